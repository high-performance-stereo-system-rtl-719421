// tb_stereo_top: end-to-end test of the stereo system at reduced maxima
// (16x12 pixels, 8 disparities). Two frames are run back to back with
// different run-time configurations (full 16x12 with 8 disparities, then
// 12x10 with 5 on a banded test pattern), so the disparity-range and image-size selection is
// exercised. Every output disparity is compared with the behavioural
// reference (stereo_ref_pkg). The test also checks that the map leaves at
// one disparity per clock, that the processing phase takes W*H*drange plus
// one plane plus the pipeline fill, and counts how often each mechanism
// fires: the DSI creation unit stalling its source while it multiplexes the
// colour components, the CA 1 mean and its boundary pass-through, the CA 2
// 0.8 and 0.6 replacements, the CA 3 0.4 and 1.2 replacements and the
// accumulator changing its winner. A mechanism that never fires is a
// failure.
module tb_stereo_top;
  import stereo_pkg::*;
  import stereo_ref_pkg::*;

  localparam int MW = 16, MH = 12, MD = 8;
  localparam int DW = $clog2(MD);

  logic clk = 0, rst_n = 0;
  cfg_t cfg;
  logic in_valid, in_ready, out_valid, done, busy;
  rgb_t in_l, in_r;
  logic [DW-1:0] out_disp;

  stereo_top #(.MAX_W(MW), .MAX_H(MH), .D(MD)) dut (
    .clk, .rst_n, .cfg, .in_valid, .in_ready, .in_l, .in_r,
    .out_valid, .out_disp, .done, .busy);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_stall = 0, n_ca1_mean = 0, n_ca1_bnd = 0, n_08 = 0, n_06 = 0;
  int n_04 = 0, n_12 = 0, n_upd = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_hcu.pending && !dut.cu_in_ready) n_stall++;
    if (dut.u_pu.u_ca1.win_valid) begin
      if (dut.u_pu.u_ca1.border) n_ca1_bnd++; else n_ca1_mean++;
    end
    if (dut.u_pu.u_ca2.tap_valid && !dut.u_pu.u_ca2.border) begin
      if (dut.u_pu.u_ca2.hit_gt) n_08++;
      else if (dut.u_pu.u_ca2.hit_lt) n_06++;
    end
    if (dut.u_pu.u_ca3.win_valid && !dut.u_pu.u_ca3.border) begin
      if (dut.u_pu.u_ca3.k_cnt >= dut.u_pu.u_ca3.mode_frq) n_04++;
      else if (dut.u_pu.u_ca3.p_cnt >= dut.u_pu.u_ca3.mode_frq) n_12++;
    end
    if (dut.u_pu.u_acc.s1_valid && dut.u_pu.u_acc.s1_d != 0 &&
        dut.u_pu.u_acc.s1_cost < dut.u_pu.u_acc.rd_q.cost) n_upd++;
  end

  task automatic run_frame(input int w, input int h, input int dr, input int seed,
                         input bit bands);
    int l[], r[], fl[], fr[], dsi[], a1[], a2[], a3[], exp_d[];
    int got[$];
    int t_pu0, t_done, last_out, n_gap;
    l = new[1]; r = new[1]; fl = new[1]; fr = new[1];
    dsi = new[1]; a1 = new[1]; a2 = new[1]; a3 = new[1]; exp_d = new[1];
    make_pair(w, h, dr, seed, bands, l, r);
    wmean(l, w, h, fl);
    wmean(r, w, h, fr);
    build_dsi(fl, fr, w, h, dr, dsi);
    rule1(dsi, w, h, dr, a1);
    rule2(a1, w, h, dr, a2);
    rule3(a2, w, h, dr, a3);
    wta(a3, w, h, dr, exp_d);

    cfg = '{w: 16'(w), h: 16'(h), drange: 8'(dr)};
    t_pu0 = -1; t_done = -1; last_out = -1; n_gap = 0;
    fork
      begin : feed
        int i;
        i = 0;
        while (i < w * h) begin
          in_valid <= 1'b1;
          in_l <= rgb_t'(l[i]);
          in_r <= rgb_t'(r[i]);
          @(posedge clk);
          if (in_ready) i++;
        end
        in_valid <= 1'b0;
      end
      begin : watch
        while (t_done < 0) begin
          @(posedge clk);
          if (dut.dsi_rd_en && t_pu0 < 0) t_pu0 = cyc;
          if (out_valid) begin
            if (last_out >= 0 && cyc != last_out + 1) n_gap++;
            last_out = cyc;
            got.push_back(int'(out_disp));
          end
          if (done) t_done = cyc;
        end
      end
    join

    checks++;
    if (got.size() != w * h) begin
      failures++;
      $display("frame %0dx%0d/%0d: %0d disparities, expected %0d", w, h, dr, got.size(), w * h);
    end
    for (int i = 0; i < w * h && i < got.size(); i++) begin
      checks++;
      if (got[i] != exp_d[i]) begin
        failures++;
        if (failures < 10) $display("pixel %0d: got %0d expected %0d", i, got[i], exp_d[i]);
      end
    end
    // one disparity per clock
    checks++;
    if (n_gap != 0) begin failures++; $display("output stream had %0d gaps", n_gap); end
    // processing phase length: drange planes, one plane of CA 2 delay, the
    // CA 1 and CA 3 window delays (3W+3) and the register stages
    checks++;
    if (t_done - t_pu0 < w*h*dr + w*h + 3*w || t_done - t_pu0 > w*h*dr + w*h + 3*w + 12) begin
      failures++;
      $display("processing took %0d cycles, expected about %0d", t_done - t_pu0, w*h*dr + w*h + 3*w);
    end
    $display("frame %0dx%0d drange %0d: processing %0d cycles", w, h, dr, t_done - t_pu0);
    @(posedge clk);
  endtask

  initial begin
    in_valid = 0; in_l = '0; in_r = '0;
    cfg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    run_frame(16, 12, 8, 7, 1'b0);
    run_frame(12, 10, 5, 34, 1'b1);  // seed gives a 0.6 replacement
    begin
      string nm[8];
      int    ct[8];
      nm = '{"cu_stall", "ca1_mean", "ca1_boundary", "ca2_x0.8", "ca2_x0.6",
             "ca3_x0.4", "ca3_x1.2", "acc_update"};
      ct = '{n_stall, n_ca1_mean, n_ca1_bnd, n_08, n_06, n_04, n_12, n_upd};
      for (int i = 0; i < 8; i++) begin
        checks++;
        $display("mechanism %-12s : %0d", nm[i], ct[i]);
        if (ct[i] == 0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
