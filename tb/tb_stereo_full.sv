// tb_stereo_full: one complete frame through stereo_top at its default
// size: a 640x480 colour pair searched over 70 disparity levels. The right
// image is the left one shifted by a disparity that is constant over bands
// of 60 rows (2, 11, 20, ... 65). The test checks that all 307200
// disparities leave at one per clock and done pulses, that the processing
// phase takes W*H*70 + W*H + 3W clocks plus the register stages, that the
// disparity equals the band's shift for the pixels well inside a band whose
// match lies inside the right image (at least 99% of them), and,
// for 40 scattered pixels, that it equals the behavioural reference chain
// (filter, SAD, the three refinement rules, argmin) evaluated on the
// neighbourhood of that pixel.
module tb_stereo_full;
  import stereo_pkg::*;
  import stereo_ref_pkg::*;

  localparam int W = 640, H = 480, DR = 70;

  logic clk = 0, rst_n = 0;
  cfg_t cfg;
  logic in_valid, in_ready, out_valid, done, busy;
  rgb_t in_l, in_r;
  logic [6:0] out_disp;

  stereo_top dut (
    .clk, .rst_n, .cfg, .in_valid, .in_ready, .in_l, .in_r,
    .out_valid, .out_disp, .done, .busy);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int band_shift(int y);
    return (y / 60) * 9 + 2;
  endfunction

  // reference disparity of pixel (x,y), x and y at least 4 from the border
  function automatic int ref_disp(input int fl[], input int fr[], input int x, input int y);
    int sub[], a1[], a2[], a3[];
    int best, bd;
    sub = new[7 * 7 * DR];
    for (int d = 0; d < DR; d++)
      for (int n = 0; n < 7; n++)
        for (int m = 0; m < 7; m++)
          sub[(d*7+n)*7+m] = sad(fl, fr, W, H, x + m - 3, y + n - 3, d);
    a1 = new[1]; a2 = new[1]; a3 = new[1];
    rule1(sub, 7, 7, DR, a1);
    rule2(a1, 7, 7, DR, a2);
    rule3(a2, 7, 7, DR, a3);
    best = a3[3*7+3]; bd = 0;
    for (int d = 1; d < DR; d++)
      if (a3[(d*7+3)*7+3] < best) begin best = a3[(d*7+3)*7+3]; bd = d; end
    return bd;
  endfunction

  int l[], r[], fl[], fr[];
  int got[];

  initial begin
    int nout, t_pu0, t_done, last_out, n_gap, n_band, n_band_ok;
    l = new[W*H]; r = new[W*H]; got = new[W*H];
    for (int i = 0; i < W * H; i++) l[i] = $urandom & 24'hffffff;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        r[y*W+x] = (x + band_shift(y) < W) ? l[y*W+x+band_shift(y)] : ($urandom & 24'hffffff);
    fl = new[1]; fr = new[1];
    wmean(l, W, H, fl);
    wmean(r, W, H, fr);

    in_valid = 0; in_l = '0; in_r = '0;
    cfg = '{w: 16'(W), h: 16'(H), drange: 8'(DR)};
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    nout = 0; t_pu0 = -1; t_done = -1; last_out = -1; n_gap = 0;
    fork
      begin
        int i;
        i = 0;
        while (i < W * H) begin
          in_valid <= 1'b1;
          in_l <= rgb_t'(l[i]);
          in_r <= rgb_t'(r[i]);
          @(posedge clk);
          if (in_ready) i++;
        end
        in_valid <= 1'b0;
      end
      begin
        while (t_done < 0) begin
          @(posedge clk);
          if (dut.dsi_rd_en && t_pu0 < 0) t_pu0 = cyc;
          if (out_valid) begin
            if (last_out >= 0 && cyc != last_out + 1) n_gap++;
            last_out = cyc;
            if (nout < W * H) got[nout] = int'(out_disp);
            nout++;
          end
          if (done) t_done = cyc;
        end
      end
    join
    $display("frame done at cycle %0d, processing phase %0d cycles", cyc, t_done - t_pu0);

    checks += 3;
    if (nout != W * H) begin failures++; $display("%0d disparities", nout); end
    if (n_gap != 0) begin failures++; $display("%0d gaps", n_gap); end
    if (t_done - t_pu0 < W*H*DR + W*H + 3*W || t_done - t_pu0 > W*H*DR + W*H + 3*W + 12)
      failures++;

    // ground truth inside the bands
    n_band = 0; n_band_ok = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W - 8; x++)
        if (y % 60 >= 5 && y % 60 < 55 && x >= band_shift(y) + 8) begin
          n_band++;
          if (got[y*W+x] == band_shift(y)) n_band_ok++;
        end
    $display("band interior: %0d of %0d pixels at the true disparity", n_band_ok, n_band);
    checks++;
    if (n_band_ok * 100 < n_band * 99) failures++;

    // exact reference at scattered pixels
    for (int k = 0; k < 40; k++) begin
      int x, y, e;
      x = 4 + (k * 151) % (W - 8);
      y = 4 + (k * 97) % (H - 8);
      e = ref_disp(fl, fr, x, y);
      checks++;
      if (got[y*W+x] != e) begin
        failures++;
        $display("pixel (%0d,%0d): got %0d expected %0d", x, y, got[y*W+x], e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
