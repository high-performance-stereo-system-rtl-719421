// tb_stereo_workloads: runs stereo_top at its default size through the
// image sizes and disparity ranges of the standard Middlebury test pairs,
// one frame each, back to back: 384x288 with 16 levels (Tsukuba), 434x380
// with 20 (Sawtooth), 284x216 with 30 (Map) and 450x375 with 65 (Cones and
// Teddy share this size). The real images are replaced by generated ones: a
// random colour left image and a right image shifted by a disparity that is
// constant over bands of 48 rows. Per frame it checks the number of
// disparities, that they leave at one per clock, the processing-phase
// length (W*H*drange + W*H + 3W clocks plus the register stages), that at
// least 99% of the band-interior pixels with a visible match get the band's
// shift, and that 12 scattered pixels equal the behavioural reference
// chain (filter, SAD, the three refinement rules, argmin) evaluated on
// their neighbourhood.
module tb_stereo_workloads;
  import stereo_pkg::*;
  import stereo_ref_pkg::*;

  localparam int NF = 4;
  localparam int FW [NF] = '{384, 434, 284, 450};
  localparam int FH [NF] = '{288, 380, 216, 375};
  localparam int FD [NF] = '{16, 20, 30, 65};

  logic clk = 0, rst_n = 0;
  cfg_t cfg;
  logic in_valid = 0, in_ready, out_valid, done, busy;
  rgb_t in_l = '0, in_r = '0;
  logic [6:0] out_disp;

  stereo_top dut (
    .clk, .rst_n, .cfg, .in_valid, .in_ready, .in_l, .in_r,
    .out_valid, .out_disp, .done, .busy);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (25_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int band_shift(int y, int dr);
    return 1 + ((y / 48) * 7) % (dr - 2);
  endfunction

  // reference disparity of pixel (x,y), x and y at least 4 from the border
  function automatic int ref_disp(input int fl[], input int fr[], input int w, input int h,
                                  input int dr, input int x, input int y);
    int sub[], a1[], a2[], a3[];
    int best, bd;
    sub = new[7 * 7 * dr];
    for (int d = 0; d < dr; d++)
      for (int n = 0; n < 7; n++)
        for (int m = 0; m < 7; m++)
          sub[(d*7+n)*7+m] = sad(fl, fr, w, h, x + m - 3, y + n - 3, d);
    a1 = new[1]; a2 = new[1]; a3 = new[1];
    rule1(sub, 7, 7, dr, a1);
    rule2(a1, 7, 7, dr, a2);
    rule3(a2, 7, 7, dr, a3);
    best = a3[3*7+3]; bd = 0;
    for (int d = 1; d < dr; d++)
      if (a3[(d*7+3)*7+3] < best) begin best = a3[(d*7+3)*7+3]; bd = d; end
    return bd;
  endfunction

  task automatic run_frame(input int w, input int h, input int dr);
    int l[], r[], fl[], fr[], got[];
    int nout, t_pu0, t_done, last_out, n_gap, n_band, n_band_ok, n_ref_bad;
    l = new[w*h]; r = new[w*h]; got = new[w*h];
    for (int i = 0; i < w * h; i++) l[i] = $urandom & 24'hffffff;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++)
        r[y*w+x] = (x + band_shift(y, dr) < w) ? l[y*w+x+band_shift(y, dr)]
                                               : ($urandom & 24'hffffff);
    fl = new[1]; fr = new[1];
    wmean(l, w, h, fl);
    wmean(r, w, h, fr);

    while (busy) @(posedge clk);
    cfg <= '{w: 16'(w), h: 16'(h), drange: 8'(dr)};
    nout = 0; t_pu0 = -1; t_done = -1; last_out = -1; n_gap = 0;
    fork
      begin
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
      begin
        while (t_done < 0) begin
          @(posedge clk);
          if (dut.dsi_rd_en && t_pu0 < 0) t_pu0 = cyc;
          if (out_valid) begin
            if (last_out >= 0 && cyc != last_out + 1) n_gap++;
            last_out = cyc;
            if (nout < w * h) got[nout] = int'(out_disp);
            nout++;
          end
          if (done) t_done = cyc;
        end
      end
    join

    checks += 3;
    if (nout != w * h) begin failures++; $display("%0d disparities", nout); end
    if (n_gap != 0) begin failures++; $display("%0d gaps", n_gap); end
    if (t_done - t_pu0 < w*h*dr + w*h + 3*w || t_done - t_pu0 > w*h*dr + w*h + 3*w + 12) begin
      failures++;
      $display("processing took %0d cycles", t_done - t_pu0);
    end

    n_band = 0; n_band_ok = 0;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w - 8; x++)
        if (y % 48 >= 5 && y % 48 < 43 && y < h - 5 && x >= band_shift(y, dr) + 8) begin
          n_band++;
          if (got[y*w+x] == band_shift(y, dr)) n_band_ok++;
        end
    checks++;
    if (n_band_ok * 100 < n_band * 99) failures++;

    n_ref_bad = 0;
    for (int k = 0; k < 12; k++) begin
      int x, y, e;
      x = 4 + (k * 151) % (w - 8);
      y = 4 + (k * 97) % (h - 8);
      e = ref_disp(fl, fr, w, h, dr, x, y);
      checks++;
      if (got[y*w+x] != e) begin
        failures++;
        n_ref_bad++;
        $display("pixel (%0d,%0d): got %0d expected %0d", x, y, got[y*w+x], e);
      end
    end
    $display("%0dx%0d, %0d levels: processing %0d cycles, band interior %0d of %0d, reference mismatches %0d",
             w, h, dr, t_done - t_pu0, n_band_ok, n_band, n_ref_bad);
  endtask

  initial begin
    cfg = '{w: 16'(FW[0]), h: 16'(FH[0]), drange: 8'(FD[0])};
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int f = 0; f < NF; f++) run_frame(FW[f], FH[f], FD[f]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
