// tb_ppu: streams a random 10x4 stereo pair (plus a flush beat) through the
// pre-processing unit and checks both filtered images against the reference
// weighted mean filter of stereo_ref_pkg, component by component, and that
// the unit keeps one pixel per clock.
module tb_ppu;
  import stereo_pkg::*;
  import stereo_ref_pkg::*;
  localparam int W = 10, H = 4;
  logic clk = 0, rst_n = 0, start = 0, in_valid = 0, in_first = 0, in_last = 0;
  rgb_t in_l = '0, in_r = '0, out_l, out_r;
  logic out_valid;
  ppu dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int l[], r[], fl[], fr[];
  int nout = 0, first_cyc = -1, last_cyc = 0, cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid) begin
      checks += 2;
      if (int'(out_l) != fl[nout]) failures++;
      if (int'(out_r) != fr[nout]) failures++;
      if (first_cyc < 0) first_cyc = cyc;
      last_cyc = cyc;
      nout++;
    end
  end
  initial begin
    l = new[W*H]; r = new[W*H];
    for (int i = 0; i < W * H; i++) begin
      l[i] = $urandom & 24'hffffff;
      r[i] = $urandom & 24'hffffff;
    end
    wmean(l, W, H, fl);
    wmean(r, W, H, fr);
    repeat (2) @(posedge clk);
    rst_n <= 1; start <= 1;
    @(posedge clk);
    start <= 0;
    for (int i = 0; i <= W * H; i++) begin
      in_valid <= 1;
      in_l <= (i < W * H) ? rgb_t'(l[i]) : '0;
      in_r <= (i < W * H) ? rgb_t'(r[i]) : '0;
      in_first <= (i % W == 0);
      in_last  <= (i % W == W - 1);
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (4) @(posedge clk);
    checks += 2;
    if (nout != W * H) failures++;
    if (last_cyc - first_cyc != W * H - 1) failures++;   // one pixel per clock
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
