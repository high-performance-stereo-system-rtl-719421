// tb_wmean_filter: drives three rows of random samples (width 9) plus one
// flush beat through the weighted mean filter, with idle gaps, and checks
// every output against (f(x-1) + 2 f(x) + f(x+1)) / 4, row ends unchanged.
// It also checks that each filtered sample appears one clock after the beat
// that follows it (one sample of latency).
module tb_wmean_filter;
  import stereo_pkg::*;
  localparam int W = 9, H = 3;
  logic clk = 0, rst_n = 0, start = 0, in_valid = 0, in_first = 0, in_last = 0;
  comp_t in_pix = '0, out_pix;
  logic out_valid;
  wmean_filter dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int img [W*H];
  int exp_q[$];
  int nout = 0;
  int beat_cyc[$];
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid) begin
      checks++;
      if (int'(out_pix) != exp_q[nout]) begin
        failures++;
        $display("sample %0d: got %0d expected %0d", nout, out_pix, exp_q[nout]);
      end
      // the output for sample n is registered at the edge that takes
      // sample n+1 (beat_cyc holds the count before that edge)
      checks++;
      if (cyc != beat_cyc[nout+1] + 2) failures++;
      nout++;
    end
  end
  initial begin
    for (int i = 0; i < W * H; i++) img[i] = $urandom_range(0, 255);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        if (x == 0 || x == W - 1) exp_q.push_back(img[y*W+x]);
        else exp_q.push_back((img[y*W+x-1] + 2 * img[y*W+x] + img[y*W+x+1]) / 4);
    repeat (2) @(posedge clk);
    rst_n <= 1;
    start <= 1;
    @(posedge clk);
    start <= 0;
    for (int i = 0; i <= W * H; i++) begin
      if ($urandom_range(0, 3) == 0) begin
        in_valid <= 0;
        @(posedge clk);
      end
      in_valid <= 1;
      in_pix   <= (i < W * H) ? comp_t'(img[i]) : comp_t'(0);
      in_first <= (i % W == 0);
      in_last  <= (i % W == W - 1);
      beat_cyc.push_back(cyc);
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (5) @(posedge clk);
    checks++;
    if (nout != W * H) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
