// tb_similarity_acc: two frames of random costs (7x5 pixels, 6 planes, then
// 5 planes with a different start) through the similarity accumulator. It
// checks each output disparity against an argmin computed here (lowest
// disparity on ties, which the small cost range makes frequent), that the
// map is emitted during the last plane at one disparity per input, that
// done pulses once per frame and that inputs after the frame are ignored.
module tb_similarity_acc;
  import stereo_pkg::*;
  import stereo_ref_pkg::*;
  localparam int MP = 40, D = 8, DW = $clog2(D), W = 7, H = 5;
  logic clk = 0, rst_n = 0, start = 0, in_valid = 0, out_valid, done;
  cfg_t cfg;
  cost_t in_cost = '0;
  logic [DW-1:0] out_disp;
  similarity_acc #(.MAX_PIX(MP), .D(D)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int e[], a[];
  int nout = 0, ndone = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (nout >= W * H || int'(out_disp) != e[nout]) failures++;
      nout++;
    end
    if (rst_n && done) ndone++;
  end
  task automatic frame(input int dr);
    a = new[W * H * dr];
    for (int i = 0; i < W * H * dr; i++) a[i] = $urandom_range(0, 12);
    wta(a, W, H, dr, e);
    cfg = '{w: 16'(W), h: 16'(H), drange: 8'(dr)};
    nout = 0; ndone = 0;
    start <= 1;
    @(posedge clk);
    start <= 0;
    for (int i = 0; i < W * H * dr + 20; i++) begin
      if (i < W * H * dr && $urandom_range(0, 4) == 0) begin in_valid <= 0; @(posedge clk); end
      in_valid <= 1;
      in_cost <= (i < W * H * dr) ? cost_t'(a[i]) : '0;
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (3) @(posedge clk);
    checks += 2;
    if (nout != W * H) failures++;
    if (ndone != 1) failures++;
  endtask
  initial begin
    e = new[1];
    repeat (2) @(posedge clk);
    rst_n <= 1;
    frame(6);
    frame(5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
