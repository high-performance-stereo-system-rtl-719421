// tb_frame_buffer: fills a 12x8 frame buffer with random pixel pairs, reads
// every address back in a shuffled order and checks data and the one-clock
// read latency.
module tb_frame_buffer;
  import stereo_pkg::*;
  localparam int MW = 12, MH = 8, N = MW * MH, AW = $clog2(N);
  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0, rd_valid;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  rgb_t wr_l = '0, wr_r = '0, rd_l, rd_r;
  frame_buffer #(.MAX_W(MW), .MAX_H(MH)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int ml[N], mr[N];
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < N; i++) begin
      ml[i] = $urandom & 24'hffffff;
      mr[i] = $urandom & 24'hffffff;
      wr_en <= 1; wr_addr <= AW'(i); wr_l <= rgb_t'(ml[i]); wr_r <= rgb_t'(mr[i]);
      @(posedge clk);
    end
    wr_en <= 0;
    for (int k = 0; k < N; k++) begin
      int a;
      a = (k * 37) % N;
      rd_en <= 1; rd_addr <= AW'(a);
      @(posedge clk);
      rd_en <= 0;
      @(negedge clk);
      checks += 3;
      if (!rd_valid) failures++;
      if (int'(rd_l) != ml[a]) failures++;
      if (int'(rd_r) != mr[a]) failures++;
      @(negedge clk);
      checks++;
      if (rd_valid) failures++;   // valid lasts one clock per read
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
