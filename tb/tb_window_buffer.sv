// tb_window_buffer: streams numbered samples, with gaps, into a 3x3 and a
// 5x5 window buffer (maximum width 16, run-time width 11) and checks after
// every sample that each window register holds the sample (K-1-r)*W+(K-1-c)
// positions back.
module tb_window_buffer;
  localparam int MW = 16, W = 11;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [15:0] cfg_w = 16'(W);
  logic [12:0] in_data = '0;
  logic [12:0] win3 [3][3];
  logic [12:0] win5 [5][5];
  window_buffer #(.MAX_W(MW), .K(3), .DW(13)) dut3 (.clk, .rst_n, .cfg_w, .in_valid, .in_data, .win (win3));
  window_buffer #(.MAX_W(MW), .K(5), .DW(13)) dut5 (.clk, .rst_n, .cfg_w, .in_valid, .in_data, .win (win5));
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 8 * W; n++) begin
      if ($urandom_range(0, 3) == 0) begin in_valid <= 0; @(posedge clk); end
      in_valid <= 1; in_data <= 13'(n + 100);
      @(posedge clk);
      in_valid <= 0;
      @(negedge clk);
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++) begin
          int back;
          back = (2 - r) * W + (2 - c);
          if (n >= back) begin
            checks++;
            if (int'(win3[r][c]) != n - back + 100) failures++;
          end
        end
      for (int r = 0; r < 5; r++)
        for (int c = 0; c < 5; c++) begin
          int back;
          back = (4 - r) * W + (4 - c);
          if (n >= back) begin
            checks++;
            if (int'(win5[r][c]) != n - back + 100) failures++;
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
