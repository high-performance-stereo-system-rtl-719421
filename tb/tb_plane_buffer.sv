// tb_plane_buffer: streams numbered samples with gaps through the DSI memory
// block (plane of 4x3 = 12 samples, maximum 20) and checks after each sample
// that the taps hold the sample itself and the ones one and two planes back.
module tb_plane_buffer;
  localparam int MP = 20, P = 12;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [5:0] plane = 6'(P);
  logic [12:0] in_data = '0, t0, t1, t2;
  plane_buffer #(.MAX_PIX(MP), .DW(13)) dut (.*);
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
    for (int n = 0; n < 6 * P; n++) begin
      if ($urandom_range(0, 2) == 0) begin in_valid <= 0; @(posedge clk); end
      in_valid <= 1; in_data <= 13'(n + 7);
      @(posedge clk);
      in_valid <= 0;
      @(negedge clk);
      checks++;
      if (int'(t0) != n + 7) failures++;
      if (n >= P) begin checks++; if (int'(t1) != n - P + 7) failures++; end
      if (n >= 2 * P) begin checks++; if (int'(t2) != n - 2 * P + 7) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
