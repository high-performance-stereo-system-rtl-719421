// tb_bin_comparator: exhaustive check of a 6-bit comparator and a random
// check of the 13-bit one against the built-in relational operators.
module tb_bin_comparator;
  logic [5:0]  a6, b6;
  logic [12:0] a13, b13;
  logic gt6, lt6, gt13, lt13;
  bin_comparator #(.WIDTH(6))  dut6  (.a (a6),  .b (b6),  .gt (gt6),  .lt (lt6));
  bin_comparator #(.WIDTH(13)) dut13 (.a (a13), .b (b13), .gt (gt13), .lt (lt13));
  int checks = 0, failures = 0;
  initial begin
    a13 = '0; b13 = '0;
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++) begin
        a6 = 6'(i); b6 = 6'(j);
        #1;
        checks++;
        if (gt6 != (i > j) || lt6 != (i < j)) failures++;
      end
    for (int t = 0; t < 5000; t++) begin
      a13 = 13'($urandom);
      b13 = (t % 4 == 0) ? a13 : 13'($urandom);
      #1;
      checks++;
      if (gt13 != (a13 > b13) || lt13 != (a13 < b13)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
