// tb_rcu: checks both replacement control units of the disparity-axis rule
// (greater-than and less-than variants) on random and on boundary cases
// (a neighbour exactly half the centre) against 2*n compared with c.
module tb_rcu;
  import stereo_pkg::*;
  cost_t c, n0, n1;
  logic hit_gt, hit_lt;
  rcu #(.LESS(1'b0)) dut_gt (.center (c), .n0, .n1, .hit (hit_gt));
  rcu #(.LESS(1'b1)) dut_lt (.center (c), .n0, .n1, .hit (hit_lt));
  int checks = 0, failures = 0;
  initial begin
    for (int t = 0; t < 5000; t++) begin
      c  = cost_t'($urandom);
      n0 = (t % 5 == 0) ? cost_t'(c >> 1) : cost_t'($urandom_range(0, 8191) >> $urandom_range(0, 4));
      n1 = (t % 7 == 0) ? cost_t'(c >> 1) : cost_t'($urandom_range(0, 8191) >> $urandom_range(0, 4));
      #1;
      checks += 2;
      if (hit_gt != (2 * int'(n0) > int'(c) || 2 * int'(n1) > int'(c))) failures++;
      if (hit_lt != (2 * int'(n0) < int'(c) || 2 * int'(n1) < int'(c))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
