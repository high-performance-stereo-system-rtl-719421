// tb_dsi_mem: writes random cost vectors (8 disparities) for a 6x5 image,
// then reads them plane by plane as the processing unit does, one read per
// clock, and checks every cost and the one-clock read latency.
module tb_dsi_mem;
  import stereo_pkg::*;
  localparam int P = 30, D = 8, AW = $clog2(P), DW = $clog2(D);
  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0, rd_valid;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [DW-1:0] rd_d = '0;
  cost_t wr_cost [D];
  cost_t rd_cost;
  dsi_mem #(.MAX_PIX(P), .D(D)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int m [P][D];
  int exp_q[$];
  always @(posedge clk) if (rst_n && rd_valid) begin
    checks++;
    if (int'(rd_cost) != exp_q.pop_front()) failures++;
  end
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int p = 0; p < P; p++) begin
      for (int d = 0; d < D; d++) begin
        m[p][d] = $urandom_range(0, 8191);
        wr_cost[d] <= cost_t'(m[p][d]);
      end
      wr_en <= 1; wr_addr <= AW'(p);
      @(posedge clk);
    end
    wr_en <= 0;
    for (int d = 0; d < D; d++)
      for (int p = 0; p < P; p++) begin
        rd_en <= 1; rd_addr <= AW'(p); rd_d <= DW'(d);
        exp_q.push_back(m[p][d]);
        @(posedge clk);
      end
    rd_en <= 0;
    repeat (3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
