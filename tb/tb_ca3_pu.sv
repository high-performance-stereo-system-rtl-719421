// tb_ca3_pu: streams a random 11x9 DSI of 3 planes (costs from a small set
// so the neighbourhood mode occurs several times) through CA 3 with idle
// gaps, then dummy costs, and checks the output against the reference 5x5
// rule (stereo_ref_pkg::rule3), counting the 0.4, 1.2 and unchanged
// outcomes; each must occur. Latency: output n appears two clocks after
// input n+2W+2.
module tb_ca3_pu;
  import stereo_pkg::*;
  import stereo_ref_pkg::*;
  localparam int MW = 12, MH = 10, W = 11, H = 9, DR = 3;
  localparam int KA = 102;
  localparam int N = W * H * DR, LAT = 2 * W + 2;
  logic clk = 0, rst_n = 0, start = 0, in_valid = 0, out_valid;
  cfg_t cfg;
  cost_t in_cost = '0, out_cost;
  ca3_pu #(.MAX_W(MW), .MAX_H(MH)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int a[], e[];
  int in_cyc[$];
  int nout = 0, cyc = 0, lat_bad = 0;
  int n_a = 0, n_b = 0, n_same = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid) in_cyc.push_back(cyc);
    if (rst_n && out_valid && nout < N) begin
      checks++;
      if (int'(out_cost) != e[nout]) begin
        failures++;
        if (failures < 6) $display("out %0d: got %0d expected %0d", nout, out_cost, e[nout]);
      end
      if (cyc != in_cyc[nout + LAT] + 2) lat_bad++;
      if (e[nout] == a[nout]) n_same++;
      else if (KA == 0 || e[nout] == q8(a[nout], KA)) n_a++;
      else n_b++;
      nout++;
    end
  end
  initial begin
    a = new[N];
    for (int i = 0; i < N; i++)
      a[i] = $urandom_range(0, 5) * 700 + (($urandom_range(0, 3) == 0) ? $urandom_range(0, 90) : 0);
    rule3(a, W, H, DR, e);
    cfg = '{w: 16'(W), h: 16'(H), drange: 8'(DR)};
    repeat (2) @(posedge clk);
    rst_n <= 1; start <= 1;
    @(posedge clk);
    start <= 0;
    for (int i = 0; nout < N; i++) begin
      if (i < N && $urandom_range(0, 4) == 0) begin in_valid <= 0; @(posedge clk); end
      in_valid <= 1;
      in_cost <= (i < N) ? cost_t'(a[i]) : '0;
      @(posedge clk);
    end
    in_valid <= 0;
    checks += 4;
    if (lat_bad != 0) begin failures++; $display("latency wrong %0d times", lat_bad); end
    $display("outcomes: first=%0d second=%0d unchanged=%0d", n_a, n_b, n_same);
    if (n_a == 0) failures++;
    if (n_same == 0) failures++;
    if (n_b == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
