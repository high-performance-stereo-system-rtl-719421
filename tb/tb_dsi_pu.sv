// tb_dsi_pu: a DSI built by the reference SAD from a random 12x9 stereo
// pair with 6 disparity levels (maxima 14x10, 8 levels) goes through the
// DSI processing unit with idle gaps, followed by dummy costs until done.
// Every disparity is checked against the reference chain rule1, rule2,
// rule3 and argmin; the map must leave at one disparity per clock and done
// must pulse once.
module tb_dsi_pu;
  import stereo_pkg::*;
  import stereo_ref_pkg::*;
  localparam int MW = 14, MH = 10, D = 8, DW = $clog2(D), W = 12, H = 9, DR = 6;
  logic clk = 0, rst_n = 0, start = 0, in_valid = 0, out_valid, done;
  cfg_t cfg;
  cost_t in_cost = '0;
  logic [DW-1:0] out_disp;
  dsi_pu #(.MAX_W(MW), .MAX_H(MH), .D(D)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int l[], r[], dsi[], a1[], a2[], a3[], e[];
  int nout = 0, ndone = 0, cyc = 0, first = -1, last = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid) begin
      checks++;
      if (nout >= W * H || int'(out_disp) != e[nout]) failures++;
      if (first < 0) first = cyc;
      last = cyc;
      nout++;
    end
    if (rst_n && done) ndone++;
  end
  initial begin
    l = new[1]; r = new[1]; dsi = new[1]; a1 = new[1]; a2 = new[1]; a3 = new[1]; e = new[1];
    make_pair(W, H, DR, 5, 1'b0, l, r);
    build_dsi(l, r, W, H, DR, dsi);
    rule1(dsi, W, H, DR, a1);
    rule2(a1, W, H, DR, a2);
    rule3(a2, W, H, DR, a3);
    wta(a3, W, H, DR, e);
    cfg = '{w: 16'(W), h: 16'(H), drange: 8'(DR)};
    repeat (2) @(posedge clk);
    rst_n <= 1; start <= 1;
    @(posedge clk);
    start <= 0;
    for (int i = 0; ndone == 0; i++) begin
      if (i < W * H * (DR - 1) && $urandom_range(0, 4) == 0) begin in_valid <= 0; @(posedge clk); end
      in_valid <= 1;
      in_cost <= (i < W * H * DR) ? cost_t'(dsi[i]) : '0;
      @(posedge clk);
    end
    in_valid <= 0;
    checks += 3;
    if (nout != W * H) failures++;
    if (ndone != 1) failures++;
    if (last - first != W * H - 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
