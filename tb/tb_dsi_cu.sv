// tb_dsi_cu: feeds a random 11x9 colour pair, extended by two columns and
// two rows, into the DSI creation unit (maxima 12x10, 6 disparities, active
// range 5) through its ready/valid handshake and checks every cost vector
// against the reference SAD (stereo_ref_pkg::sad) in raster order of the
// window centres. It checks the three-clock-per-pixel rate of the colour
// multiplexer while the source offers data continuously.
module tb_dsi_cu;
  import stereo_pkg::*;
  import stereo_ref_pkg::*;
  localparam int MW = 12, MH = 10, D = 6, W = 11, H = 9, DR = 5;
  logic clk = 0, rst_n = 0, start = 0, in_valid = 0, in_ready, out_valid;
  cfg_t cfg;
  rgb_t in_l = '0, in_r = '0;
  cost_t out_cost [D];
  dsi_cu #(.MAX_W(MW), .MAX_H(MH), .WIN(5), .D(D)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int l[], r[];
  int nout = 0, cyc = 0, n_acc = 0, first_acc = -1, last_acc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid && in_ready) begin
      if (first_acc < 0) first_acc = cyc;
      last_acc = cyc;
      n_acc++;
    end
    if (rst_n && out_valid) begin
      for (int d = 0; d < D; d++) begin
        int e;
        e = (d < DR) ? sad(l, r, W, H, nout % W, nout / W, d) : 8191;
        checks++;
        if (int'(out_cost[d]) != e) begin
          failures++;
          if (failures < 6) $display("pix %0d d %0d got %0d exp %0d", nout, d, out_cost[d], e);
        end
      end
      nout++;
    end
  end
  initial begin
    l = new[W*H]; r = new[W*H];
    for (int i = 0; i < W * H; i++) begin
      l[i] = $urandom & 24'hffffff;
      r[i] = (i % W >= 2) ? l[i-2] ^ ($urandom & 24'h070707) : $urandom & 24'hffffff;
    end
    cfg = '{w: 16'(W), h: 16'(H), drange: 8'(DR)};
    repeat (2) @(posedge clk);
    rst_n <= 1; start <= 1;
    @(posedge clk);
    start <= 0;
    for (int y = 0; y < H + 2; y++)
      for (int x = 0; x < W + 2; x++) begin
        in_valid <= 1;
        in_l <= (x < W && y < H) ? rgb_t'(l[y*W+x]) : rgb_t'($urandom);
        in_r <= (x < W && y < H) ? rgb_t'(r[y*W+x]) : rgb_t'($urandom);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
      end
    in_valid <= 0;
    repeat (8) @(posedge clk);
    checks += 2;
    if (nout != W * H) begin failures++; $display("%0d outputs", nout); end
    if (last_acc - first_acc != 3 * (n_acc - 1)) begin
      failures++;
      $display("rate: %0d pixels in %0d clocks", n_acc, last_acc - first_acc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
