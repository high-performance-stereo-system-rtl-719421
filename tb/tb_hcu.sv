// tb_hcu: runs the high-level control unit alone (maxima 8x6, 4 levels) for
// a 7x5 frame with 3 disparity levels, with simple stand-ins for the units
// it drives: the filter returns each beat one clock later, the DSI creation
// unit takes a pixel every third clock and answers with a cost vector once
// its window is complete, the DSI memory answers reads one clock later and
// the processing unit reports done, registered, after a fixed number of
// samples. It checks the frame-buffer write addresses (0..W*H-1), the
// padded read order ((W+2) x (H+2) positions, in-image ones at y*W+x), the
// DSI write addresses, the plane-major DSI read order, the number of dummy
// samples, in_ready and frame_done.
module tb_hcu;
  import stereo_pkg::*;
  localparam int MW = 8, MH = 6, D = 4, W = 7, H = 5, DR = 3, P = W * H;
  localparam int AW = $clog2(MW * MH), DW = $clog2(D);
  localparam int PU_EXTRA = 9;   // dummy samples the stand-in wants
  logic clk = 0, rst_n = 0;
  cfg_t cfg_in, cfg;
  logic busy, frame_start, frame_done, in_valid, in_ready;
  logic ppu_valid, ppu_first, ppu_last, ppu_out_valid;
  logic fb_wr_en, fb_rd_en, cu_in_valid, cu_in_ready, cu_out_valid;
  logic dsi_wr_en, dsi_rd_en, dsi_rd_valid, pu_in_valid, pu_done;
  logic [AW-1:0] fb_wr_addr, fb_rd_addr, dsi_wr_addr, dsi_rd_addr;
  logic [DW-1:0] dsi_rd_d;
  hcu #(.MAX_W(MW), .MAX_H(MH), .D(D), .WIN(5)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stand-ins
  logic [1:0] cu_busy;
  int cu_taken, pu_seen;
  logic ppu_primed;
  assign cu_in_ready = (cu_busy == 0);
  always_ff @(posedge clk) begin
    if (!rst_n || frame_start) begin
      ppu_out_valid <= 0; ppu_primed <= 0; cu_busy <= 0; cu_out_valid <= 0; cu_taken <= 0;
      dsi_rd_valid <= 0; pu_seen <= 0; pu_done <= 0;
    end else begin
      // the filter answers from the second beat on, one clock later
      ppu_out_valid <= ppu_valid && ppu_primed;
      if (ppu_valid) ppu_primed <= 1;
      dsi_rd_valid  <= dsi_rd_en;
      cu_out_valid  <= 0;
      if (cu_busy != 0) cu_busy <= cu_busy - 1;
      if (cu_in_valid && cu_in_ready) begin
        cu_busy <= 2;
        // window centre (x-2, y-2) of padded position (x, y)
        if (cu_taken % (W + 2) >= 2 && cu_taken / (W + 2) >= 2) cu_out_valid <= 1;
        cu_taken <= cu_taken + 1;
      end
      pu_done <= 0;
      if (pu_in_valid) begin
        pu_seen <= pu_seen + 1;
        if (pu_seen + 1 == P * DR + PU_EXTRA) pu_done <= 1;
      end
    end
  end

  int n_fbw = 0, n_fbr = 0, n_dw = 0, n_dr = 0, n_acc = 0, n_done = 0, n_pu = 0;
  always @(posedge clk) if (rst_n) begin
    if (fb_wr_en) begin
      checks++; if (int'(fb_wr_addr) != n_fbw) failures++;
      n_fbw++;
    end
    if (fb_rd_en) begin
      int x, y;
      x = n_fbr % (W + 2); y = n_fbr / (W + 2);
      if (x < W && y < H) begin checks++; if (int'(fb_rd_addr) != y * W + x) failures++; end
      n_fbr++;
    end
    if (dsi_wr_en) begin
      checks++; if (int'(dsi_wr_addr) != n_dw) failures++;
      n_dw++;
    end
    if (dsi_rd_en) begin
      checks += 2;
      if (int'(dsi_rd_addr) != n_dr % P) failures++;
      if (int'(dsi_rd_d) != n_dr / P) failures++;
      n_dr++;
    end
    if (pu_in_valid) n_pu++;
    if (in_valid && in_ready) n_acc++;
    if (frame_done) n_done++;
  end

  initial begin
    cfg_in = '{w: 16'(W), h: 16'(H), drange: 8'(DR)};
    in_valid = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    in_valid <= 1;
    while (n_acc < P) @(posedge clk);
    in_valid <= 0;
    while (n_done == 0) @(posedge clk);
    repeat (3) @(posedge clk);
    checks += 7;
    if (n_fbw != P) begin failures++; $display("fb writes %0d", n_fbw); end
    if (n_fbr != (W + 2) * (H + 2)) begin failures++; $display("fb reads %0d", n_fbr); end
    if (n_dw != P) begin failures++; $display("dsi writes %0d", n_dw); end
    if (n_dr != P * DR) begin failures++; $display("dsi reads %0d", n_dr); end
    // one more dummy sample passes while done travels back to the controller
    if (n_pu != P * DR + PU_EXTRA + 1) begin failures++; $display("pu samples %0d", n_pu); end
    if (n_done != 1) failures++;
    if (busy) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
