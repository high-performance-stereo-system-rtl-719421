// stereo_top: real-time dense stereo disparity system. A rectified colour
// stereo pair enters in raster order; the system smooths it (ppu), stores it
// (frame_buffer), builds the disparity space image with 5x5 SAD matching
// costs for every disparity (dsi_cu, dsi_mem), refines the DSI with three
// cellular-automaton rules and picks the lowest-cost disparity per pixel
// (dsi_pu). The disparity map leaves in raster order on out_valid/out_disp;
// done pulses at the end of the frame. The high-level control unit (hcu)
// sequences the phases and holds the run-time configuration cfg (image width
// and height up to MAX_W x MAX_H, disparity range up to D), sampled when the
// first pixel of a frame is offered.
//
// Timing per frame: W*H clocks to load, 3 clocks per pixel of the padded
// image (W+2)*(H+2) for DSI creation, and W*H*drange + W*H + about 3W
// clocks for DSI processing. A new frame is accepted once busy is low.
module stereo_top
  import stereo_pkg::*;
#(
  parameter int unsigned MAX_W = 640,
  parameter int unsigned MAX_H = 480,
  parameter int unsigned D     = 70,
  parameter int unsigned WIN   = 5,
  localparam int unsigned AW = $clog2(MAX_W * MAX_H),
  localparam int unsigned DW = (D > 1) ? $clog2(D) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  cfg_t          cfg,
  input  logic          in_valid,
  output logic          in_ready,
  input  rgb_t          in_l,
  input  rgb_t          in_r,
  output logic          out_valid,
  output logic [DW-1:0] out_disp,
  output logic          done,
  output logic          busy
);

  cfg_t          cfg_q;
  logic          frame_start;
  logic          ppu_valid, ppu_first, ppu_last, ppu_out_valid;
  rgb_t          ppu_l, ppu_r;
  logic          fb_wr_en, fb_rd_en;
  logic [AW-1:0] fb_wr_addr, fb_rd_addr;
  rgb_t          fb_l, fb_r;
  logic          cu_in_valid, cu_in_ready, cu_out_valid;
  cost_t         cu_cost [D];
  logic          dsi_wr_en, dsi_rd_en, dsi_rd_valid;
  logic [AW-1:0] dsi_wr_addr, dsi_rd_addr;
  logic [DW-1:0] dsi_rd_d;
  cost_t         dsi_cost, pu_cost;
  logic          pu_in_valid, pu_done;

  hcu #(.MAX_W(MAX_W), .MAX_H(MAX_H), .D(D), .WIN(WIN)) u_hcu (
    .clk, .rst_n, .cfg_in (cfg), .cfg (cfg_q), .busy, .frame_start,
    .frame_done (done),
    .in_valid, .in_ready, .ppu_valid, .ppu_first, .ppu_last, .ppu_out_valid,
    .fb_wr_en, .fb_wr_addr, .fb_rd_en, .fb_rd_addr,
    .cu_in_valid, .cu_in_ready, .cu_out_valid, .dsi_wr_en, .dsi_wr_addr,
    .dsi_rd_en, .dsi_rd_addr, .dsi_rd_d, .dsi_rd_valid, .pu_in_valid,
    .pu_done);

  ppu u_ppu (
    .clk, .rst_n, .start (frame_start), .in_valid (ppu_valid), .in_l, .in_r,
    .in_first (ppu_first), .in_last (ppu_last),
    .out_valid (ppu_out_valid), .out_l (ppu_l), .out_r (ppu_r));

  frame_buffer #(.MAX_W(MAX_W), .MAX_H(MAX_H)) u_fb (
    .clk, .rst_n, .wr_en (fb_wr_en), .wr_addr (fb_wr_addr), .wr_l (ppu_l),
    .wr_r (ppu_r), .rd_en (fb_rd_en), .rd_addr (fb_rd_addr),
    .rd_valid (), .rd_l (fb_l), .rd_r (fb_r));

  dsi_cu #(.MAX_W(MAX_W), .MAX_H(MAX_H), .WIN(WIN), .D(D)) u_cu (
    .clk, .rst_n, .start (frame_start), .cfg (cfg_q),
    .in_valid (cu_in_valid), .in_ready (cu_in_ready), .in_l (fb_l),
    .in_r (fb_r), .out_valid (cu_out_valid), .out_cost (cu_cost));

  dsi_mem #(.MAX_PIX(MAX_W * MAX_H), .D(D)) u_dsi (
    .clk, .rst_n, .wr_en (dsi_wr_en), .wr_addr (dsi_wr_addr),
    .wr_cost (cu_cost), .rd_en (dsi_rd_en), .rd_addr (dsi_rd_addr),
    .rd_d (dsi_rd_d), .rd_valid (dsi_rd_valid), .rd_cost (dsi_cost));

  // dummy costs after the last plane flush the refinement pipeline
  assign pu_cost = dsi_rd_valid ? dsi_cost : '0;

  dsi_pu #(.MAX_W(MAX_W), .MAX_H(MAX_H), .D(D)) u_pu (
    .clk, .rst_n, .start (frame_start), .cfg (cfg_q),
    .in_valid (pu_in_valid), .in_cost (pu_cost),
    .out_valid, .out_disp, .done (pu_done));

endmodule
