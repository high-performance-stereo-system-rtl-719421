// dsi_pu: DSI processing unit. The plane-ordered DSI stream passes through
// the three cellular-automaton refinement units in turn (ca1_pu: 3x3 mean
// in the plane; ca2_pu: comparison along the disparity axis; ca3_pu: 5x5
// count against the neighbourhood mode) and then into the similarity
// accumulator, which emits the disparity map during the last plane. One
// cost per clock. Because each stage outputs a cell only once its
// neighbourhood has arrived, the source must keep in_valid high with dummy
// costs after the last real cost until done pulses (about W*H + 3W more
// samples). start clears all stages at the beginning of a frame.
module dsi_pu
  import stereo_pkg::*;
#(
  parameter int unsigned MAX_W = 640,
  parameter int unsigned MAX_H = 480,
  parameter int unsigned D     = 70,
  localparam int unsigned DW = (D > 1) ? $clog2(D) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  cfg_t          cfg,
  input  logic          in_valid,
  input  cost_t         in_cost,
  output logic          out_valid,
  output logic [DW-1:0] out_disp,
  output logic          done
);

  logic  v1, v2, v3;
  cost_t c1, c2, c3;

  ca1_pu #(.MAX_W(MAX_W), .MAX_H(MAX_H)) u_ca1 (
    .clk, .rst_n, .start, .cfg, .in_valid, .in_cost,
    .out_valid (v1), .out_cost (c1));

  ca2_pu #(.MAX_PIX(MAX_W * MAX_H)) u_ca2 (
    .clk, .rst_n, .start, .cfg, .in_valid (v1), .in_cost (c1),
    .out_valid (v2), .out_cost (c2));

  ca3_pu #(.MAX_W(MAX_W), .MAX_H(MAX_H)) u_ca3 (
    .clk, .rst_n, .start, .cfg, .in_valid (v2), .in_cost (c2),
    .out_valid (v3), .out_cost (c3));

  similarity_acc #(.MAX_PIX(MAX_W * MAX_H), .D(D)) u_acc (
    .clk, .rst_n, .start, .cfg, .in_valid (v3), .in_cost (c3),
    .out_valid, .out_disp, .done);

endmodule
