// rcu: replacement control unit of the second refinement rule. Two binary
// comparators compare each neighbour along the disparity axis (d-1, d+1)
// with half the centre cost, and an OR combines them:
//   LESS = 0: hit = (n0 > c/2) | (n1 > c/2)
//   LESS = 1: hit = (n0 < c/2) | (n1 < c/2)
// Half the centre is compared exactly by comparing 2*n with c, one bit
// wider. Combinational.
module rcu
  import stereo_pkg::*;
#(
  parameter int unsigned WIDTH = COST_W,
  parameter bit          LESS  = 1'b0
) (
  input  logic [WIDTH-1:0] center,
  input  logic [WIDTH-1:0] n0,
  input  logic [WIDTH-1:0] n1,
  output logic             hit
);

  logic gt0, lt0, gt1, lt1;

  bin_comparator #(.WIDTH(WIDTH + 1)) u_c0 (
    .a ({n0, 1'b0}), .b ({1'b0, center}), .gt (gt0), .lt (lt0));
  bin_comparator #(.WIDTH(WIDTH + 1)) u_c1 (
    .a ({n1, 1'b0}), .b ({1'b0, center}), .gt (gt1), .lt (lt1));

  assign hit = LESS ? (lt0 | lt1) : (gt0 | gt1);

endmodule
