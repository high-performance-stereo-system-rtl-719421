// sad_unit: absolute-difference and sum-of-absolute-differences stage for one
// colour component, for all D disparities of one pixel at once.
//
// The left window and the right columns are given by row (0 = top) and by
// age (0 = newest, rightmost column). For disparity d the left column of age
// j is paired with the right column of age j+d, i.e. the right pixel d
// columns further left, as in SAD(i,j,d) = sum |Il(i+u,j+v) - Ir(i+u,j+v-d)|.
// D absolute-difference modules work in parallel and each feeds an adder
// tree. Pixels outside the image (row_ok, lcol_ok, rcol_ok low) are left out
// of the sum; this border handling, and forcing disparities at or above the
// active range to the maximum cost, are this design's choices. Purely
// combinational.
module sad_unit
  import stereo_pkg::*;
#(
  parameter int unsigned WIN = 5,
  parameter int unsigned D   = 70,
  localparam int unsigned NCOL = D + WIN - 1
) (
  input  comp_t       lwin    [WIN][WIN],
  input  comp_t       rwin    [WIN][NCOL],
  input  logic        row_ok  [WIN],
  input  logic        lcol_ok [WIN],
  input  logic        rcol_ok [NCOL],
  input  logic [7:0]  drange,
  output cost_t       sad     [D]
);

  // absolute difference of two components
  function automatic comp_t absdiff(comp_t a, comp_t b);
    return (a > b) ? comp_t'(a - b) : comp_t'(b - a);
  endfunction

  always_comb begin
    for (int d = 0; d < D; d++) begin
      cost_t acc;
      acc = '0;
      for (int v = 0; v < WIN; v++)
        for (int j = 0; j < WIN; j++)
          if (row_ok[v] && lcol_ok[j] && rcol_ok[j+d])
            acc = acc + cost_t'(absdiff(lwin[v][j], rwin[v][j+d]));
      sad[d] = (d < int'(drange)) ? acc : COST_MAX;
    end
  end

endmodule
