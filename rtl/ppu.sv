// ppu: pre-processing unit. The left and right RGB pixels are split into
// their six colour components, each smoothed by its own one-dimensional
// weighted mean filter, all six in parallel, so the unit takes one pixel
// pair per clock. The output stream runs one pixel behind the input (see
// wmean_filter); one extra input beat flushes the last pixel of a frame.
// The six parallel filters and the bus splitter follow the described unit.
module ppu
  import stereo_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic in_valid,
  input  rgb_t in_l,
  input  rgb_t in_r,
  input  logic in_first,
  input  logic in_last,
  output logic out_valid,
  output rgb_t out_l,
  output rgb_t out_r
);

  comp_t in_c  [6];
  comp_t out_c [6];
  logic  v     [6];

  // bus splitter
  assign in_c[0] = in_l.r;
  assign in_c[1] = in_l.g;
  assign in_c[2] = in_l.b;
  assign in_c[3] = in_r.r;
  assign in_c[4] = in_r.g;
  assign in_c[5] = in_r.b;

  for (genvar i = 0; i < 6; i++) begin : g_filt
    wmean_filter u_f (
      .clk, .rst_n, .start, .in_valid,
      .in_pix (in_c[i]),
      .in_first, .in_last,
      .out_valid (v[i]),
      .out_pix   (out_c[i])
    );
  end

  assign out_valid = v[0];
  assign out_l = '{r: out_c[0], g: out_c[1], b: out_c[2]};
  assign out_r = '{r: out_c[3], g: out_c[4], b: out_c[5]};

endmodule
