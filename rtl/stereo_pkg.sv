// stereo_pkg: types and constants shared by the stereo disparity pipeline.
//
// Pixels are 24-bit RGB (8 bits per component). Matching costs (SAD values
// and refined DSI values) are 13 bits wide, enough for a 5x5 window of 8-bit
// absolute differences (25*255 = 6375). The run-time configuration bundles
// the image size and the active disparity range, which the user may set per
// frame up to the maxima fixed at elaboration. The cellular-automaton scale
// factors 0.8, 0.6, 0.4 and 1.2 are held as Q8 fixed-point constants; the
// exact fixed-point form is this design's choice.
package stereo_pkg;

  localparam int unsigned PIX_W  = 8;
  localparam int unsigned COST_W = 13;

  typedef logic [PIX_W-1:0]  comp_t;
  typedef logic [COST_W-1:0] cost_t;

  typedef struct packed {
    comp_t r;
    comp_t g;
    comp_t b;
  } rgb_t;

  // Run-time configuration: image width and height in pixels and the number
  // of disparity levels searched (0 .. drange-1).
  typedef struct packed {
    logic [15:0] w;
    logic [15:0] h;
    logic [7:0]  drange;
  } cfg_t;

  localparam cost_t COST_MAX = '1;

  // Q8 scale factors of the cellular-automaton rules.
  localparam int unsigned Q_0P8 = 205;  // 0.80
  localparam int unsigned Q_0P6 = 154;  // 0.60
  localparam int unsigned Q_0P4 = 102;  // 0.40
  localparam int unsigned Q_1P2 = 307;  // 1.20

  // c * k / 256, saturated to the cost range.
  function automatic cost_t scale_q8(cost_t c, logic [8:0] k);
    logic [COST_W+8:0] p;
    p = {9'd0, c} * {{COST_W{1'b0}}, k};
    p = p >> 8;
    return (p > {9'd0, COST_MAX}) ? COST_MAX : p[COST_W-1:0];
  endfunction

endpackage
