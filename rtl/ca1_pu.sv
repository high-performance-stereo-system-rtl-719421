// ca1_pu: first refinement rule, applied to each disparity plane: every
// cost is replaced by the mean of its 3x3 neighbourhood in the same plane,
//   DSI'(i,j,d) = 1/9 * sum_{m,n=-1..1} DSI(i+m,j+n,d).
// Costs arrive one per clock, plane after plane, each plane in raster order.
// A 3x3 window_buffer supplies the neighbourhood, an adder sums the nine
// 13-bit values, a constant divider divides by nine (truncating) and the
// replacement stage keeps the original value for cells on the image border
// (fixed-value boundary). The output is registered and runs W+1 samples
// plus two clocks behind the input: the first refined cell, (1,1), leaves
// two clocks after input 2W+3 completes its window. The output stream keeps
// the input order. The rule and the boundary treatment follow the described
// unit; rounding is this design's choice.
module ca1_pu
  import stereo_pkg::*;
#(
  parameter int unsigned MAX_W = 640,
  parameter int unsigned MAX_H = 480
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  cfg_t  cfg,
  input  logic  in_valid,
  input  cost_t in_cost,
  output logic  out_valid,
  output cost_t out_cost
);

  localparam int unsigned K = 3;

  cost_t win [K][K];
  window_buffer #(.MAX_W(MAX_W), .K(K), .DW(COST_W)) u_win (
    .clk, .rst_n, .cfg_w (cfg.w), .in_valid, .in_data (in_cost), .win);

  // samples still needed before the first centre is in the window
  logic [15:0] fill;
  logic [15:0] nx, ny;          // coordinates of the next centre
  logic [15:0] cx, cy;          // coordinates of the centre in the window
  logic        win_valid;

  always_ff @(posedge clk) begin
    if (!rst_n || start) begin
      fill      <= '0;
      nx        <= '0;
      ny        <= '0;
      cx        <= '0;
      cy        <= '0;
      win_valid <= 1'b0;
    end else begin
      win_valid <= 1'b0;
      if (in_valid) begin
        if (fill != cfg.w + 16'd1) begin
          fill <= fill + 16'd1;
        end else begin
          win_valid <= 1'b1;
          cx <= nx;
          cy <= ny;
          if (nx == cfg.w - 16'd1) begin
            nx <= '0;
            ny <= (ny == cfg.h - 16'd1) ? 16'd0 : ny + 16'd1;
          end else begin
            nx <= nx + 16'd1;
          end
        end
      end
    end
  end

  // PARAL_ADDER and division
  logic [COST_W+3:0] sum;
  cost_t             mean;
  always_comb begin
    sum = '0;
    for (int r = 0; r < K; r++)
      for (int c = 0; c < K; c++) sum = sum + (COST_W+4)'(win[r][c]);
    mean = cost_t'(sum / (COST_W+4)'(9));
  end

  logic border;
  assign border = (cx == 16'd0) || (cy == 16'd0) ||
                  (cx == cfg.w - 16'd1) || (cy == cfg.h - 16'd1);

  // DSI_REP
  always_ff @(posedge clk) begin
    if (!rst_n || start) begin
      out_valid <= 1'b0;
      out_cost  <= '0;
    end else begin
      out_valid <= win_valid;
      if (win_valid) out_cost <= border ? win[1][1] : mean;
    end
  end

  // the configured image must fit the size the unit was built for
  always_ff @(posedge clk)
    if (rst_n && in_valid)
      assert (32'(cfg.w) <= MAX_W && 32'(cfg.h) <= MAX_H)
        else $error("ca1_pu: image %0dx%0d above the built maximum", cfg.w, cfg.h);

endmodule
