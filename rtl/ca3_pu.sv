// ca3_pu: third refinement rule, in each disparity plane over a 5x5 Moore
// neighbourhood. With c the centre cost, k counts the 25 cells (centre
// included) with value <= c/2 and p the others (value > c/2, which the
// rule's else-branch "value >= c/2" then accepts); mod_val is how often the
// mode of the 25 values occurs:
//   if k >= mod_val       : c' = 0.4 c
//   else if p >= mod_val  : c' = 1.2 c (saturated)
//   else                  : c' = c
// A 5x5 window_buffer (four FIFOs, 25 registers) supplies the window; 25
// gate-level comparators feed the counter, mode_freq gives mod_val, and the
// replacement stage selects the result. Cells within two pixels of the
// image border pass unchanged (fixed-value boundary). The output keeps the
// input order and runs 2W+2 samples plus two clocks behind the input. The
// scale factors are Q8 constants (102/256, 307/256), chosen here.
module ca3_pu
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

  localparam int unsigned K = 5;
  localparam int unsigned N = K * K;

  cost_t win [K][K];
  window_buffer #(.MAX_W(MAX_W), .K(K), .DW(COST_W)) u_win (
    .clk, .rst_n, .cfg_w (cfg.w), .in_valid, .in_data (in_cost), .win);

  logic [15:0] fill, nx, ny, cx, cy;
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
        if (fill != 2 * (cfg.w + 16'd1)) begin
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

  cost_t center;
  cost_t vals [N];
  assign center = win[2][2];
  always_comb
    for (int i = 0; i < N; i++) vals[i] = win[i / K][i % K];

  // comparison of every cell with half the centre
  logic gt [N];
  for (genvar i = 0; i < N; i++) begin : g_cmp
    bin_comparator #(.WIDTH(COST_W + 1)) u_cmp (
      .a ({vals[i], 1'b0}), .b ({1'b0, center}), .gt (gt[i]), .lt ());
  end

  logic [4:0] k_cnt, p_cnt;
  always_comb begin
    k_cnt = '0;
    p_cnt = '0;
    for (int i = 0; i < N; i++) begin
      if (!gt[i]) k_cnt = k_cnt + 5'd1;
      else        p_cnt = p_cnt + 5'd1;
    end
  end

  logic [4:0] mode_frq;
  mode_freq #(.N(N), .WIDTH(COST_W)) u_mode (.vals, .mode_val (), .mode_frq);

  logic border;
  assign border = (cx < 16'd2) || (cy < 16'd2) ||
                  (cx > cfg.w - 16'd3) || (cy > cfg.h - 16'd3);

  always_ff @(posedge clk) begin
    if (!rst_n || start) begin
      out_valid <= 1'b0;
      out_cost  <= '0;
    end else begin
      out_valid <= win_valid;
      if (win_valid) begin
        if (border)                 out_cost <= center;
        else if (k_cnt >= mode_frq) out_cost <= scale_q8(center, 9'(Q_0P4));
        else if (p_cnt >= mode_frq) out_cost <= scale_q8(center, 9'(Q_1P2));
        else                        out_cost <= center;
      end
    end
  end

  // the configured image must fit the size the unit was built for
  always_ff @(posedge clk)
    if (rst_n && in_valid)
      assert (32'(cfg.w) <= MAX_W && 32'(cfg.h) <= MAX_H)
        else $error("ca3_pu: image %0dx%0d above the built maximum", cfg.w, cfg.h);

endmodule
