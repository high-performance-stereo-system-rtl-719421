// ca2_pu: second refinement rule, along the disparity axis. For a cost c at
// (i,j,d) with neighbours p = DSI(i,j,d-1) and n = DSI(i,j,d+1):
//   if p > c/2 or n > c/2       : c' = 0.8 c
//   else if p < c/2 or n < c/2  : c' = 0.6 c
//   else                        : c' = c
// The plane_buffer supplies the three planes; two replacement control units
// (rcu) evaluate the two conditions with gate-level comparators and the
// replacement stage selects the scaled value. Costs in the first and last
// active plane (0 and drange-1) pass unchanged (fixed-value boundary). The
// output keeps the input order and runs one plane (W*H samples) plus two
// clocks behind the input, so the stream must be continued by W*H samples
// after the last plane. The scale factors are Q8 constants (205/256,
// 154/256), a fixed-point form chosen here.
module ca2_pu
  import stereo_pkg::*;
#(
  parameter int unsigned MAX_PIX = 640 * 480,
  localparam int unsigned AW = $clog2(MAX_PIX)
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

  logic [AW:0] plane;
  assign plane = (AW+1)'(32'(cfg.w) * 32'(cfg.h));

  cost_t t0, t1, t2;
  plane_buffer #(.MAX_PIX(MAX_PIX), .DW(COST_W)) u_buf (
    .clk, .rst_n, .plane, .in_valid, .in_data (in_cost), .t0, .t1, .t2);

  logic [AW:0] fill;
  logic [AW:0] np;              // pixel index of the next centre
  logic [7:0]  nd, cd;          // plane of the next centre / of the taps
  logic        tap_valid;

  always_ff @(posedge clk) begin
    if (!rst_n || start) begin
      fill      <= '0;
      np        <= '0;
      nd        <= '0;
      cd        <= '0;
      tap_valid <= 1'b0;
    end else begin
      tap_valid <= 1'b0;
      if (in_valid) begin
        if (fill != plane) begin
          fill <= fill + 1'b1;
        end else begin
          tap_valid <= 1'b1;
          cd <= nd;
          if (np == plane - 1'b1) begin
            np <= '0;
            nd <= (nd == cfg.drange - 8'd1) ? 8'd0 : nd + 8'd1;
          end else begin
            np <= np + 1'b1;
          end
        end
      end
    end
  end

  // first and second RCU
  logic hit_gt, hit_lt;
  rcu #(.WIDTH(COST_W), .LESS(1'b0)) u_rcu1 (.center (t1), .n0 (t2), .n1 (t0), .hit (hit_gt));
  rcu #(.WIDTH(COST_W), .LESS(1'b1)) u_rcu2 (.center (t1), .n0 (t2), .n1 (t0), .hit (hit_lt));

  logic border;
  assign border = (cd == 8'd0) || (cd == cfg.drange - 8'd1);

  // DSI replacement
  always_ff @(posedge clk) begin
    if (!rst_n || start) begin
      out_valid <= 1'b0;
      out_cost  <= '0;
    end else begin
      out_valid <= tap_valid;
      if (tap_valid) begin
        if (border)      out_cost <= t1;
        else if (hit_gt) out_cost <= scale_q8(t1, 9'(Q_0P8));
        else if (hit_lt) out_cost <= scale_q8(t1, 9'(Q_0P6));
        else             out_cost <= t1;
      end
    end
  end

endmodule
