// similarity_acc: similarity accumulator (winner-take-all). For every pixel
// it keeps the smallest refined cost seen so far and the disparity at which
// it occurred, D(i,j) = argmin_d DSI(i,j,d). Costs arrive plane after plane,
// each plane in raster order, one per clock. A two-stage read-modify-write
// on a per-pixel memory (synchronous read) updates the running minimum; the
// first plane initialises it and a tie keeps the smaller disparity. While
// the last active plane (drange-1) passes, the final disparity of each pixel
// is emitted in raster order (out_valid, out_disp), two clocks after its
// cost; done pulses with the last pixel. Inputs after the frame is complete
// are ignored until the next start. The tie rule is this design's choice.
module similarity_acc
  import stereo_pkg::*;
#(
  parameter int unsigned MAX_PIX = 640 * 480,
  parameter int unsigned D       = 70,
  localparam int unsigned AW = $clog2(MAX_PIX),
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

  typedef struct packed {
    cost_t         cost;
    logic [DW-1:0] disp;
  } best_t;

  best_t mem [MAX_PIX];

  logic [AW:0]   plane;
  assign plane = (AW+1)'(32'(cfg.w) * 32'(cfg.h));

  logic [AW-1:0] np;
  logic [7:0]    nd;
  logic          finished;

  // stage 1: address and read
  logic          s1_valid;
  cost_t         s1_cost;
  logic [AW-1:0] s1_p;
  logic [7:0]    s1_d;
  best_t         rd_q;

  always_ff @(posedge clk) begin
    if (!rst_n || start) begin
      np       <= '0;
      nd       <= '0;
      finished <= 1'b0;
      s1_valid <= 1'b0;
      s1_cost  <= '0;
      s1_p     <= '0;
      s1_d     <= '0;
    end else begin
      s1_valid <= in_valid && !finished;
      if (in_valid && !finished) begin
        s1_cost <= in_cost;
        s1_p    <= np;
        s1_d    <= nd;
        if ((AW+1)'(np) == plane - 1'b1) begin
          np <= '0;
          nd <= nd + 8'd1;
          if (nd == cfg.drange - 8'd1) finished <= 1'b1;
        end else begin
          np <= np + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk)
    if (in_valid && !finished) rd_q <= mem[np];

  // stage 2: compare and write back
  best_t best;
  always_comb begin
    if (s1_d == 8'd0 || s1_cost < rd_q.cost) best = '{cost: s1_cost, disp: DW'(s1_d)};
    else                                      best = rd_q;
  end

  always_ff @(posedge clk)
    if (s1_valid) mem[s1_p] <= best;

  always_ff @(posedge clk) begin
    if (!rst_n || start) begin
      out_valid <= 1'b0;
      out_disp  <= '0;
      done      <= 1'b0;
    end else begin
      out_valid <= s1_valid && (s1_d == cfg.drange - 8'd1);
      done      <= s1_valid && (s1_d == cfg.drange - 8'd1) &&
                   ((AW+1)'(s1_p) == plane - 1'b1);
      if (s1_valid) out_disp <= best.disp;
    end
  end

endmodule
