// dsi_mem: storage for the disparity space image of one frame. The DSI
// creation unit writes one word per pixel holding the costs of all D
// disparities; the DSI processing unit reads single costs, one disparity
// plane after another. Synchronous read: rd_cost and rd_valid appear one
// clock after rd_en, the plane being selected from the registered word.
// Keeping the whole DSI between creation and processing is this design's
// choice.
module dsi_mem
  import stereo_pkg::*;
#(
  parameter int unsigned MAX_PIX = 640 * 480,
  parameter int unsigned D       = 70,
  localparam int unsigned AW = $clog2(MAX_PIX),
  localparam int unsigned DW = (D > 1) ? $clog2(D) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  cost_t         wr_cost [D],
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  input  logic [DW-1:0] rd_d,
  output logic          rd_valid,
  output cost_t         rd_cost
);

  logic [D*COST_W-1:0] mem [MAX_PIX];
  logic [D*COST_W-1:0] wr_word, rd_q;
  logic [DW-1:0]       rd_d_q;

  always_comb
    for (int d = 0; d < D; d++) wr_word[d*COST_W +: COST_W] = wr_cost[d];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_word;
    if (rd_en) begin
      rd_q   <= mem[rd_addr];
      rd_d_q <= rd_d;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) rd_valid <= 1'b0;
    else        rd_valid <= rd_en;
  end

  assign rd_cost = rd_q[32'(rd_d_q)*COST_W +: COST_W];

endmodule
