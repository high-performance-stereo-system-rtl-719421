// frame_buffer: internal memory holding the left and right colour images of
// one frame, one word (left and right RGB pixel) per pixel address y*W+x.
// One write port and one synchronous read port; read data and rd_valid
// appear one clock after rd_en. The memory is written as a plain array so a
// synthesis tool can map it to block RAM. Its organisation is this design's
// choice; the described system keeps the input images in on-chip memory.
module frame_buffer
  import stereo_pkg::*;
#(
  parameter int unsigned MAX_W = 640,
  parameter int unsigned MAX_H = 480,
  localparam int unsigned AW = $clog2(MAX_W * MAX_H)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  rgb_t          wr_l,
  input  rgb_t          wr_r,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic          rd_valid,
  output rgb_t          rd_l,
  output rgb_t          rd_r
);

  typedef struct packed { rgb_t l; rgb_t r; } pair_t;
  pair_t mem [MAX_W * MAX_H];
  pair_t rd_q;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= '{l: wr_l, r: wr_r};
    if (rd_en) rd_q <= mem[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) rd_valid <= 1'b0;
    else        rd_valid <= rd_en;
  end

  assign rd_l = rd_q.l;
  assign rd_r = rd_q.r;

endmodule
