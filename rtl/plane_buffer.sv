// plane_buffer: DSI memory block for the second refinement rule. It delays
// the plane-ordered cost stream by one and by two whole disparity planes, so
// that for every input sample of plane d the costs of the same pixel in
// planes d, d-1 and d-2 are presented together: t0 is the In_Register, t1
// and t2 the outputs of the two image-plane buffers. The buffers are
// read-before-write memories sharing one circular pointer that wraps at
// the run-time plane size (W*H <= MAX_PIX). All taps are registered and
// update on in_valid; the taps hold the first complete triple once 2*W*H+1
// samples have entered.
module plane_buffer #(
  parameter int unsigned MAX_PIX = 640 * 480,
  parameter int unsigned DW      = 13,
  localparam int unsigned AW = $clog2(MAX_PIX)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW:0]   plane,
  input  logic          in_valid,
  input  logic [DW-1:0] in_data,
  output logic [DW-1:0] t0,
  output logic [DW-1:0] t1,
  output logic [DW-1:0] t2
);

  logic [DW-1:0] buf1 [MAX_PIX];
  logic [DW-1:0] buf2 [MAX_PIX];
  logic [AW-1:0] ptr;

  always_ff @(posedge clk) begin
    if (!rst_n) ptr <= '0;
    else if (in_valid) ptr <= ((AW+1)'(ptr) == plane - 1'b1) ? '0 : ptr + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      t0         <= in_data;
      t1         <= buf1[ptr];
      t2         <= buf2[ptr];
      buf1[ptr]  <= in_data;
      buf2[ptr]  <= buf1[ptr];
    end
  end

endmodule
