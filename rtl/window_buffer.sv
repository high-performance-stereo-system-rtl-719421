// window_buffer: line-delay memory arrangement that presents a KxK window of
// a raster-order sample stream. Each of the K rows is K registers; between
// rows a FIFO of depth W-K delays the samples so that every row register
// chain is exactly one image row (W samples) behind the next. After the
// buffer is full, each new sample moves the window one pixel to the right,
// so one complete window is available per input sample. win[K-1][K-1] is the
// newest sample, win[r][c] the sample (K-1-r)*W + (K-1-c) inputs earlier.
// The FIFOs share one circular pointer that wraps at the run-time width
// cfg_w (K < cfg_w <= MAX_W). The structure (K-1 FIFOs plus KxK registers)
// follows the described memory arrangement; the FIFO depth is derived here.
module window_buffer #(
  parameter int unsigned MAX_W = 640,
  parameter int unsigned K     = 3,
  parameter int unsigned DW    = 13
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [15:0]   cfg_w,
  input  logic          in_valid,
  input  logic [DW-1:0] in_data,
  output logic [DW-1:0] win [K][K]
);

  localparam int unsigned FD = MAX_W - K;
  localparam int unsigned PW = (FD > 1) ? $clog2(FD) : 1;

  // all K-1 FIFOs in one memory word, [r] feeds window row r
  typedef logic [K-2:0][DW-1:0] fword_t;
  fword_t        fifo [FD];
  fword_t        f_rd, f_wr;
  logic [PW-1:0] ptr;
  logic [15:0]   fd_run;

  assign fd_run = cfg_w - 16'(K);

  always_ff @(posedge clk) begin
    if (!rst_n) ptr <= '0;
    else if (in_valid) ptr <= (16'(ptr) == fd_run - 16'd1) ? '0 : ptr + 1'b1;
  end

  assign f_rd = fifo[ptr];
  always_comb
    for (int r = 0; r < K - 1; r++) f_wr[r] = win[r+1][0];

  always_ff @(posedge clk)
    if (in_valid) fifo[ptr] <= f_wr;

  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int r = 0; r < K; r++) begin
        for (int c = 0; c < K - 1; c++) win[r][c] <= win[r][c+1];
        win[r][K-1] <= (r == K - 1) ? in_data : f_rd[r];
      end
    end
  end

endmodule
