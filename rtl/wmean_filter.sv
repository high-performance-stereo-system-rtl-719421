// wmean_filter: one-dimensional weighted mean filter on one 8-bit colour
// component stream, f'(x) = f(x-1)/4 + f(x)/2 + f(x+1)/4.
//
// Samples arrive in raster order with flags marking the first and last
// sample of each row. The unit keeps the previous and current sample; when
// sample x+1 arrives it emits the filtered value of sample x, registered, so
// the output runs one sample behind the input. The weights come from the
// weighted mean filter equation; keeping the first and last pixel of a row
// unfiltered and truncating the division by four are this design's choices.
// One extra input beat (any data) after the last pixel of a frame flushes it.
// start clears the history at the beginning of a frame.
module wmean_filter
  import stereo_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  logic  in_valid,
  input  comp_t in_pix,
  input  logic  in_first,
  input  logic  in_last,
  output logic  out_valid,
  output comp_t out_pix
);

  comp_t prev_q, cur_q;
  logic  cur_first_q, cur_last_q, have_cur_q;
  logic [PIX_W+1:0] sum;

  always_comb sum = {2'b00, prev_q} + {1'b0, cur_q, 1'b0} + {2'b00, in_pix};

  always_ff @(posedge clk) begin
    if (!rst_n || start) begin
      have_cur_q  <= 1'b0;
      out_valid   <= 1'b0;
      prev_q      <= '0;
      cur_q       <= '0;
      cur_first_q <= 1'b0;
      cur_last_q  <= 1'b0;
      out_pix     <= '0;
    end else begin
      out_valid <= in_valid && have_cur_q;
      if (in_valid) begin
        if (have_cur_q)
          out_pix <= (cur_first_q || cur_last_q) ? cur_q : sum[PIX_W+1:2];
        prev_q      <= cur_q;
        cur_q       <= in_pix;
        cur_first_q <= in_first;
        cur_last_q  <= in_last;
        have_cur_q  <= 1'b1;
      end
    end
  end

endmodule
