// hcu: high-level control unit. It latches the user configuration (image
// size, disparity range) at the start of a frame and sequences the frame
// through three phases, generating all memory addresses:
//   LOAD  - accepts the stereo pair in raster order (in_valid/in_ready), one
//           pixel pair per clock, passes it through the pre-processing unit
//           and writes the filtered pixels into the frame buffer; one flush
//           beat empties the filter pipeline.
//   CU    - reads the frame buffer in raster order extended by WIN/2 columns
//           and rows (extension reads return don't-care data) and hands the
//           pixels to the DSI creation unit whenever it is ready; each cost
//           vector it returns is written to the DSI memory.
//   PU    - reads the DSI memory one plane after another (plane-major, one
//           cost per clock) into the DSI processing unit, then keeps feeding
//           dummy costs until the processing unit reports the frame done.
// frame_start pulses for one clock before LOAD to clear every unit. The
// phases of one frame run back to back; overlapping consecutive frames is
// not done. The phase structure and the address generation are this
// design's reading of the described control unit.
module hcu
  import stereo_pkg::*;
#(
  parameter int unsigned MAX_W = 640,
  parameter int unsigned MAX_H = 480,
  parameter int unsigned D     = 70,
  parameter int unsigned WIN   = 5,
  localparam int unsigned AW = $clog2(MAX_W * MAX_H),
  localparam int unsigned DW = (D > 1) ? $clog2(D) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  cfg_t          cfg_in,
  output cfg_t          cfg,
  output logic          busy,
  output logic          frame_start,
  output logic          frame_done,
  // input stream and pre-processing unit
  input  logic          in_valid,
  output logic          in_ready,
  output logic          ppu_valid,
  output logic          ppu_first,
  output logic          ppu_last,
  input  logic          ppu_out_valid,
  output logic          fb_wr_en,
  output logic [AW-1:0] fb_wr_addr,
  // DSI creation
  output logic          fb_rd_en,
  output logic [AW-1:0] fb_rd_addr,
  output logic          cu_in_valid,
  input  logic          cu_in_ready,
  input  logic          cu_out_valid,
  output logic          dsi_wr_en,
  output logic [AW-1:0] dsi_wr_addr,
  // DSI processing
  output logic          dsi_rd_en,
  output logic [AW-1:0] dsi_rd_addr,
  output logic [DW-1:0] dsi_rd_d,
  input  logic          dsi_rd_valid,
  output logic          pu_in_valid,
  input  logic          pu_done
);

  localparam int unsigned R = WIN / 2;

  typedef enum logic [2:0] {
    S_IDLE, S_START, S_LOAD, S_LFLUSH, S_LWAIT, S_CU, S_PU, S_PFLUSH
  } state_t;

  state_t state;

  logic [31:0] plane;
  assign plane = 32'(cfg.w) * 32'(cfg.h);

  logic [15:0] lx, ly;          // input pixel position
  logic [31:0] wcnt;            // write counter (frame buffer, then DSI memory)
  logic [15:0] px, py;          // padded read position
  logic [31:0] rbase;           // py * w
  logic        issued_all, pending;
  logic [31:0] rp;              // DSI read pixel
  logic [7:0]  rdd;             // DSI read plane

  logic accept, cu_fire, cu_issue;
  assign in_ready  = (state == S_LOAD);
  assign accept    = in_valid && in_ready;
  assign ppu_valid = accept || (state == S_LFLUSH);
  assign ppu_first = (state == S_LFLUSH) || (lx == 16'd0);
  assign ppu_last  = (lx == cfg.w - 16'd1);
  assign busy        = (state != S_IDLE);
  assign frame_start = (state == S_START);

  assign fb_wr_en   = ppu_out_valid;
  assign fb_wr_addr = AW'(wcnt);

  assign cu_in_valid = pending;
  assign cu_fire     = pending && cu_in_ready;
  assign cu_issue    = (state == S_CU) && !issued_all && (!pending || cu_fire);
  assign fb_rd_en    = cu_issue;
  assign fb_rd_addr  = (px < cfg.w && py < cfg.h) ? AW'(rbase + 32'(px)) : '0;
  assign dsi_wr_en   = cu_out_valid;
  assign dsi_wr_addr = AW'(wcnt);

  assign dsi_rd_en   = (state == S_PU);
  assign dsi_rd_addr = AW'(rp);
  assign dsi_rd_d    = DW'(rdd);
  assign pu_in_valid = dsi_rd_valid || (state == S_PFLUSH);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cfg        <= '0;
      lx         <= '0;
      ly         <= '0;
      wcnt       <= '0;
      px         <= '0;
      py         <= '0;
      rbase      <= '0;
      issued_all <= 1'b0;
      pending    <= 1'b0;
      rp         <= '0;
      rdd        <= '0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      case (state)
        S_IDLE: if (in_valid) begin
          cfg   <= cfg_in;
          state <= S_START;
        end
        S_START: begin
          lx <= '0; ly <= '0; wcnt <= '0;
          px <= '0; py <= '0; rbase <= '0;
          issued_all <= 1'b0; pending <= 1'b0;
          rp <= '0; rdd <= '0;
          state <= S_LOAD;
        end
        S_LOAD, S_LFLUSH, S_LWAIT: begin
          if (accept) begin
            if (lx == cfg.w - 16'd1) begin
              lx <= '0;
              ly <= ly + 16'd1;
              if (ly == cfg.h - 16'd1) state <= S_LFLUSH;
            end else begin
              lx <= lx + 16'd1;
            end
          end
          if (state == S_LFLUSH) state <= S_LWAIT;
          if (ppu_out_valid) begin
            if (wcnt == plane - 32'd1) begin
              wcnt  <= '0;
              state <= S_CU;
            end else begin
              wcnt <= wcnt + 32'd1;
            end
          end
        end
        S_CU: begin
          if (cu_issue) begin
            if (px == cfg.w + 16'(R) - 16'd1) begin
              px    <= '0;
              py    <= py + 16'd1;
              rbase <= rbase + 32'(cfg.w);
              if (py == cfg.h + 16'(R) - 16'd1) issued_all <= 1'b1;
            end else begin
              px <= px + 16'd1;
            end
          end
          if (cu_issue)     pending <= 1'b1;
          else if (cu_fire) pending <= 1'b0;
          if (cu_out_valid) begin
            if (wcnt == plane - 32'd1) begin
              wcnt  <= '0;
              state <= S_PU;
            end else begin
              wcnt <= wcnt + 32'd1;
            end
          end
        end
        S_PU: begin
          if (rp == plane - 32'd1) begin
            rp  <= '0;
            rdd <= rdd + 8'd1;
            if (rdd == cfg.drange - 8'd1) state <= S_PFLUSH;
          end else begin
            rp <= rp + 32'd1;
          end
        end
        S_PFLUSH: if (pu_done) begin
          frame_done <= 1'b1;
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // configuration limits
  always_ff @(posedge clk)
    if (rst_n && state == S_IDLE && in_valid)
      assert (cfg_in.w > 16'd5 && 32'(cfg_in.w) <= MAX_W && cfg_in.h > 16'd4 &&
              32'(cfg_in.h) <= MAX_H && cfg_in.drange > 8'd1 && 32'(cfg_in.drange) <= D)
        else $error("hcu: configuration out of range");

endmodule
