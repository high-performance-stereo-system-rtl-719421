// dsi_cu: DSI creation unit. For every pixel of the left image it computes
// the 5x5 SAD matching cost against the right image for all D disparities,
// producing one column DSI(x,y,0..D-1) of the disparity space image.
//
// Input: the filtered image pair in raster order, extended by WIN/2 columns
// and rows (the extension samples are don't-care) so that the window centred
// on every pixel is completed. Memory arrangement: scanline registers keep,
// per column, the previous WIN-1 rows of both images; a WIN-column window
// register bank holds the left window and a (D+WIN-1)-column shift register
// holds the right columns reaching D pixels further left. The three colour
// components go through one shared SAD datapath (sad_unit) by a multiplexer,
// one component per clock, and the three component SADs are added and
// saturated to 13 bits. Throughput is one pixel per three clocks: in_ready
// is high in the idle state and in the last component cycle. out_valid
// pulses with the cost vector of window centres in raster order.
// The D parallel SAD modules, the register-based memory arrangement and the
// component multiplexer follow the described unit; the padding of the
// stream, the border masking and the sum of the components are this
// design's choices.
module dsi_cu
  import stereo_pkg::*;
#(
  parameter int unsigned MAX_W = 640,
  parameter int unsigned MAX_H = 480,
  parameter int unsigned WIN   = 5,
  parameter int unsigned D     = 70
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  cfg_t  cfg,
  input  logic  in_valid,
  output logic  in_ready,
  input  rgb_t  in_l,
  input  rgb_t  in_r,
  output logic  out_valid,
  output cost_t out_cost [D]
);

  localparam int unsigned R    = WIN / 2;
  localparam int unsigned NCOL = D + WIN - 1;
  localparam int unsigned LBW  = MAX_W + R;
  localparam int unsigned XW   = $clog2(LBW);

  // scanline registers: per padded column, rows y-WIN+1 .. y-1 of both
  // images in one word ([0] oldest row)
  typedef rgb_t [WIN-2:0] lcol_t;
  typedef struct packed { lcol_t l; lcol_t r; } scan_t;
  scan_t lb [LBW];
  scan_t lb_rd, lb_wr;

  // window registers, [row][age]
  rgb_t lsh [WIN][WIN];
  rgb_t rsh [WIN][NCOL];

  logic [15:0] xs, ys;          // position of the next input sample
  logic [15:0] win_x, win_y;    // position of the newest window column
  logic [1:0]  phase;           // 0 idle, 1..3 colour component R, G, B
  logic [COST_W+1:0] acc [D];

  logic accept;
  logic [XW-1:0] xi;             // scanline register index
  assign xi = xs[XW-1:0];
  assign in_ready = (phase == 2'd0) || (phase == 2'd3);
  assign accept   = in_valid && in_ready;

  // ---- memory arrangement ----
  assign lb_rd = lb[xi];
  always_comb begin
    for (int v = 0; v < WIN - 2; v++) begin
      lb_wr.l[v] = lb_rd.l[v+1];
      lb_wr.r[v] = lb_rd.r[v+1];
    end
    lb_wr.l[WIN-2] = in_l;
    lb_wr.r[WIN-2] = in_r;
  end

  always_ff @(posedge clk)
    if (accept) lb[xi] <= lb_wr;

  always_ff @(posedge clk) begin
    if (accept) begin
      for (int v = 0; v < WIN; v++) begin
        for (int j = WIN - 1; j > 0; j--) lsh[v][j] <= lsh[v][j-1];
        for (int j = NCOL - 1; j > 0; j--) rsh[v][j] <= rsh[v][j-1];
        lsh[v][0] <= (v == WIN - 1) ? in_l : lb_rd.l[v];
        rsh[v][0] <= (v == WIN - 1) ? in_r : lb_rd.r[v];
      end
    end
  end

  // ---- position counters ----
  always_ff @(posedge clk) begin
    if (!rst_n || start) begin
      xs    <= '0;
      ys    <= '0;
      win_x <= '0;
      win_y <= '0;
    end else if (accept) begin
      win_x <= xs;
      win_y <= ys;
      if (xs == cfg.w + 16'(R) - 16'd1) begin
        xs <= '0;
        ys <= (ys == cfg.h + 16'(R) - 16'd1) ? 16'd0 : ys + 16'd1;
      end else begin
        xs <= xs + 16'd1;
      end
    end
  end

  // ---- border masks of the current window ----
  logic row_ok  [WIN];
  logic lcol_ok [WIN];
  logic rcol_ok [NCOL];
  always_comb begin
    for (int v = 0; v < WIN; v++)
      row_ok[v] = (32'(win_y) + 32'(v) >= 32'(WIN - 1)) &&
                  (32'(win_y) + 32'(v) - 32'(WIN - 1) < 32'(cfg.h));
    for (int j = 0; j < WIN; j++)
      lcol_ok[j] = (32'(win_x) >= 32'(j)) && (32'(win_x) - 32'(j) < 32'(cfg.w));
    for (int j = 0; j < NCOL; j++)
      rcol_ok[j] = (32'(win_x) >= 32'(j)) && (32'(win_x) - 32'(j) < 32'(cfg.w));
  end

  // ---- colour component multiplexer ----
  function automatic comp_t pick(rgb_t p, logic [1:0] c);
    case (c)
      2'd1:    return p.r;
      2'd2:    return p.g;
      default: return p.b;
    endcase
  endfunction

  comp_t lwin_c [WIN][WIN];
  comp_t rwin_c [WIN][NCOL];
  always_comb begin
    for (int v = 0; v < WIN; v++) begin
      for (int j = 0; j < WIN; j++)  lwin_c[v][j] = pick(lsh[v][j], phase);
      for (int j = 0; j < NCOL; j++) rwin_c[v][j] = pick(rsh[v][j], phase);
    end
  end

  cost_t sad [D];
  sad_unit #(.WIN(WIN), .D(D)) u_sad (
    .lwin (lwin_c), .rwin (rwin_c),
    .row_ok, .lcol_ok, .rcol_ok,
    .drange (cfg.drange),
    .sad
  );

  // ---- component accumulation and output ----
  logic center_ok;
  assign center_ok = (win_x >= 16'(R)) && (win_y >= 16'(R));

  always_ff @(posedge clk) begin
    if (!rst_n || start) begin
      phase     <= 2'd0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      case (phase)
        2'd0: if (accept) phase <= 2'd1;
        2'd1: phase <= 2'd2;
        2'd2: phase <= 2'd3;
        default: begin
          phase     <= accept ? 2'd1 : 2'd0;
          out_valid <= center_ok;
        end
      endcase
    end
  end

  always_ff @(posedge clk) begin
    for (int d = 0; d < D; d++) begin
      logic [COST_W+1:0] s;
      s = acc[d] + (COST_W+2)'(sad[d]);
      case (phase)
        2'd1: acc[d] <= (COST_W+2)'(sad[d]);
        2'd2: acc[d] <= s;
        2'd3: out_cost[d] <= (s > (COST_W+2)'(COST_MAX)) ? COST_MAX : s[COST_W-1:0];
        default: ;
      endcase
    end
  end

  // the configured image must fit the size the unit was built for
  always_ff @(posedge clk)
    if (rst_n && in_valid)
      assert (32'(cfg.w) <= MAX_W && 32'(cfg.h) <= MAX_H)
        else $error("dsi_cu: image %0dx%0d above the built maximum", cfg.w, cfg.h);

endmodule
