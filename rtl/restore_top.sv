// restore_top: reconfigurable engine for iterative image restoration.
//
// The degraded image g lives in host memory. The engine restores it segment by segment:
// a segment of ROWS x COLS pixels (8 x 8 by default, a 6 x 6 core with a one-pixel
// overlap border, o = 2) is loaded into an array of as many processors, every processor
// restores its own pixel in parallel using the iteration
//     f(0) = lambda*g,   f(k+1) = f(k) + lambda*g - lambda*(b * f(k)),
// b being the 3x3 blur kernel with centre weight 2^R0_SHIFT / 2^NORM_SHIFT and neighbour
// weight 1 / 2^NORM_SHIFT, lambda = 2^-GAIN_SHIFT. The segment iterates until the
// residual sum (x_k - x_{k-1})^2 / sum x_{k-1}^2 falls below eps / 2^EPS_W or max_iter
// iterations are done; its core is then written back and the next segment is loaded.
//
// Blocks: segment_walker (core position, with optional displacement off_x/off_y of the
// partitioning grid), segment_ctrl (load, write-back, sequencing), iter_ctrl (seven-step
// schedule and stopping rule), pe_array (the processors) and residual_unit.
//
// Interface: pulse start with img_w/img_h/off_x/off_y/out_base/eps/max_iter valid; done pulses
// after the last core is written. The image g is read from address y * img_w + x and
// the result written to out_base + y * img_w + x. seg_done pulses once per segment with the iteration
// count (seg_iters) and whether the residual ended it (seg_conv), at core position
// (seg_x, seg_y). The host channel is described in segment_ctrl. Timing: one iteration is
// seven cycles; loading takes about ROWS*COLS cycles and write-back one cycle per core
// pixel when the host answers at full rate. residual_stalls counts cycles the schedule
// waited for the residual test (zero at the default sizes). The array, the processor
// schedule, segmentation with overlap and the stopping rule follow the published design;
// the host channel, number formats, iteration limit and displacement port are this
// design's own.
module restore_top
  import restore_pkg::*;
#(
  parameter int ROWS          = 8,
  parameter int COLS          = 8,
  parameter int OVL           = 2,
  parameter int CW            = 12,
  parameter int ITER_W        = 16,
  parameter int EPS_W         = 16,
  parameter int ROWS_PER_BEAT = 2,
  parameter int R0_SHIFT      = 3,
  parameter int NORM_SHIFT    = 4,
  parameter int GAIN_SHIFT    = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [CW-1:0]       img_w,
  input  logic [CW-1:0]       img_h,
  input  logic [CW-1:0]       off_x,
  input  logic [CW-1:0]       off_y,
  input  logic [2*CW-1:0]     out_base,
  input  logic [EPS_W-1:0]    eps,
  input  logic [ITER_W-1:0]   max_iter,
  output logic                busy,
  output logic                done,
  output logic                seg_done,
  output logic [ITER_W-1:0]   seg_iters,
  output logic                seg_conv,
  output logic signed [CW+1:0] seg_x,
  output logic signed [CW+1:0] seg_y,
  output logic [31:0]         residual_stalls,
  // host memory channel
  output logic                rd_req_valid,
  input  logic                rd_req_ready,
  output logic [2*CW-1:0]     rd_req_addr,
  input  logic                rd_rsp_valid,
  output logic                rd_rsp_ready,
  input  logic [PIX_W-1:0]    rd_rsp_data,
  output logic                wr_valid,
  input  logic                wr_ready,
  output logic [2*CW-1:0]     wr_addr,
  output logic [PIX_W-1:0]    wr_data
);

  logic                      walk_init, walk_next, last;
  logic                      iter_start, iter_done, iter_conv, iter_busy;
  logic [ITER_W-1:0]         iter_count;
  step_e                     step;
  logic                      commit;
  logic                      res_start, res_done, res_conv;
  logic                      ld_en, ld_live;
  logic [$clog2(ROWS)-1:0]   ld_row;
  logic [$clog2(COLS)-1:0]   ld_col;
  val_t                      ld_g;
  val_t [ROWS-1:0][COLS-1:0] x_all, x_prev_all;

  segment_walker #(
    .CW(CW), .CORE_W(COLS - OVL), .CORE_H(ROWS - OVL)
  ) u_walk (
    .clk, .rst_n,
    .init (walk_init),
    .next (walk_next),
    .img_w, .img_h, .off_x, .off_y,
    .sx   (seg_x),
    .sy   (seg_y),
    .last (last)
  );

  segment_ctrl #(
    .ROWS(ROWS), .COLS(COLS), .OVL(OVL), .CW(CW), .ITER_W(ITER_W)
  ) u_seg (
    .clk, .rst_n,
    .start, .img_w, .img_h, .out_base, .busy, .done,
    .walk_init, .walk_next,
    .sx (seg_x), .sy (seg_y), .last,
    .iter_start, .iter_done, .iter_count, .iter_conv,
    .ld_en, .ld_live, .ld_row, .ld_col, .ld_g, .x_all,
    .seg_done, .seg_iters, .seg_conv,
    .rd_req_valid, .rd_req_ready, .rd_req_addr,
    .rd_rsp_valid, .rd_rsp_ready, .rd_rsp_data,
    .wr_valid, .wr_ready, .wr_addr, .wr_data
  );

  iter_ctrl #(.ITER_W(ITER_W)) u_iter (
    .clk, .rst_n,
    .start       (iter_start),
    .max_iter,
    .res_done, .res_conv,
    .step, .commit, .res_start,
    .busy        (iter_busy),
    .done        (iter_done),
    .iters       (iter_count),
    .conv_stop   (iter_conv),
    .stall_cycles(residual_stalls)
  );

  pe_array #(
    .ROWS(ROWS), .COLS(COLS),
    .R0_SHIFT(R0_SHIFT), .NORM_SHIFT(NORM_SHIFT), .GAIN_SHIFT(GAIN_SHIFT)
  ) u_array (
    .clk, .rst_n, .step, .commit,
    .ld_en, .ld_live, .ld_row, .ld_col, .ld_g,
    .x_all, .x_prev_all
  );

  residual_unit #(
    .ROWS(ROWS), .COLS(COLS), .ROWS_PER_BEAT(ROWS_PER_BEAT), .EPS_W(EPS_W)
  ) u_res (
    .clk, .rst_n,
    .start    (res_start),
    .eps,
    .x_cur    (x_all),
    .x_prev   (x_prev_all),
    .done     (res_done),
    .converged(res_conv)
  );

  // The schedule only runs while a segment is being processed.
  assert property (@(posedge clk) disable iff (!rst_n) iter_busy |-> busy)
    else $error("schedule running outside a segment");

endmodule
