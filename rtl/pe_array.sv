// pe_array: ROWS x COLS grid of restoration processors working in lockstep.
//
// Every processor holds one pixel of the segment. Neighbouring processors are joined in
// the four compass directions: each sends its pixel value to its W and E neighbours and
// its row partial sum (W + C + E) to its N and S neighbours, so the full 3x3
// neighbourhood reaches every processor over edge-adjacent links only. Links that would
// leave the array carry zero, the value assumed for pixels that do not exist. All
// processors receive the same schedule step and commit strobe.
//
// Loading: with ld_en high, the processor at (ld_row, ld_col) takes ld_g in that cycle;
// ld_live low marks it as a pixel outside the image, which then stays zero.
// x_all and x_prev_all expose every processor's current and previous estimate (row 0 is
// the top row, column 0 the left column) for read-out and for the residual test. The
// grid and zero boundary follow the published array; the addressed load port is this
// design's choice.
module pe_array
  import restore_pkg::*;
#(
  parameter int ROWS       = 8,
  parameter int COLS       = 8,
  parameter int R0_SHIFT   = 3,
  parameter int NORM_SHIFT = 4,
  parameter int GAIN_SHIFT = 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  step_e                   step,
  input  logic                    commit,
  input  logic                    ld_en,
  input  logic                    ld_live,
  input  logic [$clog2(ROWS)-1:0] ld_row,
  input  logic [$clog2(COLS)-1:0] ld_col,
  input  val_t                    ld_g,
  output val_t [ROWS-1:0][COLS-1:0] x_all,
  output val_t [ROWS-1:0][COLS-1:0] x_prev_all
);

  sum_t [ROWS-1:0][COLS-1:0] ps_all;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      val_t x_w, x_e;
      sum_t ps_n, ps_s;
      assign x_w  = (c > 0)        ? x_all[r][c-1]  : '0;
      assign x_e  = (c < COLS - 1) ? x_all[r][c+1]  : '0;
      assign ps_n = (r > 0)        ? ps_all[r-1][c] : '0;
      assign ps_s = (r < ROWS - 1) ? ps_all[r+1][c] : '0;

      restore_pe #(
        .R0_SHIFT  (R0_SHIFT),
        .NORM_SHIFT(NORM_SHIFT),
        .GAIN_SHIFT(GAIN_SHIFT)
      ) u_pe (
        .clk   (clk),
        .rst_n (rst_n),
        .step  (step),
        .commit(commit),
        .ld_en (ld_en && (ld_row == r) && (ld_col == c)),
        .ld_live(ld_live),
        .ld_g  (ld_g),
        .x_w   (x_w),
        .x_e   (x_e),
        .ps_n  (ps_n),
        .ps_s  (ps_s),
        .x     (x_all[r][c]),
        .x_prev(x_prev_all[r][c]),
        .ps    (ps_all[r][c])
      );
    end
  end

endmodule
