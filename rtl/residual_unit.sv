// residual_unit: convergence test of one segment.
//
// After an iteration the residual
//     residual = sum (x_k - x_{k-1})^2 / sum (x_{k-1})^2      over all pixels of the segment
// decides whether the segment is finished: it is when residual < eps. This unit avoids
// the division by testing  sum d^2 * 2^EPS_W < eps * sum x_{k-1}^2, with eps an unsigned
// EPS_W-bit fraction (eps / 2^EPS_W). A segment whose estimate did not change at all
// (sum d^2 = 0) also counts as converged, so an all-zero segment terminates.
//
// The array's values are read a group of ROWS_PER_BEAT rows per clock cycle (one squarer
// pair per pixel of the group), so a test takes BEATS = ceil(ROWS / ROWS_PER_BEAT) cycles
// of accumulation followed by one compare cycle. Timing: a one-cycle start pulse; the
// inputs must stay constant for the BEATS cycles that follow; done is high for exactly one
// cycle, BEATS + 1 cycles after start, together with converged. The residual and the
// stopping rule follow the published algorithm; the row-serial evaluation and the
// division-free compare are this design's choices.
module residual_unit
  import restore_pkg::*;
#(
  parameter int ROWS          = 8,
  parameter int COLS          = 8,
  parameter int ROWS_PER_BEAT = 2,
  parameter int EPS_W         = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [EPS_W-1:0]          eps,
  input  val_t [ROWS-1:0][COLS-1:0] x_cur,
  input  val_t [ROWS-1:0][COLS-1:0] x_prev,
  output logic                      done,
  output logic                      converged
);

  localparam int BEATS  = (ROWS + ROWS_PER_BEAT - 1) / ROWS_PER_BEAT;
  localparam int ACC_W  = 2 * (VAL_W + 1) + $clog2(ROWS * COLS + 1);
  localparam int CMP_W  = ACC_W + EPS_W;
  localparam int BEAT_W = $clog2(BEATS + 1);

  typedef enum logic [1:0] {R_IDLE, R_ACC, R_CMP} rstate_e;
  rstate_e state;
  logic [BEAT_W-1:0] beat;
  logic [ACC_W-1:0]  acc_d, acc_x;

  // Sum of squares of the rows in the current beat.
  logic [ACC_W-1:0] beat_d, beat_x;
  always_comb begin
    logic signed [2*VAL_W+1:0] d, xp;
    d  = '0;
    xp = '0;
    beat_d = '0;
    beat_x = '0;
    for (int i = 0; i < ROWS_PER_BEAT; i++) begin
      int r;
      r = int'(beat) * ROWS_PER_BEAT + i;
      if (r < ROWS) begin
        for (int c = 0; c < COLS; c++) begin
          xp = (2*VAL_W+2)'(x_prev[r][c]);
          d  = (2*VAL_W+2)'(x_cur[r][c]) - xp;
          beat_d = beat_d + ACC_W'(d * d);
          beat_x = beat_x + ACC_W'(xp * xp);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= R_IDLE;
      beat  <= '0;
      acc_d <= '0;
      acc_x <= '0;
    end else begin
      unique case (state)
        R_IDLE: if (start) begin
          state <= R_ACC;
          beat  <= '0;
          acc_d <= '0;
          acc_x <= '0;
        end
        R_ACC: begin
          acc_d <= acc_d + beat_d;
          acc_x <= acc_x + beat_x;
          if (int'(beat) == BEATS - 1) state <= R_CMP;
          else beat <= beat + 1'b1;
        end
        R_CMP: state <= R_IDLE;
        default: state <= R_IDLE;
      endcase
    end
  end

  logic [CMP_W-1:0] lhs, rhs;
  assign lhs       = {acc_d, {EPS_W{1'b0}}};
  assign rhs       = CMP_W'(acc_x) * CMP_W'(eps);
  assign done      = (state == R_CMP);
  assign converged = done && ((acc_d == '0) || (lhs < rhs));

endmodule
