// iter_ctrl: schedule controller of one segment's restoration.
//
// On start it steps every processor through the seven-step schedule of one iteration,
// again and again, until the segment has converged or max_iter iterations are done.
// The convergence test of iteration k runs while iteration k+1 is computed: at step 1 of
// every iteration after the first, res_start launches the residual unit, which reads the
// committed x_k and x_{k-1}; these stay unchanged until the next commit at step 7. At
// step 7 the controller decides:
//   * residual reported converged  -> no commit, segment done with x_k (k iterations);
//   * residual still running       -> stay at step 7 without commit (a residual stall);
//   * otherwise                    -> commit x_{k+1}; done if that was iteration max_iter.
// A max_iter of 0 is treated as 1. When the residual test fits in steps 1 to 6 (the
// default 8-row array, two rows per cycle), each iteration takes exactly seven cycles.
//
// Outputs: step and commit to all processors; done pulses one cycle when the segment is
// finished; iters then holds the number of committed iterations, and conv_stop tells
// whether the residual (1) or the iteration limit (0) ended it. stall_cycles counts the
// cycles spent waiting for the residual. The seven-step schedule and the stopping rule
// follow the published algorithm; overlapping the residual test with the next iteration,
// the iteration limit and the stall are this design's own.
module iter_ctrl
  import restore_pkg::*;
#(
  parameter int ITER_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ITER_W-1:0] max_iter,
  input  logic              res_done,
  input  logic              res_conv,
  output step_e             step,
  output logic              commit,
  output logic              res_start,
  output logic              busy,
  output logic              done,
  output logic [ITER_W-1:0] iters,
  output logic              conv_stop,
  output logic [31:0]       stall_cycles
);

  logic              run;
  logic [2:0]        cnt;        // current step 1..7 while run
  logic              res_wait;   // residual test launched, result not yet seen
  logic              res_ok;     // result seen and converged
  logic [ITER_W-1:0] limit;

  assign limit = (max_iter == '0) ? ITER_W'(1) : max_iter;
  assign step  = run ? step_e'(cnt) : STEP_HOLD;
  assign busy  = run;

  logic at7, stop_conv, stalled;
  assign at7       = run && (int'(cnt) == N_STEPS);
  assign stop_conv = at7 && (res_ok || (res_wait && res_done && res_conv));
  assign stalled   = at7 && res_wait && !res_done;
  assign commit    = at7 && !stop_conv && !stalled;
  assign res_start = run && (cnt == 3'd1) && (iters != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run          <= 1'b0;
      cnt          <= 3'd1;
      res_wait     <= 1'b0;
      res_ok       <= 1'b0;
      iters        <= '0;
      done         <= 1'b0;
      conv_stop    <= 1'b0;
      stall_cycles <= '0;
    end else begin
      done <= 1'b0;
      if (!run) begin
        if (start) begin
          run       <= 1'b1;
          cnt       <= 3'd1;
          iters     <= '0;
          res_wait  <= 1'b0;
          res_ok    <= 1'b0;
          conv_stop <= 1'b0;
        end
      end else begin
        if (res_start) begin
          res_wait <= 1'b1;
          res_ok   <= 1'b0;
        end else if (res_wait && res_done) begin
          res_wait <= 1'b0;
          res_ok   <= res_conv;
        end
        if (stalled) stall_cycles <= stall_cycles + 1;
        if (stop_conv) begin
          run       <= 1'b0;
          done      <= 1'b1;
          conv_stop <= 1'b1;
        end else if (commit) begin
          iters <= iters + 1'b1;
          if (iters + 1'b1 >= limit) begin
            run  <= 1'b0;
            done <= 1'b1;
          end else begin
            cnt <= 3'd1;
          end
        end else if (!at7) begin
          cnt <= cnt + 3'd1;
        end
      end
    end
  end

  // The residual result must arrive only while a test is outstanding.
  assert property (@(posedge clk) disable iff (!rst_n) res_done |-> res_wait)
    else $error("residual result without a pending test");
  // Commit happens only at step 7.
  assert property (@(posedge clk) disable iff (!rst_n) commit |-> step == STEP_7)
    else $error("commit outside step 7");

endmodule
