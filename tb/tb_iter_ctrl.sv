// tb_iter_ctrl: self-checking test of the schedule controller.
//
// A model of the residual unit answers each res_start after a chosen latency and
// reports convergence once the tested iterate is the K-th. The testbench checks that the
// steps run 1..7 in order, that commit happens only at step 7, the number of committed
// iterations, which rule stopped the segment, the total number of schedule cycles
// (seven per iteration plus residual stalls) and the stall counter. Latencies above six
// cycles force residual stalls; K above max_iter forces the iteration limit.
module tb_iter_ctrl;
  import restore_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic [15:0] max_iter = 16'd10;
  logic        res_done, res_conv;
  step_e       step;
  logic        commit, res_start, busy, done, conv_stop;
  logic [15:0] iters;
  logic [31:0] stall_cycles;

  int checks = 0, failures = 0;
  int lat = 4, conv_at = 3;

  iter_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // residual unit model: done 'lat' cycles after start
  int res_cnt = -1;
  int tested;   // number of the iterate under test
  always_ff @(posedge clk) begin
    if (res_start) begin
      res_cnt <= 1;
      tested  <= int'(iters);
    end else if (res_cnt > 0 && res_cnt < lat) res_cnt <= res_cnt + 1;
    else if (res_cnt == lat) res_cnt <= -1;
  end
  assign res_done = (res_cnt == lat);
  assign res_conv = res_done && (tested >= conv_at);

  // monitors, sampled between edges
  int run_cyc, commits, prev_step, order_err;
  always @(negedge clk) begin
    if (step != STEP_HOLD) begin
      run_cyc++;
      if (!(int'(step) == prev_step || int'(step) == prev_step + 1 || (int'(step) == 1 && prev_step == 7)))
        order_err++;
      prev_step = int'(step);
    end
    if (commit) begin
      commits++;
      if (step != STEP_7) order_err++;
    end
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (lat %0d conv_at %0d max %0d)", what, got, exp,
               lat, conv_at, max_iter);
    end
  endtask

  task automatic run_case(input int l, input int k, input int m);
    int stall, exp_iters, exp_cyc, exp_stall;
    lat = l;
    conv_at = k;
    max_iter <= 16'(m);
    @(posedge clk);
    run_cyc = 0; commits = 0; prev_step = 7; order_err = 0;
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    while (!done) @(posedge clk);
    @(negedge clk);
    stall = (l > 6) ? l - 6 : 0;
    if (m == 0) m = 1;
    if (k < m && k >= 1) begin
      exp_iters = k;
      exp_cyc   = 7 * (k + 1) + stall * k;
      exp_stall = stall * k;
    end else begin
      exp_iters = m;
      exp_cyc   = 7 * m + stall * (m - 1);
      exp_stall = stall * (m - 1);
    end
    check("iterations", iters, exp_iters);
    check("commits", commits, exp_iters);
    check("stopped by residual", conv_stop, (k < m && k >= 1));
    check("schedule cycles", run_cyc, exp_cyc);
    check("stall counter delta", stall_cycles - stall_before, exp_stall);
    check("step order", order_err, 0);
    check("idle after done", step, STEP_HOLD);
    stall_before = stall_cycles;
  endtask

  longint stall_before = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run_case(4, 3, 10);    // converges, no stall
    run_case(5, 1, 10);    // converges after the first iteration
    run_case(6, 5, 10);    // result exactly at step 7
    run_case(9, 4, 10);    // residual stalls
    run_case(4, 20, 10);   // iteration limit
    run_case(8, 20, 6);    // iteration limit with stalls
    run_case(3, 20, 1);    // single iteration
    run_case(3, 20, 0);    // max_iter 0 behaves as 1
    for (int t = 0; t < 40; t++)
      run_case($urandom_range(2, 10), $urandom_range(1, 12), $urandom_range(1, 10));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
