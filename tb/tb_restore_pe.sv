// tb_restore_pe: self-checking test of one restoration processor.
//
// Loads a random degraded pixel, drives random neighbour pixel values and partial sums,
// runs the seven schedule steps and compares the row partial sum (after step 2) and the
// new pixel value (after step 7) with the update equation evaluated directly in the
// testbench. Also checks that the previous estimate is kept, that an iteration without
// commit leaves the pixel alone, that one iteration takes seven clock cycles, and that a
// processor loaded as outside the image stays zero.
module tb_restore_pe;
  import restore_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  step_e step = STEP_HOLD;
  logic  commit = 1'b0;
  logic  ld_en = 1'b0;
  logic  ld_live = 1'b1;
  val_t  ld_g = '0, x_w = '0, x_e = '0;
  sum_t  ps_n = '0, ps_s = '0;
  val_t  x, x_prev;
  sum_t  ps;

  int checks = 0, failures = 0;

  restore_pe dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic val_t ref_next(val_t c, val_t lg, val_t w, val_t e, sum_t n, sum_t s);
    longint acc, sh, r;
    acc = longint'(w) + longint'(e) + longint'(s) + (longint'(c) <<< 3) + longint'(n);
    sh  = (acc >>> 4) >>> 1;
    r   = longint'(c) + longint'(lg) - sh;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return val_t'(r);
  endfunction

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run_iter(input logic do_commit, output int cycles);
    cycles = 0;
    for (int s = 1; s <= 7; s++) begin
      step   <= step_e'(s);
      commit <= do_commit && (s == 7);
      @(posedge clk);
      cycles++;
    end
    step   <= STEP_HOLD;
    commit <= 1'b0;
    @(posedge clk);
  endtask

  initial begin
    val_t c, lg, g, old;
    int cyc;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < 300; t++) begin
      g = val_t'($urandom_range(0, 255) << FRAC_W);
      if (t % 50 == 0) g = val_t'(16'h7ff0);   // large value: exercises clamping
      ld_g  <= g;
      ld_en <= 1'b1;
      @(posedge clk);
      ld_en <= 1'b0;
      @(posedge clk);
      lg = g >>> 1;
      check("f0 = lambda*g", x, lg);
      check("x_prev cleared on load", x_prev, 0);
      c = lg;
      for (int k = 0; k < 3; k++) begin
        x_w  <= val_t'($urandom_range(0, 8000) - 2000);
        x_e  <= val_t'($urandom_range(0, 8000) - 2000);
        ps_n <= sum_t'($urandom_range(0, 24000) - 6000);
        ps_s <= sum_t'($urandom_range(0, 24000) - 6000);
        if (t % 50 == 0) begin
          x_w <= val_t'(-30000); x_e <= val_t'(-30000);
          ps_n <= sum_t'(-90000); ps_s <= sum_t'(-90000);
        end
        @(posedge clk);
        run_iter(1'b1, cyc);
        check("cycles per iteration", cyc, 7);
        check("row partial sum W+C+E", ps, longint'(x_w) + longint'(c) + longint'(x_e));
        old = c;
        c = ref_next(c, lg, x_w, x_e, ps_n, ps_s);
        check("new pixel value", x, c);
        check("previous estimate", x_prev, old);
      end
      // an iteration without commit changes nothing
      run_iter(1'b0, cyc);
      check("no commit keeps pixel", x, c);
    end
    // a processor outside the image stays zero whatever its neighbours do
    for (int t = 0; t < 20; t++) begin
      ld_g    <= val_t'($urandom_range(1, 255) << FRAC_W);
      ld_live <= 1'b0;
      ld_en   <= 1'b1;
      @(posedge clk);
      ld_en   <= 1'b0;
      ld_live <= 1'b1;
      x_w  <= val_t'($urandom_range(100, 8000));
      x_e  <= val_t'($urandom_range(100, 8000));
      ps_n <= sum_t'($urandom_range(100, 24000));
      ps_s <= sum_t'($urandom_range(100, 24000));
      @(posedge clk);
      check("pixel outside the image loads as zero", x, 0);
      run_iter(1'b1, cyc);
      check("pixel outside the image stays zero", x, 0);
      check("its partial sum is W + E", ps, longint'(x_w) + longint'(x_e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
