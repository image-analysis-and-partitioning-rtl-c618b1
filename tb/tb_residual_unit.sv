// tb_residual_unit: self-checking test of the convergence test.
//
// Presents random current/previous segments (some nearly converged, some far from it,
// and an unchanged one), starts the unit and compares the converged flag with the
// residual computed in the testbench as a real-valued ratio against eps / 2^16. Checks
// that done comes exactly BEATS + 1 cycles after start and lasts one cycle. Uses three
// rows per beat on a 7-row array so that the last beat is a partial one.
module tb_residual_unit;
  import restore_pkg::*;

  localparam int ROWS = 7;
  localparam int COLS = 4;
  localparam int RPB  = 3;
  localparam int BEATS = (ROWS + RPB - 1) / RPB;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [15:0] eps = '0;
  val_t [ROWS-1:0][COLS-1:0] x_cur, x_prev;
  logic done, converged;

  int checks = 0, failures = 0;
  int n_conv = 0, n_not = 0;

  residual_unit #(.ROWS(ROWS), .COLS(COLS), .ROWS_PER_BEAT(RPB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real num, den;
    logic exp_conv;
    int wait_cyc, spread;
    x_cur = '0;
    x_prev = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < 400; t++) begin
      @(posedge clk);
      spread = (t % 4 == 0) ? 0 : (t % 4 == 1) ? 2 : (t % 4 == 2) ? 40 : 3000;
      num = 0.0;
      den = 0.0;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          int p, d;
          p = $urandom_range(0, 8000) - 500;
          d = (spread == 0) ? 0 : $urandom_range(0, 2 * spread) - spread;
          if (p + d > 32767) d = 0;
          x_prev[r][c] = val_t'(p);
          x_cur[r][c]  = val_t'(p + d);
          num += real'(d) * real'(d);
          den += real'(p) * real'(p);
        end
      eps = 16'($urandom_range(1, 65535));
      if (t % 7 == 0) eps = 16'd66;   // about 1e-3
      if (num == 0.0) exp_conv = 1'b1;
      else exp_conv = (num / den) < (real'(eps) / 65536.0);
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      // sample between edges so the count does not depend on event ordering
      wait_cyc = 0;
      do begin
        @(negedge clk);
        wait_cyc++;
      end while (!done);
      checks++;
      if (wait_cyc != BEATS + 1) begin
        failures++;
        $display("FAIL latency %0d, expected %0d", wait_cyc, BEATS + 1);
      end
      checks++;
      if (converged != exp_conv) begin
        failures++;
        $display("FAIL t=%0d converged=%0b expected %0b (num %f den %f eps %0d)",
                 t, converged, exp_conv, num, den, eps);
      end
      if (exp_conv) n_conv++; else n_not++;
      @(negedge clk);
      checks++;
      if (done) begin
        failures++;
        $display("FAIL done longer than one cycle");
      end
    end
    checks++;
    if (n_conv == 0 || n_not == 0) begin
      failures++;
      $display("FAIL both outcomes must occur (%0d/%0d)", n_conv, n_not);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
