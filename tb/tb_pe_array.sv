// tb_pe_array: self-checking test of the processor array.
//
// Loads a random segment through the addressed load port, runs several iterations of the
// seven-step schedule and compares every pixel after each iteration with a reference
// computed in the testbench: the weighted 3x3 sum over the full neighbourhood (diagonals
// included) with zero outside the array, normalised, scaled by the gain and subtracted
// from f(k) + lambda*g. Some processors are loaded as outside the image and must stay
// zero. A non-square array is used so that row/column mix-ups show.
module tb_pe_array;
  import restore_pkg::*;

  localparam int ROWS = 5;
  localparam int COLS = 7;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  step_e step = STEP_HOLD;
  logic  commit = 1'b0;
  logic  ld_en = 1'b0;
  logic  ld_live = 1'b1;
  logic [$clog2(ROWS)-1:0] ld_row = '0;
  logic [$clog2(COLS)-1:0] ld_col = '0;
  val_t  ld_g = '0;
  val_t [ROWS-1:0][COLS-1:0] x_all, x_prev_all;

  int checks = 0, failures = 0;

  pe_array #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint f[ROWS][COLS], fn[ROWS][COLS], lg[ROWS][COLS];
  bit live[ROWS][COLS];

  function automatic longint at(int r, int c);
    if (r < 0 || r >= ROWS || c < 0 || c >= COLS) return 0;
    return f[r][c];
  endfunction

  initial begin
    longint acc;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int seg = 0; seg < 4; seg++) begin
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          longint g;
          g = longint'($urandom_range(0, 255)) <<< FRAC_W;
          live[r][c] = (seg == 0) || ($urandom_range(0, 4) != 0);
          lg[r][c] = live[r][c] ? (g >>> 1) : 0;
          f[r][c]  = lg[r][c];
          ld_live <= live[r][c];
          ld_en  <= 1'b1;
          ld_row <= r[$clog2(ROWS)-1:0];
          ld_col <= c[$clog2(COLS)-1:0];
          ld_g   <= val_t'(g);
          @(posedge clk);
        end
      ld_en <= 1'b0;
      @(posedge clk);
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          checks++;
          if (x_all[r][c] != val_t'(f[r][c])) begin
            failures++;
            $display("FAIL load (%0d,%0d): got %0d expected %0d", r, c, x_all[r][c], f[r][c]);
          end
        end
      for (int k = 0; k < 6; k++) begin
        for (int s = 1; s <= 7; s++) begin
          step   <= step_e'(s);
          commit <= (s == 7);
          @(posedge clk);
        end
        step   <= STEP_HOLD;
        commit <= 1'b0;
        @(posedge clk);
        for (int r = 0; r < ROWS; r++)
          for (int c = 0; c < COLS; c++) begin
            acc = 0;
            for (int dr = -1; dr <= 1; dr++)
              for (int dc = -1; dc <= 1; dc++)
                if (dr != 0 || dc != 0) acc += at(r + dr, c + dc);
            acc += f[r][c] <<< 3;
            fn[r][c] = live[r][c] ? f[r][c] + lg[r][c] - ((acc >>> 4) >>> 1) : 0;
          end
        for (int r = 0; r < ROWS; r++)
          for (int c = 0; c < COLS; c++) begin
            checks++;
            if (x_all[r][c] != val_t'(fn[r][c]) ||
                (live[r][c] && x_prev_all[r][c] != val_t'(f[r][c]))) begin
              failures++;
              $display("FAIL iter %0d (%0d,%0d): got %0d/%0d expected %0d/%0d", k, r, c,
                       x_all[r][c], x_prev_all[r][c], fn[r][c], f[r][c]);
            end
            f[r][c] = fn[r][c];
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
