// tb_segment_walker: self-checking test of the segment walker.
//
// For several image sizes and grid displacements it steps through all segments and
// checks each core position against a raster walk computed in the testbench, that the
// cores hits every image pixel exactly once, and that last is high on the final core
// only.
module tb_segment_walker;

  localparam int CW = 12;
  localparam int CORE = 6;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic init = 1'b0, next = 1'b0;
  logic [CW-1:0] img_w = '0, img_h = '0, off_x = '0, off_y = '0;
  logic signed [CW+1:0] sx, sy;
  logic last;

  int checks = 0, failures = 0;

  segment_walker #(.CW(CW), .CORE_W(CORE), .CORE_H(CORE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic walk(input int w, input int h, input int ox, input int oy);
    int ex, ey, nseg, covered;
    int hits[int];
    @(negedge clk);
    img_w = CW'(w); img_h = CW'(h); off_x = CW'(ox); off_y = CW'(oy);
    init = 1'b1;
    @(negedge clk);
    init = 1'b0;
    ex = -ox; ey = -oy; nseg = 0;
    forever begin
      check("sx", sx, ex);
      check("sy", sy, ey);
      for (int y = ey; y < ey + CORE; y++)
        for (int x = ex; x < ex + CORE; x++)
          if (x >= 0 && y >= 0 && x < w && y < h) begin
            if (hits.exists(y * w + x)) hits[y * w + x]++;
            else hits[y * w + x] = 1;
          end
      nseg++;
      if (ex + CORE >= w && ey + CORE >= h) begin
        check("last on final core", last, 1);
        break;
      end
      check("last before final core", last, 0);
      if (ex + CORE >= w) begin ex = -ox; ey += CORE; end
      else ex += CORE;
      next = 1'b1;
      @(negedge clk);
      next = 1'b0;
    end
    covered = 0;
    foreach (hits[i]) if (hits[i] == 1) covered++;
    check("pixels covered once", covered, w * h);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    walk(12, 12, 0, 0);
    walk(13, 7, 0, 0);
    walk(6, 6, 0, 0);
    walk(1, 1, 0, 0);
    walk(20, 9, 3, 2);
    walk(31, 17, 5, 5);
    for (int t = 0; t < 20; t++)
      walk($urandom_range(1, 40), $urandom_range(1, 40), $urandom_range(0, 5), $urandom_range(0, 5));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
