// tb_segment_ctrl: self-checking test of the segment controller with the segment walker.
//
// A host memory model answers read requests in order after a random delay and stalls
// requests and writes at random. A stand-in for the processor array records what is
// loaded; a stand-in for the schedule controller then replaces every pixel by
// g + (row * COLS + col) in grey levels, which makes the position of every value
// visible in the written image. The testbench checks: every loaded value (image pixel,
// or zero outside the image), that no pixel outside the image is requested, that every
// image pixel is written exactly once with the value of the right core position (the
// overlap border discarded), the per-segment report, and done.
module tb_segment_ctrl;
  import restore_pkg::*;

  localparam int ROWS = 8, COLS = 8, OVL = 2, CW = 12;
  localparam int HALO = OVL / 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [CW-1:0] img_w = '0, img_h = '0, off_x = '0, off_y = '0;
  logic [2*CW-1:0] out_base = 24'd100000;
  logic busy, done;
  logic walk_init, walk_next, last;
  logic signed [CW+1:0] sx, sy;
  logic iter_start, iter_done = 1'b0, iter_conv = 1'b0;
  logic [15:0] iter_count = '0;
  logic ld_en, ld_live;
  logic [2:0] ld_row, ld_col;
  val_t ld_g;
  val_t [ROWS-1:0][COLS-1:0] x_all;
  logic seg_done, seg_conv;
  logic [15:0] seg_iters;
  logic rd_req_valid, rd_req_ready, rd_rsp_valid, rd_rsp_ready;
  logic [2*CW-1:0] rd_req_addr, wr_addr;
  logic [PIX_W-1:0] rd_rsp_data, wr_data;
  logic wr_valid, wr_ready;

  int checks = 0, failures = 0;

  segment_walker #(.CW(CW), .CORE_W(COLS - OVL), .CORE_H(ROWS - OVL)) u_walk (
    .clk, .rst_n, .init(walk_init), .next(walk_next), .img_w, .img_h, .off_x, .off_y,
    .sx, .sy, .last);

  segment_ctrl #(.ROWS(ROWS), .COLS(COLS), .OVL(OVL), .CW(CW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ---------------- host memory model ----------------
  logic [7:0] mem[int];
  int written[int];
  int W, H;
  logic [7:0] rsp_q[$];
  int rsp_delay = 0;
  bit stall_on = 1'b1;

  always_ff @(posedge clk) begin
    rd_req_ready <= stall_on ? ($urandom_range(0, 3) != 0) : 1'b1;
    wr_ready     <= stall_on ? ($urandom_range(0, 3) != 0) : 1'b1;
  end

  always @(posedge clk) begin
    if (rd_req_valid && rd_req_ready) begin
      if (int'(rd_req_addr) >= W * H) begin
        failures++;
        $display("FAIL read outside the image: %0d", rd_req_addr);
      end
      rsp_q.push_back(mem.exists(int'(rd_req_addr)) ? mem[int'(rd_req_addr)] : 8'h00);
    end
    if (rd_rsp_valid && rd_rsp_ready) void'(rsp_q.pop_front());
    if (wr_valid && wr_ready) begin
      int a;
      a = int'(wr_addr) - int'(out_base);
      if (written.exists(a)) written[a]++;
      else written[a] = 1;
      check("written value", wr_data, exp_out[a]);
    end
  end
  // response: offered when the queue is non-empty and a random gap has passed
  logic rsp_gap;
  always_ff @(posedge clk) rsp_gap <= stall_on && ($urandom_range(0, 2) == 0);
  assign rd_rsp_valid = (rsp_q.size() > 0) && !rsp_gap;
  assign rd_rsp_data  = (rsp_q.size() > 0) ? rsp_q[0] : 8'h00;

  // ---------------- array and schedule stand-ins ----------------
  int exp_out[int];
  int nseg;
  always @(posedge clk) begin
    if (ld_en) begin
      int y, x;
      y = int'(sy) - HALO + int'(ld_row);
      x = int'(sx) - HALO + int'(ld_col);
      if (y >= 0 && x >= 0 && y < H && x < W) begin
        check("loaded pixel", ld_g, pix_to_val(mem[y * W + x]));
        check("live inside image", ld_live, 1);
      end else begin
        check("zero outside image", ld_g, 0);
        check("not live outside image", ld_live, 0);
      end
      x_all[ld_row][ld_col] <= ld_g;
    end
  end

  initial begin
    forever begin
      @(posedge clk);
      if (iter_start) begin
        repeat ($urandom_range(1, 20)) @(posedge clk);
        for (int r = 0; r < ROWS; r++)
          for (int c = 0; c < COLS; c++)
            x_all[r][c] <= x_all[r][c] + val_t'((r * COLS + c) << FRAC_W);
        iter_count <= 16'(nseg + 3);
        iter_conv  <= nseg[0];
        iter_done  <= 1'b1;
        @(posedge clk);
        iter_done <= 1'b0;
      end
    end
  end

  int segs_seen;
  always @(posedge clk) if (seg_done) begin
    check("segment iterations", seg_iters, nseg + 3);
    check("segment converged flag", seg_conv, nseg[0]);
    nseg++;
    segs_seen++;
  end

  task automatic run_image(input int w, input int h, input int ox, input int oy, input bit st);
    int nx, ny, ok;
    W = w; H = h;
    stall_on = st;
    mem.delete();
    written.delete();
    exp_out.delete();
    for (int i = 0; i < w * h; i++) mem[i] = 8'($urandom_range(0, 255));
    // expected output: g + position code of the core pixel in its segment
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        int r, c, v;
        r = ((y + oy) % (ROWS - OVL)) + HALO;
        c = ((x + ox) % (COLS - OVL)) + HALO;
        v = int'(mem[y * w + x]) + r * COLS + c;
        exp_out[y * w + x] = (v > 255) ? 255 : v;
      end
    nseg = 0;
    segs_seen = 0;
    @(posedge clk);
    img_w <= CW'(w); img_h <= CW'(h); off_x <= CW'(ox); off_y <= CW'(oy);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    while (!done) @(posedge clk);
    @(posedge clk);
    nx = (w + ox + (COLS - OVL) - 1) / (COLS - OVL);
    ny = (h + oy + (ROWS - OVL) - 1) / (ROWS - OVL);
    check("segments", segs_seen, nx * ny);
    ok = 0;
    foreach (written[i]) if (written[i] == 1) ok++;
    check("pixels written once", ok, w * h);
    check("write count", written.size(), w * h);
    check("idle after done", busy, 0);
  endtask

  initial begin
    x_all = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run_image(12, 12, 0, 0, 1'b0);
    run_image(13, 9, 0, 0, 1'b1);
    run_image(20, 14, 2, 4, 1'b1);
    run_image(5, 3, 0, 0, 1'b1);
    run_image(17, 17, 5, 1, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
