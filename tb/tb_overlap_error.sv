// tb_overlap_error: segmented restoration against restoration of the whole image at once.
//
// The zero boundary of a segment moves one pixel inward per iteration, so a core is
// exact as long as the overlap border on each side is at least as wide as the number of
// iterations. Two engines restore the same blurred, noisy scene for a fixed number of
// iterations (eps = 0, so the iteration limit ends every segment):
//   engine A: the default 8 x 8 array, 1-pixel border (o = 2);
//   engine B: a 12 x 12 array with a 4-pixel border (o = 8).
// Their outputs are compared with the same iteration applied to the whole image with
// zero outside it. Checks: after 1 iteration both engines are exact, after 4 iterations
// engine B is still exact, and engine A then shows the boundary error (which is
// reported, as the error the default overlap accepts).
module tb_overlap_error;
  import restore_pkg::*;

  localparam int CW = 12;
  localparam int DEPTH = 4096;
  localparam int OUT = 2048;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (2000000) @(posedge clk);
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

  logic          start = 1'b0;
  logic [CW-1:0] img_w = '0, img_h = '0;
  logic [15:0]   max_iter = '0;

  // ---------------- engine A ----------------
  logic a_done, a_rqv, a_rqr, a_rsv, a_rsr, a_wv, a_wr;
  logic [23:0] a_rqa, a_wa;
  logic [7:0] a_rsd, a_wd;
  int a_s0, a_s1, a_s2, a_bad;

  restore_top u_a (
    .clk, .rst_n, .start, .img_w, .img_h, .off_x(12'd0), .off_y(12'd0),
    .out_base(24'(OUT)), .eps(16'd0), .max_iter,
    .busy(), .done(a_done), .seg_done(), .seg_iters(), .seg_conv(), .seg_x(), .seg_y(),
    .residual_stalls(),
    .rd_req_valid(a_rqv), .rd_req_ready(a_rqr), .rd_req_addr(a_rqa),
    .rd_rsp_valid(a_rsv), .rd_rsp_ready(a_rsr), .rd_rsp_data(a_rsd),
    .wr_valid(a_wv), .wr_ready(a_wr), .wr_addr(a_wa), .wr_data(a_wd));

  host_mem_model #(.DEPTH(DEPTH)) u_ha (
    .clk, .stall_en(1'b0),
    .rd_req_valid(a_rqv), .rd_req_ready(a_rqr), .rd_req_addr(a_rqa),
    .rd_rsp_valid(a_rsv), .rd_rsp_ready(a_rsr), .rd_rsp_data(a_rsd),
    .wr_valid(a_wv), .wr_ready(a_wr), .wr_addr(a_wa), .wr_data(a_wd),
    .req_stalls(a_s0), .rsp_gaps(a_s1), .wr_stalls(a_s2), .bad_addr(a_bad));

  // ---------------- engine B ----------------
  logic b_done, b_rqv, b_rqr, b_rsv, b_rsr, b_wv, b_wr;
  logic [23:0] b_rqa, b_wa;
  logic [7:0] b_rsd, b_wd;
  int b_s0, b_s1, b_s2, b_bad;

  restore_top #(.ROWS(12), .COLS(12), .OVL(8), .ROWS_PER_BEAT(3)) u_b (
    .clk, .rst_n, .start, .img_w, .img_h, .off_x(12'd0), .off_y(12'd0),
    .out_base(24'(OUT)), .eps(16'd0), .max_iter,
    .busy(), .done(b_done), .seg_done(), .seg_iters(), .seg_conv(), .seg_x(), .seg_y(),
    .residual_stalls(),
    .rd_req_valid(b_rqv), .rd_req_ready(b_rqr), .rd_req_addr(b_rqa),
    .rd_rsp_valid(b_rsv), .rd_rsp_ready(b_rsr), .rd_rsp_data(b_rsd),
    .wr_valid(b_wv), .wr_ready(b_wr), .wr_addr(b_wa), .wr_data(b_wd));

  host_mem_model #(.DEPTH(DEPTH)) u_hb (
    .clk, .stall_en(1'b0),
    .rd_req_valid(b_rqv), .rd_req_ready(b_rqr), .rd_req_addr(b_rqa),
    .rd_rsp_valid(b_rsv), .rd_rsp_ready(b_rsr), .rd_rsp_data(b_rsd),
    .wr_valid(b_wv), .wr_ready(b_wr), .wr_addr(b_wa), .wr_data(b_wd),
    .req_stalls(b_s0), .rsp_gaps(b_s1), .wr_stalls(b_s2), .bad_addr(b_bad));

  // ---------------- scene and whole-image reference ----------------
  int W, H;
  logic [7:0] g_img[DEPTH];
  logic [7:0] whole[DEPTH];

  task automatic make_image(input int w, input int h);
    int o[DEPTH];
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        o[y * w + x] = ((x - w / 2) * (x - w / 2) + (y - h / 2) * (y - h / 2) < (h * h) / 9) ? 230 : 50;
        if ((x + 2 * y) % 11 == 0) o[y * w + x] = 255;
      end
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        int s, v;
        s = 8 * o[y * w + x];
        for (int dy = -1; dy <= 1; dy++)
          for (int dx = -1; dx <= 1; dx++)
            if ((dy != 0 || dx != 0) && y + dy >= 0 && y + dy < h && x + dx >= 0 && x + dx < w)
              s += o[(y + dy) * w + x + dx];
        v = s / 16 + $urandom_range(0, 8) - 4;
        g_img[y * w + x] = (v < 0) ? 8'd0 : (v > 255) ? 8'd255 : 8'(v);
      end
  endtask

  task automatic restore_whole(input int iters);
    longint f[DEPTH], fn[DEPTH], lg[DEPTH];
    for (int i = 0; i < W * H; i++) begin
      lg[i] = (longint'(g_img[i]) <<< FRAC_W) >>> 1;
      f[i]  = lg[i];
    end
    for (int k = 0; k < iters; k++) begin
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          longint acc, v;
          acc = f[y * W + x] <<< 3;
          for (int dy = -1; dy <= 1; dy++)
            for (int dx = -1; dx <= 1; dx++)
              if ((dy != 0 || dx != 0) && y + dy >= 0 && y + dy < H && x + dx >= 0 && x + dx < W)
                acc += f[(y + dy) * W + x + dx];
          v = f[y * W + x] + lg[y * W + x] - ((acc >>> 4) >>> 1);
          fn[y * W + x] = (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
        end
      for (int i = 0; i < W * H; i++) f[i] = fn[i];
    end
    for (int i = 0; i < W * H; i++) whole[i] = val_to_pix(val_t'(f[i]));
  endtask

  task automatic run(input int iters, output int a_err, output int b_err, output int a_max);
    for (int i = 0; i < W * H; i++) begin
      u_ha.mem[i] = g_img[i];
      u_hb.mem[i] = g_img[i];
    end
    restore_whole(iters);
    max_iter = 16'(iters);
    @(posedge clk);
    img_w <= CW'(W); img_h <= CW'(H);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    fork
      begin while (!a_done) @(posedge clk); end
      begin while (!b_done) @(posedge clk); end
    join
    repeat (2) @(posedge clk);
    a_err = 0; b_err = 0; a_max = 0;
    for (int i = 0; i < W * H; i++) begin
      int d;
      d = int'(u_ha.mem[OUT + i]) - int'(whole[i]);
      if (d < 0) d = -d;
      if (d != 0) a_err++;
      if (d > a_max) a_max = d;
      if (u_hb.mem[OUT + i] != whole[i]) b_err++;
    end
    $display("%0d iterations: 1-pixel border: %0d of %0d pixels differ (max %0d grey levels); 4-pixel border: %0d differ",
             iters, a_err, W * H, a_max, b_err);
  endtask

  initial begin
    int ae, be, am;
    W = 30; H = 24;
    make_image(W, H);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    run(1, ae, be, am);
    check("1 iteration, 1-pixel border exact", ae, 0);
    check("1 iteration, 4-pixel border exact", be, 0);
    run(4, ae, be, am);
    check("4 iterations, 4-pixel border exact", be, 0);
    checks++;
    if (ae == 0) begin
      failures++;
      $display("FAIL 4 iterations with a 1-pixel border show no boundary error");
    end
    run(8, ae, be, am);
    check("host address errors", a_bad + b_bad, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
