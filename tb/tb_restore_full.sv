// tb_restore_full: restores a complete 128 x 96 image with the engine at its default
// parameters (8 x 8 processors, 2-pixel overlap, two residual rows per cycle).
//
// A synthetic scene is blurred with the engine's 3x3 kernel, noise is added, and the
// engine restores the whole image segment by segment from a host memory model. The
// output image and every segment's iteration count and stopping rule are compared with a
// reference of the algorithm computed in the testbench, and every iteration must take
// exactly seven cycles.
module tb_restore_full;
  import restore_pkg::*;

  localparam int CW = 12;
  localparam int ROWS = 8, COLS = 8, OVL = 2, HALO = 1, CORE = 6;
  localparam int DEPTH = 32768;
  localparam int OUT = 16384;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (20000000) @(posedge clk);
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

  // ---------------- shared controls ----------------
  logic          start = 1'b0;
  logic [CW-1:0] img_w = '0, img_h = '0, off_x = '0, off_y = '0;
  logic [15:0]   eps = '0, max_iter = '0;
  logic [23:0]   out_base = 24'(OUT);

  // ---------------- engine: default parameters ----------------
  logic a_busy, a_done, a_seg_done, a_seg_conv;
  logic [15:0] a_seg_iters;
  logic signed [CW+1:0] a_seg_x, a_seg_y;
  logic [31:0] a_stalls;
  logic a_rqv, a_rqr, a_rsv, a_rsr, a_wv, a_wr;
  logic [23:0] a_rqa, a_wa;
  logic [7:0] a_rsd, a_wd;
  int a_req_st, a_gap, a_wr_st, a_bad;

  restore_top u_a (
    .clk, .rst_n, .start, .img_w, .img_h, .off_x, .off_y, .out_base, .eps, .max_iter,
    .busy(a_busy), .done(a_done), .seg_done(a_seg_done), .seg_iters(a_seg_iters),
    .seg_conv(a_seg_conv), .seg_x(a_seg_x), .seg_y(a_seg_y), .residual_stalls(a_stalls),
    .rd_req_valid(a_rqv), .rd_req_ready(a_rqr), .rd_req_addr(a_rqa),
    .rd_rsp_valid(a_rsv), .rd_rsp_ready(a_rsr), .rd_rsp_data(a_rsd),
    .wr_valid(a_wv), .wr_ready(a_wr), .wr_addr(a_wa), .wr_data(a_wd));

  host_mem_model #(.DEPTH(DEPTH)) u_ha (
    .clk, .stall_en(1'b0),
    .rd_req_valid(a_rqv), .rd_req_ready(a_rqr), .rd_req_addr(a_rqa),
    .rd_rsp_valid(a_rsv), .rd_rsp_ready(a_rsr), .rd_rsp_data(a_rsd),
    .wr_valid(a_wv), .wr_ready(a_wr), .wr_addr(a_wa), .wr_data(a_wd),
    .req_stalls(a_req_st), .rsp_gaps(a_gap), .wr_stalls(a_wr_st), .bad_addr(a_bad));

  // ---------------- reference model ----------------
  int W, H, OX, OY;
  logic [7:0] g_img[DEPTH];
  logic [7:0] ref_out[DEPTH];
  int ref_iters[$], ref_conv[$];
  int n_conv_stop, n_limit_stop, n_zero_fill, n_discard, n_clamp;

  function automatic longint sat(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  task automatic reference();
    longint f[ROWS][COLS], fp[ROWS][COLS], fn[ROWS][COLS], lg[ROWS][COLS];
    bit live[ROWS][COLS];
    int sx, sy, k, limit;
    longint num, den, acc, d;
    ref_iters.delete();
    ref_conv.delete();
    limit = (max_iter == 0) ? 1 : int'(max_iter);
    sy = -OY;
    while (1) begin
      sx = -OX;
      while (1) begin
        for (int r = 0; r < ROWS; r++)
          for (int c = 0; c < COLS; c++) begin
            int y, x;
            y = sy - HALO + r;
            x = sx - HALO + c;
            live[r][c] = (y >= 0 && x >= 0 && y < H && x < W);
            if (live[r][c]) lg[r][c] = (longint'(g_img[y * W + x]) <<< FRAC_W) >>> 1;
            else begin
              lg[r][c] = 0;
              n_zero_fill++;
            end
            f[r][c] = lg[r][c];
          end
        k = 0;
        while (1) begin
          for (int r = 0; r < ROWS; r++)
            for (int c = 0; c < COLS; c++) begin
              acc = f[r][c] <<< 3;
              for (int dr = -1; dr <= 1; dr++)
                for (int dc = -1; dc <= 1; dc++)
                  if ((dr != 0 || dc != 0) && r + dr >= 0 && r + dr < ROWS && c + dc >= 0 && c + dc < COLS)
                    acc += f[r + dr][c + dc];
              // pixels outside the image do not exist: they stay zero
              fn[r][c] = live[r][c] ? sat(f[r][c] + lg[r][c] - ((acc >>> 4) >>> 1)) : 0;
            end
          fp = f;
          f = fn;
          k++;
          if (k >= limit) begin
            ref_conv.push_back(0);
            n_limit_stop++;
            break;
          end
          num = 0;
          den = 0;
          for (int r = 0; r < ROWS; r++)
            for (int c = 0; c < COLS; c++) begin
              d = f[r][c] - fp[r][c];
              num += d * d;
              den += fp[r][c] * fp[r][c];
            end
          if (num == 0 || (num <<< 16) < longint'(eps) * den) begin
            ref_conv.push_back(1);
            n_conv_stop++;
            break;
          end
        end
        ref_iters.push_back(k);
        for (int r = 0; r < ROWS; r++)
          for (int c = 0; c < COLS; c++) begin
            int y, x;
            y = sy - HALO + r;
            x = sx - HALO + c;
            if (y < 0 || x < 0 || y >= H || x >= W) continue;
            if (r < HALO || c < HALO || r >= ROWS - HALO || c >= COLS - HALO) n_discard++;
            else begin
              ref_out[y * W + x] = val_to_pix(val_t'(f[r][c]));
              if (((f[r][c] + 8) >>> 4) > 255 || ((f[r][c] + 8) >>> 4) < 0) n_clamp++;
            end
          end
        if (sx + CORE >= W) break;
        sx += CORE;
      end
      if (sy + CORE >= H) break;
      sy += CORE;
    end
  endtask

  // ---------------- per-segment monitors ----------------
  int a_seg_q[$], a_conv_q[$];
  int a_run, a_seg_run[$];
  always @(negedge clk) begin
    if (u_a.step != STEP_HOLD) a_run++;
    if (a_seg_done) begin
      a_seg_q.push_back(int'(a_seg_iters));
      a_conv_q.push_back(int'(a_seg_conv));
      a_seg_run.push_back(a_run);
      a_run = 0;
    end
  end

  // ---------------- scene ----------------
  task automatic make_image(input int w, input int h, input int noise);
    int o[DEPTH];
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        // a bright shape bounded by four lines, with a notch; dark background
        bit in_shape;
        in_shape = (x + y > (w + h) / 4) && (x + y < 3 * (w + h) / 4) &&
                   (x - y < w / 3) && (y - x < h / 3) && !(x > w / 2 && y > h / 2 && x < w / 2 + 3);
        o[y * w + x] = in_shape ? 250 : 40;
        if ((x * 7 + y * 3) % 23 == 0) o[y * w + x] = 255;
      end
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        int s, v;
        s = 8 * o[y * w + x];
        for (int dy = -1; dy <= 1; dy++)
          for (int dx = -1; dx <= 1; dx++)
            if ((dy != 0 || dx != 0) && y + dy >= 0 && y + dy < h && x + dx >= 0 && x + dx < w)
              s += o[(y + dy) * w + x + dx];
        v = s / 16 + ((noise > 0) ? ($urandom_range(0, 2 * noise) - noise) : 0);
        g_img[y * w + x] = (v < 0) ? 8'd0 : (v > 255) ? 8'd255 : 8'(v);
      end
  endtask

  task automatic run(input int w, input int h, input int ox, input int oy,
                     input int e, input int mi, input int noise);
    int a_mis;
    W = w; H = h; OX = ox; OY = oy;
    make_image(w, h, noise);
    for (int i = 0; i < w * h; i++) begin
      u_ha.mem[i] = g_img[i];
      u_ha.mem[OUT + i] = 8'h5a;
    end
    eps = 16'(e);
    max_iter = 16'(mi);
    reference();
    a_seg_q.delete(); a_conv_q.delete();
    a_seg_run.delete();
    a_run = 0;
    @(posedge clk);
    img_w <= CW'(w); img_h <= CW'(h); off_x <= CW'(ox); off_y <= CW'(oy);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    while (!a_done) @(posedge clk);
    repeat (2) @(posedge clk);
    a_mis = 0;
    for (int i = 0; i < w * h; i++) begin
      if (u_ha.mem[OUT + i] != ref_out[i]) begin
        a_mis++;
        if (a_mis < 4) $display("A pixel %0d: got %0d expected %0d", i, u_ha.mem[OUT + i], ref_out[i]);
      end
    end
    check("engine A output pixels differing from reference", a_mis, 0);
    check("engine A segments", a_seg_q.size(), ref_iters.size());
    for (int s = 0; s < ref_iters.size() && s < a_seg_q.size(); s++) begin
      check("engine A iterations of segment", a_seg_q[s], ref_iters[s]);
      check("engine A stop rule", a_conv_q[s], ref_conv[s]);
      // seven cycles per iteration, plus the aborted one after a residual stop
      check("engine A schedule cycles", a_seg_run[s], 7 * (ref_iters[s] + ref_conv[s]));
    end
    check("host address errors", a_bad, 0);
  endtask

  initial begin
    n_conv_stop = 0; n_limit_stop = 0; n_zero_fill = 0; n_discard = 0; n_clamp = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    run(128, 96, 0, 0, 66, 200, 6);   // eps about 1e-3
    check("no residual stalls at the default sizes", a_stalls, 0);
    $display("segments %0d, stops by residual %0d, by limit %0d", a_seg_q.size(), n_conv_stop, n_limit_stop);
    checks++; if (n_conv_stop == 0) begin failures++; $display("FAIL no residual stop"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
