// segment_ctrl: moves segments between host memory and the processor array.
//
// The array holds a segment of ROWS x COLS pixels: a core of (ROWS-OVL) x (COLS-OVL)
// pixels (n x m) surrounded by an overlap border of OVL/2 pixels on every side, so that
// ROWS = n + o and COLS = m + o with o = OVL. For every core position given by the
// segment walker the controller
//   1. LOAD:   reads the segment window from host memory in raster order. Pixels that lie
//              outside the image are not requested; the processors there are marked as
//              not live and hold zero, the value assumed for missing neighbours.
//   2. ITER:   starts the schedule controller and waits until it reports the segment done;
//              it then pulses seg_done with the iteration count.
//   3. UNLOAD: writes the core back to host memory at out_base + y * img_w + x,
//              converted to PIX_W-bit grey values (rounded, clamped). The overlap
//              border is discarded, and so are core pixels outside the image.
// After the last segment it pulses done. The result goes to its own area (out_base) so
// that the overlap of later segments still reads the degraded input.
//
// Host channel (all valid/ready, a transfer happens when both are high):
//   read request  rd_req_valid/rd_req_ready/rd_req_addr (address = y * img_w + x)
//   read response rd_rsp_valid/rd_rsp_ready/rd_rsp_data, in request order
//   write         wr_valid/wr_ready/wr_addr/wr_data
// Requests may run ahead of responses; rd_rsp_ready is low while the load position is a
// zero-filled one. With a host that answers every cycle, LOAD takes about ROWS*COLS
// cycles and UNLOAD one cycle per core pixel. Loading one segment, restoring it and
// writing its core back follows the published system; the channel protocol, raster
// order and grey-value conversion are this design's choices. The four fraction bits of
// ld_g are always zero, since the host delivers whole grey values.
module segment_ctrl
  import restore_pkg::*;
#(
  parameter int ROWS   = 8,
  parameter int COLS   = 8,
  parameter int OVL    = 2,
  parameter int CW     = 12,
  parameter int ITER_W = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // control
  input  logic                      start,
  input  logic [CW-1:0]             img_w,
  input  logic [CW-1:0]             img_h,
  input  logic [2*CW-1:0]           out_base,
  output logic                      busy,
  output logic                      done,
  // segment walker
  output logic                      walk_init,
  output logic                      walk_next,
  input  logic signed [CW+1:0]      sx,
  input  logic signed [CW+1:0]      sy,
  input  logic                      last,
  // schedule controller
  output logic                      iter_start,
  input  logic                      iter_done,
  input  logic [ITER_W-1:0]         iter_count,
  input  logic                      iter_conv,
  // processor array
  output logic                      ld_en,
  output logic                      ld_live,
  output logic [$clog2(ROWS)-1:0]   ld_row,
  output logic [$clog2(COLS)-1:0]   ld_col,
  output val_t                      ld_g,
  input  val_t [ROWS-1:0][COLS-1:0] x_all,
  // per-segment report
  output logic                      seg_done,
  output logic [ITER_W-1:0]         seg_iters,
  output logic                      seg_conv,
  // host memory
  output logic                      rd_req_valid,
  input  logic                      rd_req_ready,
  output logic [2*CW-1:0]           rd_req_addr,
  input  logic                      rd_rsp_valid,
  output logic                      rd_rsp_ready,
  input  logic [PIX_W-1:0]          rd_rsp_data,
  output logic                      wr_valid,
  input  logic                      wr_ready,
  output logic [2*CW-1:0]           wr_addr,
  output logic [PIX_W-1:0]          wr_data
);

  localparam int HALO = OVL / 2;
  localparam int RW   = $clog2(ROWS);
  localparam int CWD  = $clog2(COLS);
  localparam logic signed [CW+1:0] HALO_S = (CW+2)'(HALO);

  typedef enum logic [2:0] {S_IDLE, S_START, S_LOAD, S_ITER, S_UNLOAD, S_NEXT} state_e;
  state_e state;

  logic [CW-1:0]   w_r, h_r;
  logic [2*CW-1:0] ob_r;

  // position counters: request side (q), response side (p), write-back (u, core coords)
  logic [RW-1:0]  q_r, p_r, u_r;
  logic [CWD-1:0] q_c, p_c, u_c;
  logic           q_end, p_end;

  function automatic logic inside_img(input logic signed [CW+1:0] y,
                                      input logic signed [CW+1:0] x,
                                      input logic [CW-1:0] hh, input logic [CW-1:0] ww);
    return (y >= 0) && (x >= 0) && (y < (CW+2)'(hh)) && (x < (CW+2)'(ww));
  endfunction

  // Only called for positions inside the image, so the coordinates are non-negative.
  function automatic logic [2*CW-1:0] img_addr(input logic [CW-1:0] y,
                                               input logic [CW-1:0] x,
                                               input logic [CW-1:0] ww);
    return (2*CW)'(y) * (2*CW)'(ww) + (2*CW)'(x);
  endfunction

  // image coordinates of the three positions
  logic signed [CW+1:0] qy, qx, py, px, uy, ux;
  assign qy = sy - HALO_S + (CW+2)'(q_r);
  assign qx = sx - HALO_S + (CW+2)'(q_c);
  assign py = sy - HALO_S + (CW+2)'(p_r);
  assign px = sx - HALO_S + (CW+2)'(p_c);
  assign uy = sy + (CW+2)'(u_r);
  assign ux = sx + (CW+2)'(u_c);

  logic q_in, p_in, u_in;
  assign q_in = inside_img(qy, qx, h_r, w_r);
  assign p_in = inside_img(py, px, h_r, w_r);
  assign u_in = inside_img(uy, ux, h_r, w_r);

  // ---------------- load ----------------
  logic q_adv, p_adv;
  assign rd_req_valid = (state == S_LOAD) && !q_end && q_in;
  assign rd_req_addr  = img_addr(qy[CW-1:0], qx[CW-1:0], w_r);
  assign q_adv        = (state == S_LOAD) && !q_end && (!q_in || rd_req_ready);

  assign rd_rsp_ready = (state == S_LOAD) && !p_end && p_in;
  assign p_adv        = (state == S_LOAD) && !p_end && (!p_in || rd_rsp_valid);
  assign ld_en        = p_adv;
  assign ld_live      = p_in;
  assign ld_row       = p_r;
  assign ld_col       = p_c;
  assign ld_g         = p_in ? pix_to_val(rd_rsp_data) : '0;

  // ---------------- write-back ----------------
  logic u_adv, u_last;
  val_t u_val;
  assign u_val    = x_all[RW'(u_r + RW'(HALO))][CWD'(u_c + CWD'(HALO))];
  assign wr_valid = (state == S_UNLOAD) && u_in;
  assign wr_addr  = ob_r + img_addr(uy[CW-1:0], ux[CW-1:0], w_r);
  assign wr_data  = val_to_pix(u_val);
  assign u_adv    = (state == S_UNLOAD) && (!u_in || wr_ready);
  assign u_last   = (int'(u_r) == ROWS - OVL - 1) && (int'(u_c) == COLS - OVL - 1);

  assign walk_init  = (state == S_IDLE) && start;
  assign walk_next  = (state == S_UNLOAD) && u_adv && u_last && !last;
  assign iter_start = (state == S_LOAD) && q_end && p_end;
  assign busy       = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      w_r       <= '0;
      h_r       <= '0;
      ob_r      <= '0;
      q_r       <= '0; q_c <= '0; q_end <= 1'b0;
      p_r       <= '0; p_c <= '0; p_end <= 1'b0;
      u_r       <= '0; u_c <= '0;
      done      <= 1'b0;
      seg_done  <= 1'b0;
      seg_iters <= '0;
      seg_conv  <= 1'b0;
    end else begin
      done     <= 1'b0;
      seg_done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          w_r   <= img_w;
          h_r   <= img_h;
          ob_r  <= out_base;
          state <= S_START;
        end
        S_START, S_NEXT: begin
          q_r <= '0; q_c <= '0; q_end <= 1'b0;
          p_r <= '0; p_c <= '0; p_end <= 1'b0;
          state <= S_LOAD;
        end
        S_LOAD: begin
          if (q_adv) begin
            if (int'(q_c) == COLS - 1) begin
              q_c <= '0;
              if (int'(q_r) == ROWS - 1) q_end <= 1'b1;
              else q_r <= q_r + 1'b1;
            end else q_c <= q_c + 1'b1;
          end
          if (p_adv) begin
            if (int'(p_c) == COLS - 1) begin
              p_c <= '0;
              if (int'(p_r) == ROWS - 1) p_end <= 1'b1;
              else p_r <= p_r + 1'b1;
            end else p_c <= p_c + 1'b1;
          end
          if (iter_start) state <= S_ITER;
        end
        S_ITER: if (iter_done) begin
          seg_done  <= 1'b1;
          seg_iters <= iter_count;
          seg_conv  <= iter_conv;
          u_r       <= '0;
          u_c       <= '0;
          state     <= S_UNLOAD;
        end
        S_UNLOAD: if (u_adv) begin
          if (u_last) begin
            if (last) begin
              done  <= 1'b1;
              state <= S_IDLE;
            end else state <= S_NEXT;
          end else if (int'(u_c) == COLS - OVL - 1) begin
            u_c <= '0;
            u_r <= u_r + 1'b1;
          end else u_c <= u_c + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Handshake rules of the host channel: a request or write, once offered, is held
  // with the same address until it is accepted.
  assert property (@(posedge clk) disable iff (!rst_n)
                   rd_req_valid && !rd_req_ready |=> rd_req_valid && $stable(rd_req_addr))
    else $error("read request withdrawn before acceptance");
  assert property (@(posedge clk) disable iff (!rst_n)
                   wr_valid && !wr_ready |=> wr_valid && $stable(wr_addr) && $stable(wr_data))
    else $error("write withdrawn before acceptance");

endmodule
