// host_mem_model: behavioural model of the host computer's image memory, for testbenches.
//
// Serves the engine's host channel: read requests are accepted when rd_req_ready is
// high and answered in order through a response queue; writes are accepted when
// wr_ready is high. With stall_en set, request and write acceptance and response
// delivery pause at random, which exercises every handshake. The image is held in mem,
// which testbenches fill and inspect hierarchically. Counters report how often each kind
// of stall happened. Not synthesizable.
module host_mem_model #(
  parameter int AW    = 24,
  parameter int DEPTH = 65536
) (
  input  logic          clk,
  input  logic          stall_en,
  input  logic          rd_req_valid,
  output logic          rd_req_ready,
  input  logic [AW-1:0] rd_req_addr,
  output logic          rd_rsp_valid,
  input  logic          rd_rsp_ready,
  output logic [7:0]    rd_rsp_data,
  input  logic          wr_valid,
  output logic          wr_ready,
  input  logic [AW-1:0] wr_addr,
  input  logic [7:0]    wr_data,
  output int            req_stalls,
  output int            rsp_gaps,
  output int            wr_stalls,
  output int            bad_addr
);

  logic [7:0] mem [DEPTH];
  logic [7:0] q[$];
  logic       gap = 1'b0;

  initial begin
    rd_req_ready = 1'b1;
    wr_ready     = 1'b1;
    req_stalls   = 0;
    rsp_gaps     = 0;
    wr_stalls    = 0;
    bad_addr     = 0;
  end

  always @(posedge clk) begin
    if (rd_req_valid && !rd_req_ready) req_stalls++;
    if (wr_valid && !wr_ready) wr_stalls++;
    if (rd_rsp_ready && q.size() > 0 && gap) rsp_gaps++;
    if (rd_req_valid && rd_req_ready) begin
      if (int'(rd_req_addr) >= DEPTH) begin
        bad_addr++;
        q.push_back(8'h00);
      end else q.push_back(mem[int'(rd_req_addr)]);
    end
    if (rd_rsp_valid && rd_rsp_ready) void'(q.pop_front());
    if (wr_valid && wr_ready) begin
      if (int'(wr_addr) >= DEPTH) bad_addr++;
      else mem[int'(wr_addr)] <= wr_data;
    end
    rd_req_ready <= !stall_en || ($urandom_range(0, 3) != 0);
    wr_ready     <= !stall_en || ($urandom_range(0, 3) != 0);
    gap          <= stall_en && ($urandom_range(0, 3) == 0);
  end

  assign rd_rsp_valid = (q.size() > 0) && !gap;
  assign rd_rsp_data  = (q.size() > 0) ? q[0] : 8'h00;

endmodule
