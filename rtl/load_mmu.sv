// load_mmu: turns the addresses of load streams into in-order element
// data. For each new address (one per cycle) it looks for the line, in
// priority order: a response arriving in this cycle, the line buffer (L0
// hit, data answered at once), a pending request-queue entry (coalesced,
// waits on that ID) or a new request-queue entry (new memory request). The
// request is recorded in the load FIFO with its stream, ID and word
// offset. Memory returns whole lines tagged with the ID, in any order;
// a returned line goes into the line buffer and answers every waiting
// load FIFO entry with that ID. The FIFO head then leaves in order
// (out_valid, out_sid, out_data), always accepted because the engine only
// issues addresses for which the stream register has reserved space.
// 'ready' means two more addresses can be taken (one may be in flight).
// ev_* are one-cycle event pulses for performance counting.
// Structure and behaviour follow the design description; the line size
// and memory handshake are this design's choices.
module load_mmu
  import accel_pkg::*;
#(
  parameter int unsigned RQ_ENTRIES = 32,
  parameter int unsigned LB_ROWS    = 4,
  parameter int unsigned LF_DEPTH   = 16
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            flush,
  input  logic                            addr_valid,
  input  logic [31:0]                     addr,
  input  logic [2:0]                      sid,
  output logic                            ready,
  output logic                            idle,
  output logic                            mem_req_valid,
  input  logic                            mem_req_ready,
  output logic [LINE_AW-1:0]              mem_req_line,
  output logic [$clog2(RQ_ENTRIES)-1:0]   mem_req_id,
  input  logic                            mem_resp_valid,
  input  logic [$clog2(RQ_ENTRIES)-1:0]   mem_resp_id,
  input  logic [LINE_BITS-1:0]            mem_resp_data,
  output logic                            out_valid,
  output logic [2:0]                      out_sid,
  output logic [31:0]                     out_data,
  output logic                            ev_lb_hit,
  output logic                            ev_coalesce,
  output logic                            ev_ooo
);
  localparam int unsigned IW = $clog2(RQ_ENTRIES);
  logic [LINE_AW-1:0] line, resp_line;
  logic [3:0] off;
  logic rq_hit, rq_free2, rq_empty, lb_hit, lf_free2, lf_empty, alloc, resp_hit;
  logic [IW-1:0] rq_id, alloc_id, push_id;
  logic [LINE_BITS-1:0] lb_data;
  logic push_ready;
  logic [31:0] push_data;

  assign line = addr[31:6];
  assign off  = addr[5:2];

  load_request_queue #(.ENTRIES(RQ_ENTRIES)) u_rq (
    .clk, .rst_n, .lk_line(line), .lk_hit(rq_hit), .lk_id(rq_id),
    .alloc, .alloc_id, .free_ge2(rq_free2), .empty(rq_empty),
    .mem_req_valid, .mem_req_ready, .mem_req_line, .mem_req_id,
    .resp_valid(mem_resp_valid), .resp_id(mem_resp_id), .resp_line
  );

  load_line_buffer #(.ROWS(LB_ROWS)) u_lb (
    .clk, .rst_n, .flush, .fill(mem_resp_valid), .fill_line(resp_line), .fill_data(mem_resp_data),
    .lk_line(line), .lk_hit(lb_hit), .lk_data(lb_data)
  );

  always_comb begin
    resp_hit   = mem_resp_valid && (resp_line == line);
    alloc      = 1'b0;
    push_ready = 1'b0;
    push_data  = '0;
    push_id    = '0;
    if (resp_hit) begin
      push_ready = 1'b1; push_data = mem_resp_data[32*off +: 32];
    end else if (lb_hit) begin
      push_ready = 1'b1; push_data = lb_data[32*off +: 32];
    end else if (rq_hit) begin
      push_id = rq_id;
    end else begin
      push_id = alloc_id;
      alloc   = addr_valid;
    end
    ev_lb_hit   = addr_valid && (resp_hit || lb_hit);
    ev_coalesce = addr_valid && !resp_hit && !lb_hit && rq_hit;
  end

  load_fifo #(.DEPTH(LF_DEPTH), .IDW(IW)) u_lf (
    .clk, .rst_n, .push(addr_valid), .push_sid(sid), .push_id, .push_off(off),
    .push_ready, .push_data,
    .fill(mem_resp_valid), .fill_id(mem_resp_id), .fill_data(mem_resp_data),
    .head_valid(out_valid), .head_sid(out_sid), .head_data(out_data),
    .free_ge2(lf_free2), .empty(lf_empty), .late_fill(ev_ooo)
  );

  assign ready = rq_free2 && lf_free2;
  assign idle  = rq_empty && lf_empty;
endmodule
