// load_request_queue: outstanding cache-line read requests of the load
// MMU. Each entry holds a line address; its index is the request ID sent
// to memory and carried by the response. A new address that falls in a
// line already requested is coalesced onto that entry (lookup hit, same
// ID) instead of causing a second memory request. New entries take the
// lowest free index; requests are issued to memory lowest index first;
// the entry is freed when the response with its ID arrives, which may be
// in any order. free_ge2 tells the AGU side that two more entries fit.
// Coalescing and ID tagging follow the design description; the free-on-
// response policy and issue order are this design's choices.
module load_request_queue
  import accel_pkg::*;
#(
  parameter int unsigned ENTRIES = 32
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [LINE_AW-1:0]          lk_line,
  output logic                        lk_hit,
  output logic [$clog2(ENTRIES)-1:0]  lk_id,
  input  logic                        alloc,
  output logic [$clog2(ENTRIES)-1:0]  alloc_id,
  output logic                        free_ge2,
  output logic                        empty,
  output logic                        mem_req_valid,
  input  logic                        mem_req_ready,
  output logic [LINE_AW-1:0]          mem_req_line,
  output logic [$clog2(ENTRIES)-1:0]  mem_req_id,
  input  logic                        resp_valid,
  input  logic [$clog2(ENTRIES)-1:0]  resp_id,
  output logic [LINE_AW-1:0]          resp_line
);
  localparam int unsigned IW = $clog2(ENTRIES);
  logic [ENTRIES-1:0] vld, issued;
  logic [LINE_AW-1:0] line [ENTRIES];

  always_comb begin
    int nfree;
    lk_hit = 1'b0; lk_id = '0;
    alloc_id = '0; nfree = 0;
    mem_req_valid = 1'b0; mem_req_id = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (vld[i] && line[i] == lk_line && !(resp_valid && resp_id == IW'(i))) begin
        lk_hit = 1'b1; lk_id = IW'(i);
      end
      if (!vld[i]) alloc_id = IW'(i);
      if (vld[i] && !issued[i]) begin mem_req_valid = 1'b1; mem_req_id = IW'(i); end
    end
    for (int i = 0; i < ENTRIES; i++) if (!vld[i]) nfree++;
    free_ge2 = (nfree >= 2);
    empty = (vld == '0);
    mem_req_line = line[mem_req_id];
    resp_line = line[resp_id];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld <= '0; issued <= '0;
      for (int i = 0; i < ENTRIES; i++) line[i] <= '0;
    end else begin
      if (mem_req_valid && mem_req_ready) issued[mem_req_id] <= 1'b1;
      if (resp_valid) vld[resp_id] <= 1'b0;
      if (alloc) begin
        vld[alloc_id] <= 1'b1;
        issued[alloc_id] <= 1'b0;
        line[alloc_id] <= lk_line;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) resp_valid |-> vld[resp_id] && issued[resp_id])
    else $error("load_request_queue: response for an idle ID");
  assert property (@(posedge clk) disable iff (!rst_n) alloc |-> !vld[alloc_id])
    else $error("load_request_queue: allocation while full");
endmodule
