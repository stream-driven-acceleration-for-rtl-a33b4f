// store_mmu: writes store streams to memory. Each store stream has an
// address queue (AQ_DEPTH entries) filled by the AGU; an address waits
// there until the stream's next data element arrives from the PE array
// (via the store stream register). Each cycle one stream with both an
// address and a data element is served (lowest index first) and the word
// is merged into a one-line write buffer with a per-word mask. The buffer
// is written to memory as one line write when the next word belongs to
// another line or when no word is ready, so consecutive stores to a line
// cost one memory write. aq_space[s]: two more addresses fit. Pairing
// addresses with array data and line-aligned merging follow the design
// description; one queue per stream and the flush rule are this design's.
module store_mmu
  import accel_pkg::*;
#(
  parameter int unsigned NSS_P    = NSS,
  parameter int unsigned AQ_DEPTH = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     addr_valid,
  input  logic [31:0]              addr,
  input  logic [$clog2(NSS_P)-1:0] ssid,
  output logic [NSS_P-1:0]         aq_space,
  input  logic [NSS_P-1:0]         data_valid,
  input  logic [NSS_P-1:0][31:0]   data,
  output logic [NSS_P-1:0]         data_pop,
  output logic                     mem_wr_valid,
  input  logic                     mem_wr_ready,
  output logic [LINE_AW-1:0]       mem_wr_line,
  output logic [LINE_BITS-1:0]     mem_wr_data,
  output logic [LINE_WORDS-1:0]    mem_wr_mask,
  output logic                     idle,
  output logic                     ev_merge
);
  logic [NSS_P-1:0] aq_empty, aq_full;
  logic [NSS_P-1:0][31:0] aq_head;
  logic                   buf_vld;
  logic [LINE_AW-1:0]     buf_line;
  logic [LINE_WORDS-1:0][31:0] buf_data;
  logic [LINE_WORDS-1:0]  buf_mask;

  for (genvar s = 0; s < NSS_P; s++) begin : g_aq
    logic [$clog2(AQ_DEPTH+1)-1:0] cnt;
    sync_fifo #(.W(32), .DEPTH(AQ_DEPTH)) u_aq (
      .clk, .rst_n, .clear(1'b0),
      .push(addr_valid && ssid == s), .din(addr),
      .pop(data_pop[s]), .dout(aq_head[s]),
      .empty(aq_empty[s]), .full(aq_full[s]), .count(cnt)
    );
    assign aq_space[s] = (32'(cnt) + 2 <= AQ_DEPTH);
  end

  logic cand;
  logic [$clog2(NSS_P)-1:0] cs;
  logic [LINE_AW-1:0] cline;
  logic accept;
  always_comb begin
    cand = 1'b0; cs = '0;
    for (int s = NSS_P - 1; s >= 0; s--)
      if (!aq_empty[s] && data_valid[s]) begin cand = 1'b1; cs = $clog2(NSS_P)'(s); end
    cline        = aq_head[cs][31:6];
    mem_wr_valid = buf_vld && (!cand || cline != buf_line);
    accept       = cand && (!buf_vld || cline == buf_line);
    data_pop     = '0;
    if (accept) data_pop[cs] = 1'b1;
    mem_wr_line  = buf_line;
    mem_wr_data  = buf_data;
    mem_wr_mask  = buf_mask;
    idle         = (&aq_empty) && !buf_vld;
    ev_merge     = accept && buf_vld;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_vld <= 1'b0; buf_line <= '0; buf_data <= '0; buf_mask <= '0;
    end else begin
      if (accept) begin
        if (!buf_vld) begin
          buf_line <= cline;
          buf_mask <= '0;
          buf_mask[aq_head[cs][5:2]] <= 1'b1;
        end else begin
          buf_mask[aq_head[cs][5:2]] <= 1'b1;
        end
        buf_data[aq_head[cs][5:2]] <= data[cs];
        buf_vld <= 1'b1;
      end else if (mem_wr_valid && mem_wr_ready) begin
        buf_vld <= 1'b0;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) addr_valid |-> !aq_full[ssid])
    else $error("store_mmu: address queue overflow");
endmodule
