// streaming_engine: autonomous data mover of the accelerator. Streams are
// described by the host through configuration commands (stream
// configurator -> stream tables). After 'go', the stream state selector
// hands one stream per cycle to the single AGU, which produces that
// stream's next address; load addresses go to the load MMU and store
// addresses to the store MMU. Loaded elements arrive in order in the load
// stream registers (streams 0..NLS-1), from which the load re-mapper takes
// vectors; the store re-mapper fills the store stream registers (streams
// NLS..NS-1), whose elements the store MMU pairs with queued addresses.
// Flow control: a load stream is only picked while its stream register has
// an unreserved slot (a credit per element, returned when the element
// leaves), so the in-order load FIFO can always drain; a store stream only
// while its address queue has room. streams_done: every started stream has
// generated all addresses and all loads and stores have completed;
// loads_drained: every load element has left the load stream registers.
// The module set and data path follow the published engine organisation;
// the fixed load/store split of stream numbers and the credit
// scheme are this design's choices.
module streaming_engine
  import accel_pkg::*;
#(
  parameter int unsigned RQ_ENTRIES = 32,
  parameter int unsigned LB_ROWS    = 4,
  parameter int unsigned SREG_DEPTH = 8
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                go,
  input  logic                                cmd_valid,
  input  stream_cmd_t                         cmd,
  output logic                                cfg_error,
  // load stream registers -> load re-mapper
  output logic [NLS-1:0][VL-1:0][31:0]        ld_head,
  output logic [NLS-1:0][3:0]                 ld_count,
  input  logic [NLS-1:0][2:0]                 ld_pop_n,
  // store re-mapper -> store stream registers
  output logic [NSS-1:0][3:0]                 st_free,
  input  logic [NSS-1:0][2:0]                 st_push_n,
  input  logic [NSS-1:0][VL-1:0][31:0]        st_push_data,
  // memory read port (cache lines)
  output logic                                mem_rd_req_valid,
  input  logic                                mem_rd_req_ready,
  output logic [LINE_AW-1:0]                  mem_rd_req_line,
  output logic [$clog2(RQ_ENTRIES)-1:0]       mem_rd_req_id,
  input  logic                                mem_rd_resp_valid,
  input  logic [$clog2(RQ_ENTRIES)-1:0]       mem_rd_resp_id,
  input  logic [LINE_BITS-1:0]                mem_rd_resp_data,
  // memory write port (cache lines with word mask)
  output logic                                mem_wr_valid,
  input  logic                                mem_wr_ready,
  output logic [LINE_AW-1:0]                  mem_wr_line,
  output logic [LINE_BITS-1:0]                mem_wr_data,
  output logic [LINE_WORDS-1:0]               mem_wr_mask,
  // status and events
  output logic                                streams_done,
  output logic                                loads_drained,
  output logic                                ev_addr,
  output logic                                ev_bypass,
  output logic                                ev_lb_hit,
  output logic                                ev_coalesce,
  output logic                                ev_ooo,
  output logic                                ev_merge
);
  localparam int unsigned SW = $clog2(NS);

  // ---------------- configuration and tables ----------------
  logic [SW-1:0] cfg_rd_sid, cfg_wr_sid, sel, agu_sid;
  stream_state_t cfg_rd_entry, cfg_wr_entry, tab_state, agu_st, agu_nxt;
  logic cfg_we, sel_valid, agu_valid, wb_en;
  logic [NS-1:0] t_active, t_done, t_store, elig;
  logic [31:0] agu_addr;

  stream_configurator u_cfg (
    .cmd_valid, .cmd, .rd_sid(cfg_rd_sid), .rd_entry(cfg_rd_entry),
    .wr_en(cfg_we), .wr_sid(cfg_wr_sid), .wr_entry(cfg_wr_entry), .error(cfg_error)
  );

  stream_table u_tab (
    .clk, .rst_n, .go, .cfg_we, .cfg_sid(cfg_wr_sid), .cfg_entry(cfg_wr_entry),
    .wb_en, .wb_sid(agu_sid), .wb_state(agu_nxt),
    .rd_sid(sel), .rd_state(tab_state), .cfg_rd_sid, .cfg_rd_state(cfg_rd_entry),
    .active(t_active), .done(t_done), .is_store(t_store)
  );

  stream_state_selector u_sel (
    .clk, .rst_n, .flush(go), .elig, .sel, .sel_valid, .tab_state, .agu_nxt,
    .agu_valid, .agu_sid, .agu_st, .wb_en, .bypass(ev_bypass)
  );

  agu u_agu (.st(agu_st), .addr(agu_addr), .nxt(agu_nxt));

  // ---------------- load path ----------------
  logic ld_ready, ld_idle, lo_valid;
  logic [2:0] lo_sid;
  logic [31:0] lo_data;
  logic [NLS-1:0][3:0] resv;

  load_mmu #(.RQ_ENTRIES(RQ_ENTRIES), .LB_ROWS(LB_ROWS)) u_lmmu (
    .clk, .rst_n, .flush(go),
    .addr_valid(agu_valid && !agu_sid[SW-1]), .addr(agu_addr), .sid(3'(agu_sid)),
    .ready(ld_ready), .idle(ld_idle),
    .mem_req_valid(mem_rd_req_valid), .mem_req_ready(mem_rd_req_ready),
    .mem_req_line(mem_rd_req_line), .mem_req_id(mem_rd_req_id),
    .mem_resp_valid(mem_rd_resp_valid), .mem_resp_id(mem_rd_resp_id),
    .mem_resp_data(mem_rd_resp_data),
    .out_valid(lo_valid), .out_sid(lo_sid), .out_data(lo_data),
    .ev_lb_hit, .ev_coalesce, .ev_ooo
  );

  for (genvar s = 0; s < NLS; s++) begin : g_ld_sreg
    logic [3:0] fr;
    stream_register #(.DEPTH(SREG_DEPTH), .VL(VL)) u_sreg (
      .clk, .rst_n, .clear(go),
      .push_n(3'(lo_valid && lo_sid == 3'(s))), .push_data({VL{lo_data}}),
      .pop_n(ld_pop_n[s]), .head(ld_head[s]), .count(ld_count[s]), .free(fr)
    );
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) resv[s] <= '0;
      else if (go) resv[s] <= '0;
      else resv[s] <= resv[s] + 4'(sel_valid && sel == SW'(s)) - 4'(ld_pop_n[s]);
    end
  end

  // ---------------- store path ----------------
  logic [NSS-1:0] aq_space, sd_valid, sd_pop;
  logic [NSS-1:0][31:0] sd_data;
  logic [NSS-1:0][3:0] st_count;
  logic st_idle;

  for (genvar s = 0; s < NSS; s++) begin : g_st_sreg
    logic [VL-1:0][31:0] hd;
    stream_register #(.DEPTH(SREG_DEPTH), .VL(VL)) u_sreg (
      .clk, .rst_n, .clear(go),
      .push_n(st_push_n[s]), .push_data(st_push_data[s]),
      .pop_n(3'(sd_pop[s])), .head(hd), .count(st_count[s]), .free(st_free[s])
    );
    assign sd_valid[s] = (st_count[s] != 0);
    assign sd_data[s]  = hd[0];
  end

  store_mmu #(.NSS_P(NSS)) u_smmu (
    .clk, .rst_n, .addr_valid(agu_valid && agu_sid[SW-1]), .addr(agu_addr),
    .ssid(agu_sid[SW-2:0]), .aq_space,
    .data_valid(sd_valid), .data(sd_data), .data_pop(sd_pop),
    .mem_wr_valid, .mem_wr_ready, .mem_wr_line, .mem_wr_data, .mem_wr_mask,
    .idle(st_idle), .ev_merge
  );

  // ---------------- eligibility and status ----------------
  always_comb begin
    for (int s = 0; s < NS; s++) begin
      if (s < NLS)
        elig[s] = t_active[s] && !t_done[s] && !t_store[s] && ld_ready &&
                  (32'(resv[s]) < SREG_DEPTH);
      else
        elig[s] = t_active[s] && !t_done[s] && t_store[s] && aq_space[s-NLS];
    end
    streams_done = ((t_active & ~t_done) == '0) && !agu_valid && ld_idle && st_idle &&
                   (st_count == '0) && !go;
    loads_drained = ld_idle && (ld_count == '0) && !(agu_valid && !agu_sid[SW-1]) && !go;
    for (int s = 0; s < NLS; s++) if (t_active[s] && !t_done[s]) loads_drained = 1'b0;
    ev_addr = agu_valid;
  end

endmodule
