// stream_accel_top: stream-driven accelerator for a RISC-V SoC. A kernel
// loop is split into data streaming and dataflow computing. The streaming
// engine fetches and stores data autonomously from stream descriptors; the
// load re-mapper scatters each load stream into per-PE mu-streams entering
// the west/north edges of a ROWS x COLS PE array; the PE array executes the
// unrolled dataflow graph as a statically scheduled, lock-step modulo
// schedule; the store re-mapper gathers the east/south edge outputs into
// store streams. The controller connects the host register bus and
// sequences a run. Memory traffic leaves through a cache-line read port
// (tagged requests, responses in any order) and a line write port with a
// word mask. ev = {array run, array stall, AGU address, selector bypass,
// line-buffer hit, coalesced request, out-of-order fill, store merge},
// one-cycle event pulses. The block structure follows the design
// description (4x4 array, 32-entry load request queue, 4-row line buffer);
// buses, handshakes and encodings are this design's own choices.
module stream_accel_top
  import accel_pkg::*;
#(
  parameter int unsigned ROWS = 4,
  parameter int unsigned COLS = 4,
  parameter int unsigned RQ_ENTRIES = 32,
  parameter int unsigned LB_ROWS = 4
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // host register bus
  input  logic                           host_we,
  input  logic [11:0]                    host_addr,
  input  logic [63:0]                    host_wdata,
  output logic [63:0]                    host_rdata,
  output logic                           busy,
  output logic                           done,
  // memory read port
  output logic                           mem_rd_req_valid,
  input  logic                           mem_rd_req_ready,
  output logic [LINE_AW-1:0]             mem_rd_req_line,
  output logic [$clog2(RQ_ENTRIES)-1:0]  mem_rd_req_id,
  input  logic                           mem_rd_resp_valid,
  input  logic [$clog2(RQ_ENTRIES)-1:0]  mem_rd_resp_id,
  input  logic [LINE_BITS-1:0]           mem_rd_resp_data,
  // memory write port
  output logic                           mem_wr_valid,
  input  logic                           mem_wr_ready,
  output logic [LINE_AW-1:0]             mem_wr_line,
  output logic [LINE_BITS-1:0]           mem_wr_data,
  output logic [LINE_WORDS-1:0]          mem_wr_mask,
  output logic [7:0]                     ev
);
  localparam int unsigned NP = ROWS + COLS;
  localparam int unsigned NL = NLS * VL;
  localparam int unsigned SW_BITS = (2 * $clog2(NL) - 1) * (NL / 2);

  logic pe_cfg_we, pe_dm_we, pe_loop_we, cmd_valid, go, array_en, array_done;
  logic array_run, array_stall, se_done, drained, cfg_error, loads_drained;
  logic [7:0] pe_idx;
  logic [$clog2(CFG_DEPTH)-1:0]  pe_cfg_addr;
  logic [$clog2(DMEM_DEPTH)-1:0] pe_dm_addr;
  logic [63:0] pe_wdata;
  stream_cmd_t cmd;
  logic [NLS-1:0][2:0] ld_u;
  logic [NSS-1:0][2:0] st_u;
  logic [SW_BITS-1:0] ld_sw, st_sw;

  accel_controller #(.SW_BITS(SW_BITS)) u_ctrl (
    .clk, .rst_n, .host_we, .host_addr, .host_wdata, .host_rdata,
    .pe_cfg_we, .pe_dm_we, .pe_loop_we, .pe_idx, .pe_cfg_addr, .pe_dm_addr, .pe_wdata,
    .cmd_valid, .cmd, .ld_u, .st_u, .ld_sw, .st_sw,
    .go, .array_en, .array_done, .array_stall, .se_done, .drained, .busy, .done
  );

  // streaming engine
  logic [NLS-1:0][VL-1:0][31:0] ld_head;
  logic [NLS-1:0][3:0] ld_count, st_free;
  logic [NLS-1:0][2:0] ld_pop_n, st_push_n;
  logic [NSS-1:0][VL-1:0][31:0] st_push_data;

  streaming_engine #(.RQ_ENTRIES(RQ_ENTRIES), .LB_ROWS(LB_ROWS)) u_se (
    .clk, .rst_n, .go, .cmd_valid, .cmd, .cfg_error,
    .ld_head, .ld_count, .ld_pop_n, .st_free, .st_push_n, .st_push_data,
    .mem_rd_req_valid, .mem_rd_req_ready, .mem_rd_req_line, .mem_rd_req_id,
    .mem_rd_resp_valid, .mem_rd_resp_id, .mem_rd_resp_data,
    .mem_wr_valid, .mem_wr_ready, .mem_wr_line, .mem_wr_data, .mem_wr_mask,
    .streams_done(se_done), .loads_drained, .ev_addr(ev[5]), .ev_bypass(ev[4]), .ev_lb_hit(ev[3]),
    .ev_coalesce(ev[2]), .ev_ooo(ev[1]), .ev_merge(ev[0])
  );

  // re-mappers and PE array
  logic [NP-1:0] in_valid, in_pop, out_push, out_space;
  logic [NP-1:0][31:0] in_data, out_data;
  logic st_idle;

  remapper_load #(.NP(NP)) u_rml (
    .clk, .rst_n, .clear(go), .cfg_u(ld_u), .cfg_sw(ld_sw),
    .sreg_head(ld_head), .sreg_count(ld_count), .sreg_pop_n(ld_pop_n),
    .port_valid(in_valid), .port_data(in_data), .port_pop(in_pop)
  );

  remapper_store #(.NP(NP)) u_rms (
    .clk, .rst_n, .clear(go), .cfg_u(st_u), .cfg_sw(st_sw),
    .port_push(out_push), .port_data(out_data), .port_space(out_space), .idle(st_idle),
    .sreg_free(st_free), .sreg_push_n(st_push_n), .sreg_push_data(st_push_data)
  );

  pe_array #(.ROWS(ROWS), .COLS(COLS)) u_array (
    .clk, .rst_n,
    .cfg_we(pe_cfg_we), .cfg_pe(pe_idx), .cfg_addr(pe_cfg_addr),
    .cfg_data(pe_instr_t'(pe_wdata[INSTR_W-1:0])),
    .dm_init_we(pe_dm_we), .dm_init_addr(pe_dm_addr), .dm_init_data(pe_wdata[31:0]),
    .loop_we(pe_loop_we), .loop_data(pe_wdata[39:0]),
    .start(go), .en(array_en), .in_drained(loads_drained && (in_valid == '0)),
    .west_valid(in_valid[ROWS-1:0]), .west_data(in_data[ROWS-1:0]), .west_pop(in_pop[ROWS-1:0]),
    .north_valid(in_valid[NP-1:ROWS]), .north_data(in_data[NP-1:ROWS]), .north_pop(in_pop[NP-1:ROWS]),
    .east_push(out_push[ROWS-1:0]), .east_data(out_data[ROWS-1:0]), .east_space(out_space[ROWS-1:0]),
    .south_push(out_push[NP-1:ROWS]), .south_data(out_data[NP-1:ROWS]),
    .south_space(out_space[NP-1:ROWS]),
    .run(array_run), .stall(array_stall), .done(array_done)
  );

  assign drained = st_idle && (out_push == '0);
  assign ev[7] = array_run;
  assign ev[6] = array_stall;

  assert property (@(posedge clk) disable iff (!rst_n) !cfg_error)
    else $error("stream_accel_top: stream descriptor has too many dimensions");
endmodule
