// stream_table: the stream tables, one entry (stream_state_t) per stream
// holding its descriptor (base, sizes, strides, direction) and its
// iteration state (counters, active, done). Written by the stream
// configurator (whole entry) and by the AGU write-back (state after one
// element); 'go' starts every configured stream from index zero and
// 'clear_all' empties the table. Two asynchronous read ports: one for the
// state selector, one for the configurator. Keeping the status of all
// active streams in tables follows the design description; the entry
// layout is this design's choice.
module stream_table
  import accel_pkg::*;
#(
  parameter int unsigned NS_P = NS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     go,
  input  logic                     cfg_we,
  input  logic [$clog2(NS_P)-1:0]  cfg_sid,
  input  stream_state_t            cfg_entry,
  input  logic                     wb_en,
  input  logic [$clog2(NS_P)-1:0]  wb_sid,
  input  stream_state_t            wb_state,
  input  logic [$clog2(NS_P)-1:0]  rd_sid,
  output stream_state_t            rd_state,
  input  logic [$clog2(NS_P)-1:0]  cfg_rd_sid,
  output stream_state_t            cfg_rd_state,
  output logic [NS_P-1:0]          active,
  output logic [NS_P-1:0]          done,
  output logic [NS_P-1:0]          is_store
);
  stream_state_t tab [NS_P];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NS_P; s++) tab[s] <= '0;
    end else if (go) begin
      for (int s = 0; s < NS_P; s++) begin
        tab[s].active <= tab[s].configured;
        tab[s].done   <= 1'b0;
        tab[s].idx    <= '0;
      end
    end else begin
      if (wb_en) begin
        tab[wb_sid].idx  <= wb_state.idx;
        tab[wb_sid].done <= wb_state.done;
      end
      if (cfg_we) tab[cfg_sid] <= cfg_entry;
    end
  end

  assign rd_state     = tab[rd_sid];
  assign cfg_rd_state = tab[cfg_rd_sid];
  always_comb
    for (int s = 0; s < NS_P; s++) begin
      active[s]   = tab[s].active;
      done[s]     = tab[s].done;
      is_store[s] = tab[s].is_store;
    end
endmodule
