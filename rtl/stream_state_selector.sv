// stream_state_selector: arbitrates the single AGU between streams. Each
// cycle it picks one eligible stream round-robin (eligible = active, not
// done, with space downstream; computed by the streaming engine), reads
// its state from the stream tables and registers it as the AGU's operand
// for the next cycle. The AGU's result is written back to the tables,
// except when the same stream has just been picked again: then the AGU's
// next state is forwarded straight into the operand register (bypass) and
// the write-back is skipped. A stream whose in-flight element is its last
// is not picked. One address per cycle in steady state; the AGU stage adds
// one cycle of latency. Arbitration, table access and the write-back
// exception follow the design description; round-robin is this design's.
module stream_state_selector
  import accel_pkg::*;
#(
  parameter int unsigned NS_P = NS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     flush,
  input  logic [NS_P-1:0]          elig,
  output logic [$clog2(NS_P)-1:0]  sel,
  output logic                     sel_valid,
  input  stream_state_t            tab_state,
  input  stream_state_t            agu_nxt,
  output logic                     agu_valid,
  output logic [$clog2(NS_P)-1:0]  agu_sid,
  output stream_state_t            agu_st,
  output logic                     wb_en,
  output logic                     bypass
);
  localparam int unsigned SW = $clog2(NS_P);
  logic [SW-1:0] rr_q;
  logic [NS_P-1:0] e;

  always_comb begin
    e = elig;
    if (agu_valid && agu_nxt.done) e[agu_sid] = 1'b0;
    sel = '0; sel_valid = 1'b0;
    for (int k = NS_P; k >= 1; k--) begin
      logic [SW-1:0] cand;
      cand = SW'(32'(rr_q) + k);
      if (e[cand]) begin sel = cand; sel_valid = 1'b1; end
    end
    bypass = sel_valid && agu_valid && (sel == agu_sid);
    wb_en  = agu_valid && !bypass;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr_q <= '0; agu_valid <= 1'b0; agu_sid <= '0; agu_st <= '0;
    end else if (flush) begin
      agu_valid <= 1'b0;
    end else begin
      agu_valid <= sel_valid;
      if (sel_valid) begin
        rr_q    <= sel;
        agu_sid <= sel;
        agu_st  <= bypass ? agu_nxt : tab_state;
      end
    end
  end
endmodule
