// remapper_load: load-side stream re-mapper. It scatters each load stream
// into mu-streams, one per array input. Load stream s offers its oldest
// U[s] elements (U = cfg_u[s], the unroll width; 0 = unused) as lanes
// s*VL..s*VL+U-1 of a Benes permutation network; network outputs
// 0..NP-1 feed the input buffers of the array (ports 0..ROWS-1 are the
// west inputs of rows 0.., ports ROWS.. the north inputs of columns 0..).
// A stream moves a whole vector in a cycle when it holds U elements and
// none of the input buffers its used lanes are routed to is full (a second
// copy of the network carries lane numbers to find those buffers, so one
// stream that runs ahead cannot block the others); element e of the vector
// lands in the buffer its lane is routed to. Input buffers are BUF_DEPTH-entry FIFOs popped by the
// array. The scatter role, the permutation network and the input buffers
// follow the design description; the vector handshake is this design's.
module remapper_load
  import accel_pkg::*;
#(
  parameter int unsigned NLS_P     = NLS,
  parameter int unsigned VL_P      = VL,
  parameter int unsigned NP        = 8,
  parameter int unsigned BUF_DEPTH = 4,
  parameter int unsigned SREG_CW   = 4
) (
  input  logic                                    clk,
  input  logic                                    rst_n,
  input  logic                                    clear,
  input  logic [NLS_P-1:0][2:0]                   cfg_u,
  input  logic [2*$clog2(NLS_P*VL_P)-2:0][NLS_P*VL_P/2-1:0] cfg_sw,
  input  logic [NLS_P-1:0][VL_P-1:0][31:0]        sreg_head,
  input  logic [NLS_P-1:0][SREG_CW-1:0]           sreg_count,
  output logic [NLS_P-1:0][2:0]                   sreg_pop_n,
  output logic [NP-1:0]                           port_valid,
  output logic [NP-1:0][31:0]                     port_data,
  input  logic [NP-1:0]                           port_pop
);
  localparam int unsigned NL = NLS_P * VL_P;

  logic [NP-1:0] buf_full, buf_empty;
  logic [NLS_P-1:0] move;
  logic [NL-1:0][32:0] lanes_in, lanes_out;
  localparam int unsigned LW = $clog2(NL);
  logic [NL-1:0][LW-1:0] lane_id, lane_at;
  logic [NLS_P-1:0] blocked;

  for (genvar l = 0; l < NL; l++) begin : g_id
    assign lane_id[l] = LW'(l);
  end
  benes_network #(.N(NL), .W(LW)) u_idnet (.in_data(lane_id), .sw(cfg_sw), .out_data(lane_at));

  always_comb begin
    blocked = '0;
    for (int p = 0; p < NP; p++)
      if (buf_full[p] && (int'(lane_at[p]) % VL_P) < int'(cfg_u[int'(lane_at[p]) / VL_P]))
        blocked[int'(lane_at[p]) / VL_P] = 1'b1;
    for (int s = 0; s < NLS_P; s++) begin
      move[s] = !blocked[s] && (cfg_u[s] != 0) && (32'(sreg_count[s]) >= 32'(cfg_u[s]));
      sreg_pop_n[s] = move[s] ? cfg_u[s] : 3'd0;
      for (int e = 0; e < VL_P; e++)
        lanes_in[s*VL_P+e] = {move[s] && (e < int'(cfg_u[s])), sreg_head[s][e]};
    end
  end

  benes_network #(.N(NL), .W(33)) u_net (.in_data(lanes_in), .sw(cfg_sw), .out_data(lanes_out));

  for (genvar p = 0; p < NP; p++) begin : g_buf
    logic [$clog2(BUF_DEPTH+1)-1:0] cnt;
    sync_fifo #(.W(32), .DEPTH(BUF_DEPTH)) u_buf (
      .clk, .rst_n, .clear,
      .push(lanes_out[p][32]), .din(lanes_out[p][31:0]),
      .pop(port_pop[p]), .dout(port_data[p]),
      .empty(buf_empty[p]), .full(buf_full[p]), .count(cnt)
    );
    assign port_valid[p] = !buf_empty[p];
  end
endmodule
