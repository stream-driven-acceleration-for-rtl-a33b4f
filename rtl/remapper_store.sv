// remapper_store: store-side stream re-mapper. It gathers the array's
// output mu-streams into store streams. The output buffers (BUF_DEPTH-entry
// FIFOs, ports 0..ROWS-1 = east outputs of rows 0.., ports ROWS.. = south
// outputs of columns 0..) present their head elements, with a valid bit and
// their port number, on lanes 0..NP-1 of a Benes permutation network;
// output lane s*VL+e is element e of store stream s. Store stream s (unroll
// width U = cfg_u[s], 0 = unused) moves a vector when all of its U lanes
// are valid and its stream register has room for U elements; the buffers
// whose port numbers arrived on those lanes are then popped.
// port_space[p] tells the array that buffer p can take two more values.
// The gather role, the permutation network and the output buffers follow
// the design description; the vector handshake is this design's choice.
module remapper_store
  import accel_pkg::*;
#(
  parameter int unsigned NSS_P     = NSS,
  parameter int unsigned VL_P      = VL,
  parameter int unsigned NP        = 8,
  parameter int unsigned BUF_DEPTH = 4,
  parameter int unsigned SREG_CW   = 4
) (
  input  logic                                    clk,
  input  logic                                    rst_n,
  input  logic                                    clear,
  input  logic [NSS_P-1:0][2:0]                   cfg_u,
  input  logic [2*$clog2(NSS_P*VL_P)-2:0][NSS_P*VL_P/2-1:0] cfg_sw,
  input  logic [NP-1:0]                           port_push,
  input  logic [NP-1:0][31:0]                     port_data,
  output logic [NP-1:0]                           port_space,
  output logic                                    idle,
  input  logic [NSS_P-1:0][SREG_CW-1:0]           sreg_free,
  output logic [NSS_P-1:0][2:0]                   sreg_push_n,
  output logic [NSS_P-1:0][VL_P-1:0][31:0]        sreg_push_data
);
  localparam int unsigned NL = NSS_P * VL_P;
  localparam int unsigned TW = $clog2(NP);
  localparam int unsigned LW = 1 + TW + 32;

  logic [NP-1:0] buf_empty, buf_full, buf_pop;
  logic [NP-1:0][31:0] buf_data;
  logic [NL-1:0][LW-1:0] lanes_in, lanes_out;
  logic [NSS_P-1:0] move;

  for (genvar p = 0; p < NP; p++) begin : g_buf
    logic [$clog2(BUF_DEPTH+1)-1:0] cnt;
    sync_fifo #(.W(32), .DEPTH(BUF_DEPTH)) u_buf (
      .clk, .rst_n, .clear,
      .push(port_push[p]), .din(port_data[p]),
      .pop(buf_pop[p]), .dout(buf_data[p]),
      .empty(buf_empty[p]), .full(buf_full[p]), .count(cnt)
    );
    assign port_space[p] = (32'(cnt) + 2 <= BUF_DEPTH);
  end

  always_comb begin
    lanes_in = '0;
    for (int p = 0; p < NP; p++) lanes_in[p] = {!buf_empty[p], TW'(p), buf_data[p]};
  end

  benes_network #(.N(NL), .W(LW)) u_net (.in_data(lanes_in), .sw(cfg_sw), .out_data(lanes_out));

  always_comb begin
    buf_pop = '0;
    for (int s = 0; s < NSS_P; s++) begin
      move[s] = (cfg_u[s] != 0) && (32'(sreg_free[s]) >= 32'(cfg_u[s]));
      for (int e = 0; e < VL_P; e++) begin
        if (e < int'(cfg_u[s]) && !lanes_out[s*VL_P+e][LW-1]) move[s] = 1'b0;
        sreg_push_data[s][e] = lanes_out[s*VL_P+e][31:0];
      end
      sreg_push_n[s] = move[s] ? cfg_u[s] : 3'd0;
      for (int e = 0; e < VL_P; e++)
        if (move[s] && e < int'(cfg_u[s]))
          buf_pop[lanes_out[s*VL_P+e][32 +: TW]] = 1'b1;
    end
    idle = &buf_empty;
  end
endmodule
