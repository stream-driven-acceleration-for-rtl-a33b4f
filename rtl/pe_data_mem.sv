// pe_data_mem: data memory of a processing element, a small register file
// that keeps values across cycles (the delays of temporal connections in a
// mapped dataflow graph) and constants loaded by the controller. Three
// asynchronous read ports (one per FPU operand) and one write port; a
// write is visible to reads in the next cycle. Its size (8 words) and port
// count are this design's choices; the description only names the memory.
module pe_data_mem #(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned W     = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr_a,
  input  logic [$clog2(DEPTH)-1:0] raddr_b,
  input  logic [$clog2(DEPTH)-1:0] raddr_c,
  output logic [W-1:0]             rdata_a,
  output logic [W-1:0]             rdata_b,
  output logic [W-1:0]             rdata_c
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  assign rdata_a = mem[raddr_a];
  assign rdata_b = mem[raddr_b];
  assign rdata_c = mem[raddr_c];
endmodule
