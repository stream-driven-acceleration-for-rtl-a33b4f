// pe_config_mem: configuration memory of a processing element. It holds one
// instruction word (pe_instr_t) per context of the PE's modulo schedule,
// written by the accelerator controller before a run and read every cycle
// by the control unit. One write port, one asynchronous read port; reset
// clears every context to an idle instruction. The memory itself follows
// the design description; its depth (16 contexts) is this design's choice.
module pe_config_mem
  import accel_pkg::*;
#(
  parameter int unsigned DEPTH = CFG_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  pe_instr_t                wr_data,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output pe_instr_t                rd_data
);
  pe_instr_t mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (wr_en) begin
      mem[wr_addr] <= wr_data;
    end
  end

  assign rd_data = mem[rd_addr];
endmodule
