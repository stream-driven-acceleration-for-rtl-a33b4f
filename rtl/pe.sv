// pe: processing element of the array. It has four cardinal inputs and
// outputs (N, E, S, W), a control unit that sequences its configuration
// contexts, a data memory for delayed values and constants, and an FPU.
// In each context the instruction selects three FPU operands (any input,
// the result register, zero or a data-memory word), optionally writes the
// FPU result to the result register and/or the data memory, and loads each
// output register with the FPU result or with one of the inputs (route
// through). Outputs are registers: a value crosses one PE per cycle, and
// out_vld marks the outputs written in the last active cycle.
// rd_n/rd_w tell the array that the current context consumes the north or
// west input (used to pop stream data at the array edge); ring_n/ring_w
// tell an edge PE to take that input from the wrap-around ring instead.
// Everything advances only when 'run' is high.
// The component list and the four-neighbour interface follow the design
// description; operand and route encodings are this design's choices.
module pe
  import accel_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  // configuration
  input  logic                          cfg_we,
  input  logic [$clog2(CFG_DEPTH)-1:0]  cfg_addr,
  input  pe_instr_t                     cfg_data,
  input  logic                          dm_init_we,
  input  logic [$clog2(DMEM_DEPTH)-1:0] dm_init_addr,
  input  logic [31:0]                   dm_init_data,
  input  logic                          loop_we,
  input  logic [39:0]                   loop_data,
  // execution
  input  logic                          start,
  input  logic                          run,
  input  logic [3:0][31:0]              in_data,
  input  logic [3:0]                    in_vld,
  output logic [3:0][31:0]              out_data,
  output logic [3:0]                    out_vld,
  output logic                          rd_n,
  output logic                          rd_w,
  output logic                          ring_n,
  output logic                          ring_w,
  output logic                          done
);
  pe_instr_t instr;
  logic      active;
  logic [$clog2(CFG_DEPTH)-1:0] ctx;
  logic [31:0] res_q, op_a, op_b, op_c, dm_a, dm_b, dm_c, fpu_y;

  pe_control_unit u_ctrl (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_data, .loop_we, .loop_data,
    .start, .run, .instr, .active, .done, .ctx
  );

  logic dm_we;
  logic uses_b, uses_c, exec, op_vld;
  assign dm_we = (run && active && op_vld && instr.dm_we) || dm_init_we;

  pe_data_mem #(.DEPTH(DMEM_DEPTH)) u_dmem (
    .clk, .rst_n, .we(dm_we),
    .waddr(dm_init_we ? dm_init_addr : instr.dm_waddr),
    .wdata(dm_init_we ? dm_init_data : fpu_y),
    .raddr_a(instr.src_a[2:0]), .raddr_b(instr.src_b[2:0]), .raddr_c(instr.src_c[2:0]),
    .rdata_a(dm_a), .rdata_b(dm_b), .rdata_c(dm_c)
  );

  function automatic logic [31:0] operand(input src_t s, input logic [31:0] dm,
                                          input logic [3:0][31:0] inp, input logic [31:0] res);
    if (s[3])             return dm;
    else if (s == SRC_RES) return res;
    else if (s[3:2] == 2'b00) return inp[s[1:0]];
    else                  return 32'd0;
  endfunction

  assign op_a = operand(instr.src_a, dm_a, in_data, res_q);
  assign op_b = operand(instr.src_b, dm_b, in_data, res_q);
  assign op_c = operand(instr.src_c, dm_c, in_data, res_q);

  fpu u_fpu (.op(instr.op), .a(op_a), .b(op_b), .c(op_c), .y(fpu_y));

  // Which inputs the current context reads, and whether all of the
  // neighbour values the FPU uses carry valid data.
  logic [3:0] reads;
  always_comb begin
    uses_b = (instr.op != FMV);
    uses_c = (instr.op inside {FMADD, FMSUB, FNMADD, FNMSUB});
    exec   = instr.res_we || instr.dm_we;
    for (int d = 0; d < 4; d++) if (instr.out_sel[d] == OUT_FPU) exec = 1'b1;
    reads = '0;
    op_vld = 1'b1;
    for (int d = 0; d < 4; d++) begin
      if (instr.src_a == src_t'(d) && !in_vld[d])           op_vld = 1'b0;
      if (uses_b && instr.src_b == src_t'(d) && !in_vld[d]) op_vld = 1'b0;
      if (uses_c && instr.src_c == src_t'(d) && !in_vld[d]) op_vld = 1'b0;
      if (exec && instr.src_a == src_t'(d))           reads[d] = 1'b1;
      if (exec && uses_b && instr.src_b == src_t'(d)) reads[d] = 1'b1;
      if (exec && uses_c && instr.src_c == src_t'(d)) reads[d] = 1'b1;
      for (int o = 0; o < 4; o++)
        if (instr.out_sel[o] == out_sel_e'(32'(OUT_IN_N) + d)) reads[d] = 1'b1;
    end
  end
  assign rd_n   = active && reads[DIR_N];
  assign rd_w   = active && reads[DIR_W];
  assign ring_n = instr.ring_n;
  assign ring_w = instr.ring_w;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_q <= '0; out_data <= '0; out_vld <= '0;
    end else if (start) begin
      out_vld <= '0;
    end else if (run) begin
      out_vld <= '0;
      if (active) begin
        if (instr.res_we && op_vld) res_q <= fpu_y;
        for (int d = 0; d < 4; d++) begin
          unique case (instr.out_sel[d])
            OUT_FPU:  begin out_data[d] <= fpu_y;           out_vld[d] <= op_vld;        end
            OUT_IN_N: begin out_data[d] <= in_data[DIR_N];  out_vld[d] <= in_vld[DIR_N]; end
            OUT_IN_E: begin out_data[d] <= in_data[DIR_E];  out_vld[d] <= in_vld[DIR_E]; end
            OUT_IN_S: begin out_data[d] <= in_data[DIR_S];  out_vld[d] <= in_vld[DIR_S]; end
            OUT_IN_W: begin out_data[d] <= in_data[DIR_W];  out_vld[d] <= in_vld[DIR_W]; end
            default:  ;
          endcase
        end
      end
    end
  end
endmodule
