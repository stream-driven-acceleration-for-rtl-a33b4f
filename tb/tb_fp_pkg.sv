// tb_fp_pkg: reference helpers for the testbenches. f2r widens a
// single-precision word to a real exactly; r2f rounds a real to single
// precision, nearest-even, flushing results below the normal range to zero
// as the FPU does. pe_ins builds a PE instruction word.
package tb_fp_pkg;
  import accel_pkg::*;

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 0) d = {f[31], 63'd0};
    else d = {f[31], 11'(f[30:23]) - 11'd127 + 11'd1023, f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    int e;
    logic [24:0] m;
    d = $realtobits(r);
    if (d[62:0] == 0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {2'b01, d[51:29]};
    if (d[28] && ((|d[27:0]) || m[0])) m = m + 1;
    if (m[24]) begin m = m >> 1; e++; end
    if (e >= 255) return {d[63], 8'hff, 23'd0};
    if (e <= 0) return {d[63], 31'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  function automatic pe_instr_t pe_ins(input fpu_op_e op, input src_t a, input src_t b,
                                       input src_t c, input out_sel_e on, input out_sel_e oe,
                                       input out_sel_e os, input out_sel_e ow,
                                       input logic res_we = 1'b0, input logic dm_we = 1'b0,
                                       input logic [2:0] dm_waddr = 3'd0,
                                       input logic ring_n = 1'b0, input logic ring_w = 1'b0);
    pe_instr_t i;
    i = '0;
    i.op = op; i.src_a = a; i.src_b = b; i.src_c = c;
    i.out_sel[DIR_N] = on; i.out_sel[DIR_E] = oe; i.out_sel[DIR_S] = os; i.out_sel[DIR_W] = ow;
    i.res_we = res_we; i.dm_we = dm_we; i.dm_waddr = dm_waddr;
    i.ring_n = ring_n; i.ring_w = ring_w;
    return i;
  endfunction
endpackage
