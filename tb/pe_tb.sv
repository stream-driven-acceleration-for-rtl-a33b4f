// pe_tb: processing element test. Program 1 (one context): multiply-
// accumulate res = W*N + res with the result on the east output, while
// the south input is routed to the north output; random valid bits on the
// inputs, checked against a model (invalid operands must not update the
// accumulator, valid bits follow the data). Program 2 (two contexts): the
// west value is stored into data memory word 3, then the next context adds
// data memory words 3 and 0 (a constant) and sends the sum south (a
// temporal connection). Small integers keep the float results exact.
`include "tb_check.svh"
module pe_tb;
  import accel_pkg::*;
  import tb_fp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic cfg_we = 0, dm_init_we = 0, loop_we = 0, start = 0, run = 0;
  logic [3:0] cfg_addr = 0;
  pe_instr_t cfg_data = '0;
  logic [2:0] dm_init_addr = 0;
  logic [31:0] dm_init_data = 0;
  logic [39:0] loop_data = 0;
  logic [3:0][31:0] in_data = '0, out_data;
  logic [3:0] in_vld = '0, out_vld;
  logic rd_n, rd_w, ring_n, ring_w, done;
  pe dut (.*);
  `WATCHDOG(20000)

  task automatic prog(input int ctx, input pe_instr_t i);
    @(negedge clk); cfg_we = 1; cfg_addr = 4'(ctx); cfg_data = i;
    @(negedge clk); cfg_we = 0;
  endtask
  task automatic loops(input int skew, input int iters, input int len);
    @(negedge clk); loop_we = 1; loop_data = {16'(skew), 16'(iters), 8'(len)};
    @(negedge clk); loop_we = 0; start = 1;
    @(negedge clk); start = 0;
  endtask

  initial begin
    real acc;
    int a, b;
    logic vw, vn, vs;
    logic [31:0] sv;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // ---- program 1: MAC + route ----
    prog(0, pe_ins(FMADD, SRC_W, SRC_N, SRC_RES, OUT_IN_S, OUT_FPU, OUT_NONE, OUT_NONE, 1'b1));
    loops(0, 40, 1);
    acc = 0.0;
    for (int n = 0; n < 40; n++) begin
      a = $urandom_range(0, 9); b = $urandom_range(0, 9);
      vw = ($urandom_range(0, 3) != 0); vn = ($urandom_range(0, 3) != 0); vs = 1'($urandom);
      sv = $urandom;
      in_data[DIR_W] = r2f(real'(a)); in_data[DIR_N] = r2f(real'(b)); in_data[DIR_S] = sv;
      in_vld = '0; in_vld[DIR_W] = vw; in_vld[DIR_N] = vn; in_vld[DIR_S] = vs;
      run = 1;
      #1;
      `CHECK(rd_w && rd_n && !ring_w, "reads west and north")
      @(negedge clk);
      if (vw && vn) acc = acc + real'(a * b);
      `CHECK(out_vld[DIR_E] == (vw && vn), "FPU result valid bit")
      if (vw && vn) `CHECK(out_data[DIR_E] == r2f(acc), "accumulated value")
      `CHECK(out_vld[DIR_N] == vs && out_data[DIR_N] == sv, "route south->north")
      // A stalled cycle holds everything.
      run = 0;
      @(negedge clk);
      `CHECK(out_vld[DIR_E] == (vw && vn) && out_vld[DIR_N] == vs, "hold on stall")
    end
    run = 1;
    @(negedge clk);
    `CHECK(done, "done after the loop count")
    // ---- program 2: temporal connection through data memory ----
    @(negedge clk); dm_init_we = 1; dm_init_addr = 0; dm_init_data = r2f(100.0);
    @(negedge clk); dm_init_we = 0;
    prog(0, pe_ins(FMV, SRC_W, SRC_ZERO, SRC_ZERO, OUT_NONE, OUT_NONE, OUT_NONE, OUT_NONE, 1'b0, 1'b1, 3'd3));
    prog(1, pe_ins(FADD, SRC_DM + 3, SRC_DM, SRC_ZERO, OUT_NONE, OUT_NONE, OUT_FPU, OUT_NONE));
    run = 0;
    loops(0, 10, 2);
    in_vld = '1;
    for (int n = 0; n < 10; n++) begin
      a = $urandom_range(0, 50);
      in_data[DIR_W] = r2f(real'(a));
      run = 1;
      @(negedge clk);        // context 0: store
      in_data[DIR_W] = r2f(-1.0);
      #1;
      `CHECK(!rd_w, "context 1 does not read west")
      @(negedge clk);        // context 1: add and send south
      `CHECK(out_vld[DIR_S] && out_data[DIR_S] == r2f(real'(a) + 100.0), "delayed sum")
    end
    `CHECK(done, "done after 10 two-context iterations")
    `FINISH
  end
endmodule
