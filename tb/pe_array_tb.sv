// pe_array_tb: 4x4 array test with random input availability and random
// output back-pressure, driven by queue models of the input and output
// buffers. Program 1 (element-wise product, the pattern of an unrolled
// stream-DFG): a_r enters row r from the west, b_c enters column c from
// the north, the two meet on diagonal PE (k,k) which multiplies them, and
// the product leaves row k on the east edge; the PEs off the diagonal
// route values, and each PE's skew/count covers the flows through it.
// Expected: row k emits a_k[i]*b_k[i] in order. Program 2 (rings): column
// 3's north input is sent east by PE(0,3), leaves on the east edge and
// also wraps around the row ring into PE(0,0), which adds 1.0 and sends it
// south down column 0. Checks values and order, that stalls happened,
// and that every output port produced exactly the expected count.
`include "tb_check.svh"
module pe_array_tb;
  import accel_pkg::*;
  import tb_fp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_we = 0, dm_init_we = 0, loop_we = 0, start = 0, en = 0, in_drained = 0;
  logic [7:0] cfg_pe = 0;
  logic [3:0] cfg_addr = 0;
  pe_instr_t cfg_data = '0;
  logic [2:0] dm_init_addr = 0;
  logic [31:0] dm_init_data = 0;
  logic [39:0] loop_data = 0;
  logic [3:0] west_valid, north_valid, west_pop, north_pop, east_push, south_push, east_space, south_space;
  logic [3:0][31:0] west_data, north_data, east_data, south_data;
  logic run, stall, done;
  pe_array dut (.*);
  `WATCHDOG(50000)

  logic [31:0] wq[4][$], nq[4][$], eq[4][$], sq[4][$];
  int stalls = 0;
  bit avail_w[4], avail_n[4];

  // Input and output buffer models; decisions at the falling edge.
  always @(negedge clk) begin
    for (int i = 0; i < 4; i++) begin
      avail_w[i] = ($urandom_range(0, 3) != 0);
      avail_n[i] = ($urandom_range(0, 3) != 0);
      west_valid[i]  = avail_w[i] && wq[i].size() > 0;
      west_data[i]   = wq[i].size() > 0 ? wq[i][0] : 32'd0;
      north_valid[i] = avail_n[i] && nq[i].size() > 0;
      north_data[i]  = nq[i].size() > 0 ? nq[i][0] : 32'd0;
      east_space[i]  = ($urandom_range(0, 4) != 0);
      south_space[i] = ($urandom_range(0, 4) != 0);
    end
    in_drained = (wq[0].size() + wq[1].size() + wq[2].size() + wq[3].size() +
                  nq[0].size() + nq[1].size() + nq[2].size() + nq[3].size()) == 0;
  end
  always @(posedge clk) if (rst_n) begin
    if (stall) stalls++;
    for (int i = 0; i < 4; i++) begin
      if (west_pop[i]) void'(wq[i].pop_front());
      if (north_pop[i]) void'(nq[i].pop_front());
      if (east_push[i]) eq[i].push_back(east_data[i]);
      if (south_push[i]) sq[i].push_back(south_data[i]);
    end
  end

  task automatic cfg(input int r, input int c, input pe_instr_t ins, input int skew, input int iters);
    @(negedge clk); cfg_we = 1; cfg_pe = 8'(r * 4 + c); cfg_addr = 0; cfg_data = ins;
    @(negedge clk); cfg_we = 0; loop_we = 1; loop_data = {16'(skew), 16'(iters), 8'd1};
    @(negedge clk); loop_we = 0;
  endtask

  task automatic go_and_wait();
    @(negedge clk); start = 1;
    @(negedge clk); start = 0; en = 1;
    while (!done) @(negedge clk);
    en = 0;
    repeat (2) @(negedge clk);
  endtask

  localparam int N = 20;
  initial begin
    logic [31:0] a[4][N], b[4][N];
    repeat (2) @(negedge clk);
    rst_n = 1;
    // ---------------- program 1 ----------------
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        if (r == c)
          cfg(r, c, pe_ins(FMUL, SRC_W, SRC_N, SRC_ZERO, OUT_NONE, OUT_FPU, OUT_NONE, OUT_NONE), r, N);
        else if (c < r)
          cfg(r, c, pe_ins(FMV, SRC_W, SRC_ZERO, SRC_ZERO, OUT_NONE, OUT_IN_W, OUT_NONE, OUT_NONE), c, N);
        else
          cfg(r, c, pe_ins(FMV, SRC_W, SRC_ZERO, SRC_ZERO, OUT_NONE, OUT_IN_W, OUT_IN_N, OUT_NONE), r, N + c - r);
      end
    for (int k = 0; k < 4; k++)
      for (int i = 0; i < N; i++) begin
        a[k][i] = r2f(real'($urandom_range(1, 30)));
        b[k][i] = r2f(real'($urandom_range(1, 30)) * 0.25);
        wq[k].push_back(a[k][i]);
        nq[k].push_back(b[k][i]);
      end
    go_and_wait();
    for (int k = 0; k < 4; k++) begin
      `CHECK(eq[k].size() == N, "east output count")
      `CHECK(sq[k].size() == 0, "no south output")
      for (int i = 0; i < N && i < eq[k].size(); i++)
        `CHECK(eq[k][i] == r2f(f2r(a[k][i]) * f2r(b[k][i])), "product value and order")
      eq[k].delete();
    end
    `CHECK(stalls > 0, "stall occurred")
    // ---------------- program 2: rings ----------------
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        cfg(r, c, pe_ins(FMV, SRC_ZERO, SRC_ZERO, SRC_ZERO, OUT_NONE, OUT_NONE, OUT_NONE, OUT_NONE), 0, 0);
    cfg(0, 3, pe_ins(FMV, SRC_N, SRC_ZERO, SRC_ZERO, OUT_NONE, OUT_IN_N, OUT_NONE, OUT_NONE), 0, N);
    cfg(0, 0, pe_ins(FADD, SRC_W, SRC_DM, SRC_ZERO, OUT_NONE, OUT_NONE, OUT_FPU, OUT_NONE,
                     1'b0, 1'b0, 3'd0, 1'b0, 1'b1), 1, N);
    @(negedge clk); dm_init_we = 1; cfg_pe = 0; dm_init_addr = 0; dm_init_data = r2f(1.0);
    @(negedge clk); dm_init_we = 0;
    for (int r = 1; r < 4; r++)
      cfg(r, 0, pe_ins(FMV, SRC_ZERO, SRC_ZERO, SRC_ZERO, OUT_NONE, OUT_NONE, OUT_IN_N, OUT_NONE), 1 + r, N);
    for (int i = 0; i < N; i++) begin
      b[3][i] = r2f(real'($urandom_range(1, 1000)));
      nq[3].push_back(b[3][i]);
    end
    go_and_wait();
    `CHECK(eq[0].size() == N && sq[0].size() == N, "ring program output counts")
    for (int i = 0; i < N && i < eq[0].size() && i < sq[0].size(); i++) begin
      `CHECK(eq[0][i] == b[3][i], "east edge value")
      `CHECK(sq[0][i] == r2f(f2r(b[3][i]) + 1.0), "value that went around the ring")
    end
    `FINISH
  end
endmodule
