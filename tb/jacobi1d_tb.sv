// jacobi1d_tb: runs the Jacobi-1D kernel y[i] = (x[i] + x[i+1] + x[i+2]) / 3
// on the whole accelerator at its default size. Three load streams read
// the same vector X at element offsets 0, 1 and 2 (so their lines are
// shared: request coalescing and line-buffer hits) and enter rows 0-2 on
// the west edge. Column 0 adds the three values as they move south
// (PE(0,0) routes, PE(1,0) and PE(2,0) add, each one cycle later through
// its loop skew), PE(2,1) multiplies by 1/3 from its data memory, and
// PE(2,2)/PE(2,3) route the result to the east edge of row 2, where the
// store re-mapper gives it to store stream 4 (Y). The Benes settings of
// both re-mappers are found by the testbench from the wanted lane
// mapping with a reference model of the network. The memory model answers
// out of order. Checks every Y word against a reference with single
// rounding per operation, that nothing past Y is written, and that stalls,
// coalescing, line-buffer hits and out-of-order returns occurred.
module jacobi1d_tb;
  import accel_pkg::*;
  import tb_fp_pkg::*;

  localparam int N = 96;                       // output points
  localparam int X_W = 32'h200, Y_W = 32'h900;  // word addresses
  localparam logic [31:0] THIRD = 32'h3eaa_aaab;  // 1/3 rounded to single

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic host_we = 0;
  logic [11:0] host_addr = '0;
  logic [63:0] host_wdata = '0, host_rdata;
  logic busy, done;
  logic mem_rd_req_valid, mem_rd_req_ready, mem_rd_resp_valid;
  logic [LINE_AW-1:0] mem_rd_req_line, mem_wr_line;
  logic [4:0] mem_rd_req_id, mem_rd_resp_id;
  logic [LINE_BITS-1:0] mem_rd_resp_data, mem_wr_data;
  logic mem_wr_valid, mem_wr_ready;
  logic [LINE_WORDS-1:0] mem_wr_mask;
  logic [7:0] ev;

  stream_accel_top dut (.*);

  int checks = 0, failures = 0;
  int evcnt[8];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- memory model ----------------
  logic [31:0] mem [0:4095];
  typedef struct { int id; int line; int t; } pend_t;
  pend_t pend[$];
  int now = 0;

  // The model works at the falling edge: it applies the handshakes that
  // completed at the last rising edge, then drives the next cycle's
  // ready and response signals and, once the design has settled, notes the
  // handshakes and events of the cycle.
  bit rd_fire = 0, wr_fire = 0;
  int rd_id, rd_line, wr_line;
  logic [LINE_BITS-1:0] wr_data;
  logic [LINE_WORDS-1:0] wr_mask;

  always @(negedge clk) begin
    int cand[$];
    now++;
    cand.delete();
    if (rd_fire) pend.push_back('{rd_id, rd_line, now + 4 + int'($urandom_range(0, 60))});
    if (wr_fire)
      for (int w = 0; w < LINE_WORDS; w++)
        if (wr_mask[w]) mem[(wr_line * 16 + w) % 4096] = wr_data[32*w +: 32];
    mem_rd_req_ready = ($urandom_range(0, 3) != 0);
    mem_wr_ready = ($urandom_range(0, 4) != 0);
    mem_rd_resp_valid = 1'b0;
    mem_rd_resp_id = '0;
    mem_rd_resp_data = '0;
    for (int k = 0; k < pend.size(); k++) if (pend[k].t <= now) cand.push_back(k);
    if (cand.size() > 0) begin
      int k = cand[$urandom_range(0, cand.size() - 1)];
      mem_rd_resp_valid = 1'b1;
      mem_rd_resp_id = 5'(pend[k].id);
      for (int w = 0; w < LINE_WORDS; w++)
        mem_rd_resp_data[32*w +: 32] = mem[(pend[k].line * 16 + w) % 4096];
      pend.delete(k);
    end
    #1;
    if (rst_n) for (int k = 0; k < 8; k++) if (ev[k]) evcnt[k]++;
    rd_fire = rst_n && mem_rd_req_valid && mem_rd_req_ready;
    rd_id = int'(mem_rd_req_id); rd_line = int'(mem_rd_req_line);
    wr_fire = rst_n && mem_wr_valid && mem_wr_ready;
    wr_line = int'(mem_wr_line); wr_data = mem_wr_data; wr_mask = mem_wr_mask;
  end

  // ---------------- host writes ----------------
  task automatic wr(input logic [11:0] a, input logic [63:0] d);
    @(negedge clk);
    host_we = 1; host_addr = a; host_wdata = d;
    @(negedge clk);
    host_we = 0;
  endtask

  task automatic scmd(input int sid, input scmd_kind_e k, input bit last,
                      input int base, input int size, input int stride);
    wr(12'hC00, 64'(base));
    wr(12'hC01, {26'd0, 3'(sid), k, last, 16'(size), 16'(stride)});
  endtask

  task automatic pe_cfg(input int r, input int c, input pe_instr_t ins, input int skew, input int iters);
    wr(12'(((r * 4 + c) << 4)), 64'(ins));
    wr(12'h800 | 12'(r * 4 + c), {24'd0, 16'(skew), 16'(iters), 8'd1});
  endtask

  task automatic pe_dm(input int r, input int c, input int a, input logic [31:0] v);
    wr(12'h400 | 12'(((r * 4 + c) << 3) | a), 64'(v));
  endtask

  function automatic logic [31:0] rnd_f();
    return {1'($urandom), 8'(120 + $urandom_range(0, 14)), 23'($urandom)};
  endfunction

  function automatic int follow(input int p, input logic [55:0] swv);
    int bb, k;
    for (int i = 0; i < 7; i++) begin
      bb = (i < 4) ? i : 6 - i;
      k = ((p >> (bb + 1)) << bb) | (p & ((1 << bb) - 1));
      if (swv[i * 8 + k]) p = p ^ (1 << bb);
    end
    return p;
  endfunction

  initial begin
    logic [31:0] exp_v;
    logic [55:0] lsw, ssw;
    real s;
    for (int i = 0; i < 4096; i++) mem[i] = 32'hdead_0000 | i;
    for (int i = 0; i < N + 2; i++) mem[X_W + i] = rnd_f();
    // lanes 0, 4, 8 (streams 0-2) -> ports 0, 1, 2 (rows 0-2)
    do lsw = {$urandom, $urandom};
    while (!(follow(0, lsw) == 0 && follow(4, lsw) == 1 && follow(8, lsw) == 2));
    // port 2 (row 2 east) -> lane 0 (store stream 4)
    do ssw = {$urandom, $urandom};
    while (follow(2, ssw) != 0);
    repeat (3) @(posedge clk);
    rst_n = 1;

    for (int s = 0; s < 3; s++) scmd(s, SCMD_LD_START, 1, (X_W + s) * 4, N, 1);
    scmd(4, SCMD_ST_START, 1, Y_W * 4, N, 1);
    wr(12'hC02, {52'd0, 3'd0, 3'd1, 3'd1, 3'd1});
    wr(12'hC04, 64'(lsw));
    wr(12'hC03, {52'd0, 3'd0, 3'd0, 3'd0, 3'd1});
    wr(12'hC05, 64'(ssw));
    pe_cfg(0, 0, pe_ins(FMV, SRC_W, SRC_ZERO, SRC_ZERO, OUT_NONE, OUT_NONE, OUT_IN_W, OUT_NONE), 0, N);
    pe_cfg(1, 0, pe_ins(FADD, SRC_N, SRC_W, SRC_ZERO, OUT_NONE, OUT_NONE, OUT_FPU, OUT_NONE), 1, N);
    pe_cfg(2, 0, pe_ins(FADD, SRC_N, SRC_W, SRC_ZERO, OUT_NONE, OUT_FPU, OUT_NONE, OUT_NONE), 2, N);
    pe_cfg(2, 1, pe_ins(FMUL, SRC_W, SRC_DM, SRC_ZERO, OUT_NONE, OUT_FPU, OUT_NONE, OUT_NONE), 3, N);
    pe_dm(2, 1, 0, THIRD);
    pe_cfg(2, 2, pe_ins(FMV, SRC_W, SRC_ZERO, SRC_ZERO, OUT_NONE, OUT_IN_W, OUT_NONE, OUT_NONE), 4, N);
    pe_cfg(2, 3, pe_ins(FMV, SRC_W, SRC_ZERO, SRC_ZERO, OUT_NONE, OUT_IN_W, OUT_NONE, OUT_NONE), 5, N);

    wr(12'hC08, 64'd1);
    @(negedge clk);
    while (!done) @(negedge clk);
    repeat (2) @(negedge clk);

    for (int i = 0; i < N; i++) begin
      s = f2r(r2f(f2r(mem[X_W + i]) + f2r(mem[X_W + i + 1])));
      s = f2r(r2f(s + f2r(mem[X_W + i + 2])));
      exp_v = r2f(s * f2r(THIRD));
      checks++;
      if (mem[Y_W + i] !== exp_v) begin
        failures++;
        if (failures < 8) $display("FAIL Y[%0d]=%h exp %h", i, mem[Y_W + i], exp_v);
      end
    end
    checks++;
    if (mem[Y_W + N] !== (32'hdead_0000 | (Y_W + N))) failures++;
    host_addr = 12'hC09;
    #1;
    $display("run cycles=%0d stall=%0d lbhit=%0d coalesce=%0d ooo=%0d merge=%0d",
             host_rdata, evcnt[6], evcnt[3], evcnt[2], evcnt[1], evcnt[0]);
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (evcnt[k == 0 ? 6 : k] == 0) begin failures++; $display("FAIL mechanism %0d never occurred", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
