// gemm_tb: matrix product C = A * B (A is 24x4, B is 4x4, all row-major)
// on the whole accelerator at its default size, computed one column of C
// per run. In run j the PEs of column 0 hold B[k][j] in their data
// memories and form a multiply-accumulate chain down the column (PE(k,0)
// one cycle after PE(k-1,0) through its loop skew). A 2-D load stream
// reads A row by row (inner dimension k, outer dimension i) with unroll
// width 4, so A[i][k] enters row k on the west edge. The dot product
// leaves on the east edge of row 3 and a store stream with stride N writes
// it into column j of C. Between runs the host rewrites only the data
// memories and the store base, so the test also covers restarting the
// accelerator. Inputs have short mantissas so that the double-precision
// reference with one rounding per fused operation is exact. Checks every
// element of C, that the words around C keep their values, and the busy/
// done handshake of each run.
module gemm_tb;
  import accel_pkg::*;
  import tb_fp_pkg::*;

  localparam int M = 24, K = 4, N = 4;        // C[M][N] = A[M][K] * B[K][N]
  localparam int A_W = 32'h300, C_W = 32'hA00;  // word addresses, row-major

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

  function automatic logic [31:0] short_f();
    return {1'($urandom), 8'(124 + $urandom_range(0, 6)), 11'($urandom), 12'd0};
  endfunction

  initial begin
    logic [31:0] exp_v, b[K][N];
    logic [55:0] ssw;
    real acc;
    for (int i = 0; i < 4096; i++) mem[i] = 32'hdead_0000 | i;
    for (int i = 0; i < M * K; i++) mem[A_W + i] = short_f();
    for (int k = 0; k < K; k++) for (int j = 0; j < N; j++) b[k][j] = short_f();
    do ssw = {$urandom, $urandom};
    while (follow(3, ssw) != 0);
    repeat (3) @(posedge clk);
    rst_n = 1;

    wr(12'hC02, {52'd0, 3'd0, 3'd0, 3'd0, 3'd4});
    wr(12'hC04, 64'd0);
    wr(12'hC03, {52'd0, 3'd0, 3'd0, 3'd0, 3'd1});
    wr(12'hC05, 64'(ssw));
    pe_cfg(0, 0, pe_ins(FMUL, SRC_W, SRC_DM, SRC_ZERO, OUT_NONE, OUT_NONE, OUT_FPU, OUT_NONE), 0, M);
    pe_cfg(1, 0, pe_ins(FMADD, SRC_W, SRC_DM, SRC_N, OUT_NONE, OUT_NONE, OUT_FPU, OUT_NONE), 1, M);
    pe_cfg(2, 0, pe_ins(FMADD, SRC_W, SRC_DM, SRC_N, OUT_NONE, OUT_NONE, OUT_FPU, OUT_NONE), 2, M);
    pe_cfg(3, 0, pe_ins(FMADD, SRC_W, SRC_DM, SRC_N, OUT_NONE, OUT_FPU, OUT_NONE, OUT_NONE), 3, M);
    for (int c = 1; c < 4; c++)
      pe_cfg(3, c, pe_ins(FMV, SRC_W, SRC_ZERO, SRC_ZERO, OUT_NONE, OUT_IN_W, OUT_NONE, OUT_NONE), 3 + c, M);
    scmd(0, SCMD_LD_START, 0, A_W * 4, K, 1);
    scmd(0, SCMD_APPEND, 1, 0, M, K);

    for (int j = 0; j < N; j++) begin
      for (int k = 0; k < K; k++) pe_dm(k, 0, 0, b[k][j]);
      scmd(4, SCMD_ST_START, 1, (C_W + j) * 4, M, N);
      wr(12'hC08, 64'd1);
      @(negedge clk);
      checks++;
      if (!busy || done) failures++;
      while (!done) @(negedge clk);
      repeat (2) @(negedge clk);
    end

    for (int i = 0; i < M; i++)
      for (int j = 0; j < N; j++) begin
        acc = f2r(r2f(f2r(mem[A_W + i * K]) * f2r(b[0][j])));
        for (int k = 1; k < K; k++) acc = f2r(r2f(f2r(mem[A_W + i * K + k]) * f2r(b[k][j]) + acc));
        exp_v = r2f(acc);
        checks++;
        if (mem[C_W + i * N + j] !== exp_v) begin
          failures++;
          if (failures < 8) $display("FAIL C[%0d][%0d]=%h exp %h", i, j, mem[C_W + i * N + j], exp_v);
        end
      end
    checks++;
    if (mem[C_W - 1] !== (32'hdead_0000 | (C_W - 1)) || mem[C_W + M * N] !== (32'hdead_0000 | (C_W + M * N)))
      failures++;
    $display("stall=%0d bypass=%0d lbhit=%0d coalesce=%0d merge=%0d", evcnt[6], evcnt[4], evcnt[3], evcnt[2], evcnt[0]);
    foreach (evcnt[k]) if (k inside {6, 3, 2}) begin
      checks++;
      if (evcnt[k] == 0) begin failures++; $display("FAIL mechanism %0d never occurred", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
