// fir_tb: runs a 4-tap FIR filter y[i] = sum_k h[k] * x[i+k] on the whole
// accelerator at its default size. One 2-D load stream reads the sliding
// windows of X (inner dimension k: 4 elements, stride 1; outer dimension
// i: N windows, stride 1) with unroll width 4, so each window becomes a
// 4-element vector whose elements enter rows 0-3 on the west edge (the
// identity Benes setting). Column 0 is a multiply-accumulate chain that
// moves south: PE(0,0) computes x*h0, PE(k,0) adds x*hk to the partial sum
// from the north one cycle later (loop skew k), the taps sit in the PEs'
// data memories. PE(3,0) sends the sum east; PE(3,1..3) route it to the
// east edge of row 3, which the store re-mapper maps to store stream 4.
// Inputs have short mantissas so that a double-precision reference with
// one rounding per fused operation is exact. Checks every output, that
// nothing past Y is written, and that stalls, line-buffer hits, request
// coalescing and selector bypasses occurred.
module fir_tb;
  import accel_pkg::*;
  import tb_fp_pkg::*;

  localparam int N = 120;                      // output points
  localparam int T = 4;                        // taps
  localparam int X_W = 32'h300, Y_W = 32'hA00;  // word addresses

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

  // a float with a 12-bit significand
  function automatic logic [31:0] short_f();
    return {1'($urandom), 8'(124 + $urandom_range(0, 6)), 11'($urandom), 12'd0};
  endfunction

  initial begin
    logic [31:0] exp_v, h[T];
    logic [55:0] ssw;
    real acc;
    for (int i = 0; i < 4096; i++) mem[i] = 32'hdead_0000 | i;
    for (int i = 0; i < N + T - 1; i++) mem[X_W + i] = short_f();
    for (int k = 0; k < T; k++) h[k] = short_f();
    // port 3 (row 3 east) -> lane 0 (store stream 4)
    do ssw = {$urandom, $urandom};
    while (follow(3, ssw) != 0);
    repeat (3) @(posedge clk);
    rst_n = 1;

    scmd(0, SCMD_LD_START, 0, X_W * 4, T, 1);
    scmd(0, SCMD_APPEND, 1, 0, N, 1);
    scmd(4, SCMD_ST_START, 1, Y_W * 4, N, 1);
    wr(12'hC02, {52'd0, 3'd0, 3'd0, 3'd0, 3'd4});
    wr(12'hC04, 64'd0);
    wr(12'hC03, {52'd0, 3'd0, 3'd0, 3'd0, 3'd1});
    wr(12'hC05, 64'(ssw));
    pe_cfg(0, 0, pe_ins(FMUL, SRC_W, SRC_DM, SRC_ZERO, OUT_NONE, OUT_NONE, OUT_FPU, OUT_NONE), 0, N);
    pe_cfg(1, 0, pe_ins(FMADD, SRC_W, SRC_DM, SRC_N, OUT_NONE, OUT_NONE, OUT_FPU, OUT_NONE), 1, N);
    pe_cfg(2, 0, pe_ins(FMADD, SRC_W, SRC_DM, SRC_N, OUT_NONE, OUT_NONE, OUT_FPU, OUT_NONE), 2, N);
    pe_cfg(3, 0, pe_ins(FMADD, SRC_W, SRC_DM, SRC_N, OUT_NONE, OUT_FPU, OUT_NONE, OUT_NONE), 3, N);
    for (int k = 0; k < T; k++) pe_dm(k, 0, 0, h[k]);
    for (int c = 1; c < 4; c++)
      pe_cfg(3, c, pe_ins(FMV, SRC_W, SRC_ZERO, SRC_ZERO, OUT_NONE, OUT_IN_W, OUT_NONE, OUT_NONE), 3 + c, N);

    wr(12'hC08, 64'd1);
    @(negedge clk);
    while (!done) @(negedge clk);
    repeat (2) @(negedge clk);

    for (int i = 0; i < N; i++) begin
      acc = f2r(r2f(f2r(mem[X_W + i]) * f2r(h[0])));
      for (int k = 1; k < T; k++) acc = f2r(r2f(f2r(mem[X_W + i + k]) * f2r(h[k]) + acc));
      exp_v = r2f(acc);
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
    $display("run cycles=%0d stall=%0d bypass=%0d lbhit=%0d coalesce=%0d",
             host_rdata, evcnt[6], evcnt[4], evcnt[3], evcnt[2]);
    checks++;
    if (evcnt[5] != T * N + N) begin failures++; $display("FAIL address count"); end
    foreach (evcnt[k]) if (k inside {6, 4, 3, 2}) begin
      checks++;
      if (evcnt[k] == 0) begin failures++; $display("FAIL mechanism %0d never occurred", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
