// stream_accel_top_tb: end-to-end test of the accelerator at its default
// size (4x4 array, 32-entry request queue, 4-row line buffer). Two kernels
// run side by side in one run: Y[i] = 2*A[i] + 1 on rows 0-1 (1-D load
// stream A of NA elements unrolled twice, store stream Y) and
// Z[j] = 0.5*B[j] - 3 on rows 2-3 (B is a 2-D stream: NB/4 rows of 4 elements
// with a row pitch of BP words; Z is 1-D). The Benes switches of both
// re-mappers are set to move stream B's lanes to rows 2-3 and rows 2-3 to
// stream Z's lanes. Memory is a behavioural model with random request
// back-pressure and random response latency, so line responses return out
// of order. Checks: every Y and Z word against a double-precision
// reference, the cycle register, and that each mechanism occurred: array
// stall, selector bypass, line-buffer hit, request coalescing,
// out-of-order fill, store merging.
module stream_accel_top_tb;
  import accel_pkg::*;
  import tb_fp_pkg::*;

  localparam int NA = 128;
  localparam int NB = 32;
  localparam int BP = 16;   // row pitch of B in words
  localparam int A_W = 32'h100, B_W = 32'h400, Y_W = 32'h800, Z_W = 32'hC00;

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

  initial begin
    logic [31:0] exp_v;
    logic [7:0] sw_mask;
    for (int i = 0; i < 4096; i++) mem[i] = 32'hdead_0000 | i;
    for (int i = 0; i < NA; i++) mem[A_W + i] = rnd_f();
    for (int r = 0; r < NB / 4; r++) for (int e = 0; e < 4; e++) mem[B_W + r * BP + e] = rnd_f();
    repeat (3) @(posedge clk);
    rst_n = 1;

    // Streams: 0 = A (load, 1-D), 1 = B (load, 2-D), 4 = Y, 5 = Z (store).
    scmd(0, SCMD_LD_START, 1, A_W * 4, NA, 1);
    scmd(1, SCMD_LD_START, 0, B_W * 4, 4, 1);
    scmd(1, SCMD_APPEND,   1, 0, NB / 4, BP);
    scmd(4, SCMD_ST_START, 1, Y_W * 4, NA, 1);
    scmd(5, SCMD_ST_START, 1, Z_W * 4, NB, 1);
    // Re-mappers: load lanes 0,1 (A) -> rows 0,1; lanes 4,5 (B) -> rows 2,3
    // through stage 1 (bit 1) and stage 2 (bit 2) switches 2 and 3.
    sw_mask = 8'b0000_1100;
    wr(12'hC02, {52'd0, 3'd0, 3'd0, 3'd2, 3'd2});
    wr(12'hC04, 64'({sw_mask, sw_mask, 8'd0}));
    // Store: rows 0,1 -> Y lanes 0,1; rows 2,3 -> Z lanes 4,5 via stages 2 and 5.
    wr(12'hC03, {52'd0, 3'd0, 3'd0, 3'd2, 3'd2});
    wr(12'hC05, (64'(sw_mask) << 16) | (64'(sw_mask) << 40));
    // PE array: column 0 computes, columns 1-3 route east.
    for (int r = 0; r < 4; r++) begin
      automatic int n = (r < 2) ? NA / 2 : NB / 2;
      pe_cfg(r, 0, pe_ins(FMADD, SRC_W, SRC_DM, SRC_DM + 1, OUT_NONE, OUT_FPU, OUT_NONE, OUT_NONE), 0, n);
      pe_dm(r, 0, 0, (r < 2) ? 32'h4000_0000 : 32'h3f00_0000);
      pe_dm(r, 0, 1, (r < 2) ? 32'h3f80_0000 : 32'hc040_0000);
      for (int c = 1; c < 4; c++)
        pe_cfg(r, c, pe_ins(FMV, SRC_W, SRC_ZERO, SRC_ZERO, OUT_NONE, OUT_IN_W, OUT_NONE, OUT_NONE), c, n);
    end

    wr(12'hC08, 64'd1);
    @(negedge clk);
    while (!done) @(negedge clk);
    repeat (2) @(negedge clk);

    for (int i = 0; i < NA; i++) begin
      exp_v = r2f(2.0 * f2r(mem[A_W + i]) + 1.0);
      checks++;
      if (mem[Y_W + i] !== exp_v) begin
        failures++;
        if (failures < 8) $display("FAIL Y[%0d]=%h exp %h", i, mem[Y_W + i], exp_v);
      end
    end
    for (int j = 0; j < NB; j++) begin
      exp_v = r2f(0.5 * f2r(mem[B_W + (j / 4) * BP + (j % 4)]) - 3.0);
      checks++;
      if (mem[Z_W + j] !== exp_v) begin
        failures++;
        if (failures < 8) $display("FAIL Z[%0d]=%h exp %h", j, mem[Z_W + j], exp_v);
      end
    end
    // Nothing written past the outputs.
    checks++;
    if (mem[Y_W + NA] !== (32'hdead_0000 | (Y_W + NA)) || mem[Z_W + NB] !== (32'hdead_0000 | (Z_W + NB)))
      failures++;
    host_addr = 12'hC09;
    #1;
    checks++;
    if (host_rdata < 64'(NA / 2)) failures++;
    $display("run cycles=%0d stall=%0d run=%0d addr=%0d bypass=%0d lbhit=%0d coalesce=%0d ooo=%0d merge=%0d",
             host_rdata, evcnt[6], evcnt[7], evcnt[5], evcnt[4], evcnt[3], evcnt[2], evcnt[1], evcnt[0]);
    checks++;
    if (evcnt[5] != NA + NB + NA + NB) begin failures++; $display("FAIL address count"); end
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (evcnt[k] == 0) begin failures++; $display("FAIL mechanism %0d never occurred", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
