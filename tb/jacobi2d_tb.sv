// jacobi2d_tb: one Jacobi-2D sweep over the interior of a WxH grid,
// y[i][j] = 0.2 * (x[i][j-1] + x[i][j] + x[i][j+1] + x[i-1][j] + x[i+1][j]),
// on the whole accelerator at its default size. Two 3-D load streams
// cover the five neighbours: stream 0 walks (k: 3 elements, stride 1;
// j; i) and gives the west/centre/east values as a 3-element vector,
// stream 1 walks (k: 2 elements, stride 2W; j; i) from the row above and
// gives the north/south pair. The load re-mapper sends stream 0's lanes to
// rows 0-2 and stream 1's to row 3 and column 1. Column 0 sums four
// values as they move south, column 1 brings the fifth down to PE(3,1),
// which adds it; PE(3,2) scales by 0.2 and PE(3,3) routes the result to
// store stream 4, which writes the interior of Y (2-D store pattern).
// Each PE is started one cycle after its upstream neighbour (loop skew).
// Inputs have short mantissas so that sums are exact in the reference,
// which rounds once per operation. Checks every interior point, that the
// border of Y is untouched, and that stalls, bypasses, line-buffer hits
// and coalescing occurred.
module jacobi2d_tb;
  import accel_pkg::*;
  import tb_fp_pkg::*;

  localparam int W = 12, H = 10;               // grid, row-major, pitch W
  localparam int X_W = 32'h200, Y_W = 32'h900;  // word addresses
  localparam logic [31:0] FIFTH = 32'h3e4c_cccd;  // 0.2 rounded to single
  localparam int NI = (H - 2) * (W - 2);        // interior points

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
    return {1'($urandom), 8'(124 + $urandom_range(0, 3)), 11'($urandom), 12'd0};
  endfunction

  function automatic real x(input int i, input int j);
    return f2r(mem[X_W + i * W + j]);
  endfunction

  initial begin
    logic [31:0] exp_v;
    logic [55:0] lsw, ssw;
    real s;
    for (int i = 0; i < 4096; i++) mem[i] = 32'hdead_0000 | i;
    for (int i = 0; i < W * H; i++) mem[X_W + i] = short_f();
    // lanes 0,1,2 (stream 0) -> rows 0,1,2; lanes 4,5 (stream 1) -> row 3, column 1
    do lsw = {$urandom, $urandom};
    while (!(follow(0, lsw) == 0 && follow(1, lsw) == 1 && follow(2, lsw) == 2 &&
             follow(4, lsw) == 3 && follow(5, lsw) == 5));
    do ssw = {$urandom, $urandom};
    while (follow(3, ssw) != 0);
    repeat (3) @(posedge clk);
    rst_n = 1;

    scmd(0, SCMD_LD_START, 0, (X_W + W) * 4, 3, 1);
    scmd(0, SCMD_APPEND, 0, 0, W - 2, 1);
    scmd(0, SCMD_APPEND, 1, 0, H - 2, W);
    scmd(1, SCMD_LD_START, 0, (X_W + 1) * 4, 2, 2 * W);
    scmd(1, SCMD_APPEND, 0, 0, W - 2, 1);
    scmd(1, SCMD_APPEND, 1, 0, H - 2, W);
    scmd(4, SCMD_ST_START, 0, (Y_W + W + 1) * 4, W - 2, 1);
    scmd(4, SCMD_APPEND, 1, 0, H - 2, W);
    wr(12'hC02, {52'd0, 3'd0, 3'd0, 3'd2, 3'd3});
    wr(12'hC04, 64'(lsw));
    wr(12'hC03, {52'd0, 3'd0, 3'd0, 3'd0, 3'd1});
    wr(12'hC05, 64'(ssw));
    pe_cfg(0, 0, pe_ins(FMV, SRC_W, SRC_ZERO, SRC_ZERO, OUT_NONE, OUT_NONE, OUT_IN_W, OUT_NONE), 0, NI);
    pe_cfg(1, 0, pe_ins(FADD, SRC_N, SRC_W, SRC_ZERO, OUT_NONE, OUT_NONE, OUT_FPU, OUT_NONE), 1, NI);
    pe_cfg(2, 0, pe_ins(FADD, SRC_N, SRC_W, SRC_ZERO, OUT_NONE, OUT_NONE, OUT_FPU, OUT_NONE), 2, NI);
    pe_cfg(3, 0, pe_ins(FADD, SRC_N, SRC_W, SRC_ZERO, OUT_NONE, OUT_FPU, OUT_NONE, OUT_NONE), 3, NI);
    pe_cfg(0, 1, pe_ins(FMV, SRC_N, SRC_ZERO, SRC_ZERO, OUT_NONE, OUT_NONE, OUT_IN_N, OUT_NONE), 1, NI);
    pe_cfg(1, 1, pe_ins(FMV, SRC_N, SRC_ZERO, SRC_ZERO, OUT_NONE, OUT_NONE, OUT_IN_N, OUT_NONE), 2, NI);
    pe_cfg(2, 1, pe_ins(FMV, SRC_N, SRC_ZERO, SRC_ZERO, OUT_NONE, OUT_NONE, OUT_IN_N, OUT_NONE), 3, NI);
    pe_cfg(3, 1, pe_ins(FADD, SRC_W, SRC_N, SRC_ZERO, OUT_NONE, OUT_FPU, OUT_NONE, OUT_NONE), 4, NI);
    pe_cfg(3, 2, pe_ins(FMUL, SRC_W, SRC_DM, SRC_ZERO, OUT_NONE, OUT_FPU, OUT_NONE, OUT_NONE), 5, NI);
    pe_dm(3, 2, 0, FIFTH);
    pe_cfg(3, 3, pe_ins(FMV, SRC_W, SRC_ZERO, SRC_ZERO, OUT_NONE, OUT_IN_W, OUT_NONE, OUT_NONE), 6, NI);

    wr(12'hC08, 64'd1);
    @(negedge clk);
    while (!done) @(negedge clk);
    repeat (2) @(negedge clk);

    for (int i = 0; i < H; i++)
      for (int j = 0; j < W; j++) begin
        if (i == 0 || j == 0 || i == H - 1 || j == W - 1) exp_v = 32'hdead_0000 | (Y_W + i * W + j);
        else begin
          // same order as the array: ((w + c) + e) + n, then + s, then * 0.2
          s = f2r(r2f(x(i, j - 1) + x(i, j)));
          s = f2r(r2f(s + x(i, j + 1)));
          s = f2r(r2f(s + x(i - 1, j)));
          s = f2r(r2f(s + x(i + 1, j)));
          exp_v = r2f(s * f2r(FIFTH));
        end
        checks++;
        if (mem[Y_W + i * W + j] !== exp_v) begin
          failures++;
          if (failures < 8) $display("FAIL Y[%0d][%0d]=%h exp %h", i, j, mem[Y_W + i * W + j], exp_v);
        end
      end
    $display("stall=%0d bypass=%0d lbhit=%0d coalesce=%0d", evcnt[6], evcnt[4], evcnt[3], evcnt[2]);
    foreach (evcnt[k]) if (k inside {6, 4, 3, 2}) begin
      checks++;
      if (evcnt[k] == 0) begin failures++; $display("FAIL mechanism %0d never occurred", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
