// stream_state_selector_tb: the selector runs with a reference stream
// table (an array updated by its write-backs) and a real AGU. Eight
// streams with random 1-3 dimensional shapes and random eligibility are
// stepped to completion. Checks: every stream produces its full address
// sequence in order (so bypassed states are never lost or replayed),
// write-back is skipped exactly on bypass, a stream is never granted more
// than once while others wait more than NS grants, and flush drops the
// in-flight state.
`include "tb_check.svh"
module stream_state_selector_tb;
  import accel_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic flush, sel_valid, agu_valid, wb_en, bypass;
  logic [7:0] elig;
  logic [2:0] sel, agu_sid;
  stream_state_t tab_state, agu_nxt, agu_st;
  logic [31:0] addr;
  stream_state_selector dut (.*);
  agu u_agu (.st(agu_st), .addr(addr), .nxt(agu_nxt));
  `WATCHDOG(200000)

  stream_state_t m[8];
  logic [31:0] expq[8][$];
  int nbyp = 0, wait_n[8];
  bit addr_chk = 1;
  logic [7:0] want;
  assign tab_state = m[sel];

  always @(negedge clk) begin
    for (int s = 0; s < 8; s++) begin
      want[s] = $urandom_range(0, 3) != 0;
      elig[s] = want[s] && !m[s].done && m[s].active;
    end
    #1;
    if (rst_n && !flush) begin
      if (agu_valid && addr_chk) begin
        checks++;
        if (expq[agu_sid].size() == 0 || addr != expq[agu_sid][0]) begin
          failures++; if (failures < 10) $display("FAIL stream %0d addr %h at %0t left %0d", agu_sid, addr, $time, expq[agu_sid].size());
        end
        if (expq[agu_sid].size() != 0) void'(expq[agu_sid].pop_front());
        `CHECK(wb_en == !bypass, "write-back skipped exactly on bypass")
        if (bypass) begin nbyp++; `CHECK(sel == agu_sid, "bypass only for the same stream") end
      end
      for (int s = 0; s < 8; s++) begin
        if (elig[s] && !(agu_valid && agu_sid == 3'(s) && agu_nxt.done) && !(sel_valid && sel == 3'(s))) wait_n[s]++;
        else wait_n[s] = 0;
        `CHECK(wait_n[s] <= 8, "round robin bound")
      end
    end
  end
  always @(posedge clk) if (rst_n && wb_en) begin
    m[agu_sid].idx = agu_nxt.idx; m[agu_sid].done = agu_nxt.done;
  end

  initial begin
    flush = 0;
    for (int s = 0; s < 8; s++) begin
      int sz[3], sd[3], nd;
      m[s] = '0;
      nd = $urandom_range(1, 3);
      m[s].base = 32'h1000 * s; m[s].last_dim = 2'(nd - 1);
      m[s].configured = 1; m[s].active = 1;
      for (int d = 0; d < 3; d++) begin
        sz[d] = d < nd ? $urandom_range(1, 6) : 1; sd[d] = $urandom_range(1, 9);
        m[s].size[d] = 16'(sz[d]); m[s].stride[d] = 16'(sd[d]);
      end
      for (int k = 0; k < sz[2]; k++) for (int j = 0; j < sz[1]; j++) for (int i = 0; i < sz[0]; i++)
        expq[s].push_back(m[s].base + 32'(4 * (i * sd[0] + j * sd[1] + k * sd[2])));
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (1500) @(negedge clk);
    for (int s = 0; s < 8; s++) `CHECK(expq[s].size() == 0 && m[s].done, "stream completed")
    `CHECK(nbyp > 0, "bypass path used")
    // flush: the next cycle carries no state
    addr_chk = 0;
    m[0].done = 0; m[0].idx = '0; m[0].size[0] = 100; m[0].last_dim = 0;
    @(negedge clk); @(negedge clk);
    flush = 1; @(negedge clk); #2;
    `CHECK(!agu_valid, "flush drops the in-flight state")
    `FINISH
  end
endmodule
