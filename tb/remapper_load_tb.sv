// remapper_load_tb: two load streams with unroll widths 2 and 3 feed the
// load re-mapper; the Benes switches route stream 0's lanes 0,1 to ports
// 0,1 and stream 1's lanes 4,5,6 to ports 2,5,6 (a setting found by the
// reference network model below from a target mapping). Stream register
// models supply random element counts, the array side pops at random.
// Checks: each port receives exactly its mu-stream (element e of every
// vector of its stream) in order, and vectors move only whole.
`include "tb_check.svh"
module remapper_load_tb;
  import accel_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic clear = 0;
  logic [3:0][2:0] cfg_u, sreg_pop_n;
  logic [6:0][7:0] cfg_sw;
  logic [3:0][3:0][31:0] sreg_head;
  logic [3:0][3:0] sreg_count;
  logic [7:0] port_valid, port_pop;
  logic [7:0][31:0] port_data;
  remapper_load dut (.*);
  `WATCHDOG(100000)

  logic [31:0] sq[4][$];      // stream register contents
  logic [31:0] expq[8][$];    // expected per port
  int got[8];
  logic [3:0][2:0] pop_q;
  logic [7:0][31:0] data_q;

  // Where lane p ends up for switch setting sw (same stage order as the network).
  function automatic int follow(input int p, input logic [6:0][7:0] sw);
    int bb, k;
    for (int i = 0; i < 7; i++) begin
      bb = (i < 4) ? i : 6 - i;
      k = ((p >> (bb + 1)) << bb) | (p & ((1 << bb) - 1));
      if (sw[i][k]) p = p ^ (1 << bb);
    end
    return p;
  endfunction

  always @(negedge clk) begin
    for (int s = 0; s < 4; s++) begin
      for (int e = 0; e < 4; e++) sreg_head[s][e] = (e < sq[s].size()) ? sq[s][e] : 32'd0;
      sreg_count[s] = 4'(sq[s].size() > 8 ? 8 : sq[s].size());
      if ($urandom_range(0, 2) == 0) sreg_count[s] = 4'(sq[s].size() > 1 ? 1 : sq[s].size());
      // slots beyond the reported count hold junk
      for (int e = 0; e < 4; e++) if (e >= int'(sreg_count[s])) sreg_head[s][e] = 32'hDEAD_0000 | 32'(e);
    end
    for (int p = 0; p < 8; p++) port_pop[p] = rst_n && port_valid[p] && ($urandom_range(0, 2) != 0);
    #1 pop_q = sreg_pop_n; data_q = port_data;
  end
  always @(posedge clk) if (rst_n) begin
    if (rst_n) for (int s = 0; s < 4; s++) for (int e = 0; e < int'(pop_q[s]); e++) void'(sq[s].pop_front());
    for (int p = 0; p < 8; p++) if (port_pop[p]) begin
      checks++;
      if (expq[p].size() == 0 || data_q[p] != expq[p][0]) begin
        failures++; if (failures < 10) $display("FAIL port %0d data %h exp %h t=%0t", p, data_q[p], expq[p].size() > 0 ? expq[p][0] : 0, $time);
      end
      if (expq[p].size() > 0) void'(expq[p].pop_front());
      got[p]++;
    end
  end

  initial begin
    int dst[8];
    logic [31:0] v;
    cfg_u = '0; cfg_u[0] = 3'd2; cfg_u[1] = 3'd3;
    // Search random switch settings for one that realises lanes
    // 0->0, 1->1, 4->2, 5->5, 6->6 (a check of rearrangeability as well).
    do begin
      cfg_sw = 56'({$urandom, $urandom});
    end while (!(follow(0, cfg_sw) == 0 && follow(1, cfg_sw) == 1 && follow(4, cfg_sw) == 2 &&
                 follow(5, cfg_sw) == 5 && follow(6, cfg_sw) == 6));
    dst = '{0, 1, 0, 0, 2, 5, 6, 0};
    for (int i = 0; i < 40; i++) begin
      v = 32'h1000_0000 | i; sq[0].push_back(v); expq[dst[i % 2]].push_back(v);
    end
    for (int i = 0; i < 30; i++) begin
      v = 32'h2000_0000 | i; sq[1].push_back(v); expq[dst[4 + i % 3]].push_back(v);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (400) @(negedge clk);
    `CHECK(got[0] == 20 && got[1] == 20, "stream 0 mu-stream counts")
    `CHECK(got[2] == 10 && got[5] == 10 && got[6] == 10, "stream 1 mu-stream counts")
    `CHECK(got[3] == 0 && got[4] == 0 && got[7] == 0, "unused ports idle")
    `CHECK(sq[0].size() == 0 && sq[1].size() == 0, "streams drained")
    `FINISH
  end
endmodule
