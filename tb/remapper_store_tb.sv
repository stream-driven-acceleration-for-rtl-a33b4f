// remapper_store_tb: the array pushes into output ports 1, 2 and 7; the
// store re-mapper gathers ports 1,2 into store stream 0 (width 2) and port
// 7 into store stream 2 (width 1). Switch bits are found with a reference
// model of the network. Stream registers have random free space. Checks:
// each store stream receives its interleaved elements in order and whole
// vectors only, port_space never lets a buffer overflow, idle at the end.
`include "tb_check.svh"
module remapper_store_tb;
  import accel_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic clear = 0, idle;
  logic [3:0][2:0] cfg_u, sreg_push_n;
  logic [6:0][7:0] cfg_sw;
  logic [7:0] port_push, port_space;
  logic [7:0][31:0] port_data;
  logic [3:0][3:0] sreg_free;
  logic [3:0][3:0][31:0] sreg_push_data;
  remapper_store dut (.*);
  `WATCHDOG(100000)

  function automatic int follow(input int p, input logic [6:0][7:0] sw);
    int bb, k;
    for (int i = 0; i < 7; i++) begin
      bb = (i < 4) ? i : 6 - i;
      k = ((p >> (bb + 1)) << bb) | (p & ((1 << bb) - 1));
      if (sw[i][k]) p = p ^ (1 << bb);
    end
    return p;
  endfunction

  logic [31:0] exp0[$], exp2[$];
  int n1 = 0, n2 = 0, n7 = 0;
  const int N = 30;
  logic [3:0][2:0] pn_q;
  logic [3:0][3:0][31:0] pd_q;
  logic [3:0][3:0] fr_q;

  always @(negedge clk) begin
    port_push = '0;
    for (int s = 0; s < 4; s++) sreg_free[s] = 4'($urandom_range(0, 8));
    if (rst_n) begin
      if (port_space[1] && n1 < N && $urandom_range(0, 1) != 0) begin port_push[1] = 1; port_data[1] = 32'h100 + n1; n1++; end
      if (port_space[2] && n2 < N && $urandom_range(0, 1) != 0) begin port_push[2] = 1; port_data[2] = 32'h200 + n2; n2++; end
      if (port_space[7] && n7 < N && $urandom_range(0, 1) != 0) begin port_push[7] = 1; port_data[7] = 32'h700 + n7; n7++; end
    end
    #1 pn_q = sreg_push_n; pd_q = sreg_push_data; fr_q = sreg_free;
  end
  always @(posedge clk) if (rst_n) begin
    if (pn_q[0] != 0) begin
      checks++;
      if (pn_q[0] != 2 || exp0.size() < 2 || pd_q[0][0] != exp0[0] || pd_q[0][1] != exp0[1])
        failures++;
      void'(exp0.pop_front()); void'(exp0.pop_front());
      `CHECK(fr_q[0] >= 2, "room in the stream register")
    end
    if (pn_q[2] != 0) begin
      checks++;
      if (pn_q[2] != 1 || exp2.size() < 1 || pd_q[2][0] != exp2[0]) failures++;
      void'(exp2.pop_front());
    end
    checks++;
    if (pn_q[1] != 0 || pn_q[3] != 0) failures++;
  end

  initial begin
    cfg_u = '0; cfg_u[0] = 3'd2; cfg_u[2] = 3'd1;
    do cfg_sw = 56'({$urandom, $urandom});
    while (!(follow(1, cfg_sw) == 0 && follow(2, cfg_sw) == 1 && follow(7, cfg_sw) == 8));
    for (int i = 0; i < N; i++) begin
      exp0.push_back(32'h100 + i); exp0.push_back(32'h200 + i); exp2.push_back(32'h700 + i);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (600) @(negedge clk);
    `CHECK(exp0.size() == 0 && exp2.size() == 0, "all elements gathered")
    `CHECK(idle, "buffers empty")
    `FINISH
  end
endmodule
