// pe_data_mem_tb: random writes and reads on the three read ports of the
// PE data memory against a shadow copy; checks reset to zero and that a
// write is visible only after the clock edge.
`include "tb_check.svh"
module pe_data_mem_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic we = 0;
  logic [2:0] waddr = 0, raddr_a = 0, raddr_b = 0, raddr_c = 0;
  logic [31:0] wdata = 0, rdata_a, rdata_b, rdata_c;
  logic [31:0] shadow [8];
  pe_data_mem dut (.*);
  `WATCHDOG(10000)
  initial begin
    for (int i = 0; i < 8; i++) shadow[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      we = 1'($urandom); waddr = 3'($urandom); wdata = $urandom;
      raddr_a = 3'($urandom); raddr_b = 3'($urandom); raddr_c = waddr;
      #1;
      `CHECK(rdata_a == shadow[raddr_a] && rdata_b == shadow[raddr_b], "read ports")
      `CHECK(rdata_c == shadow[raddr_c], "old value before the edge")
      @(negedge clk);
      if (we) shadow[waddr] = wdata;
      we = 0;
      #1;
      `CHECK(rdata_c == shadow[raddr_c], "new value after the edge")
    end
    `FINISH
  end
endmodule
