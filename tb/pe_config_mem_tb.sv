// pe_config_mem_tb: writes random instruction words to every context of
// the PE configuration memory and reads them back against a shadow copy;
// checks that reset clears every context.
`include "tb_check.svh"
module pe_config_mem_tb;
  import accel_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic wr_en = 0;
  logic [3:0] wr_addr = 0, rd_addr = 0;
  pe_instr_t wr_data = '0, rd_data, shadow [16];
  pe_config_mem dut (.*);
  `WATCHDOG(10000)
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) begin rd_addr = 4'(i); #1; `CHECK(rd_data == '0, "reset value") end
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 4'($urandom); wr_data = pe_instr_t'({$urandom, $urandom});
      shadow[wr_addr] = wr_data;
      if (n == 0) for (int i = 0; i < 16; i++) shadow[i] = (i == int'(wr_addr)) ? wr_data : '0;
      @(negedge clk);
      wr_en = 0;
      rd_addr = 4'($urandom);
      #1;
      `CHECK(rd_data == shadow[rd_addr], "read back")
    end
    `FINISH
  end
endmodule
