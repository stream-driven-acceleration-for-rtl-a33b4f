// stream_register_tb: random multi-element pushes and pops on the stream
// register against a queue model, never beyond its free space or count;
// checks the head window, count and free after every cycle, and clear.
`include "tb_check.svh"
module stream_register_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic clear = 0;
  logic [2:0] push_n = 0, pop_n = 0;
  logic [3:0][31:0] push_data = '0, head;
  logic [3:0] count, free;
  logic [31:0] model[$];
  stream_register dut (.*);
  `WATCHDOG(100000)
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      #1;
      `CHECK(int'(count) == model.size() && int'(free) == 8 - model.size(), "count and free")
      for (int e = 0; e < 4; e++)
        if (e < model.size()) `CHECK(head[e] == model[e], "head window")
      push_n = 3'($urandom_range(0, 4)); if (int'(push_n) > int'(free)) push_n = 3'(free);
      pop_n = 3'($urandom_range(0, 4));  if (int'(pop_n) > int'(count)) pop_n = 3'(count);
      for (int e = 0; e < 4; e++) push_data[e] = $urandom;
      @(negedge clk);
      for (int e = 0; e < int'(pop_n); e++) void'(model.pop_front());
      for (int e = 0; e < int'(push_n); e++) model.push_back(push_data[e]);
      push_n = 0; pop_n = 0;
      if (n == 1500) begin
        clear = 1; @(negedge clk); clear = 0; model.delete();
      end
    end
    `FINISH
  end
endmodule
