// pe_control_unit_tb: loads a 3-context program, runs it with SKEW=2 and
// ITERS=4 under a random run enable, and checks the context sequence, the
// active window (idle for the first 2 repetitions), that done rises after
// exactly (SKEW+ITERS)*LEN advancing cycles, and that ITERS=0 is done at once.
`include "tb_check.svh"
module pe_control_unit_tb;
  import accel_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic cfg_we = 0, loop_we = 0, start = 0, run = 0, active, done;
  logic [3:0] cfg_addr = 0, ctx;
  pe_instr_t cfg_data = '0, instr;
  logic [39:0] loop_data = '0;
  pe_control_unit dut (.*);
  `WATCHDOG(10000)
  initial begin
    int steps;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3; i++) begin
      @(negedge clk); cfg_we = 1; cfg_addr = 4'(i); cfg_data = '0; cfg_data.op = fpu_op_e'(i + 1);
    end
    @(negedge clk); cfg_we = 0; loop_we = 1; loop_data = {16'd2, 16'd4, 8'd3};
    @(negedge clk); loop_we = 0; start = 1;
    @(negedge clk); start = 0;
    steps = 0;
    while (!done && steps < 100) begin
      run = 1'($urandom);
      #1;
      `CHECK(int'(ctx) == steps % 3, "context sequence")
      `CHECK(instr.op == fpu_op_e'(steps % 3 + 1), "instruction of the context")
      `CHECK(active == (steps >= 6), "active window after the skew")
      @(negedge clk);
      if (run) steps++;
    end
    `CHECK(steps == 18, "done after (SKEW+ITERS)*LEN steps")
    @(negedge clk); loop_we = 1; loop_data = {16'd0, 16'd0, 8'd1};
    @(negedge clk); loop_we = 0; start = 1;
    @(negedge clk); start = 0; #1;
    `CHECK(done && !active, "zero iterations")
    `FINISH
  end
endmodule
