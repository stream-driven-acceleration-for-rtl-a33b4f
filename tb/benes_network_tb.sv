// benes_network_tb: drives random switch settings into a 16-lane Benes
// network and compares its outputs with a reference that follows each
// element through the stages as an index computation; also checks that
// the outputs are always a permutation of the inputs, and routes one
// hand-computed permutation (lanes 4,5 to 2,3).
`include "tb_check.svh"
module benes_network_tb;
  localparam int N = 16, LN = 4, NST = 7;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [N-1:0][7:0] in_data, out_data;
  logic [NST-1:0][N/2-1:0] sw;
  benes_network #(.N(N), .W(8)) dut (.*);
  `WATCHDOG(100000)

  // Position of the element that enters on lane p, after all stages.
  function automatic int follow(input int p);
    int b, k;
    for (int i = 0; i < NST; i++) begin
      b = (i < LN) ? i : 2 * LN - 2 - i;
      k = ((p >> (b + 1)) << b) | (p & ((1 << b) - 1));
      if (sw[i][k]) p = p ^ (1 << b);
    end
    return p;
  endfunction

  initial begin
    int seen;
    for (int i = 0; i < N; i++) in_data[i] = 8'(i * 7 + 3);
    for (int n = 0; n < 2000; n++) begin
      sw = {$urandom, $urandom};
      #1;
      seen = 0;
      for (int p = 0; p < N; p++) begin
        `CHECK(out_data[follow(p)] == in_data[p], "element position")
        seen |= 1 << follow(p);
      end
      `CHECK(seen == 16'hffff, "outputs form a permutation")
    end
    sw = '0;
    sw[1] = 8'b0000_1100;
    sw[2] = 8'b0000_1100;
    #1;
    `CHECK(out_data[2] == in_data[4] && out_data[3] == in_data[5] &&
           out_data[0] == in_data[0] && out_data[1] == in_data[1], "hand-routed permutation")
    `FINISH
  end
endmodule
