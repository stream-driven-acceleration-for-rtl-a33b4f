// agu_tb: random 1-, 2- and 3-dimensional descriptors (sizes 1..5,
// signed strides) are walked by feeding each next state back into the
// AGU; the produced addresses and the done flag are compared with a
// nested-loop reference.
`include "tb_check.svh"
module agu_tb;
  import accel_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  stream_state_t st, nxt;
  logic [31:0] addr;
  agu dut (.*);
  `WATCHDOG(1000000)

  initial begin
    int sz[3], sd[3], nd, total, n;
    logic [31:0] base, exp_a;
    for (int t = 0; t < 300; t++) begin
      nd = $urandom_range(1, 3);
      base = $urandom & 32'hffff_fffc;
      st = '0;
      st.base = base;
      st.last_dim = 2'(nd - 1);
      st.configured = 1; st.active = 1;
      total = 1;
      for (int d = 0; d < 3; d++) begin
        sz[d] = (d < nd) ? $urandom_range(1, 5) : 1;
        sd[d] = $urandom_range(0, 40) - 20;
        st.size[d] = 16'(sz[d]);
        st.stride[d] = 16'(sd[d]);
        total *= sz[d];
      end
      n = 0;
      for (int k = 0; k < sz[2]; k++)
        for (int j = 0; j < sz[1]; j++)
          for (int i = 0; i < sz[0]; i++) begin
            #1;
            exp_a = base + 32'((i * sd[0] + (nd > 1 ? j * sd[1] : 0) + (nd > 2 ? k * sd[2] : 0)) * 4);
            `CHECK(addr == exp_a, "address")
            n++;
            `CHECK(nxt.done == (n == total), "done on the last element only")
            st = nxt;
          end
    end
    // An unused dimension with garbage size must not affect the walk.
    st = '0; st.size[0] = 3; st.stride[0] = 1; st.size[1] = 7; st.stride[1] = 100;
    #1 st = nxt; #1 st = nxt; #1;
    `CHECK(nxt.done && nxt.idx[1] == 0, "dimensions above last_dim ignored")
    `FINISH
  end
endmodule
