// store_mmu_tb: four store streams write unit-stride, strided and
// line-crossing patterns. Addresses are sent while aq_space allows; data
// elements appear in random order across streams. A memory model applies
// the masked line writes with random ready. Checks: final memory equals
// the expected image, no masked-out word is touched, merging happens
// (fewer line writes than words), and the MMU is idle at the end.
`include "tb_check.svh"
module store_mmu_tb;
  import accel_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic addr_valid, mem_wr_valid, mem_wr_ready, idle, ev_merge;
  logic [31:0] addr;
  logic [1:0] ssid;
  logic [3:0] aq_space, data_valid, data_pop;
  logic [3:0][31:0] data;
  logic [25:0] mem_wr_line;
  logic [511:0] mem_wr_data;
  logic [15:0] mem_wr_mask;
  store_mmu #(.NSS_P(4), .AQ_DEPTH(8)) dut (.*);
  `WATCHDOG(200000)

  logic [31:0] mem[logic [31:0]];   // word address -> value
  logic [31:0] expm[logic [31:0]];
  logic [31:0] dq[4][$];
  int na[4], nd[4], nwr = 0, nmerge = 0;
  const int N = 200;

  function automatic logic [31:0] saddr(input int s, input int i);
    case (s)
      0: return 32'h0002_0000 + 32'(4 * i);
      1: return 32'h0003_0000 + 32'(4 * 3 * i);
      2: return 32'h0005_0000 + 32'(4 * 17 * i);
      default: return 32'h0006_0000 + 32'(4 * (i ^ 1));
    endcase
  endfunction

  always @(negedge clk) begin
    addr_valid = 0;
    mem_wr_ready = $urandom_range(0, 3) != 0;
    for (int s = 0; s < 4; s++) begin
      data_valid[s] = (nd[s] < na[s]) && $urandom_range(0, 1);
      data[s] = 32'(s << 24 | nd[s]);
    end
    if (rst_n) begin
      int s; s = $urandom_range(0, 3);
      if (aq_space[s] && na[s] < N && $urandom_range(0, 2) != 0) begin
        addr_valid = 1; ssid = 2'(s); addr = saddr(s, na[s]);
        expm[addr >> 2] = 32'(s << 24 | na[s]);
        na[s]++;
      end
    end
    #1;
    if (rst_n) begin
      for (int s = 0; s < 4; s++) if (data_pop[s]) begin `CHECK(data_valid[s], "pop only valid data") nd[s]++; end
      if (ev_merge) nmerge++;
    end
  end
  always @(posedge clk) if (rst_n && mem_wr_valid && mem_wr_ready) begin
    nwr++;
    for (int w = 0; w < 16; w++) if (mem_wr_mask[w]) mem[{mem_wr_line, 4'(w)}] = mem_wr_data[32*w +: 32];
  end

  initial begin
    addr_valid = 0; addr = 0; ssid = 0; data_valid = 0; data = 0; mem_wr_ready = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (nd[0] == N && nd[1] == N && nd[2] == N && nd[3] == N);
    repeat (20) @(negedge clk);
    `CHECK(idle, "idle at the end")
    `CHECK(mem.num() == expm.num(), "only stored words written")
    foreach (expm[a]) `CHECK(mem.exists(a) && mem[a] == expm[a], "stored value")
    `CHECK(nwr < 4 * N && nmerge > 0, "line merging")
    $display("line writes=%0d merges=%0d", nwr, nmerge);
    `FINISH
  end
endmodule
