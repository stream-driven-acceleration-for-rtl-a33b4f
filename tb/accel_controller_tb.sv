// accel_controller_tb: host-bus writes to every register region are
// decoded into the matching configuration strobes (PE instruction, data
// memory and loop writes with PE index and address, stream commands with
// the latched base, unroll widths and switch bits). A run is started and
// completion is withheld until array, engine and drain conditions all
// hold; checks the go pulse, busy/done, the cycle and stall counters and
// that configuration is ignored while running.
`include "tb_check.svh"
module accel_controller_tb;
  import accel_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic host_we;
  logic [11:0] host_addr;
  logic [63:0] host_wdata, host_rdata, pe_wdata;
  logic pe_cfg_we, pe_dm_we, pe_loop_we, cmd_valid, go, array_en, array_done, array_stall;
  logic se_done, drained, busy, done;
  logic [7:0] pe_idx;
  logic [3:0] pe_cfg_addr;
  logic [2:0] pe_dm_addr;
  stream_cmd_t cmd;
  logic [3:0][2:0] ld_u, st_u;
  logic [55:0] ld_sw, st_sw;
  accel_controller dut (.*);
  `WATCHDOG(100000)

  task automatic wr(input logic [11:0] a, input logic [63:0] d);
    @(negedge clk); host_we = 1; host_addr = a; host_wdata = d;
    #1;
  endtask
  task automatic idle_bus();
    @(negedge clk); host_we = 0; host_addr = 12'hC08;
  endtask

  initial begin
    logic [63:0] d;
    int ngo, nrun, nst;
    host_we = 0; host_addr = 0; host_wdata = 0;
    array_done = 0; array_stall = 0; se_done = 0; drained = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int pe, a;
      pe = $urandom_range(0, 15); a = $urandom_range(0, 15); d = {$urandom, $urandom};
      wr(12'(pe << 4 | a), d);
      `CHECK(pe_cfg_we && !pe_dm_we && !pe_loop_we && !cmd_valid && pe_idx == 8'(pe) && pe_cfg_addr == 4'(a) && pe_wdata == d, "instruction write")
      wr(12'h400 | 12'(pe << 3 | (a & 7)), d);
      `CHECK(pe_dm_we && !pe_cfg_we && pe_idx == 8'(pe) && pe_dm_addr == 3'(a) && pe_wdata == d, "data memory write")
      wr(12'h800 | 12'(pe), d);
      `CHECK(pe_loop_we && !pe_cfg_we && !pe_dm_we && pe_idx == 8'(pe) && pe_wdata == d, "loop register write")
    end
    wr(12'hC00, 64'hDEAD_BEEF);
    d = {26'd0, 3'd5, 2'd2, 1'b1, 16'd300, 16'hFFF0};
    wr(12'hC01, d);
    `CHECK(cmd_valid && cmd.sid == 3'd5 && cmd.kind == SCMD_APPEND && cmd.last && cmd.size == 16'd300 &&
           cmd.stride == 16'hFFF0 && cmd.base == 32'hDEAD_BEEF, "stream command")
    wr(12'hC02, 64'o4321); wr(12'hC03, 64'o1234);
    wr(12'hC04, 64'h00AB_CDEF_0123_4567); wr(12'hC05, 64'h0076_5432_10FE_DCBA);
    idle_bus();
    `CHECK(ld_u == 12'o4321 && st_u == 12'o1234, "unroll widths")
    `CHECK(ld_sw == 56'hAB_CDEF_0123_4567 && st_sw == 56'h76_5432_10FE_DCBA, "switch bits")
    `CHECK(!busy && !done && !go && !array_en, "idle after reset")
    // run
    wr(12'hC08, 64'd1);
    idle_bus();
    ngo = 0; nrun = 0; nst = 0;
    for (int c = 0; c < 100; c++) begin
      #1;
      if (go) ngo++;
      if (array_en) nrun++;
      `CHECK(busy && !done, "busy while running")
      array_stall = $urandom_range(0, 1);
      if (array_en && array_stall) nst++;
      array_done = c > 30; se_done = c > 50; drained = c > 70 && c != 80;
      if (c == 10) begin host_we = 1; host_addr = 12'hC04; host_wdata = 64'h1; end
      @(negedge clk);
      if (c == 10) `CHECK(ld_sw == 56'hAB_CDEF_0123_4567, "configuration ignored while running")
      host_we = 0;
      if (c == 75) begin drained = 0; end
      if (!busy) break;
    end
    #1;
    `CHECK(ngo == 1, "one go pulse")
    `CHECK(!busy && done, "done after all conditions")
    host_addr = 12'hC08; #1;
    `CHECK(host_rdata == 64'd1, "status register")
    host_addr = 12'hC09; #1;
    `CHECK(host_rdata == 64'(nrun), "cycle counter")
    host_addr = 12'hC0A; #1;
    `CHECK(host_rdata == 64'(nst), "stall counter")
    array_done = 0; se_done = 0; drained = 0;
    wr(12'hC08, 64'd1); idle_bus(); #1;
    `CHECK(busy && !done, "restart clears done")
    `FINISH
  end
endmodule
