// stream_configurator_tb: drives start/append/clear command sequences
// through the configurator with a one-entry table model and checks the
// resulting descriptor fields, the configured flag after the last command,
// the error on a fourth dimension and that clear empties the entry.
`include "tb_check.svh"
module stream_configurator_tb;
  import accel_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic cmd_valid, wr_en, error;
  stream_cmd_t cmd;
  logic [2:0] rd_sid, wr_sid;
  stream_state_t rd_entry, wr_entry;
  stream_state_t tab[8];
  logic err_q;
  stream_configurator dut (.*);
  assign rd_entry = tab[rd_sid];
  `WATCHDOG(100000)

  task automatic issue(input int sid, input scmd_kind_e k, input bit last,
                       input logic [31:0] base, input int size, input int stride);
    cmd = '{sid: 3'(sid), kind: k, last: last, base: base, size: 16'(size), stride: 16'(stride)};
    cmd_valid = 1;
    #1;
    `CHECK(wr_sid == 3'(sid) && rd_sid == 3'(sid), "stream id")
    err_q = error;
    if (wr_en) tab[wr_sid] = wr_entry;
    cmd_valid = 0;
    #1;
  endtask

  initial begin
    foreach (tab[i]) tab[i] = '0;
    cmd_valid = 0; cmd = '0;
    for (int t = 0; t < 200; t++) begin
      int sid, nd, sz[3], sd[3];
      logic [31:0] base;
      bit st;
      sid = $urandom_range(0, 7); nd = $urandom_range(1, 3); st = $urandom_range(0, 1);
      base = $urandom;
      for (int d = 0; d < 3; d++) begin sz[d] = $urandom_range(1, 60000); sd[d] = $urandom_range(0, 65535); end
      issue(sid, st ? SCMD_ST_START : SCMD_LD_START, nd == 1, base, sz[0], sd[0]);
      `CHECK(!err_q && tab[sid].configured == (nd == 1) && tab[sid].last_dim == 0, "start")
      for (int d = 1; d < nd; d++) begin
        issue(sid, SCMD_APPEND, d == nd - 1, 0, sz[d], sd[d]);
        `CHECK(!err_q, "append accepted")
      end
      `CHECK(tab[sid].base == base && tab[sid].is_store == st && tab[sid].configured, "descriptor header")
      `CHECK(int'(tab[sid].last_dim) == nd - 1, "dimension count")
      for (int d = 0; d < nd; d++)
        `CHECK(tab[sid].size[d] == 16'(sz[d]) && tab[sid].stride[d] == 16'(sd[d]), "size/stride")
      `CHECK(!tab[sid].active && !tab[sid].done, "not started before go")
      if (nd == 3) begin
        issue(sid, SCMD_APPEND, 1, 0, 1, 1);
        `CHECK(err_q && int'(tab[sid].last_dim) == 2, "fourth dimension rejected")
      end
      if ($urandom_range(0, 3) == 0) begin
        issue(sid, SCMD_CLEAR, 0, 0, 0, 0);
        `CHECK(tab[sid] == '0, "clear")
      end
    end
    `FINISH
  end
endmodule
