// stream_table_tb: random configuration writes, write-backs and go pulses
// against a reference array. Checks both read ports, the active/done/
// is_store vectors, that go activates exactly the configured streams and
// rewinds them, and that write-back changes only the iteration state.
`include "tb_check.svh"
module stream_table_tb;
  import accel_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic go, cfg_we, wb_en;
  logic [2:0] cfg_sid, wb_sid, rd_sid, cfg_rd_sid;
  stream_state_t cfg_entry, wb_state, rd_state, cfg_rd_state;
  logic [7:0] active, done, is_store;
  stream_table dut (.*);
  `WATCHDOG(100000)

  stream_state_t m[8];

  function automatic stream_state_t rnd_state();
    stream_state_t s;
    s = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    return s;
  endfunction

  initial begin
    go = 0; cfg_we = 0; wb_en = 0; cfg_sid = 0; wb_sid = 0; rd_sid = 0; cfg_rd_sid = 0;
    cfg_entry = '0; wb_state = '0;
    foreach (m[i]) m[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      go = 0; cfg_we = 0; wb_en = 0;
      case ($urandom_range(0, 9))
        0, 1, 2: begin cfg_we = 1; cfg_sid = 3'($urandom); cfg_entry = rnd_state(); end
        3: go = 1;
        4, 5, 6: begin wb_en = 1; wb_sid = 3'($urandom); wb_state = rnd_state(); end
        default: ;
      endcase
      @(posedge clk);
      if (cfg_we) m[cfg_sid] = cfg_entry;
      else if (go) foreach (m[i]) begin m[i].active = m[i].configured; m[i].done = 0; m[i].idx = '0; end
      else if (wb_en) begin m[wb_sid].idx = wb_state.idx; m[wb_sid].done = wb_state.done; end
      #1;
      rd_sid = 3'($urandom); cfg_rd_sid = 3'($urandom);
      #1;
      `CHECK(rd_state == m[rd_sid] && cfg_rd_state == m[cfg_rd_sid], "entry contents")
      for (int i = 0; i < 8; i++)
        `CHECK(active[i] == m[i].active && done[i] == m[i].done && is_store[i] == m[i].is_store, "status vectors")
    end
    `FINISH
  end
endmodule
