// streaming_engine_tb: the host configures three load streams (a 1-D
// unit-stride vector, a 2-D tile with a row pitch, a 3-D walk with a
// negative innermost stride) and two store streams (unit stride and
// stride 3) through stream commands, then pulses go. Array-side models
// pop load elements and push store elements at random rates; a memory
// model answers line reads out of order with random delays and applies
// masked line writes. Checks: each load stream delivers exactly its
// address sequence's memory words in order, stores land at the right
// addresses, streams_done/loads_drained rise only at the end, every
// mechanism event occurs, and a second run after go works again.
`include "tb_check.svh"
module streaming_engine_tb;
  import accel_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic go, cmd_valid, cfg_error;
  stream_cmd_t cmd;
  logic [3:0][3:0][31:0] ld_head;
  logic [3:0][3:0] ld_count, st_free;
  logic [3:0][2:0] ld_pop_n, st_push_n;
  logic [3:0][3:0][31:0] st_push_data;
  logic mem_rd_req_valid, mem_rd_req_ready, mem_rd_resp_valid, mem_wr_valid, mem_wr_ready;
  logic [25:0] mem_rd_req_line, mem_wr_line;
  logic [4:0] mem_rd_req_id, mem_rd_resp_id;
  logic [511:0] mem_rd_resp_data, mem_wr_data;
  logic [15:0] mem_wr_mask;
  logic streams_done, loads_drained, ev_addr, ev_bypass, ev_lb_hit, ev_coalesce, ev_ooo, ev_merge;
  streaming_engine dut (.*);
  `WATCHDOG(400000)

  function automatic logic [31:0] word(input logic [31:0] wa);
    return wa * 32'h9E37_79B1 ^ 32'h1234_5678;
  endfunction

  logic [31:0] ldq[4][$];
  logic [31:0] wmem[logic [31:0]], expm[logic [31:0]];
  int st_n[2], st_tot[2];
  logic [31:0] st_base[2];
  int st_str[2];
  int due[32];
  logic [25:0] oline[32];
  int cyc = 0, ev[6];
  bit started = 0;   // the array side only pushes once the run has begun

  task automatic send(input int sid, input scmd_kind_e k, input bit last, input logic [31:0] base,
                      input int size, input int stride);
    @(negedge clk);
    cmd = '{sid: 3'(sid), kind: k, last: last, base: base, size: 16'(size), stride: 16'(stride)};
    cmd_valid = 1;
    @(negedge clk);
    cmd_valid = 0;
  endtask

  always @(negedge clk) begin
    cyc++;
    mem_rd_resp_valid = 0;
    mem_rd_req_ready = $urandom_range(0, 3) != 0;
    mem_wr_ready = $urandom_range(0, 3) != 0;
    ld_pop_n = '0; st_push_n = '0;
    if (rst_n) begin
      int best; best = -1;
      for (int i = 0; i < 32; i++) if (due[i] >= 0 && due[i] <= cyc && (best < 0 || $urandom_range(0, 1))) best = i;
      if (best >= 0) begin
        mem_rd_resp_valid = 1; mem_rd_resp_id = 5'(best); due[best] = -1;
        for (int w = 0; w < 16; w++) mem_rd_resp_data[32*w +: 32] = word({oline[best], 4'(w)});
      end
      for (int s = 0; s < 2; s++)
        if (started && st_n[s] < st_tot[s] && st_free[s] >= 1 && $urandom_range(0, 2) == 0) begin
          st_push_n[s] = 3'd1; st_push_data[s][0] = 32'(32'hA000_0000 | s << 16 | st_n[s]);
          st_n[s]++;
        end
      #1;
      for (int s = 0; s < 3; s++)
        if (ld_count[s] != 0 && $urandom_range(0, 2) == 0) begin
          int n; n = $urandom_range(1, int'(ld_count[s]) > 4 ? 4 : int'(ld_count[s]));
          ld_pop_n[s] = 3'(n);
          for (int e = 0; e < n; e++) begin
            `CHECK(ldq[s].size() > 0 && ld_head[s][e] == ldq[s][0], "load element order and value")
            if (ldq[s].size() > 0) void'(ldq[s].pop_front());
          end
        end
      ev[0] += int'(ev_addr); ev[1] += int'(ev_bypass); ev[2] += int'(ev_lb_hit);
      ev[3] += int'(ev_coalesce); ev[4] += int'(ev_ooo); ev[5] += int'(ev_merge);
    end
  end
  always @(posedge clk) if (rst_n) begin
    if (mem_rd_req_valid && mem_rd_req_ready) begin
      due[mem_rd_req_id] = cyc + $urandom_range(2, 50); oline[mem_rd_req_id] = mem_rd_req_line;
    end
    if (mem_wr_valid && mem_wr_ready)
      for (int w = 0; w < 16; w++) if (mem_wr_mask[w]) wmem[{mem_wr_line, 4'(w)}] = mem_wr_data[32*w +: 32];
  end

  task automatic run_once(input int pass);
    ldq[0].delete(); ldq[1].delete(); ldq[2].delete();
    // load 0: 1-D, 60 elements, unit stride
    send(0, SCMD_LD_START, 1, 32'h0010_0000 + 32'(pass * 256), 60, 1);
    for (int i = 0; i < 60; i++) ldq[0].push_back(word(32'h0004_0000 + 32'(pass * 64) + i));
    // load 1: 2-D tile 6 x 5 with row pitch 40 words
    send(1, SCMD_LD_START, 0, 32'h0020_0000, 6, 1);
    send(1, SCMD_APPEND, 1, 0, 5, 40);
    for (int j = 0; j < 5; j++) for (int i = 0; i < 6; i++) ldq[1].push_back(word(32'h0008_0000 + i + 40 * j));
    // load 2: 3-D 4 x 3 x 2, innermost stride -1
    send(2, SCMD_LD_START, 0, 32'h0030_0100, 4, -1);
    send(2, SCMD_APPEND, 0, 0, 3, 16);
    send(2, SCMD_APPEND, 1, 0, 2, 100);
    for (int k = 0; k < 2; k++) for (int j = 0; j < 3; j++) for (int i = 0; i < 4; i++)
      ldq[2].push_back(word(32'h000C_0040 - i + 16 * j + 100 * k));
    // stores: stream 4 unit stride, stream 5 stride 3
    st_base = '{32'h0040_0000, 32'h0050_0000}; st_str = '{1, 3}; st_tot = '{50, 40}; st_n = '{0, 0};
    for (int s = 0; s < 2; s++) begin
      send(4 + s, SCMD_ST_START, 1, st_base[s], st_tot[s], st_str[s]);
      for (int i = 0; i < st_tot[s]; i++)
        expm[(st_base[s] >> 2) + 32'(st_str[s] * i)] = 32'(32'hA000_0000 | s << 16 | i);
    end
    `CHECK(!cfg_error, "no configuration error")
    @(negedge clk); go = 1; @(negedge clk); go = 0; started = 1;
    repeat (3) @(negedge clk);
    `CHECK(!streams_done && !loads_drained, "busy after go")
    wait (streams_done && loads_drained);
    repeat (3) @(negedge clk);
    started = 0;
    for (int s = 0; s < 3; s++) `CHECK(ldq[s].size() == 0, "load stream complete")
    foreach (expm[a]) `CHECK(wmem.exists(a) && wmem[a] == expm[a], "stored word")
    `CHECK(wmem.num() == expm.num(), "no stray writes")
  endtask

  initial begin
    for (int i = 0; i < 32; i++) due[i] = -1;
    go = 0; cmd_valid = 0; cmd = '0; ld_pop_n = '0; st_push_n = '0; st_push_data = '0;
    mem_rd_resp_id = 0; mem_rd_resp_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_once(0);
    run_once(1);
    // a fourth dimension is rejected
    send(3, SCMD_LD_START, 0, 0, 2, 1);
    send(3, SCMD_APPEND, 0, 0, 2, 1);
    send(3, SCMD_APPEND, 0, 0, 2, 1);
    @(negedge clk);
    cmd = '{sid: 3'd3, kind: SCMD_APPEND, last: 1'b1, base: 0, size: 2, stride: 1}; cmd_valid = 1;
    #1 `CHECK(cfg_error, "fourth dimension flagged")
    @(negedge clk); cmd_valid = 0;
    for (int i = 0; i < 6; i++) `CHECK(ev[i] > 0, "mechanism event seen")
    $display("addr=%0d bypass=%0d lb_hit=%0d coalesce=%0d ooo=%0d merge=%0d", ev[0], ev[1], ev[2], ev[3], ev[4], ev[5]);
    `FINISH
  end
endmodule
