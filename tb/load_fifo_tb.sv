// load_fifo_tb: entries are pushed in program order with a stream id, a
// request ID and a word offset; some are ready at push (line-buffer hit),
// the rest wait for a fill of their ID, which arrives in random order,
// sometimes in the very cycle of the push. Checks: the head leaves in
// push order with the right word of the right line, only when ready, the
// late_fill event, and the free/empty flags.
`include "tb_check.svh"
module load_fifo_tb;
  import accel_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic push, push_ready, fill, head_valid, free_ge2, empty, late_fill;
  logic [2:0] push_sid, head_sid;
  logic [4:0] push_id, fill_id;
  logic [3:0] push_off;
  logic [31:0] push_data, head_data;
  logic [511:0] fill_data;
  load_fifo #(.DEPTH(16), .IDW(5)) dut (.*);
  `WATCHDOG(200000)

  logic [511:0] line_of[32];
  bit outst[32];        // ID waiting for its fill
  int users[32];
  typedef struct { logic [2:0] sid; logic [31:0] data; int id; bit rdy; int t; } exp_t;
  exp_t expq[$];
  int cnt = 0, nout = 0, nlate = 0;

  always @(negedge clk) begin
    push = 0; fill = 0;
    if (rst_n) begin
    // fill a random outstanding ID
    if ($urandom_range(0, 2) == 0) begin
      int c[$];
      c.delete();
      for (int i = 0; i < 32; i++) if (outst[i] && users[i] > 0) c.push_back(i);
      if (c.size() > 0) begin fill = 1; fill_id = 5'(c[$urandom_range(0, c.size() - 1)]); fill_data = line_of[fill_id]; end
    end
    if (free_ge2 && $urandom_range(0, 1)) begin
      int id;
      push = 1;
      id = $urandom_range(0, 31);
      push_id = 5'(id); push_sid = 3'($urandom); push_off = 4'($urandom);
      if (!outst[id]) begin
        if ($urandom_range(0, 1)) begin   // line-buffer hit
          push_ready = 1; push_data = $urandom;
        end else begin                    // new request
          outst[id] = 1; users[id] = 0;
          for (int w = 0; w < 16; w++) line_of[id][32*w +: 32] = $urandom;
          push_ready = 0; push_data = 'x;
        end
      end else begin push_ready = 0; push_data = 'x; end
      expq.push_back('{push_sid, push_ready ? push_data : line_of[id][32*push_off +: 32], id, push_ready, $time});
      if (!push_ready) users[id]++;
    end
    #1;
    if (late_fill) nlate++;
    `CHECK(empty == (cnt == 0) && free_ge2 == (cnt + 2 <= 16), "flags")
    if (head_valid) begin
      `CHECK(expq.size() > 0 && head_sid == expq[0].sid && head_data == expq[0].data, "in-order head")
      void'(expq.pop_front()); nout++;
    end
    cnt = cnt + int'(push) - int'(head_valid);
    end
  end
  always @(posedge clk) if (rst_n && fill) begin outst[fill_id] = 0; users[fill_id] = 0; end

  initial begin
    push = 0; fill = 0; push_sid = 0; push_id = 0; push_off = 0; push_ready = 0;
    push_data = 0; fill_id = 0; fill_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (6000) @(negedge clk);
    `CHECK(nout > 800 && nlate > 50, "traffic and out-of-order fills exercised")
    `FINISH
  end
endmodule
