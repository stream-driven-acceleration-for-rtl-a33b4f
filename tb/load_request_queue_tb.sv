// load_request_queue_tb: lookups of lines from a small pool; a miss with
// room allocates an entry. A memory model accepts requests with random
// ready and answers them in random order after random delays. Checks
// against a reference map of ID -> line: hit/miss and hit ID, every entry
// requested exactly once with its line, response line lookup, free/empty
// flags, and that IDs are reused after their response.
`include "tb_check.svh"
module load_request_queue_tb;
  import accel_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [25:0] lk_line, mem_req_line, resp_line;
  logic lk_hit, alloc, free_ge2, empty, mem_req_valid, mem_req_ready, resp_valid;
  logic [4:0] lk_id, alloc_id, mem_req_id, resp_id;
  load_request_queue #(.ENTRIES(32)) dut (.*);
  `WATCHDOG(200000)

  bit mvld[32], miss[32];
  logic [25:0] mline[32];
  int pend[$];       // requested, not answered
  int nreq = 0, nresp = 0, nhit = 0;

  always @(negedge clk) begin
    int nf, hid;
    bit hit;
    alloc = 0; resp_valid = 0;
    lk_line = 26'($urandom_range(0, 47));
    mem_req_ready = $urandom_range(0, 1);
    if (pend.size() > 0 && $urandom_range(0, 2) == 0) begin
      int k;
      k = $urandom_range(0, pend.size() - 1);
      resp_valid = 1; resp_id = 5'(pend[k]); pend.delete(k);
    end
    #1;
    if (rst_n) begin
    hit = 0; nf = 0;
    for (int i = 0; i < 32; i++) begin
      if (mvld[i] && mline[i] == lk_line && !(resp_valid && resp_id == 5'(i))) begin hit = 1; hid = i; end
      if (!mvld[i]) nf++;
    end
    `CHECK(lk_hit == hit && (!hit || lk_id == 5'(hid)), "lookup")
    `CHECK(free_ge2 == (nf >= 2) && empty == (nf == 32), "occupancy flags")
    if (resp_valid) begin `CHECK(resp_line == mline[resp_id], "response line") end
    if (hit) nhit++;
    if (!hit && nf >= 1 && $urandom_range(0, 1)) begin
      alloc = 1;
    end
    #1;
    if (alloc) begin `CHECK(!mvld[alloc_id], "allocates a free entry") end
    if (mem_req_valid) begin
      `CHECK(mvld[mem_req_id] && miss[mem_req_id], "request for an allocated, unrequested entry")
      `CHECK(mem_req_line == mline[mem_req_id], "request line")
    end
    end
  end
  always @(posedge clk) if (rst_n) begin
    if (mem_req_valid && mem_req_ready) begin miss[mem_req_id] = 0; pend.push_back(int'(mem_req_id)); nreq++; end
    if (resp_valid) begin mvld[resp_id] = 0; nresp++; end
    if (alloc) begin mvld[alloc_id] = 1; miss[alloc_id] = 1; mline[alloc_id] = lk_line; end
  end

  initial begin
    resp_valid = 0; alloc = 0; mem_req_ready = 0; lk_line = 0; resp_id = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (5000) @(negedge clk);
    `CHECK(nreq > 500 && nresp > 500 && nhit > 500, "traffic exercised")
    `FINISH
  end
endmodule
