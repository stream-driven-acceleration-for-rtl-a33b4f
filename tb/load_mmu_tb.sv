// load_mmu_tb: three interleaved address streams (unit stride, a large
// stride and a repeating window) are fed to the load MMU whenever it is
// ready. A memory model accepts line requests with random ready and
// returns lines after random delays in any order. Checks: the elements
// leave in issue order with the right stream id and word, every line is
// requested at most once while outstanding, line-buffer hits, coalescing
// and out-of-order returns all occur, and the MMU is idle at the end.
`include "tb_check.svh"
module load_mmu_tb;
  import accel_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic flush = 0, addr_valid, ready, idle, mem_req_valid, mem_req_ready, mem_resp_valid;
  logic out_valid, ev_lb_hit, ev_coalesce, ev_ooo;
  logic [31:0] addr, out_data;
  logic [2:0] sid, out_sid;
  logic [25:0] mem_req_line;
  logic [4:0] mem_req_id, mem_resp_id;
  logic [511:0] mem_resp_data;
  load_mmu #(.RQ_ENTRIES(32), .LB_ROWS(4), .LF_DEPTH(16)) dut (.*);
  `WATCHDOG(200000)

  function automatic logic [31:0] word(input logic [31:0] wa);
    return wa * 32'h9E37_79B1 ^ 32'h5A5A_0F0F;
  endfunction

  typedef struct { logic [2:0] sid; logic [31:0] data; } exp_t;
  exp_t expq[$];
  int due[32];              // cycle at which an outstanding ID returns, -1 idle
  logic [25:0] out_line[32];
  int cyc = 0, n_issued = 0, n_out = 0, nlb = 0, nco = 0, nooo = 0;
  int pos[3];
  const int N = 1500;

  function automatic logic [31:0] next_addr(input int s);
    case (s)
      0: return 32'h0001_0000 + 32'(4 * pos[0]);
      1: return 32'h0004_0000 + 32'(4 * 37 * pos[1]);
      default: return 32'h0008_0000 + 32'(4 * ((pos[2] * 5) % 97));
    endcase
  endfunction

  always @(negedge clk) begin
    cyc++;
    addr_valid = 0; mem_resp_valid = 0;
    mem_req_ready = $urandom_range(0, 3) != 0;
    if (rst_n) begin
      begin
        int best; best = -1;
        for (int i = 0; i < 32; i++) if (due[i] >= 0 && due[i] <= cyc && (best < 0 || $urandom_range(0, 1))) best = i;
        if (best >= 0) begin
          mem_resp_valid = 1; mem_resp_id = 5'(best); due[best] = -1;
          for (int w = 0; w < 16; w++) mem_resp_data[32*w +: 32] = word({out_line[best], 4'(w)});
        end
      end
      #1;
      if (ready && n_issued < N && $urandom_range(0, 4) != 0) begin
        int s; s = $urandom_range(0, 2);
        addr_valid = 1; sid = 3'(s); addr = next_addr(s); pos[s]++; n_issued++;
        expq.push_back('{sid, word(addr >> 2)});
      end
      #1;
      if (out_valid) begin
        `CHECK(expq.size() > 0 && out_sid == expq[0].sid && out_data == expq[0].data, "in-order element")
        if (expq.size() > 0) void'(expq.pop_front());
        n_out++;
      end
      if (ev_lb_hit) nlb++;
      if (ev_coalesce) nco++;
      if (ev_ooo) nooo++;
    end
  end
  always @(posedge clk) if (rst_n && mem_req_valid && mem_req_ready) begin
    `CHECK(due[mem_req_id] < 0, "request for a free ID")
    for (int i = 0; i < 32; i++) if (due[i] >= 0) `CHECK(out_line[i] != mem_req_line, "no duplicate outstanding line")
    due[mem_req_id] = cyc + $urandom_range(2, 40);
    out_line[mem_req_id] = mem_req_line;
  end

  initial begin
    for (int i = 0; i < 32; i++) due[i] = -1;
    addr_valid = 0; addr = 0; sid = 0; mem_req_ready = 0; mem_resp_valid = 0; mem_resp_id = 0; mem_resp_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (n_out == N);
    repeat (5) @(negedge clk);
    `CHECK(idle, "idle at the end")
    `CHECK(nlb > 0 && nco > 0 && nooo > 0, "line-buffer hits, coalescing and out-of-order returns seen")
    $display("lb_hit=%0d coalesce=%0d ooo=%0d", nlb, nco, nooo);
    `FINISH
  end
endmodule
