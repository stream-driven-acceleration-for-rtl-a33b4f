// load_line_buffer_tb: random fills and lookups against a reference that
// keeps the last four filled lines (round-robin replacement), plus flush.
`include "tb_check.svh"
module load_line_buffer_tb;
  import accel_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic flush, fill, lk_hit;
  logic [25:0] fill_line, lk_line;
  logic [511:0] fill_data, lk_data;
  load_line_buffer #(.ROWS(4)) dut (.*);
  `WATCHDOG(100000)

  logic [25:0] rt[4];
  logic [511:0] rd[4];
  bit rv[4];
  int vic = 0, nh = 0;

  initial begin
    flush = 0; fill = 0; fill_line = 0; lk_line = 0; fill_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      flush = ($urandom_range(0, 199) == 0);
      fill = !flush && $urandom_range(0, 1);
      fill_line = 26'($urandom_range(0, 9));
      for (int w = 0; w < 16; w++) fill_data[32*w +: 32] = $urandom;
      lk_line = 26'($urandom_range(0, 9));
      #1;
      begin
        bit h; logic [511:0] d;
        h = 0; d = '0;
        for (int r = 0; r < 4; r++) if (rv[r] && rt[r] == lk_line) begin h = 1; d = rd[r]; end
        `CHECK(lk_hit == h && (!h || lk_data == d), "lookup")
        if (h) nh++;
      end
      @(posedge clk);
      if (flush) rv = '{0, 0, 0, 0};
      else if (fill) begin rv[vic] = 1; rt[vic] = fill_line; rd[vic] = fill_data; vic = (vic + 1) % 4; end
    end
    `CHECK(nh > 500, "hits exercised")
    `FINISH
  end
endmodule
