// load_line_buffer: small fully associative buffer of the last ROWS cache
// lines returned by memory. It acts as an L0 cache for the load MMU: an
// address that hits a buffered line is answered at once, without a new
// memory request. Rows are filled round-robin as responses arrive;
// 'flush' invalidates all rows (done at the start of every run so stores
// of an earlier run are never hidden). Lookup is combinational.
// The role follows the design description; the replacement policy is
// this design's choice.
module load_line_buffer
  import accel_pkg::*;
#(
  parameter int unsigned ROWS = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  flush,
  input  logic                  fill,
  input  logic [LINE_AW-1:0]    fill_line,
  input  logic [LINE_BITS-1:0]  fill_data,
  input  logic [LINE_AW-1:0]    lk_line,
  output logic                  lk_hit,
  output logic [LINE_BITS-1:0]  lk_data
);
  logic [ROWS-1:0]      vld;
  logic [LINE_AW-1:0]   tag  [ROWS];
  logic [LINE_BITS-1:0] data [ROWS];
  logic [$clog2(ROWS)-1:0] victim;

  always_comb begin
    lk_hit = 1'b0; lk_data = '0;
    for (int r = 0; r < ROWS; r++)
      if (vld[r] && tag[r] == lk_line) begin lk_hit = 1'b1; lk_data = data[r]; end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld <= '0; victim <= '0;
      for (int r = 0; r < ROWS; r++) begin tag[r] <= '0; data[r] <= '0; end
    end else if (flush) begin
      vld <= '0;
    end else if (fill) begin
      vld[victim]  <= 1'b1;
      tag[victim]  <= fill_line;
      data[victim] <= fill_data;
      victim <= victim + 1'b1;
    end
  end
endmodule
