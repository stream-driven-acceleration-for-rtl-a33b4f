// stream_register: per-stream FIFO of elements that assembles stream
// vectors. Up to VL elements enter per cycle (push_n, from push_data[0]
// upward) and up to VL leave (pop_n); head[0..VL-1] shows the oldest VL
// elements and count how many are valid. Load streams are filled one
// element per cycle by the load MMU and emptied a vector at a time by the
// load re-mapper; store streams the other way round. The FIFO form follows
// the design description; its depth of 8 elements is this design's choice.
module stream_register #(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned VL    = 4,
  parameter int unsigned W     = 32
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          clear,
  input  logic [$clog2(VL+1)-1:0]       push_n,
  input  logic [VL-1:0][W-1:0]          push_data,
  input  logic [$clog2(VL+1)-1:0]       pop_n,
  output logic [VL-1:0][W-1:0]          head,
  output logic [$clog2(DEPTH+1)-1:0]    count,
  output logic [$clog2(DEPTH+1)-1:0]    free
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rp, wp;

  assign free = $clog2(DEPTH+1)'(DEPTH) - count;
  always_comb
    for (int e = 0; e < VL; e++) head[e] = mem[AW'(rp + AW'(e))];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp <= '0; wp <= '0; count <= '0;
    end else if (clear) begin
      rp <= '0; wp <= '0; count <= '0;
    end else begin
      wp <= wp + AW'(push_n);
      rp <= rp + AW'(pop_n);
      count <= count + $clog2(DEPTH+1)'(push_n) - $clog2(DEPTH+1)'(pop_n);
    end
  end

  always_ff @(posedge clk)
    for (int e = 0; e < VL; e++)
      if (e < int'(push_n)) mem[AW'(wp + AW'(e))] <= push_data[e];

  assert property (@(posedge clk) disable iff (!rst_n)
                   ($clog2(DEPTH+1)+1)'(push_n) <= ($clog2(DEPTH+1)+1)'(free))
    else $error("stream_register: overflow");
  assert property (@(posedge clk) disable iff (!rst_n)
                   ($clog2(DEPTH+1)+1)'(pop_n) <= ($clog2(DEPTH+1)+1)'(count))
    else $error("stream_register: underflow");
endmodule
