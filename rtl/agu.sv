// agu: address generation unit (stream iterator). From a stream's
// descriptor and current iteration counters it computes, in one cycle,
// the element's byte address, base + 4 * sum(idx[d] * stride[d]) over the
// dimensions 0..last_dim (strides are signed, in 32-bit elements), and the
// next state: idx[0] counts fastest and each counter wraps to 0 and carries
// into the next when it reaches its size; when the outermost counter wraps
// the stream is done (nxt.done: this is its final element). A single AGU is
// shared by all streams. Multi-dimensional affine patterns follow the
// design description; indirect patterns are not supported here.
// Combinational.
module agu
  import accel_pkg::*;
(
  input  stream_state_t st,
  output logic [31:0]   addr,
  output stream_state_t nxt
);
  always_comb begin
    logic signed [31:0] off;
    logic carry;
    off = '0;
    for (int d = 0; d < DIMS; d++)
      if (d <= int'(st.last_dim))
        off = off + $signed({16'd0, st.idx[d]}) * $signed({{16{st.stride[d][15]}}, st.stride[d]});
    addr = st.base + 32'(off <<< 2);

    nxt = st;
    carry = 1'b1;
    for (int d = 0; d < DIMS; d++) begin
      if (carry && d <= int'(st.last_dim)) begin
        if (st.idx[d] + 16'd1 >= st.size[d]) begin
          nxt.idx[d] = '0;
        end else begin
          nxt.idx[d] = st.idx[d] + 16'd1;
          carry = 1'b0;
        end
      end
    end
    nxt.done = carry;
  end
endmodule
