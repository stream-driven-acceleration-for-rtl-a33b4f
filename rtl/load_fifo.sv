// load_fifo: in-order record of the load requests of all load streams.
// Each entry holds the stream, the request ID of its cache line, the word
// offset in the line, a data word and a ready bit. Entries answered by the
// line buffer enter ready; the others are filled when the line with their
// ID returns, all matching entries in the same cycle and in any order of
// responses (a push in the same cycle as its line is filled too). The
// head leaves, in program order, as soon as it is ready (head_valid), so
// each stream register receives its elements in order. free_ge2: two more
// entries fit. The structure follows the design description; the depth
// (16) is this design's choice.
module load_fifo
  import accel_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned IDW   = 5
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  push,
  input  logic [2:0]            push_sid,
  input  logic [IDW-1:0]        push_id,
  input  logic [3:0]            push_off,
  input  logic                  push_ready,
  input  logic [31:0]           push_data,
  input  logic                  fill,
  input  logic [IDW-1:0]        fill_id,
  input  logic [LINE_BITS-1:0]  fill_data,
  output logic                  head_valid,
  output logic [2:0]            head_sid,
  output logic [31:0]           head_data,
  output logic                  free_ge2,
  output logic                  empty,
  output logic                  late_fill
);
  localparam int unsigned AW = $clog2(DEPTH);
  typedef struct packed {
    logic [2:0]     sid;
    logic [IDW-1:0] id;
    logic [3:0]     off;
    logic           ready;
    logic [31:0]    data;
  } lf_entry_t;

  lf_entry_t q [DEPTH];
  logic [AW-1:0] rp, wp;
  logic [AW:0]   cnt;

  assign empty      = (cnt == 0);
  assign free_ge2   = (32'(cnt) + 2 <= DEPTH);
  assign head_valid = !empty && q[rp].ready;
  assign head_sid   = q[rp].sid;
  assign head_data  = q[rp].data;

  // A fill that answers an entry which is not the head: a response that
  // arrived out of order with respect to the program order.
  always_comb begin
    late_fill = 1'b0;
    for (int i = 0; i < DEPTH; i++)
      if (fill && (AW'(i) != rp) && (32'(AW'(AW'(i) - rp)) < 32'(cnt)) &&
          !q[i].ready && q[i].id == fill_id)
        late_fill = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp <= '0; wp <= '0; cnt <= '0;
      for (int i = 0; i < DEPTH; i++) q[i] <= '0;
    end else begin
      if (fill)
        for (int i = 0; i < DEPTH; i++)
          if ((32'(AW'(AW'(i) - rp)) < 32'(cnt)) && !q[i].ready && q[i].id == fill_id) begin
            q[i].ready <= 1'b1;
            q[i].data  <= fill_data[32*q[i].off +: 32];
          end
      if (push) begin
        q[wp].sid   <= push_sid;
        q[wp].id    <= push_id;
        q[wp].off   <= push_off;
        if (!push_ready && fill && fill_id == push_id) begin
          q[wp].ready <= 1'b1;
          q[wp].data  <= fill_data[32*push_off +: 32];
        end else begin
          q[wp].ready <= push_ready;
          q[wp].data  <= push_data;
        end
        wp <= wp + 1'b1;
      end
      if (head_valid) rp <= rp + 1'b1;
      cnt <= cnt + (AW+1)'(push) - (AW+1)'(head_valid);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) push |-> (32'(cnt) < DEPTH || head_valid))
    else $error("load_fifo: overflow");
endmodule
