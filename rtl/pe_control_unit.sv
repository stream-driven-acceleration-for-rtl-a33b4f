// pe_control_unit: sequencer of a processing element. It stores the PE's
// configuration (a pe_config_mem of instruction words) and runs it as a
// hardware loop: a context counter steps through contexts 0..LEN-1 and the
// whole sequence repeats SKEW+ITERS times. During the first SKEW
// repetitions the PE is idle (its instructions have no effect), which lets
// a pipelined schedule fill without prologue code; after SKEW+ITERS
// repetitions the unit reports done. The counters advance only on cycles
// where the array-wide 'run' enable is high, so all PEs stay in lockstep.
// Loop register write (loop_we, loop_data = {SKEW[15:0], ITERS[15:0],
// LEN[7:0]}) and 'start' (clear counters, begin) come from the controller.
// That the control unit holds the configuration and implements hardware
// loops follows the design description; the loop form (length, count,
// skew) is this design's choice.
module pe_control_unit
  import accel_pkg::*;
#(
  parameter int unsigned DEPTH = CFG_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     cfg_we,
  input  logic [$clog2(DEPTH)-1:0] cfg_addr,
  input  pe_instr_t                cfg_data,
  input  logic                     loop_we,
  input  logic [39:0]              loop_data,
  input  logic                     start,
  input  logic                     run,
  output pe_instr_t                instr,
  output logic                     active,
  output logic                     done,
  output logic [$clog2(DEPTH)-1:0] ctx
);
  logic [15:0] skew_q, iters_q;
  logic [7:0]  len_q;
  logic [16:0] iter_q;
  logic        running;

  pe_config_mem #(.DEPTH(DEPTH)) u_cfg (
    .clk, .rst_n, .wr_en(cfg_we), .wr_addr(cfg_addr), .wr_data(cfg_data),
    .rd_addr(ctx), .rd_data(instr)
  );

  logic last_ctx, last_iter;
  assign last_ctx  = ({{(8 - $clog2(DEPTH)){1'b0}}, ctx} == len_q - 8'd1);
  assign last_iter = (iter_q == {1'b0, skew_q} + {1'b0, iters_q} - 17'd1);
  assign active    = running && (iter_q >= {1'b0, skew_q});
  assign done      = !running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      skew_q <= '0; iters_q <= '0; len_q <= 8'd1;
      iter_q <= '0; ctx <= '0; running <= 1'b0;
    end else begin
      if (loop_we) begin
        skew_q  <= loop_data[39:24];
        iters_q <= loop_data[23:8];
        len_q   <= (loop_data[7:0] == 0) ? 8'd1 : loop_data[7:0];
      end
      if (start) begin
        ctx <= '0; iter_q <= '0;
        running <= (iters_q != 0);
      end else if (run && running) begin
        if (last_ctx) begin
          ctx <= '0;
          iter_q <= iter_q + 17'd1;
          if (last_iter) running <= 1'b0;
        end else begin
          ctx <= ctx + 1'b1;
        end
      end
    end
  end
endmodule
