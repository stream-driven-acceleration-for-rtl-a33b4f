// stream_configurator: decodes stream configuration commands from the
// controller and builds descriptors in the stream tables. A stream is a
// chain of 1-D patterns: a start command (load or store) sets the base
// address and the innermost dimension (size, stride), each append command
// adds the next outer dimension, and the command whose 'last' bit is set
// completes the descriptor so that the next 'go' activates it. A clear
// command deletes it. The configurator reads the stream's current entry,
// merges the command and writes the entry back in the same cycle.
// 'error' flags an append beyond DIMS dimensions (the command is dropped).
// Building descriptors dimension by dimension follows the UVE-style model
// in the design description; the command encoding is this design's own.
module stream_configurator
  import accel_pkg::*;
#(
  parameter int unsigned NS_P = NS
) (
  input  logic                     cmd_valid,
  input  stream_cmd_t              cmd,
  output logic [$clog2(NS_P)-1:0]  rd_sid,
  input  stream_state_t            rd_entry,
  output logic                     wr_en,
  output logic [$clog2(NS_P)-1:0]  wr_sid,
  output stream_state_t            wr_entry,
  output logic                     error
);
  assign rd_sid = cmd.sid[$clog2(NS_P)-1:0];
  assign wr_sid = rd_sid;

  always_comb begin
    logic [2:0] dim;
    wr_entry = rd_entry;
    wr_en    = cmd_valid;
    error    = 1'b0;
    dim      = 3'(rd_entry.last_dim) + 3'd1;
    unique case (cmd.kind)
      SCMD_LD_START, SCMD_ST_START: begin
        wr_entry            = '0;
        wr_entry.base       = cmd.base;
        wr_entry.size[0]    = cmd.size;
        wr_entry.stride[0]  = cmd.stride;
        wr_entry.is_store   = (cmd.kind == SCMD_ST_START);
        wr_entry.configured = cmd.last;
      end
      SCMD_APPEND: begin
        if (int'(dim) >= DIMS) begin
          error = cmd_valid;
          wr_en = 1'b0;
        end else begin
          wr_entry.size[dim[1:0]]   = cmd.size;
          wr_entry.stride[dim[1:0]] = cmd.stride;
          wr_entry.last_dim         = dim[1:0];
          wr_entry.configured       = cmd.last;
        end
      end
      default: wr_entry = '0;   // SCMD_CLEAR
    endcase
  end
endmodule
