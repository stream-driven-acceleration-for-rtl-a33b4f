// accel_pkg: types and constants shared by the stream-driven accelerator.
// It defines the sizes of the 4x4 PE array configuration evaluated for the
// design, the FPU operation codes, the PE instruction word, the stream
// descriptor held in the stream tables and the stream configuration command.
// Sizes marked "chosen" are this implementation's own choices.
package accel_pkg;

  localparam int unsigned XLEN       = 32;  // single-precision data path
  localparam int unsigned NS         = 8;   // streams (chosen): 0..3 load, 4..7 store
  localparam int unsigned NLS        = 4;   // load streams feeding the array (chosen)
  localparam int unsigned NSS        = 4;   // store streams fed by the array (chosen)
  localparam int unsigned VL         = 4;   // elements per stream vector (chosen)
  localparam int unsigned DIMS       = 3;   // dimensions per stream descriptor (chosen)
  localparam int unsigned LINE_WORDS = 16;  // 64-byte cache line (chosen)
  localparam int unsigned LINE_BITS  = LINE_WORDS * XLEN;
  localparam int unsigned LINE_AW    = 26;  // line address = byte address[31:6]
  localparam int unsigned CFG_DEPTH  = 16;  // PE configuration memory contexts (chosen)
  localparam int unsigned DMEM_DEPTH = 8;   // PE data memory words (chosen)

  // FPU operations (16, RISC-V F-extension naming).
  typedef enum logic [3:0] {
    FADD   = 4'd0,  FSUB   = 4'd1,  FMUL   = 4'd2,  FMADD  = 4'd3,
    FMSUB  = 4'd4,  FNMADD = 4'd5,  FNMSUB = 4'd6,  FMIN   = 4'd7,
    FMAX   = 4'd8,  FEQ    = 4'd9,  FLT    = 4'd10, FLE    = 4'd11,
    FSGNJ  = 4'd12, FSGNJN = 4'd13, FSGNJX = 4'd14, FMV    = 4'd15
  } fpu_op_e;

  // Directions, also the index of a PE's inputs and outputs.
  localparam int unsigned DIR_N = 0, DIR_E = 1, DIR_S = 2, DIR_W = 3;

  // Operand sources: 0..3 the neighbour inputs N/E/S/W, 4 the result
  // register, 5 constant zero, 8..15 data memory word 0..7.
  typedef logic [3:0] src_t;
  localparam src_t SRC_N = 4'd0, SRC_E = 4'd1, SRC_S = 4'd2, SRC_W = 4'd3;
  localparam src_t SRC_RES = 4'd4, SRC_ZERO = 4'd5, SRC_DM = 4'd8;

  // Output routes: what an output register loads in a context.
  typedef enum logic [2:0] {
    OUT_NONE = 3'd0, OUT_FPU = 3'd1,
    OUT_IN_N = 3'd2, OUT_IN_E = 3'd3, OUT_IN_S = 3'd4, OUT_IN_W = 3'd5
  } out_sel_e;

  typedef struct packed {
    logic          ring_n;    // edge PE: north input from the column ring, not the stream
    logic          ring_w;    // edge PE: west input from the row ring, not the stream
    logic          dm_we;     // write the FPU result into data memory
    logic [2:0]    dm_waddr;
    logic          res_we;    // load the result register (and execute the FPU op)
    out_sel_e [3:0] out_sel;  // per direction N,E,S,W
    src_t          src_c;
    src_t          src_b;
    src_t          src_a;
    fpu_op_e       op;
  } pe_instr_t;

  localparam int unsigned INSTR_W = $bits(pe_instr_t);

  // Stream descriptor and iteration state (one Stream Table entry).
  typedef struct packed {
    logic [31:0]                    base;    // byte address
    logic [DIMS-1:0][15:0]          size;    // elements per dimension, dim 0 innermost
    logic [DIMS-1:0][15:0]          stride;  // signed, in elements
    logic [1:0]                     last_dim;
    logic                           is_store;
    logic                           configured;
    logic                           active;
    logic                           done;
    logic [DIMS-1:0][15:0]          idx;
  } stream_state_t;

  typedef enum logic [1:0] {
    SCMD_LD_START = 2'd0, SCMD_ST_START = 2'd1, SCMD_APPEND = 2'd2, SCMD_CLEAR = 2'd3
  } scmd_kind_e;

  typedef struct packed {
    logic [2:0]  sid;
    scmd_kind_e  kind;
    logic        last;     // descriptor complete after this command
    logic [31:0] base;
    logic [15:0] size;
    logic [15:0] stride;
  } stream_cmd_t;

endpackage
