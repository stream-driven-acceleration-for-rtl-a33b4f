// accel_controller: interface between the host processor and the
// accelerator, and manager of a stream-DFG run. The host writes 64-bit
// registers (host_we/host_addr/host_wdata) and reads status combinationally
// (host_addr/host_rdata). Address map (word addresses):
//   0x000 | pe<<4 | ctx   PE configuration word (instruction of a context)
//   0x400 | pe<<3 | a     PE data-memory word (constants)
//   0x800 | pe            PE loop registers {SKEW[15:0], ITERS[15:0], LEN[7:0]}
//   0xC00                 stream command base address (latched)
//   0xC01                 stream command {sid[2:0], kind[1:0], last, size[15:0], stride[15:0]},
//                         issued with the latched base
//   0xC02 / 0xC03         load / store re-mapper widths, 3 bits per stream
//   0xC04 / 0xC05         load / store re-mapper Benes switch bits
//   0xC08                 write bit 0 = start; read {busy, done}
//   0xC09 / 0xC0A         read: cycles / array stall cycles of the last run
// A start pulses 'go' (streams activated, buffers cleared) and PE 'start',
// then enables the array until the array has finished its loops, every
// stream is done and the store side has drained; 'done' then stays set
// until the next start. The controller's role follows the design
// description; the register map and protocol are this design's choices.
module accel_controller
  import accel_pkg::*;
#(
  parameter int unsigned SW_BITS = 56
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           host_we,
  input  logic [11:0]                    host_addr,
  input  logic [63:0]                    host_wdata,
  output logic [63:0]                    host_rdata,
  // PE array configuration
  output logic                           pe_cfg_we,
  output logic                           pe_dm_we,
  output logic                           pe_loop_we,
  output logic [7:0]                     pe_idx,
  output logic [$clog2(CFG_DEPTH)-1:0]   pe_cfg_addr,
  output logic [$clog2(DMEM_DEPTH)-1:0]  pe_dm_addr,
  output logic [63:0]                    pe_wdata,
  // streaming engine configuration
  output logic                           cmd_valid,
  output stream_cmd_t                    cmd,
  // re-mapper configuration
  output logic [NLS-1:0][2:0]            ld_u,
  output logic [NSS-1:0][2:0]            st_u,
  output logic [SW_BITS-1:0]             ld_sw,
  output logic [SW_BITS-1:0]             st_sw,
  // run control
  output logic                           go,
  output logic                           array_en,
  input  logic                           array_done,
  input  logic                           array_stall,
  input  logic                           se_done,
  input  logic                           drained,
  output logic                           busy,
  output logic                           done
);
  typedef enum logic [1:0] {S_IDLE, S_GO, S_RUN} state_e;
  state_e state;
  logic [31:0] cmd_base;
  logic [63:0] cycles, stalls;

  always_comb begin
    pe_idx      = (host_addr[11:10] == 2'd1) ? 8'(host_addr[9:3]) : 8'(host_addr[9:4]);
    pe_cfg_addr = host_addr[$clog2(CFG_DEPTH)-1:0];
    pe_dm_addr  = host_addr[$clog2(DMEM_DEPTH)-1:0];
    pe_wdata    = host_wdata;
    pe_cfg_we   = host_we && host_addr[11:10] == 2'd0;
    pe_dm_we    = host_we && host_addr[11:10] == 2'd1;
    pe_loop_we  = host_we && host_addr[11:10] == 2'd2;
    if (pe_loop_we) pe_idx = host_addr[7:0];
    cmd_valid   = host_we && host_addr == 12'hC01;
    cmd.sid     = host_wdata[37:35];
    cmd.kind    = scmd_kind_e'(host_wdata[34:33]);
    cmd.last    = host_wdata[32];
    cmd.size    = host_wdata[31:16];
    cmd.stride  = host_wdata[15:0];
    cmd.base    = cmd_base;
    go          = (state == S_GO);
    array_en    = (state == S_RUN);
    busy        = (state != S_IDLE);
    unique case (host_addr)
      12'hC08: host_rdata = {62'd0, busy, done};
      12'hC09: host_rdata = cycles;
      12'hC0A: host_rdata = stalls;
      default: host_rdata = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; done <= 1'b0; cmd_base <= '0;
      ld_u <= '0; st_u <= '0; ld_sw <= '0; st_sw <= '0;
      cycles <= '0; stalls <= '0;
    end else begin
      if (host_we && state == S_IDLE) begin
        unique case (host_addr)
          12'hC00: cmd_base <= host_wdata[31:0];
          12'hC02: ld_u  <= host_wdata[3*NLS-1:0];
          12'hC03: st_u  <= host_wdata[3*NSS-1:0];
          12'hC04: ld_sw <= host_wdata[SW_BITS-1:0];
          12'hC05: st_sw <= host_wdata[SW_BITS-1:0];
          default: ;
        endcase
      end
      unique case (state)
        S_IDLE: if (host_we && host_addr == 12'hC08 && host_wdata[0]) begin
          state <= S_GO; done <= 1'b0; cycles <= '0; stalls <= '0;
        end
        S_GO:   state <= S_RUN;
        default: begin
          cycles <= cycles + 64'd1;
          if (array_stall) stalls <= stalls + 64'd1;
          if (array_done && se_done && drained) begin
            state <= S_IDLE; done <= 1'b1;
          end
        end
      endcase
    end
  end
endmodule
