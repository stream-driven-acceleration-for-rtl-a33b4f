// pe_array: ROWS x COLS grid of processing elements. Inner PEs are linked
// to their four neighbours in both directions. The grid also closes into
// rings: the north output of a first-row PE reaches the south input of the
// last-row PE of its column, the south output of a last-row PE reaches the
// north input of the first-row PE, and likewise west/east along each row.
// The west inputs of the first column and the north inputs of the first row
// are shared between the ring and the stream input buffers; each edge PE's
// instruction chooses (ring_w / ring_n). The east outputs of the last
// column and the south outputs of the last row go to the output buffers
// (east_push / south_push, in the cycle after a valid value was produced;
// values carry valid bits through the array, see pe).
// All PEs advance together: 'run' is high when the array is enabled, not
// done, every stream input read this cycle has data and every output
// buffer has room for two more values. A stall holds every register.
// Once the load streams are exhausted (in_drained), reading an empty
// stream input no longer stalls but yields an invalid value, so a PE whose
// loop also covers the drain of a longer flow can outlive its stream.
// Configuration writes address one PE by index r*COLS+c.
// The grid, the neighbour links, the rings and the edge I/O follow the
// design description; the global lockstep enable is this design's choice.
module pe_array
  import accel_pkg::*;
#(
  parameter int unsigned ROWS = 4,
  parameter int unsigned COLS = 4
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              cfg_we,
  input  logic [7:0]                        cfg_pe,
  input  logic [$clog2(CFG_DEPTH)-1:0]      cfg_addr,
  input  pe_instr_t                         cfg_data,
  input  logic                              dm_init_we,
  input  logic [$clog2(DMEM_DEPTH)-1:0]     dm_init_addr,
  input  logic [31:0]                       dm_init_data,
  input  logic                              loop_we,
  input  logic [39:0]                       loop_data,
  input  logic                              start,
  input  logic                              en,
  input  logic                              in_drained,
  input  logic [ROWS-1:0]                   west_valid,
  input  logic [ROWS-1:0][31:0]             west_data,
  output logic [ROWS-1:0]                   west_pop,
  input  logic [COLS-1:0]                   north_valid,
  input  logic [COLS-1:0][31:0]             north_data,
  output logic [COLS-1:0]                   north_pop,
  output logic [ROWS-1:0]                   east_push,
  output logic [ROWS-1:0][31:0]             east_data,
  input  logic [ROWS-1:0]                   east_space,
  output logic [COLS-1:0]                   south_push,
  output logic [COLS-1:0][31:0]             south_data,
  input  logic [COLS-1:0]                   south_space,
  output logic                              run,
  output logic                              stall,
  output logic                              done
);
  logic [3:0][31:0] pin   [ROWS][COLS];
  logic [3:0][31:0] pout  [ROWS][COLS];
  logic [3:0]       pvld  [ROWS][COLS];
  logic [3:0]       pivld [ROWS][COLS];
  logic             prd_n [ROWS][COLS];
  logic             prd_w [ROWS][COLS];
  logic             pring_n [ROWS][COLS];
  logic             pring_w [ROWS][COLS];
  logic [ROWS*COLS-1:0] pdone;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int unsigned IDX = r * COLS + c;
      // North input
      if (r == 0) begin : g_n_edge
        assign pin[r][c][DIR_N]   = pring_n[r][c] ? pout[ROWS-1][c][DIR_S] : north_data[c];
        assign pivld[r][c][DIR_N] = pring_n[r][c] ? pvld[ROWS-1][c][DIR_S] : north_valid[c];
      end else begin : g_n_in
        assign pin[r][c][DIR_N]   = pout[r-1][c][DIR_S];
        assign pivld[r][c][DIR_N] = pvld[r-1][c][DIR_S];
      end
      // South input
      if (r == ROWS - 1) begin : g_s_ring
        assign pin[r][c][DIR_S]   = pout[0][c][DIR_N];
        assign pivld[r][c][DIR_S] = pvld[0][c][DIR_N];
      end else begin : g_s_in
        assign pin[r][c][DIR_S]   = pout[r+1][c][DIR_N];
        assign pivld[r][c][DIR_S] = pvld[r+1][c][DIR_N];
      end
      // West input
      if (c == 0) begin : g_w_edge
        assign pin[r][c][DIR_W]   = pring_w[r][c] ? pout[r][COLS-1][DIR_E] : west_data[r];
        assign pivld[r][c][DIR_W] = pring_w[r][c] ? pvld[r][COLS-1][DIR_E] : west_valid[r];
      end else begin : g_w_in
        assign pin[r][c][DIR_W]   = pout[r][c-1][DIR_E];
        assign pivld[r][c][DIR_W] = pvld[r][c-1][DIR_E];
      end
      // East input
      if (c == COLS - 1) begin : g_e_ring
        assign pin[r][c][DIR_E]   = pout[r][0][DIR_W];
        assign pivld[r][c][DIR_E] = pvld[r][0][DIR_W];
      end else begin : g_e_in
        assign pin[r][c][DIR_E]   = pout[r][c+1][DIR_W];
        assign pivld[r][c][DIR_E] = pvld[r][c+1][DIR_W];
      end

      pe u_pe (
        .clk, .rst_n,
        .cfg_we(cfg_we && cfg_pe == 8'(IDX)), .cfg_addr, .cfg_data,
        .dm_init_we(dm_init_we && cfg_pe == 8'(IDX)), .dm_init_addr, .dm_init_data,
        .loop_we(loop_we && cfg_pe == 8'(IDX)), .loop_data,
        .start, .run,
        .in_data(pin[r][c]), .in_vld(pivld[r][c]), .out_data(pout[r][c]), .out_vld(pvld[r][c]),
        .rd_n(prd_n[r][c]), .rd_w(prd_w[r][c]),
        .ring_n(pring_n[r][c]), .ring_w(pring_w[r][c]),
        .done(pdone[IDX])
      );
    end
  end

  logic in_ok, out_ok, ran_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ran_q <= 1'b0;
    else        ran_q <= run;

  always_comb begin
    in_ok = 1'b1;
    for (int r = 0; r < ROWS; r++) begin
      west_pop[r] = prd_w[r][0] && !pring_w[r][0];
      if (west_pop[r] && !west_valid[r] && !in_drained) in_ok = 1'b0;
      west_pop[r] = west_pop[r] && west_valid[r];
      east_push[r] = pvld[r][COLS-1][DIR_E] && ran_q;
      east_data[r] = pout[r][COLS-1][DIR_E];
    end
    for (int c = 0; c < COLS; c++) begin
      north_pop[c] = prd_n[0][c] && !pring_n[0][c];
      if (north_pop[c] && !north_valid[c] && !in_drained) in_ok = 1'b0;
      north_pop[c] = north_pop[c] && north_valid[c];
      south_push[c] = pvld[ROWS-1][c][DIR_S] && ran_q;
      south_data[c] = pout[ROWS-1][c][DIR_S];
    end
    out_ok = (&east_space) && (&south_space);
    done   = &pdone;
    run    = en && !done && in_ok && out_ok;
    stall  = en && !done && !run;
    // Pops happen only on cycles the array advances.
    west_pop  = run ? west_pop  : '0;
    north_pop = run ? north_pop : '0;
  end
endmodule
