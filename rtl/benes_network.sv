// benes_network: rearrangeable N-input permutation network built from 2x2
// switches, used inside the stream re-mappers instead of a full crossbar
// (no element needs to be multicast). It has 2*log2(N)-1 stages of N/2
// switches. Stage i exchanges the lanes j and j^(1<<b) when the switch bit
// is set, with b = i for the first log2(N) stages and b = 2*log2(N)-2-i
// after, i.e. bit order 0,1,..,n-1,..,1,0: the outer stages steer each
// element into one of two half-size Benes networks, recursively, so every
// permutation can be set. The switch of lanes j / j^(1<<b) is number
// {j above bit b, j below bit b} in sw[i]. Switch settings are computed by
// software. Purely combinational. Using a permutation network follows the
// design description; the Benes topology is this design's choice.
module benes_network #(
  parameter int unsigned N = 16,
  parameter int unsigned W = 32
) (
  input  logic [N-1:0][W-1:0]                        in_data,
  input  logic [2*$clog2(N)-2:0][N/2-1:0]            sw,
  output logic [N-1:0][W-1:0]                        out_data
);
  localparam int unsigned LN = $clog2(N);
  localparam int unsigned NST = 2 * LN - 1;

  logic [N-1:0][W-1:0] lane [NST+1];
  assign lane[0] = in_data;

  for (genvar i = 0; i < NST; i++) begin : g_stage
    localparam int unsigned B = (i < LN) ? i : (2 * LN - 2 - i);
    for (genvar k = 0; k < N / 2; k++) begin : g_sw
      // lane index with a 0 inserted at bit B
      localparam int unsigned LO = ((k >> B) << (B + 1)) | (k & ((1 << B) - 1));
      localparam int unsigned HI = LO | (1 << B);
      assign lane[i+1][LO] = sw[i][k] ? lane[i][HI] : lane[i][LO];
      assign lane[i+1][HI] = sw[i][k] ? lane[i][LO] : lane[i][HI];
    end
  end

  assign out_data = lane[NST];
endmodule
