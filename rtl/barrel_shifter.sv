// barrel_shifter: rotates a word of H lanes by any number of lanes in one
// combinational step. Output lane l takes input lane (l + shift) mod H.
//
// It is built as log2 stages; stage b rotates by 2^b lanes when bit b of the
// shift amount is set, so the logic depth grows with log2(H) rather than H.
// The QC-LDPC memory fabric places one on the read side and one on the write
// side of every decoding message memory block; the write side is given the
// complementary amount (H - shift) mod H to undo the read-side rotation.
// Purely combinational, no clock.
module barrel_shifter #(
  parameter int H    = 8,    // lanes
  parameter int EW   = 6,    // bits per lane
  parameter int SH_W = (H > 1) ? $clog2(H) : 1
) (
  input  logic [H-1:0][EW-1:0] din,
  input  logic [SH_W-1:0]      shift,   // 0 .. H-1
  output logic [H-1:0][EW-1:0] dout
);

  logic [H-1:0][EW-1:0] stage [SH_W+1];

  assign stage[0] = din;

  for (genvar b = 0; b < SH_W; b++) begin : g_stage
    localparam int AMT = (1 << b) % H;
    for (genvar l = 0; l < H; l++) begin : g_lane
      assign stage[b+1][l] = shift[b] ? stage[b][(l + AMT) % H] : stage[b][l];
    end
  end

  assign dout = stage[SH_W];

endmodule
