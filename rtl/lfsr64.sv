// lfsr64: 64-bit Fibonacci linear feedback shift register used as a source
// of uniformly distributed random bits for the noise generator.
//
// Feedback polynomial x^64 + x^63 + x^61 + x^60 + 1 (maximal length). With
// 'en' high the register advances STEP positions in one cycle (the steps are
// unrolled), so STEP fresh bits per cycle can be taken from the state.
// SEED must be non-zero; the register returns to SEED on reset. The use of
// 64-bit LFSRs follows the simulator's noise source; the polynomial, the
// step count and the seeds are this design's choices.
module lfsr64 #(
  parameter int          STEP = 16,
  parameter logic [63:0] SEED = 64'h0123_4567_89AB_CDEF
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  output logic [63:0] state
);

  function automatic logic [63:0] advance(input logic [63:0] s);
    logic [63:0] r;
    r = s;
    for (int i = 0; i < STEP; i++)
      r = {r[62:0], r[63] ^ r[62] ^ r[60] ^ r[59]};
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  state <= SEED;
    else if (en) state <= advance(state);
  end

endmodule
