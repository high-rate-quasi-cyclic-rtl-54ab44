// epr4_channel: model of the magnetic recording read-back signal as an
// extended partial response class 4 (EPR4) channel with additive noise.
//
// Each recorded bit b is written as x = 2b - 1 (NRZ). The noiseless read-back
// sample is the EPR4 response (1 + D - D^2 - D^3) applied to x:
//   r_k = x_k + x_(k-1) - x_(k-2) - x_(k-3),  r in {0, +/-2, +/-4},
// to which the noise sample is added. Output y has 3 fractional bits in 8
// bits (range +/-16, wide enough that signal plus noise never saturates).
// 'clear' sets the bit history to 0 (x = -1) at the start of a sector, which
// is the start state the detector assumes. Timing: y is registered, valid
// one cycle after in_valid.
module epr4_channel
  import qc_ldpc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              in_valid,
  input  logic              in_bit,
  input  msg_t              noise,
  output logic              out_valid,
  output logic signed [7:0] y
);

  logic [2:0] hist;   // b_(k-1), b_(k-2), b_(k-3)

  function automatic int nrz(input logic b);
    return b ? 1 : -1;
  endfunction

  int r;
  always_comb r = nrz(in_bit) + nrz(hist[2]) - nrz(hist[1]) - nrz(hist[0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist      <= '0;
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= in_valid;
      if (clear) begin
        hist <= '0;
      end else if (in_valid) begin
        hist <= {in_bit, hist[2:1]};
        y    <= 8'(8 * r + int'(noise));
      end
    end
  end

endmodule
