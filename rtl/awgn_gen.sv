// awgn_gen: additive white Gaussian noise generator after the Box-Muller
// method in product form: x = f(x1) * g(x2), f(x1) = sqrt(-ln x1),
// g(x2) = sqrt(2) cos(2 pi x2), with x1, x2 uniform on (0, 1]. x has zero
// mean and unit variance; it is scaled by the noise standard deviation
// 'sigma' that sets the signal-to-noise ratio.
//
// Two 64-bit LFSRs supply x1 (10 bits) and x2 (8 bits) each cycle. f and g
// are look-up tables:
//   awgn_f_lut.hex, 1024 entries: round(64 * sqrt(-ln((u + 0.5) / 1024)))
//   awgn_g_lut.hex,  256 entries: round(64 * sqrt(2) * cos(2 pi (u + 0.5) / 256)),
//                                 8-bit two's complement
// (both with 6 fractional bits). The product has 12 fractional bits; it is
// multiplied by sigma (unsigned, 6 fractional bits), rounded to 3 fractional
// bits and saturated to the 6-bit output format (+/-3.875).
// The Box-Muller product form, the table look-up and the 6-bit output
// follow the simulator's noise source; table sizes, table precision and the
// sigma input are this design's choices.
// Timing: a new sample every cycle with 'en' high; latency 2 cycles from the
// LFSR state to 'noise' (table read, then scaling).
module awgn_gen
  import qc_ldpc_pkg::*;
#(
  parameter logic [63:0] SEED1 = 64'h0123_4567_89AB_CDEF,
  parameter logic [63:0] SEED2 = 64'hFEDC_BA98_7654_3210
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [7:0] sigma,   // noise standard deviation, 6 fractional bits
  output msg_t       noise    // 3 fractional bits
);

  logic [63:0] s1, s2;
  lfsr64 #(.STEP(16), .SEED(SEED1)) u_lfsr1 (.clk(clk), .rst_n(rst_n), .en(en), .state(s1));
  lfsr64 #(.STEP(16), .SEED(SEED2)) u_lfsr2 (.clk(clk), .rst_n(rst_n), .en(en), .state(s2));

  logic [7:0]        f_rom [1024];
  logic signed [7:0] g_rom [256];
  initial begin
    $readmemh("rtl/awgn_f_lut.hex", f_rom);
    $readmemh("rtl/awgn_g_lut.hex", g_rom);
  end

  logic [7:0]        f_q;
  logic signed [7:0] g_q;
  always_ff @(posedge clk) begin
    if (en) begin
      f_q <= f_rom[s1[9:0]];
      g_q <= g_rom[s2[7:0]];
    end
  end

  logic signed [16:0] fg;       // 12 fractional bits
  logic signed [26:0] scaled;   // 18 fractional bits
  always_comb begin
    fg     = $signed({1'b0, f_q}) * g_q;
    scaled = fg * $signed({1'b0, sigma});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  noise <= '0;
    else if (en) noise <= sat_msg((int'(scaled) + 16384) >>> 15);
  end

endmodule
