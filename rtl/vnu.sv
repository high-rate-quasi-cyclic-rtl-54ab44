// vnu: variable node unit. Computes, in one cycle, everything one variable
// node of degree DV produces: the variable-to-check message of each edge
// (channel message plus all other incoming check messages), the hard
// decision on the a-posteriori LLR (channel plus all check messages),
// and the extrinsic output (sum of the check messages only) that is fed back
// to the channel detector in iterative detection and decoding.
//
// Sums are formed at full width and saturated to the 6-bit message format
// only at the outputs. In the decoder each VNU is time multiplexed over v
// consecutive columns, one column per cycle. Purely combinational.
module vnu
  import qc_ldpc_pkg::*;
#(
  parameter int DV = 4
) (
  input  msg_t          ch,
  input  msg_t [DV-1:0] c2v,
  output msg_t [DV-1:0] v2c,
  output msg_t          ext,
  output logic          hard
);

  int sum_c2v;

  always_comb begin
    sum_c2v = 0;
    for (int d = 0; d < DV; d++) sum_c2v += int'(c2v[d]);
    for (int d = 0; d < DV; d++) v2c[d] = sat_msg(int'(ch) + sum_c2v - int'(c2v[d]));
    ext   = sat_msg(sum_c2v);
    hard  = (int'(ch) + sum_c2v) < 0;
  end

endmodule
