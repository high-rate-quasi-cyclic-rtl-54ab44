// cnu: check node unit. Computes, in one cycle, the check-to-variable
// messages of one parity check of degree DC with the min-sum rule: the
// message back to edge d has the sign of the product of all other incoming
// signs and the smallest magnitude among all other incoming messages.
//
// It finds the smallest and second-smallest magnitude and the index of the
// smallest over all DC inputs; edge d receives the second minimum if it is
// the minimum's own edge and the minimum otherwise. The design uses plain
// min-sum without scaling or offset. In the decoder each CNU is time
// multiplexed over v consecutive rows of the parity-check matrix, one row
// per cycle. Purely combinational.
module cnu
  import qc_ldpc_pkg::*;
#(
  parameter int DC = 36
) (
  input  msg_t [DC-1:0] v2c,
  output msg_t [DC-1:0] c2v
);

  localparam int IDX_W = (DC > 1) ? $clog2(DC) : 1;

  logic [MSG_W-2:0] min1, min2;
  logic [IDX_W-1:0] min_idx;
  logic             sign_all;

  always_comb begin
    min1     = '1;
    min2     = '1;
    min_idx  = '0;
    sign_all = 1'b0;
    for (int d = 0; d < DC; d++) begin
      logic [MSG_W-2:0] m;
      m = msg_mag(v2c[d]);
      sign_all ^= v2c[d][MSG_W-1];
      if (m < min1) begin
        min2    = min1;
        min1    = m;
        min_idx = IDX_W'(d);
      end else if (m < min2) begin
        min2 = m;
      end
    end
  end

  always_comb begin
    for (int d = 0; d < DC; d++) begin
      logic [MSG_W-2:0] mag;
      logic             sgn;
      mag = (IDX_W'(d) == min_idx) ? min2 : min1;
      sgn = sign_all ^ v2c[d][MSG_W-1];
      c2v[d] = sgn ? -msg_t'({1'b0, mag}) : msg_t'({1'b0, mag});
    end
  end

endmodule
