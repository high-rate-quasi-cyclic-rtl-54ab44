// qc_ldpc_pkg: types, constants and helper functions shared by the QC-LDPC
// decoder and the read-channel simulator around it.
//
// Message format: every decoder message, channel message and detector soft
// output is a 6-bit two's-complement number with 3 fractional bits (LSB =
// 0.125), saturated symmetrically to +/-31 so that negation never overflows.
// LLR sign convention: positive means bit 0 is more likely; a hard decision
// is 1 when the LLR is negative.
//
// Default code (this design's own choice of the parity-check matrix): m = 2
// block rows, n = 18 block columns, circulant size p = 256, circulant weight
// w = 2, so column weight 4, row weight 36, length 4608 and rate 8/9. The
// decoder folds each group of p nodes onto h = p/v units with v = 32.
// The circulant offsets below were drawn at random, one circulant at a time,
// rejecting any draw that would close a cycle of length 4.
package qc_ldpc_pkg;

  localparam int MSG_W    = 6;
  localparam int MSG_FRAC = 3;
  localparam int MSG_MAX  = 31;

  typedef logic signed [MSG_W-1:0] msg_t;

  // decoder phases
  typedef enum logic [1:0] {PH_IDLE, PH_VN, PH_CN} phase_e;

  // default code and decoder folding
  localparam int DEF_M  = 2;
  localparam int DEF_NB = 18;
  localparam int DEF_P  = 256;
  localparam int DEF_V  = 32;
  localparam int DEF_W  = 2;
  localparam int OFF_W  = 16;   // bits per stored circulant offset

  // Offset t_k of the k-th one in the first row of circulant H(i,j) is
  // element (i*n + j)*w + k, at bits [OFF_W*e +: OFF_W].
  localparam logic [DEF_M*DEF_NB*DEF_W*OFF_W-1:0] DEF_OFFSETS = {
      16'd56, 16'd137, 16'd36, 16'd16, 16'd102, 16'd186, 16'd218, 16'd105, 16'd2, 16'd137,
      16'd118, 16'd102, 16'd189, 16'd201, 16'd191, 16'd187, 16'd145, 16'd155, 16'd51, 16'd213,
      16'd118, 16'd176, 16'd14, 16'd216, 16'd4, 16'd13, 16'd162, 16'd52, 16'd228, 16'd1, 16'd14,
      16'd249, 16'd194, 16'd241, 16'd60, 16'd130, 16'd8, 16'd42, 16'd248, 16'd211, 16'd246,
      16'd28, 16'd66, 16'd196, 16'd176, 16'd207, 16'd15, 16'd250, 16'd224, 16'd44, 16'd201,
      16'd255, 16'd151, 16'd95, 16'd235, 16'd112, 16'd224, 16'd113, 16'd110, 16'd195, 16'd11,
      16'd15, 16'd117, 16'd136, 16'd221, 16'd199, 16'd48, 16'd107, 16'd230, 16'd253, 16'd32,
      16'd68
  };

  // saturate a wide signed value to a message
  function automatic msg_t sat_msg(input int x);
    if (x > MSG_MAX)       return msg_t'(MSG_MAX);
    else if (x < -MSG_MAX) return msg_t'(-MSG_MAX);
    else                   return msg_t'(x);
  endfunction

  // magnitude of a message (0..31)
  function automatic logic [MSG_W-2:0] msg_mag(input msg_t x);
    return x[MSG_W-1] ? (MSG_W-1)'(-x) : x[MSG_W-2:0];
  endfunction

endpackage
