// max_log_map_det: soft-output channel detector for the EPR4 read channel,
// computing Max-Log-MAP bit LLRs over the 8-state EPR4 trellis with the
// sliding-window method, and returning extrinsic information for the LDPC
// decoder.
//
// Trellis: state s = {b_(k-1), b_(k-2), b_(k-3)}; input bit b moves it to
// {b, s[2], s[1]} and produces the ideal sample
// r = x_k + x_(k-1) - x_(k-2) - x_(k-3), x = 2b - 1. The sector starts in
// state 0; its end state is unknown.
// Branch metric: g = -((y - r)^2 * bm_scale) + (b ? -La/2 : +La/2), with
// bm_scale = 1/(2 sigma^2) (4 fractional bits) and La the a-priori LLR from
// the decoder (positive favours 0). Branch and path metrics are 9 bits with 3
// fractional bits; path metrics are renormalised every step by subtracting
// their maximum, so they lie in [-255, 0].
//
// Operation (one sector of N bits, after 'start'):
//   1. forward sweep, k = 0 .. N-1: alpha_k is stored, one step per cycle;
//   2. for each window [j*WIN, (j+1)*WIN), last window first: a backward
//      warm-up over the following window starting from equal metrics (the
//      sliding-window approximation), then the backward sweep over the window
//      itself, producing one LLR per cycle, in decreasing bit order.
// Output LLR = max over b=0 transitions of (alpha + g + beta) minus the same
// over b=1, with the a-priori term left out, i.e. the extrinsic LLR; it is
// saturated to 6 bits with 3 fractional bits. Sample and a-priori input are
// read through 'rd_addr' with the data expected in the same cycle. A sector
// takes about 3N cycles; 'done' pulses after the last output.
module max_log_map_det
  import qc_ldpc_pkg::*;
#(
  parameter int N     = DEF_NB * DEF_P,
  parameter int WIN   = 32,
  parameter int IDX_W = $clog2(N)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [7:0]        bm_scale,
  output logic [IDX_W-1:0]  rd_addr,
  input  logic signed [7:0] y_data,
  input  msg_t              la_data,
  output logic              out_valid,
  output logic [IDX_W-1:0]  out_idx,
  output msg_t              out_llr,
  output logic              busy,
  output logic              done
);

  localparam int PM_W   = 9;
  localparam int PM_MIN = -255;
  localparam int NWIN   = (N + WIN - 1) / WIN;

  typedef logic signed [PM_W-1:0] pm_t;
  typedef pm_t [7:0] pmv_t;

  typedef enum logic [1:0] {S_IDLE, S_FWD, S_WARM, S_OUT} state_e;
  state_e st;

  logic [IDX_W:0] k;             // current bit position
  logic [IDX_W:0] win_lo, win_hi;
  pmv_t alpha, beta;
  pmv_t amem [N];

  // ---------------------------------------------------------- branch metrics
  function automatic int ideal(input logic [2:0] s, input logic b);
    return (b ? 1 : -1) + (s[2] ? 1 : -1) - (s[1] ? 1 : -1) - (s[0] ? 1 : -1);
  endfunction

  function automatic int sat_pm(input int x);
    if (x > 255)    return 255;
    if (x < PM_MIN) return PM_MIN;
    return x;
  endfunction

  // channel part, indexed by {s, b}
  int gch [16];
  int gfull [16];
  always_comb begin
    for (int t = 0; t < 16; t++) begin
      int d;
      d = int'(y_data) - 8 * ideal(3'(t >> 1), t[0]);
      gch[t]   = sat_pm(-((d * d * int'(bm_scale)) >>> 7));
      gfull[t] = sat_pm(gch[t] + (t[0] ? -(int'(la_data) >>> 1) : (int'(la_data) >>> 1)));
    end
  end

  // ------------------------------------------------------- recursion steps
  pmv_t alpha_next, beta_next;
  always_comb begin
    int a [8];
    int b [8];
    int amax, bmax;
    amax = PM_MIN;
    bmax = PM_MIN;
    for (int sn = 0; sn < 8; sn++) begin
      int c0, c1;
      // predecessors {sn[1:0], 0} and {sn[1:0], 1} with input bit sn[2]
      c0 = int'(alpha[(sn & 3) << 1])       + gfull[(((sn & 3) << 1) << 1) | (sn >> 2)];
      c1 = int'(alpha[((sn & 3) << 1) | 1]) + gfull[((((sn & 3) << 1) | 1) << 1) | (sn >> 2)];
      a[sn] = (c0 > c1) ? c0 : c1;
      if (a[sn] > amax) amax = a[sn];
    end
    for (int s = 0; s < 8; s++) begin
      int c0, c1;
      c0 = int'(beta[s >> 1])       + gfull[(s << 1)];
      c1 = int'(beta[(s >> 1) | 4]) + gfull[(s << 1) | 1];
      b[s] = (c0 > c1) ? c0 : c1;
      if (b[s] > bmax) bmax = b[s];
    end
    for (int s = 0; s < 8; s++) begin
      alpha_next[s] = pm_t'(sat_pm(a[s] - amax));
      beta_next[s]  = pm_t'(sat_pm(b[s] - bmax));
    end
  end

  // ---------------------------------------------------------------- LLR
  pmv_t alpha_k;
  msg_t llr;
  always_comb begin
    int m0, m1;
    alpha_k = amem[k[IDX_W-1:0]];
    m0 = -100000;
    m1 = -100000;
    for (int t = 0; t < 16; t++) begin
      int s, bb, mt;
      s  = t >> 1;
      bb = t & 1;
      mt = int'(alpha_k[s]) + gch[t] + int'(beta[(bb << 2) | (s >> 1)]);
      if (bb == 0) begin if (mt > m0) m0 = mt; end
      else         begin if (mt > m1) m1 = mt; end
    end
    llr = sat_msg(m0 - m1);
  end

  assign rd_addr = k[IDX_W-1:0];
  assign busy    = (st != S_IDLE);

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      k         <= '0;
      win_lo    <= '0;
      win_hi    <= '0;
      alpha     <= '0;
      beta      <= '0;
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_llr   <= '0;
      done      <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      done      <= 1'b0;
      case (st)
        S_IDLE: if (start) begin
          st <= S_FWD;
          k  <= '0;
          for (int s = 0; s < 8; s++) alpha[s] <= (s == 0) ? pm_t'(0) : pm_t'(PM_MIN);
        end
        S_FWD: begin
          amem[k[IDX_W-1:0]] <= alpha;
          alpha <= alpha_next;
          if (int'(k) == N - 1) begin
            // last window first; its backward sweep starts at the sector end
            win_lo <= (IDX_W+1)'((NWIN - 1) * WIN);
            win_hi <= (IDX_W+1)'(N);
            k      <= (IDX_W+1)'(N - 1);
            beta   <= '0;
            st     <= S_OUT;
          end else begin
            k <= k + 1'b1;
          end
        end
        S_WARM: begin
          beta <= beta_next;
          if (k == win_hi) st <= S_OUT;
          k <= k - 1'b1;
        end
        S_OUT: begin
          beta      <= beta_next;
          out_valid <= 1'b1;
          out_idx   <= k[IDX_W-1:0];
          out_llr   <= llr;
          if (k == win_lo) begin
            if (win_lo == '0) begin
              st   <= S_IDLE;
              done <= 1'b1;
            end else begin
              // next window to the left: warm up over the window just done
              win_hi <= win_lo;
              win_lo <= win_lo - (IDX_W+1)'(WIN);
              k      <= (win_lo + (IDX_W+1)'(WIN) > (IDX_W+1)'(N)) ? (IDX_W+1)'(N - 1)
                                                                 : win_lo + (IDX_W+1)'(WIN - 1);
              beta   <= '0;
              st     <= S_WARM;
            end
          end else begin
            k <= k - 1'b1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
