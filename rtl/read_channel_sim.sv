// read_channel_sim: hardware simulator of a magnetic recording read channel
// with iterative detection and QC-LDPC decoding, for measuring sector error
// rates far below what software simulation reaches.
//
// Datapath, per sector and per simulation round:
//   channel   - the stored codeword is written through the EPR4 channel with
//               fresh Gaussian noise (awgn_gen + epr4_channel) into the
//               sample buffer, one bit per cycle;
//   detector  - the Max-Log-MAP detector turns samples plus the decoder's
//               a-priori LLRs (zero on the first pass) into extrinsic LLRs,
//               which are loaded straight into the decoder's CMMBs;
//   decoder   - the QC-LDPC decoder runs NIT iterations; its final sweep
//               writes its extrinsic output into the a-priori buffer for the
//               next detector pass and its hard decisions into the error
//               counter.
// Detector and decoder alternate up to NOUT times. A pass whose decisions
// equal the transmitted codeword ends the sector early (the simulator knows
// the codeword); otherwise after NOUT passes the sector counts as an error.
// The same codeword is reused for n_rounds rounds, each with new noise, as
// the host supplies codewords much more slowly than the hardware uses them.
//
// The datapath, widths and iteration counts follow the simulator it models;
// the early stop on the known codeword, the host port and the buffering are
// this design's choices.
//
// Host interface: write the codeword bit by bit with cw_we/cw_addr/cw_bit
// while idle, set sigma (noise standard deviation, 6 fractional bits),
// bm_scale (1/(2 sigma^2), 4 fractional bits) and n_rounds, and pulse start.
// busy stays high until the done pulse; the counters then hold the totals of
// the run (they are cleared by start). passes counts detector-decoder passes
// and early_stops the sectors that finished before NOUT passes.
module read_channel_sim
  import qc_ldpc_pkg::*;
#(
  parameter int M    = DEF_M,
  parameter int NB   = DEF_NB,
  parameter int P    = DEF_P,
  parameter int V    = DEF_V,
  parameter int W    = DEF_W,
  parameter logic [M*NB*W*OFF_W-1:0] OFFSETS = DEF_OFFSETS,
  parameter int WIN  = 32,     // detector window length
  parameter int NOUT = 4,      // detector-decoder passes per sector, at most
  parameter int NIT  = 4,      // decoder iterations per pass
  parameter int H    = P / V,
  parameter int N    = NB * P,
  parameter int IDX_W = $clog2(N)
) (
  input  logic             clk,
  input  logic             rst_n,
  // host
  input  logic             cw_we,
  input  logic [IDX_W-1:0] cw_addr,
  input  logic             cw_bit,
  input  logic [7:0]       sigma,
  input  logic [7:0]       bm_scale,
  input  logic [15:0]      n_rounds,
  input  logic             start,
  output logic             busy,
  output logic             done,
  // statistics
  output logic [31:0]      sectors,
  output logic [31:0]      sector_errs,
  output logic [31:0]      bit_errs,
  output logic [31:0]      passes,
  output logic [31:0]      early_stops
);

  typedef enum logic [2:0] {S_IDLE, S_CHAN, S_CHAN_END, S_DET, S_DEC_GO, S_DEC, S_CHECK} state_e;
  state_e st;

  logic [N-1:0]      cw;                 // transmitted codeword
  logic signed [7:0] ybuf [N];           // channel samples
  msg_t              apri [N];           // decoder extrinsic -> detector a priori
  logic [IDX_W:0]    k;
  logic [15:0]       round;
  logic [3:0]        outer;

  // ----------------------------------------------------------- channel
  msg_t              noise;
  logic              ch_valid, ch_clear;
  logic signed [7:0] y;
  logic [IDX_W-1:0]  y_idx;

  awgn_gen u_awgn (
    .clk(clk), .rst_n(rst_n), .en(st == S_CHAN), .sigma(sigma), .noise(noise)
  );

  epr4_channel u_chan (
    .clk(clk), .rst_n(rst_n), .clear(ch_clear),
    .in_valid(st == S_CHAN), .in_bit(cw[k[IDX_W-1:0]]), .noise(noise),
    .out_valid(ch_valid), .y(y)
  );

  // ----------------------------------------------------------- detector
  logic             det_start, det_busy, det_done, det_ov;
  logic [IDX_W-1:0] det_addr, det_idx;
  msg_t             det_llr;

  max_log_map_det #(.N(N), .WIN(WIN)) u_det (
    .clk(clk), .rst_n(rst_n), .start(det_start), .bm_scale(bm_scale),
    .rd_addr(det_addr), .y_data(ybuf[det_addr]),
    .la_data(outer == '0 ? msg_t'(0) : apri[det_addr]),
    .out_valid(det_ov), .out_idx(det_idx), .out_llr(det_llr),
    .busy(det_busy), .done(det_done)
  );

  // ----------------------------------------------------------- decoder
  logic                 dec_start, dec_done, so_valid;
  logic [$clog2(V)-1:0] so_addr;
  msg_t [NB-1:0][H-1:0] so_ext;
  logic [NB-1:0][H-1:0] so_hard, so_ref;

  qc_ldpc_decoder #(.M(M), .NB(NB), .P(P), .V(V), .W(W), .OFFSETS(OFFSETS)) u_dec (
    .clk(clk), .rst_n(rst_n),
    .ld_valid(det_ov), .ld_idx(det_idx), .ld_llr(det_llr),
    .start(dec_start), .first(outer == '0), .n_iter(4'(NIT)),
    .busy(), .done(dec_done),
    .so_valid(so_valid), .so_addr(so_addr), .so_ext(so_ext), .so_hard(so_hard)
  );

  always_comb begin
    for (int j = 0; j < NB; j++)
      for (int l = 0; l < H; l++)
        so_ref[j][l] = cw[j*P + l*V + int'(so_addr)];
  end

  // ----------------------------------------------------------- statistics
  logic [31:0] frame_errs;
  logic        commit;

  sector_err_counter #(.K(NB*H)) u_err (
    .clk(clk), .rst_n(rst_n), .clear_all(st == S_IDLE && start),
    .frame_start(dec_start), .cmp_valid(so_valid),
    .dec_bits(so_hard), .ref_bits(so_ref), .commit(commit),
    .frame_errs(frame_errs), .sectors(sectors), .sector_errs(sector_errs),
    .bit_errs(bit_errs)
  );

  // ----------------------------------------------------------- buffers
  always_ff @(posedge clk) begin
    if (st == S_IDLE && cw_we) cw[cw_addr] <= cw_bit;
    if (ch_valid) ybuf[y_idx] <= y;
    if (so_valid)
      for (int j = 0; j < NB; j++)
        for (int l = 0; l < H; l++)
          apri[j*P + l*V + int'(so_addr)] <= so_ext[j][l];
  end

  // ----------------------------------------------------------- control
  assign busy      = (st != S_IDLE);
  assign ch_clear  = (st == S_IDLE) || (st == S_CHECK);
  assign det_start = (st == S_DET) && !det_busy && !det_done;
  assign dec_start = (st == S_DEC_GO);
  assign commit    = (st == S_CHECK) && (frame_errs == '0 || int'(outer) == NOUT - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= S_IDLE;
      k           <= '0;
      round       <= '0;
      outer       <= '0;
      y_idx       <= '0;
      done        <= 1'b0;
      passes      <= '0;
      early_stops <= '0;
    end else begin
      done  <= 1'b0;
      y_idx <= k[IDX_W-1:0];
      case (st)
        S_IDLE: if (start) begin
          round       <= '0;
          passes      <= '0;
          early_stops <= '0;
          k           <= '0;
          outer       <= '0;
          st          <= (n_rounds == '0) ? S_IDLE : S_CHAN;
          done        <= (n_rounds == '0);
        end
        S_CHAN: begin
          if (int'(k) == N - 1) st <= S_CHAN_END;
          else                  k  <= k + 1'b1;
        end
        S_CHAN_END: st <= S_DET;       // last sample written this cycle
        S_DET:    if (det_done) st <= S_DEC_GO;
        S_DEC_GO: st <= S_DEC;
        S_DEC:    if (dec_done) st <= S_CHECK;
        S_CHECK: begin
          passes <= passes + 1;
          if (commit) begin
            if (int'(outer) != NOUT - 1) early_stops <= early_stops + 1;
            outer <= '0;
            k     <= '0;
            round <= round + 1'b1;
            if (round + 1'b1 == n_rounds) begin
              st   <= S_IDLE;
              done <= 1'b1;
            end else begin
              st <= S_CHAN;
            end
          end else begin
            outer <= outer + 1'b1;
            st    <= S_DET;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
