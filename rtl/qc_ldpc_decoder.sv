// qc_ldpc_decoder: partly parallel min-sum decoder for a regular QC-LDPC
// code whose (m*p) x (n*p) parity-check matrix is an m x n array of p x p
// circulants, each of weight w.
//
// Architecture: m groups of h = p/v check node units (CNUs), n groups of h
// variable node units (VNUs), and a memory fabric of m*n DMMB groups (w
// decoding message memories each, see dmmb_group) plus n channel message
// memories (CMMBs). Each CNU (VNU) serves v consecutive rows (columns) of
// the matrix, one per cycle, so a full check-node or variable-node sweep
// takes v cycles and one decoding iteration 2v cycles, plus one pipeline
// cycle per sweep for the synchronous memory read (2v + 2 in all).
//
// Schedule of one decoding run of I iterations (flooding):
//   VN, CN, VN, CN, ... (I times VN+CN), then a final VN output sweep.
// A VN sweep reads check-to-variable messages and the channel messages and
// writes variable-to-check messages back to the same DMMB words; a CN sweep
// does the reverse. Between runs the DMMBs therefore hold check-to-variable
// messages, so a new run with fresh channel messages from the detector (the
// next detector-decoder iteration) continues from them. With 'first' set,
// the first VN sweep treats all check messages as zero, which starts a new
// sector. The final sweep writes nothing and streams out, per cycle, one
// column per VNU: the hard decision and the extrinsic soft output (sum of the
// check messages) for the detector.
//
// Interface:
//   load  - while idle, ld_valid writes channel message ld_llr for code bit
//           ld_idx into its CMMB (one message per cycle, any order).
//   start - begins a run of n_iter iterations; busy is high until the done
//           pulse. Total time (2*n_iter + 1)*(v + 1) cycles after start.
//   so_*  - during the final sweep, so_valid marks a cycle in which lane l of
//           VNU group j delivers code bit j*p + l*v + so_addr.
// The circulant offsets are parameters; p and v are powers of two.
// The unit counts, the memory fabric and the v-cycle sweeps follow the
// published architecture; the sweep order, the first-sweep initialisation,
// the load and output interfaces and the one-cycle pipeline are this
// design's choices.
module qc_ldpc_decoder
  import qc_ldpc_pkg::*;
#(
  parameter int M  = DEF_M,
  parameter int NB = DEF_NB,
  parameter int P  = DEF_P,
  parameter int V  = DEF_V,
  parameter int W  = DEF_W,
  parameter logic [M*NB*W*OFF_W-1:0] OFFSETS = DEF_OFFSETS,
  parameter int H    = P / V,
  parameter int N    = NB * P,
  parameter int A_W  = (V > 1) ? $clog2(V) : 1,
  parameter int IDX_W = $clog2(N)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // channel message load
  input  logic                  ld_valid,
  input  logic [IDX_W-1:0]      ld_idx,
  input  msg_t                  ld_llr,
  // control
  input  logic                  start,
  input  logic                  first,
  input  logic [3:0]            n_iter,
  output logic                  busy,
  output logic                  done,
  // soft/hard output stream of the final sweep
  output logic                  so_valid,
  output logic [A_W-1:0]        so_addr,
  output msg_t [NB-1:0][H-1:0]  so_ext,
  output logic [NB-1:0][H-1:0]  so_hard
);

  localparam int DC = NB * W;   // check node degree
  localparam int DV = M * W;    // variable node degree

  // ---------------------------------------------------------------- control
  logic         running;
  logic [4:0]   ph;             // phase index 0 .. 2*n_iter
  logic [4:0]   last_ph;
  logic [A_W:0] cnt;            // 0 .. V
  logic         first_r;
  logic         load, load_cn, issue, wr_en, ph_cn;
  logic         vn_d, zero_d, out_d;
  logic [A_W-1:0] addr_d;

  assign ph_cn   = ph[0];
  assign issue   = running && (int'(cnt) < V);
  assign wr_en   = (ph != last_ph);
  assign load    = (!running && start) || (running && int'(cnt) == V && ph != last_ph);
  assign load_cn = running && !ph_cn;          // next phase after a VN is CN
  assign busy    = running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      ph      <= '0;
      last_ph <= '0;
      cnt     <= '0;
      first_r <= 1'b0;
      done    <= 1'b0;
      vn_d    <= 1'b0;
      zero_d  <= 1'b0;
      out_d   <= 1'b0;
      addr_d  <= '0;
    end else begin
      done <= 1'b0;
      if (!running) begin
        if (start) begin
          running <= 1'b1;
          ph      <= '0;
          last_ph <= {n_iter, 1'b0};
          cnt     <= '0;
          first_r <= first;
        end
      end else if (int'(cnt) == V) begin
        cnt <= '0;
        if (ph == last_ph) begin
          running <= 1'b0;
          done    <= 1'b1;
        end else begin
          ph <= ph + 1'b1;
        end
      end else begin
        cnt <= cnt + 1'b1;
      end
      vn_d   <= issue && !ph_cn;
      zero_d <= issue && first_r && ph == '0;
      out_d  <= issue && ph == last_ph;
      addr_d <= cnt[A_W-1:0];
    end
  end

  // ---------------------------------------------------------- memory fabric
  msg_t [W-1:0][H-1:0] grp_out [M][NB];
  msg_t [W-1:0][H-1:0] grp_cn  [M][NB];
  msg_t [W-1:0][H-1:0] grp_vn  [M][NB];

  for (genvar i = 0; i < M; i++) begin : g_row
    for (genvar j = 0; j < NB; j++) begin : g_col
      dmmb_group #(
        .V(V), .H(H), .W(W),
        .T(OFFSETS[OFF_W*W*(i*NB+j) +: OFF_W*W])
      ) u_grp (
        .clk     (clk),
        .rst_n   (rst_n),
        .load    (load),
        .load_cn (load_cn),
        .issue   (issue),
        .wr_en   (wr_en),
        .msg_out (grp_out[i][j]),
        .cn_in   (grp_cn[i][j]),
        .vn_in   (grp_vn[i][j])
      );
    end
  end

  // channel message memories
  logic [$clog2(NB+1)-1:0] ld_j;
  logic [A_W-1:0]          ld_a;
  logic [H-1:0]            ld_lanes;
  msg_t [NB-1:0][H-1:0]    ch_msg;

  always_comb begin
    ld_j     = ($clog2(NB+1))'(int'(ld_idx) / P);
    ld_a     = A_W'((int'(ld_idx) % P) % V);
    ld_lanes = H'(1) << ((int'(ld_idx) % P) / V);
  end

  for (genvar j = 0; j < NB; j++) begin : g_cmmb
    logic         cm_we;
    msg_t [H-1:0] cm_wdata;
    assign cm_we    = !running && ld_valid && int'(ld_j) == j;
    assign cm_wdata = {H{ld_llr}};
    cmmb #(.V(V), .H(H)) u_cmmb (
      .clk     (clk),
      .addr    (cm_we ? ld_a : cnt[A_W-1:0]),
      .we      (cm_we),
      .lane_we (ld_lanes),
      .wdata   (cm_wdata),
      .rdata   (ch_msg[j])
    );
  end

  // ----------------------------------------------------------------- CNUs
  for (genvar i = 0; i < M; i++) begin : g_cnu_grp
    for (genvar l = 0; l < H; l++) begin : g_cnu
      msg_t [DC-1:0] v2c, c2v;
      for (genvar j = 0; j < NB; j++) begin : g_e
        for (genvar k = 0; k < W; k++) begin : g_k
          assign v2c[j*W+k]       = grp_out[i][j][k][l];
          assign grp_cn[i][j][k][l] = c2v[j*W+k];
        end
      end
      cnu #(.DC(DC)) u_cnu (.v2c(v2c), .c2v(c2v));
    end
  end

  // ----------------------------------------------------------------- VNUs
  for (genvar j = 0; j < NB; j++) begin : g_vnu_grp
    for (genvar l = 0; l < H; l++) begin : g_vnu
      msg_t [DV-1:0] c2v, v2c;
      for (genvar i = 0; i < M; i++) begin : g_e
        for (genvar k = 0; k < W; k++) begin : g_k
          assign c2v[i*W+k]         = zero_d ? msg_t'(0) : grp_out[i][j][k][l];
          assign grp_vn[i][j][k][l] = v2c[i*W+k];
        end
      end
      vnu #(.DV(DV)) u_vnu (
        .ch    (ch_msg[j][l]),
        .c2v   (c2v),
        .v2c   (v2c),
        .ext   (so_ext[j][l]),
        .hard  (so_hard[j][l])
      );
    end
  end

  assign so_valid = out_d && vn_d;
  assign so_addr  = addr_d;

  // a load may only arrive while the decoder is idle
  assert property (@(posedge clk) disable iff (!rst_n) ld_valid |-> !running)
    else $error("channel message loaded while decoding");

endmodule
