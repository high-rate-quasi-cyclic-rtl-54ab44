// dmmb_group: storage of the w*p decoding messages of one non-zero weight-w
// circulant H(i,j), with its address generation and barrel shifters. It
// connects to the i-th CNU group and the j-th VNU group.
//
// The circulant is treated as a sum of w permutation matrices; permutation k
// has its one in row r at column (r + t_k) mod p, and DMMB k keeps the p
// messages of those ones in column order, folded into v words of h lanes.
// Each DMMB has a binary read-address counter:
//   * check-node phase: loaded with t_k mod v. In cycle c the CNU in lane l
//     works on row l*v + c; the message it needs sits in word (t_k + c) mod v,
//     lane (l + floor(t_k/v) + wrap) mod h, where wrap is 1 once the counter
//     has rolled over from v-1 to 0 in this phase. The read-side barrel
//     shifter rotates by that amount, the write-side one by its complement.
//   * variable-node phase: loaded with 0, no rotation; lane l holds column
//     l*v + c, which is what VNU l works on.
// The document gives the rotation as floor(t_k/v) only; the extra lane after
// the counter wraps is what makes rows whose column index passes a multiple
// of v line up, and is this design's reading of it.
//
// Timing: 'load' (with 'load_cn') initialises the counters; each 'issue'
// cycle reads one word and advances the counters. The read data, already
// rotated, appears on msg_out one cycle later; the same cycle, if 'wr_en' was
// set with the issue, the updated messages (cn_in in a check phase, vn_in in
// a variable phase) are written back to the delayed address.
module dmmb_group
  import qc_ldpc_pkg::*;
#(
  parameter int V = 32,
  parameter int H = 8,
  parameter int W = 2,
  parameter logic [W*OFF_W-1:0] T = '0,   // t_k at bits [OFF_W*k +: OFF_W]
  parameter int A_W  = (V > 1) ? $clog2(V) : 1,
  parameter int SH_W = (H > 1) ? $clog2(H) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,      // initialise address counters
  input  logic                load_cn,   // phase being loaded is check-node
  input  logic                issue,     // read one word, advance counters
  input  logic                wr_en,     // write back the result of this issue
  output msg_t [W-1:0][H-1:0] msg_out,   // to CNU group i and VNU group j
  input  msg_t [W-1:0][H-1:0] cn_in,     // updated messages from CNU group i
  input  msg_t [W-1:0][H-1:0] vn_in      // updated messages from VNU group j
);

  logic mode_cn;              // phase currently issuing
  logic mode_cn_d, we_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_cn   <= 1'b0;
      mode_cn_d <= 1'b0;
      we_d      <= 1'b0;
    end else begin
      if (load) mode_cn <= load_cn;
      mode_cn_d <= mode_cn;
      we_d      <= issue & wr_en;
    end
  end

  for (genvar k = 0; k < W; k++) begin : g_dmmb
    localparam int TK = int'(T[OFF_W*k +: OFF_W]);
    localparam logic [A_W-1:0]  S = A_W'(TK % V);
    localparam logic [SH_W-1:0] Q = SH_W'((TK / V) % H);

    logic [A_W-1:0]  ctr, waddr;
    logic            wrapped;
    logic [SH_W-1:0] rot, rot_d;
    msg_t [H-1:0]    rdata, wdata;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        ctr     <= '0;
        wrapped <= 1'b0;
        waddr   <= '0;
        rot_d   <= '0;
      end else begin
        if (load) begin
          ctr     <= load_cn ? S : '0;
          wrapped <= 1'b0;
        end else if (issue) begin
          ctr <= (int'(ctr) == V-1) ? '0 : ctr + 1'b1;
          if (int'(ctr) == V-1) wrapped <= 1'b1;
        end
        waddr <= ctr;
        rot_d <= rot;
      end
    end

    always_comb begin
      if (mode_cn) rot = SH_W'((int'(Q) + int'(wrapped)) % H);
      else         rot = '0;
    end

    dmmb #(.V(V), .H(H)) u_mem (
      .clk   (clk),
      .raddr (ctr),
      .rdata (rdata),
      .we    (we_d),
      .waddr (waddr),
      .wdata (wdata)
    );

    barrel_shifter #(.H(H), .EW(MSG_W)) u_rd_shift (
      .din   (rdata),
      .shift (rot_d),
      .dout  (msg_out[k])
    );

    barrel_shifter #(.H(H), .EW(MSG_W)) u_wr_shift (
      .din   (mode_cn_d ? cn_in[k] : vn_in[k]),
      .shift (SH_W'((H - int'(rot_d)) % H)),
      .dout  (wdata)
    );
  end

endmodule
