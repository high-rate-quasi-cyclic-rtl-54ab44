// tb_dmmb_group: exercises one circulant's DMMB group (p = 32, v = 8, h = 4,
// w = 2, offsets 13 and 30, so both the in-word start and the lane rotation
// are non-zero and the counters wrap mid-sweep).
//   1. VN sweep, writing: message of column c of permutation k := A_k[c].
//   2. CN sweep, writing: lane l in cycle r must see A_k[(l*v + r + t_k) mod p],
//      the message of row l*v + r; it writes back B_k at that column.
//   3. VN sweep, read only: lane l in cycle r must see B_k[l*v + r].
// The checks are derived from the circulant definition, not the folding.
module tb_dmmb_group;
  import qc_ldpc_pkg::*;
  localparam int V = 8, H = 4, W = 2, P = V * H;
  localparam int TK [W] = '{13, 30};
  localparam logic [W*OFF_W-1:0] T = {16'd30, 16'd13};

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic load = 0, load_cn = 0, issue = 0, wr_en = 0;
  msg_t [W-1:0][H-1:0] msg_out, cn_in = '0, vn_in = '0;
  msg_t A [W][P], B [W][P];

  dmmb_group #(.V(V), .H(H), .W(W), .T(T)) dut (.*);

  // sweep: mode 0 = VN write A, 1 = CN check A write B, 2 = VN check B
  task automatic sweep(input int mode);
    @(negedge clk);
    load = 1; load_cn = (mode == 1); issue = 0;
    for (int t = 0; t <= V; t++) begin
      @(negedge clk);
      load = 0;
      issue = (t < V); wr_en = (mode != 2);
      if (t > 0) begin
        int r;
        r = t - 1;
        for (int k = 0; k < W; k++)
          for (int l = 0; l < H; l++) begin
            int c;
            case (mode)
              0: vn_in[k][l] = A[k][l*V + r];
              1: begin
                c = (l*V + r + TK[k]) % P;
                checks++;
                if (msg_out[k][l] !== A[k][c]) failures++;
                cn_in[k][l] = B[k][c];
              end
              default: begin
                checks++;
                if (msg_out[k][l] !== B[k][l*V + r]) failures++;
              end
            endcase
          end
      end
    end
    issue = 0; wr_en = 0;
  endtask

  initial begin
    foreach (A[k, c]) begin A[k][c] = msg_t'($urandom); B[k][c] = msg_t'($urandom); end
    repeat (2) @(negedge clk);
    rst_n = 1;
    sweep(0);
    sweep(1);
    sweep(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
