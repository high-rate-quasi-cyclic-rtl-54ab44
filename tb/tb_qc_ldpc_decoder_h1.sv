// tb_qc_ldpc_decoder_h1: the unfolded special case of the decoder, v = p
// (h = 1): one CNU per block row and one VNU per block column, each serving
// all p nodes of its group, with no lane rotation. Small code m = 2, n = 4,
// p = 32, w = 2. As in tb_qc_ldpc_decoder, every soft output and hard
// decision of a fresh, a continued and a biased sector is compared with an
// edge-by-edge flooding min-sum model, and done must rise
// (2*I + 1)*(v + 1) + 1 cycles after start is sampled.
module tb_qc_ldpc_decoder_h1;
  import qc_ldpc_pkg::*;

  localparam int M = 2, NB = 4, P = 32, V = 32, W = 2, H = P / V, N = NB * P;
  localparam int E = M * NB * W * P;
  localparam int TV [M*NB*W] = '{15, 8, 30, 16, 9, 14, 25, 28, 4, 0, 30, 25, 24, 27, 27, 19};

  function automatic logic [M*NB*W*OFF_W-1:0] pack_offsets();
    logic [M*NB*W*OFF_W-1:0] r;
    r = '0;
    for (int e = 0; e < M*NB*W; e++) r[OFF_W*e +: OFF_W] = OFF_W'(TV[e]);
    return r;
  endfunction
  localparam logic [M*NB*W*OFF_W-1:0] OFFS = pack_offsets();

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ld_valid = 0, start = 0, first = 0;
  logic [$clog2(N)-1:0] ld_idx = '0;
  msg_t ld_llr = '0;
  logic [3:0] n_iter = 4'd4;
  logic busy, done, so_valid;
  logic [$clog2(V)-1:0] so_addr;
  msg_t [NB-1:0][H-1:0] so_ext;
  logic [NB-1:0][H-1:0] so_hard;

  qc_ldpc_decoder #(.M(M), .NB(NB), .P(P), .V(V), .W(W), .OFFSETS(OFFS)) dut (.*);

  int checks = 0, failures = 0;

  // reference model
  int   e_chk [E], e_var [E];
  msg_t c2v [E], v2c [E];
  msg_t ch [N];
  msg_t ref_ext [N];
  logic ref_hard [N];
  msg_t got_ext [N];
  logic got_hard [N];
  int   got_cnt;

  initial begin
    for (int i = 0; i < M; i++)
      for (int j = 0; j < NB; j++)
        for (int k = 0; k < W; k++)
          for (int r = 0; r < P; r++) begin
            int e;
            e = ((i*NB + j)*W + k)*P + r;
            e_chk[e] = i*P + r;
            e_var[e] = j*P + (r + TV[(i*NB+j)*W+k]) % P;
          end
  end

  task automatic ref_decode(input bit fresh, input int iters);
    int vsum [N];
    if (fresh) foreach (c2v[e]) c2v[e] = '0;
    for (int it = 0; it < iters; it++) begin
      foreach (vsum[v]) vsum[v] = int'(ch[v]);
      foreach (c2v[e]) vsum[e_var[e]] += int'(c2v[e]);
      foreach (v2c[e]) v2c[e] = sat_msg(vsum[e_var[e]] - int'(c2v[e]));
      foreach (c2v[e]) begin
        int mn; bit sg;
        mn = MSG_MAX; sg = 0;
        foreach (v2c[f])
          if (f != e && e_chk[f] == e_chk[e]) begin
            int a;
            a = (v2c[f] < 0) ? -int'(v2c[f]) : int'(v2c[f]);
            if (a < mn) mn = a;
            sg ^= v2c[f][MSG_W-1];
          end
        c2v[e] = sat_msg(sg ? -mn : mn);
      end
    end
    foreach (vsum[v]) vsum[v] = 0;
    foreach (c2v[e]) vsum[e_var[e]] += int'(c2v[e]);
    foreach (ref_ext[v]) begin
      ref_ext[v]  = sat_msg(vsum[v]);
      ref_hard[v] = (int'(ch[v]) + vsum[v]) < 0;
    end
  endtask

  // collect the output stream
  always @(posedge clk) if (so_valid) begin
    for (int j = 0; j < NB; j++)
      for (int l = 0; l < H; l++) begin
        got_ext[j*P + l*V + int'(so_addr)]  = so_ext[j][l];
        got_hard[j*P + l*V + int'(so_addr)] = so_hard[j][l];
      end
    got_cnt++;
  end

  task automatic load_channel();
    for (int v = 0; v < N; v++) begin
      @(negedge clk);
      ld_valid = 1; ld_idx = v[$clog2(N)-1:0]; ld_llr = ch[v];
    end
    @(negedge clk); ld_valid = 0;
  endtask

  task automatic run(input bit fresh, input string tag);
    int t0, cyc;
    got_cnt = 0;
    load_channel();
    @(negedge clk); start = 1; first = fresh;
    @(negedge clk); start = 0;
    t0 = 1; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    ref_decode(fresh, 4);
    checks++;
    if (cyc != (2*4 + 1)*(V + 1) + 1) begin
      failures++; $display("%s: decode took %0d cycles", tag, cyc);
    end
    checks++;
    if (got_cnt != V) begin failures++; $display("%s: %0d output words", tag, got_cnt); end
    for (int v = 0; v < N; v++) begin
      checks++;
      if (got_ext[v] !== ref_ext[v] || got_hard[v] !== ref_hard[v]) begin
        failures++;
        if (failures < 10) $display("%s: bit %0d got %0d/%0b want %0d/%0b", tag, v,
                                    got_ext[v], got_hard[v], ref_ext[v], ref_hard[v]);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // noisy sector: random LLRs
    foreach (ch[v]) ch[v] = sat_msg(int'($urandom_range(0, 40)) - 14);
    run(1'b1, "fresh");
    // next detector-decoder iteration: new channel LLRs, kept check messages
    foreach (ch[v]) ch[v] = sat_msg(int'($urandom_range(0, 50)) - 20);
    run(1'b0, "continued");
    // strongly biased to 0 with a few wrong-signed bits: all must decide 0
    foreach (ch[v]) ch[v] = (v % 17 == 3) ? msg_t'(-4) : msg_t'(12);
    run(1'b1, "biased");
    for (int v = 0; v < N; v++) begin
      checks++;
      if (got_hard[v] !== 1'b0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
