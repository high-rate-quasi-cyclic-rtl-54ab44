// tb_max_log_map_det: runs the EPR4 detector on a 256-bit sector (window 32)
// and compares every output LLR with a behavioural model written here from
// the algorithm's definition: per-position branch metrics, a full forward
// recursion, and for each window a backward recursion started from equal
// metrics one window further on (at the sector end for the last window),
// with the same 9-bit saturation and renormalisation. Three sectors:
// noiseless without a-priori input (every decision must also be right),
// noisy without a-priori input, and noisy with random a-priori LLRs. Also
// checks that each bit is output exactly once and that a sector takes less
// than 3N + 8 cycles.
module tb_max_log_map_det;
  import qc_ldpc_pkg::*;
  localparam int N = 256, WIN = 32, NWIN = N / WIN;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0;
  logic [7:0] bm_scale = 8'd16;
  logic [7:0] rd_addr, out_idx;
  logic signed [7:0] yv [N];
  msg_t lav [N];
  logic bits [N];
  logic out_valid, busy, done;
  msg_t out_llr;
  msg_t got [N];
  int   seen [N];

  max_log_map_det #(.N(N), .WIN(WIN)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .bm_scale(bm_scale),
    .rd_addr(rd_addr), .y_data(yv[rd_addr]), .la_data(lav[rd_addr]),
    .out_valid(out_valid), .out_idx(out_idx), .out_llr(out_llr),
    .busy(busy), .done(done)
  );

  always @(posedge clk) if (out_valid) begin
    got[out_idx] = out_llr;
    seen[out_idx]++;
  end

  // ------------------------------------------------------ behavioural model
  function automatic int sat9(input int x);
    return x > 255 ? 255 : (x < -255 ? -255 : x);
  endfunction
  function automatic int xv(input int b);
    return b ? 1 : -1;
  endfunction
  // channel branch metric at position k for from-state s and input b
  function automatic int gc(input int k, input int s, input int b);
    int r, d;
    r = xv(b) + xv((s >> 2) & 1) - xv((s >> 1) & 1) - xv(s & 1);
    d = int'(yv[k]) - 8 * r;
    return sat9(-((d * d * int'(bm_scale)) >>> 7));
  endfunction
  function automatic int gf(input int k, input int s, input int b);
    int h;
    h = int'(lav[k]) >>> 1;
    return sat9(gc(k, s, b) + (b ? -h : h));
  endfunction

  int al [N+1][8];
  int be [8], nb [8];
  int ref_llr [N];

  task automatic ref_model();
    for (int s = 0; s < 8; s++) al[0][s] = (s == 0) ? 0 : -255;
    for (int k = 0; k < N; k++) begin
      int mx;
      mx = -1000000;
      for (int s = 0; s < 8; s++) al[k+1][s] = -1000000;
      for (int s = 0; s < 8; s++)
        for (int b = 0; b < 2; b++) begin
          int sn, c;
          sn = (b << 2) | (s >> 1);
          c = al[k][s] + gf(k, s, b);
          if (c > al[k+1][sn]) al[k+1][sn] = c;
        end
      for (int s = 0; s < 8; s++) if (al[k+1][s] > mx) mx = al[k+1][s];
      for (int s = 0; s < 8; s++) al[k+1][s] = sat9(al[k+1][s] - mx);
    end
    for (int w = 0; w < NWIN; w++) begin
      int lo, hi, e;
      lo = w * WIN; hi = lo + WIN; e = (hi + WIN > N) ? N : hi + WIN;
      for (int s = 0; s < 8; s++) be[s] = 0;
      for (int k = e - 1; k >= lo; k--) begin
        int mx;
        if (k < hi) begin
          int m0, m1;
          m0 = -1000000; m1 = -1000000;
          for (int s = 0; s < 8; s++)
            for (int b = 0; b < 2; b++) begin
              int mt;
              mt = al[k][s] + gc(k, s, b) + be[(b << 2) | (s >> 1)];
              if (b == 0 && mt > m0) m0 = mt;
              if (b == 1 && mt > m1) m1 = mt;
            end
          ref_llr[k] = int'(sat_msg(m0 - m1));
        end
        mx = -1000000;
        for (int s = 0; s < 8; s++) begin
          int c0, c1;
          c0 = be[s >> 1] + gf(k, s, 0);
          c1 = be[(s >> 1) | 4] + gf(k, s, 1);
          nb[s] = c0 > c1 ? c0 : c1;
          if (nb[s] > mx) mx = nb[s];
        end
        for (int s = 0; s < 8; s++) be[s] = sat9(nb[s] - mx);
      end
    end
  endtask

  task automatic run_sector(input int noise_amp, input bit use_la, input bit check_bits);
    int h, cyc;
    h = 0;
    foreach (bits[k]) bits[k] = 1'($urandom);
    for (int k = 0; k < N; k++) begin
      int r;
      r = xv(bits[k]) + (k > 0 ? xv(bits[k-1]) : -1) - (k > 1 ? xv(bits[k-2]) : -1)
          - (k > 2 ? xv(bits[k-3]) : -1);
      yv[k]  = 8'(8 * r + (noise_amp == 0 ? 0 : int'($urandom_range(0, 2*noise_amp)) - noise_amp));
      lav[k] = use_la ? sat_msg(int'($urandom_range(0, 40)) - 20) : msg_t'(0);
    end
    foreach (seen[k]) seen[k] = 0;
    ref_model();
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done && cyc < 10*N) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc >= 3*N + 8) begin failures++; $display("sector took %0d cycles", cyc); end
    repeat (2) @(negedge clk);
    for (int k = 0; k < N; k++) begin
      checks++;
      if (seen[k] != 1 || int'(got[k]) != ref_llr[k]) begin
        failures++;
        if (failures < 10) $display("k=%0d seen=%0d got=%0d want=%0d", k, seen[k], got[k], ref_llr[k]);
      end
      if (check_bits) begin
        checks++;
        if ((got[k] < 0) != bits[k]) failures++;
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_sector(0, 0, 1);
    run_sector(12, 0, 0);
    run_sector(12, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
