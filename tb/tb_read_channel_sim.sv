// tb_read_channel_sim: end-to-end test of the read-channel simulator at a
// reduced size (m = 2, n = 4, p = 32, v = 8, w = 2: 128-bit sectors; detector
// window 16; 4 detector-decoder passes of 4 decoder iterations).
// A random codeword of the code (checked to have zero syndrome) is loaded
// through the host port, then four runs are made:
//   quiet  - sigma 0.25, 3 rounds: no errors, every sector ends after the
//            first pass, and the codeword is reused per round; the run time
//            must be within 10 cycles per round of channel (N) + detector
//            (3N - WIN) + decoder ((2*4 + 1)*(v + 1) + 1);
//   medium - sigma 0.75, 0.85 and 0.95, 24 rounds each: statistics must be
//            consistent, and at least one sector must need more than one
//            pass (detector fed with decoder output) and still succeed;
//   loud   - sigma 2.0, 4 rounds: every sector fails after all 4 passes.
// Each mechanism (early stop, a-priori feedback pass, full-length failure,
// codeword reuse) is counted and must have happened at least once.
module tb_read_channel_sim;
  import qc_ldpc_pkg::*;
  import tb_code_pkg::*;

  localparam int M = 2, NB = 4, P = 32, V = 8, W = 2, N = NB * P, WIN = 16;
  localparam int TV [M*NB*W] = '{15, 8, 30, 16, 9, 14, 25, 28, 4, 0, 30, 25, 24, 27, 27, 19};

  function automatic logic [M*NB*W*OFF_W-1:0] pack_offsets();
    logic [M*NB*W*OFF_W-1:0] r;
    r = '0;
    for (int e = 0; e < M*NB*W; e++) r[OFF_W*e +: OFF_W] = OFF_W'(TV[e]);
    return r;
  endfunction

  int checks = 0, failures = 0;
  int n_early = 0, n_feedback_ok = 0, n_fail_full = 0, n_reuse = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cw_we = 0, cw_bit = 0, start = 0;
  logic [$clog2(N)-1:0] cw_addr = '0;
  logic [7:0] sigma = '0, bm_scale = '0;
  logic [15:0] n_rounds = '0;
  logic busy, done;
  logic [31:0] sectors, sector_errs, bit_errs, passes, early_stops;

  read_channel_sim #(.M(M), .NB(NB), .P(P), .V(V), .W(W), .OFFSETS(pack_offsets()),
                     .WIN(WIN)) dut (.*);

  task automatic run(input real sg, input int rounds, output int cycles);
    sigma    = 8'($rtoi(sg * 64.0 + 0.5));
    bm_scale = 8'($rtoi(16.0 / (2.0 * sg * sg) > 255.0 ? 255.0 : 16.0 / (2.0 * sg * sg)));
    n_rounds = 16'(rounds);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!done && cycles < 2000000) begin @(negedge clk); cycles++; end
    $display("sigma %4.2f: sectors %0d sector errors %0d bit errors %0d passes %0d early %0d (%0d cycles)",
             sg, sectors, sector_errs, bit_errs, passes, early_stops, cycles);
    checks++;
    if (int'(sectors) != rounds) failures++;
    if (rounds > 1) n_reuse++;
    // a failed sector always used every pass; early stops are error-free
    checks++;
    if (int'(sector_errs) + int'(early_stops) > int'(sectors)) failures++;
    checks++;
    if (int'(passes) < int'(sectors) || int'(passes) > 4 * int'(sectors)) failures++;
    checks++;
    if (int'(passes) < int'(sectors) + 3 * int'(sector_errs)) failures++;
    n_early     += int'(early_stops);
    n_fail_full += int'(sector_errs);
    // passes beyond one per sector that did not belong to failed sectors:
    // sectors decoded only after the detector used the decoder's output
    if (int'(passes) - int'(sectors) - 3 * int'(sector_errs) > 0 && sector_errs < sectors)
      n_feedback_ok++;
  endtask

  initial begin
    int offs [];
    bit x [];
    int cyc, dec_cycles, min_cycles;
    offs = new[M*NB*W];
    foreach (offs[e]) offs[e] = TV[e];
    x = make_codeword(M, NB, P, W, offs, 1'b0);
    checks++;
    if (syndrome_weight(M, NB, P, W, offs, x) != 0) failures++;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < N; c++) begin
      @(negedge clk);
      cw_we = 1; cw_addr = 7'(c); cw_bit = x[c];
    end
    @(negedge clk); cw_we = 0;

    // quiet
    run(0.25, 3, cyc);
    checks++; if (sector_errs != 0 || bit_errs != 0) failures++;
    checks++; if (early_stops != 3 || passes != 3) failures++;
    dec_cycles = (2*4 + 1) * (V + 1) + 1;
    // per round: channel N, detector about 3N - WIN, decoder dec_cycles
    min_cycles = 3 * (4 * N - WIN + dec_cycles);
    checks++;
    if (cyc < min_cycles || cyc > min_cycles + 3 * 10) begin
      failures++; $display("quiet run took %0d cycles, expected about %0d", cyc, min_cycles);
    end

    // medium
    run(0.75, 24, cyc);
    run(0.85, 24, cyc);
    run(0.95, 24, cyc);

    // loud
    run(2.0, 4, cyc);
    checks++; if (sector_errs != 4 || passes != 16 || early_stops != 0) failures++;

    $display("mechanisms: sectors stopped early %0d, runs with success after feedback %0d, failure after all passes %0d, codeword reuse %0d",
             n_early, n_feedback_ok, n_fail_full, n_reuse);
    checks++; if (n_early == 0) failures++;
    checks++; if (n_feedback_ok == 0) failures++;
    checks++; if (n_fail_full == 0) failures++;
    checks++; if (n_reuse == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
