// tb_read_channel_sim_full: the read-channel simulator at its default size
// (4608-bit sectors of the rate-8/9 code with p = 256, v = 32, w = 2, column
// weight 4). A random codeword, checked to satisfy all 512 parity checks, is
// loaded through the host port; then
//   * 2 rounds at sigma 0.25 must decode without error in one pass each, in
//     channel + detector + decoder time (within 10 cycles per round);
//   * runs at sigma 0.5 to 0.66 must give consistent statistics, and at
//     least one sector must be decoded only after a second pass (detector
//     using the decoder's output);
//   * 2 rounds at sigma 1.2 must both fail after all 4 passes.
module tb_read_channel_sim_full;
  import qc_ldpc_pkg::*;
  import tb_code_pkg::*;

  localparam int M = DEF_M, NB = DEF_NB, P = DEF_P, V = DEF_V, W = DEF_W, N = NB * P;
  localparam int WIN = 32;

  int checks = 0, failures = 0;
  int n_feedback_ok = 0, n_fail_full = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cw_we = 0, cw_bit = 0, start = 0;
  logic [$clog2(N)-1:0] cw_addr = '0;
  logic [7:0] sigma = '0, bm_scale = '0;
  logic [15:0] n_rounds = '0;
  logic busy, done;
  logic [31:0] sectors, sector_errs, bit_errs, passes, early_stops;

  read_channel_sim dut (.*);

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
    checks++;
    if (int'(passes) < int'(sectors) + 3 * int'(sector_errs) || int'(passes) > 4 * int'(sectors))
      failures++;
    n_fail_full += int'(sector_errs);
    // failed sectors take exactly 4 passes; passes beyond one per sector left
    // after those belong to sectors decoded after a-priori feedback
    n_feedback_ok += int'(passes) - int'(sectors) - 3 * int'(sector_errs);
  endtask

  initial begin
    int offs [];
    bit x [];
    int cyc, per_round;
    offs = new[M*NB*W];
    foreach (offs[e]) offs[e] = int'(DEF_OFFSETS[OFF_W*e +: OFF_W]);
    x = make_codeword(M, NB, P, W, offs, 1'b0);
    checks++;
    if (syndrome_weight(M, NB, P, W, offs, x) != 0) failures++;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < N; c++) begin
      @(negedge clk);
      cw_we = 1; cw_addr = $clog2(N)'(c); cw_bit = x[c];
    end
    @(negedge clk); cw_we = 0;

    run(0.25, 2, cyc);
    checks++; if (sector_errs != 0 || bit_errs != 0 || passes != 2) failures++;
    per_round = 4 * N - WIN + (2*4 + 1) * (V + 1) + 1;
    checks++;
    if (cyc < 2 * per_round || cyc > 2 * per_round + 20) failures++;

    run(0.5, 2, cyc);
    run(0.62, 8, cyc);
    run(0.64, 8, cyc);
    run(0.66, 8, cyc);
    run(1.20, 2, cyc);
    checks++; if (sector_errs != 2 || passes != 8) failures++;
    $display("extra passes of sectors decoded after a-priori feedback: %0d, sectors failed after 4 passes: %0d",
             n_feedback_ok, n_fail_full);
    checks++; if (n_feedback_ok == 0) failures++;
    checks++; if (n_fail_full == 0) failures++;

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
