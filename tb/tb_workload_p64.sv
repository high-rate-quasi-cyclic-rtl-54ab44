// tb_workload_p64: the circulant-size study's rate-8/9, length-4608,
// column-weight-4 code with p = 64, run on the read-channel simulator by
// parameter override: m = 8 block rows, n = 72 block columns, circulant
// weight 1, folded with v = 8 (h = 8). The offsets come from a
// linear congruential sequence (the code's own offsets are not known), so the
// matrix may have 4-cycles; the run shows the datapath handles this shape of
// code, not its error floor. A random codeword (zero syndrome checked) must
// decode without error in one pass per sector at sigma 0.25; runs at sigma
// 0.5 and 0.6 must give consistent statistics.
module tb_workload_p64;
  import qc_ldpc_pkg::*;
  import tb_code_pkg::*;

  localparam int M = 8, NB = 72, P = 64, V = 8, W = 1, N = NB * P, WIN = 32;

  function automatic int lcg_offset(input int e);
    int unsigned s;
    s = 32'd12345 + 32'(e) * 32'd2654435761;
    s = s * 32'd1103515245 + 32'd12345;
    return int'((s >> 8) % P);
  endfunction

  function automatic logic [M*NB*W*OFF_W-1:0] pack_offsets();
    logic [M*NB*W*OFF_W-1:0] r;
    r = '0;
    for (int e = 0; e < M*NB*W; e++) r[OFF_W*e +: OFF_W] = OFF_W'(lcg_offset(e));
    return r;
  endfunction

  int checks = 0, failures = 0;
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

  task automatic run(input real sg, input int rounds);
    int cycles;
    sigma    = 8'($rtoi(sg * 64.0 + 0.5));
    bm_scale = 8'($rtoi(16.0 / (2.0 * sg * sg) > 255.0 ? 255.0 : 16.0 / (2.0 * sg * sg)));
    n_rounds = 16'(rounds);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!done && cycles < 2000000) begin @(negedge clk); cycles++; end
    $display("p=%0d sigma %4.2f: sectors %0d sector errors %0d bit errors %0d passes %0d (%0d cycles)",
             P, sg, sectors, sector_errs, bit_errs, passes, cycles);
    checks++;
    if (int'(sectors) != rounds) failures++;
    checks++;
    if (int'(passes) < int'(sectors) + 3 * int'(sector_errs) || int'(passes) > 4 * int'(sectors))
      failures++;
  endtask

  initial begin
    int offs [];
    bit x [];
    offs = new[M*NB*W];
    foreach (offs[e]) offs[e] = lcg_offset(e);
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
    run(0.25, 2);
    checks++; if (sector_errs != 0 || passes != 2) failures++;
    run(0.5, 2);
    run(0.6, 2);
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
