// tb_sector_err_counter: feeds random decided and reference words with a
// controlled number of differing bits over several frames, some of which
// are error-free, and checks the per-frame count and the totals after each
// commit, then that clear_all resets the totals.
module tb_sector_err_counter;
  localparam int K = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear_all = 0, frame_start = 0, cmp_valid = 0, commit = 0;
  logic [K-1:0] dec_bits = '0, ref_bits = '0;
  logic [31:0] frame_errs, sectors, sector_errs, bit_errs;
  int m_sec = 0, m_secerr = 0, m_bits = 0;

  sector_err_counter #(.K(K)) dut (.*);

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 12; f++) begin
      int fe;
      fe = 0;
      @(negedge clk); frame_start = 1;
      @(negedge clk); frame_start = 0;
      for (int w = 0; w < 6; w++) begin
        logic [K-1:0] flip;
        flip = (f % 3 == 0) ? '0 : K'($urandom) & K'($urandom);
        for (int i = 0; i < K; i++) fe += flip[i];
        ref_bits = K'($urandom);
        dec_bits = ref_bits ^ flip;
        cmp_valid = 1;
        @(negedge clk);
      end
      cmp_valid = 0;
      checks++;
      if (int'(frame_errs) != fe) failures++;
      commit = 1;
      @(negedge clk); commit = 0;
      m_sec++; m_bits += fe; if (fe != 0) m_secerr++;
      checks++;
      if (int'(sectors) != m_sec || int'(sector_errs) != m_secerr || int'(bit_errs) != m_bits)
        failures++;
    end
    clear_all = 1;
    @(negedge clk); clear_all = 0;
    checks++;
    if (sectors != 0 || sector_errs != 0 || bit_errs != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
