// tb_awgn_gen: checks the noise generator two ways.
//  * Sample by sample: from the LFSR bits that address the tables, the
//    testbench evaluates sqrt(-ln x1) and sqrt(2) cos(2 pi x2) in real
//    arithmetic, rounds them to 6 fractional bits, scales by sigma and rounds
//    and saturates as specified; the result must equal the output two cycles
//    later.
//  * Statistics: with sigma = 1.0 over 20000 samples the mean must be within
//    0.05 of 0 and the variance within 10 % of 1; with sigma = 0.5 the
//    variance must be within 10 % of 0.25.
module tb_awgn_gen;
  import qc_ldpc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;
  logic [7:0] sigma = 8'd64;
  msg_t noise;

  awgn_gen dut (.*);

  localparam real PI = 3.14159265358979;

  function automatic int expect_noise(input int u1, input int u2, input int sg);
    int f, g, p;
    f = int'($floor(64.0 * $sqrt(-$ln((u1 + 0.5) / 1024.0)) + 0.5));
    g = int'($floor(64.0 * $sqrt(2.0) * $cos(2.0 * PI * (u2 + 0.5) / 256.0) + 0.5));
    p = (f * g * sg + 16384) >>> 15;
    return p > 31 ? 31 : (p < -31 ? -31 : p);
  endfunction

  task automatic run(input int nsamp, input int sg, output real mean, output real var_);
    int q1 [$], q2 [$];
    real s, s2;
    sigma = 8'(sg);
    s = 0; s2 = 0;
    en = 1;
    for (int c = 0; c < nsamp + 1; c++) begin
      @(negedge clk);
      q1.push_back(int'(dut.s1[9:0]));
      q2.push_back(int'(dut.s2[7:0]));
      @(posedge clk); #1;
      if (c >= 1) begin
        int e;
        e = expect_noise(q1[0], q2[0], sg);
        void'(q1.pop_front()); void'(q2.pop_front());
        checks++;
        if (int'(noise) != e) begin
          failures++;
          if (failures < 5) $display("sample %0d: got %0d want %0d", c, noise, e);
        end
        s  += real'(int'(noise)) / 8.0;
        s2 += (real'(int'(noise)) / 8.0) ** 2;
      end
    end
    mean = s / nsamp;
    var_ = s2 / nsamp - mean * mean;
    en = 0;
    @(negedge clk);
  endtask

  initial begin
    real m, v;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(20000, 64, m, v);
    $display("sigma 1.0: mean %f variance %f", m, v);
    checks++; if (m > 0.05 || m < -0.05) failures++;
    checks++; if (v < 0.9 || v > 1.1) failures++;
    run(20000, 32, m, v);
    $display("sigma 0.5: mean %f variance %f", m, v);
    checks++; if (m > 0.05 || m < -0.05) failures++;
    checks++; if (v < 0.225 || v > 0.275) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
