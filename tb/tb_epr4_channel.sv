// tb_epr4_channel: random bits and noise samples through the EPR4 channel
// model; each output must equal 8*(x_k + x_(k-1) - x_(k-2) - x_(k-3)) plus the
// noise, one cycle after the input, with the history cleared to x = -1 by
// 'clear' at the start of each of three sectors. Bubbles (in_valid low) must
// leave the history unchanged.
module tb_epr4_channel;
  import qc_ldpc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, in_bit = 0;
  msg_t noise = '0;
  logic out_valid;
  logic signed [7:0] y;
  always #5 clk = ~clk;

  epr4_channel dut (.*);

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int sec = 0; sec < 3; sec++) begin
      int hx [3];
      @(negedge clk); clear = 1; in_valid = 0;
      @(negedge clk); clear = 0;
      hx = '{-1, -1, -1};
      for (int k = 0; k < 200; k++) begin
        int x, want;
        @(negedge clk);
        in_valid = (k % 9 != 5);
        in_bit = 1'($urandom);
        noise = sat_msg(int'($urandom_range(0, 62)) - 31);
        x = in_bit ? 1 : -1;
        want = 8 * (x + hx[0] - hx[1] - hx[2]) + int'(noise);
        @(posedge clk); #1;
        checks++;
        if (out_valid !== in_valid) failures++;
        if (in_valid) begin
          checks++;
          if (int'(y) != want) begin failures++; if (failures < 5) $display("k=%0d y=%0d want=%0d", k, y, want); end
          hx[2] = hx[1]; hx[1] = hx[0]; hx[0] = x;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
