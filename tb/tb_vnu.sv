// tb_vnu: random inputs to a degree-4 variable node, including values that
// saturate; outputs are compared with sums computed in the testbench.
module tb_vnu;
  import qc_ldpc_pkg::*;
  localparam int DV = 4;
  int checks = 0, failures = 0;
  msg_t ch, ext;
  msg_t [DV-1:0] c2v, v2c;
  logic hard;

  vnu #(.DV(DV)) dut (.*);

  initial begin
    for (int rep = 0; rep < 500; rep++) begin
      int s;
      ch = sat_msg(int'($urandom_range(0, 62)) - 31);
      s = 0;
      for (int d = 0; d < DV; d++) begin
        c2v[d] = sat_msg(int'($urandom_range(0, (rep % 2) ? 62 : 16)) - ((rep % 2) ? 31 : 8));
        s += int'(c2v[d]);
      end
      #1;
      for (int d = 0; d < DV; d++) begin
        int x;
        x = int'(ch) + s - int'(c2v[d]);
        x = x > 31 ? 31 : (x < -31 ? -31 : x);
        checks++;
        if (int'(v2c[d]) != x) failures++;
      end
      checks++;
      if (int'(ext) != (s > 31 ? 31 : (s < -31 ? -31 : s))) failures++;
      checks++;
      if (hard !== (int'(ch) + s < 0)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
