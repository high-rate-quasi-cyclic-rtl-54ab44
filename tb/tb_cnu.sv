// tb_cnu: random and corner-case inputs to a degree-36 check node; each
// output is compared with a direct evaluation of the min-sum rule (sign
// product and minimum magnitude over the other 35 inputs).
module tb_cnu;
  import qc_ldpc_pkg::*;
  localparam int DC = 36;
  int checks = 0, failures = 0;
  msg_t [DC-1:0] v2c, c2v;

  cnu #(.DC(DC)) dut (.*);

  initial begin
    for (int rep = 0; rep < 300; rep++) begin
      for (int d = 0; d < DC; d++) begin
        case (rep % 3)
          0: v2c[d] = sat_msg(int'($urandom_range(0, 62)) - 31);
          1: v2c[d] = sat_msg(int'($urandom_range(0, 8)) - 4);   // ties
          default: v2c[d] = (d == rep % DC) ? msg_t'(0) : sat_msg(int'($urandom_range(0, 62)) - 31);
        endcase
      end
      #1;
      for (int d = 0; d < DC; d++) begin
        int mn; bit sg; msg_t want;
        mn = MSG_MAX; sg = 0;
        for (int f = 0; f < DC; f++) if (f != d) begin
          int a;
          a = v2c[f] < 0 ? -int'(v2c[f]) : int'(v2c[f]);
          if (a < mn) mn = a;
          sg ^= (v2c[f] < 0);
        end
        want = sat_msg(sg ? -mn : mn);
        checks++;
        if (c2v[d] !== want) failures++;
      end
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
