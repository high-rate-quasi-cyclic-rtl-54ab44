// tb_lfsr64: compares a 16-step and a 1-step LFSR with a bit-serial model of
// the polynomial x^64 + x^63 + x^61 + x^60 + 1, including cycles with the
// enable low, and checks the reset value.
module tb_lfsr64;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;
  localparam logic [63:0] SEED = 64'hDEAD_BEEF_0BAD_F00D;
  logic [63:0] st16, st1, m16, m1;

  lfsr64 #(.STEP(16), .SEED(SEED)) u16 (.clk(clk), .rst_n(rst_n), .en(en), .state(st16));
  lfsr64 #(.STEP(1),  .SEED(SEED)) u1  (.clk(clk), .rst_n(rst_n), .en(en), .state(st1));

  function automatic logic [63:0] step1(input logic [63:0] s);
    logic fb;
    fb = s[63] ^ s[62] ^ s[60] ^ s[59];
    return (s << 1) | 64'(fb);
  endfunction

  initial begin
    m16 = SEED; m1 = SEED;
    repeat (2) @(negedge clk);
    checks++;
    if (st16 !== SEED || st1 !== SEED) failures++;
    rst_n = 1;
    for (int c = 0; c < 300; c++) begin
      @(negedge clk);
      en = (c % 7 != 3);
      @(posedge clk); #1;
      if (en) begin
        for (int i = 0; i < 16; i++) m16 = step1(m16);
        m1 = step1(m1);
      end
      checks++;
      if (st16 !== m16 || st1 !== m1) failures++;
    end
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
