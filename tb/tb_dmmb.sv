// tb_dmmb: writes every word of a small DMMB, then reads them back one per
// cycle while other words are being written, checking one-cycle read latency
// and that a read and write to the same word return the old contents.
module tb_dmmb;
  import qc_ldpc_pkg::*;
  localparam int V = 8, H = 4;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [2:0] raddr = '0, waddr = '0;
  logic we = 0;
  msg_t [H-1:0] rdata, wdata = '0;
  msg_t [H-1:0] model [V];

  dmmb #(.V(V), .H(H)) dut (.*);

  initial begin
    for (int a = 0; a < V; a++) begin
      @(negedge clk);
      we = 1; waddr = 3'(a);
      for (int l = 0; l < H; l++) wdata[l] = msg_t'($urandom);
      model[a] = wdata;
    end
    for (int rep = 0; rep < 40; rep++) begin
      int ra;
      msg_t [H-1:0] expect_d;
      @(negedge clk);
      ra = $urandom_range(0, V-1);
      raddr = 3'(ra);
      expect_d = model[ra];
      we = 1; waddr = (rep % 3 == 0) ? 3'(ra) : 3'($urandom);
      for (int l = 0; l < H; l++) wdata[l] = msg_t'($urandom);
      @(posedge clk); #1;
      model[waddr] = wdata;
      checks++;
      if (rdata !== expect_d) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
