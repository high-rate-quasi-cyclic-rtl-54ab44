// tb_cmmb: loads a small CMMB one message at a time through the lane mask
// (in scrambled order), then reads every word back and checks each lane,
// including one-cycle read latency.
module tb_cmmb;
  import qc_ldpc_pkg::*;
  localparam int V = 8, H = 4;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [2:0] addr = '0;
  logic we = 0;
  logic [H-1:0] lane_we = '0;
  msg_t [H-1:0] wdata = '0, rdata;
  msg_t model [V][H];

  cmmb #(.V(V), .H(H)) dut (.*);

  initial begin
    for (int n = 0; n < V*H; n++) begin
      int idx, a, l;
      idx = (n * 13) % (V*H);
      a = idx % V; l = idx / V;
      @(negedge clk);
      we = 1; addr = 3'(a); lane_we = H'(1) << l;
      model[a][l] = msg_t'($urandom);
      wdata = {H{model[a][l]}};
    end
    @(negedge clk); we = 0;
    for (int a = V-1; a >= 0; a--) begin
      addr = 3'(a);
      @(posedge clk); #1;
      for (int l = 0; l < H; l++) begin
        checks++;
        if (rdata[l] !== model[a][l]) failures++;
      end
      @(negedge clk);
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
