// tb_barrel_shifter: drives every shift amount with random lane contents
// for an 8-lane and a 6-lane (not a power of two) shifter and checks that
// output lane l equals input lane (l + shift) mod H.
module tb_barrel_shifter;
  int checks = 0, failures = 0;

  logic [7:0][5:0] din8, dout8;
  logic [2:0]      sh8;
  logic [5:0][3:0] din6, dout6;
  logic [2:0]      sh6;

  barrel_shifter #(.H(8), .EW(6)) u8 (.din(din8), .shift(sh8), .dout(dout8));
  barrel_shifter #(.H(6), .EW(4)) u6 (.din(din6), .shift(sh6), .dout(dout6));

  initial begin
    for (int rep = 0; rep < 20; rep++) begin
      for (int s = 0; s < 8; s++) begin
        for (int l = 0; l < 8; l++) din8[l] = 6'($urandom);
        sh8 = 3'(s);
        #1;
        for (int l = 0; l < 8; l++) begin
          checks++;
          if (dout8[l] !== din8[(l + s) % 8]) failures++;
        end
      end
      for (int s = 0; s < 6; s++) begin
        for (int l = 0; l < 6; l++) din6[l] = 4'($urandom);
        sh6 = 3'(s);
        #1;
        for (int l = 0; l < 6; l++) begin
          checks++;
          if (dout6[l] !== din6[(l + s) % 6]) failures++;
        end
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
