// dmmb: decoding message memory block. Holds the p decoding messages that
// belong to the ones of one permutation matrix of a circulant, folded into
// v words of h = p/v messages: word a holds messages x_a, x_(a+v), ...,
// x_(a+(h-1)v), where x_c is the message on the one in column c.
//
// Dual-port RAM with one port always reading and one always writing, as the
// decoder architecture prescribes. The read is synchronous (data one cycle
// after the address), which is the single pipeline stage between the memory
// output and input of this design; the write address is that read address
// delayed by one cycle (generated in dmmb_group). A read and a write to the
// same word in the same cycle return the old contents.
module dmmb
  import qc_ldpc_pkg::*;
#(
  parameter int V = 32,   // words
  parameter int H = 8,    // messages per word
  parameter int A_W = (V > 1) ? $clog2(V) : 1
) (
  input  logic              clk,
  input  logic [A_W-1:0]    raddr,
  output msg_t [H-1:0]      rdata,
  input  logic              we,
  input  logic [A_W-1:0]    waddr,
  input  msg_t [H-1:0]      wdata
);

  msg_t [H-1:0] mem [V];

  always_ff @(posedge clk) begin
    rdata <= mem[raddr];
    if (we) mem[waddr] <= wdata;
  end

endmodule
