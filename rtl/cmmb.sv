// cmmb: channel message memory block. Holds the p channel messages of one
// group of p consecutive variable nodes, folded like a DMMB: word a holds
// c_a, c_(a+v), ..., c_(a+(h-1)v).
//
// Single-port RAM: one address serves either a write or a read in a cycle.
// Writes carry a lane mask so that the messages of a sector can be loaded
// one at a time as the detector produces them. Reads are synchronous (data
// one cycle after the address), matching the DMMB read timing so that the
// channel message reaches the VNU in the same cycle as the check messages.
module cmmb
  import qc_ldpc_pkg::*;
#(
  parameter int V = 32,
  parameter int H = 8,
  parameter int A_W = (V > 1) ? $clog2(V) : 1
) (
  input  logic           clk,
  input  logic [A_W-1:0] addr,
  input  logic           we,
  input  logic [H-1:0]   lane_we,
  input  msg_t [H-1:0]   wdata,
  output msg_t [H-1:0]   rdata
);

  msg_t [H-1:0] mem [V];

  always_ff @(posedge clk) begin
    if (we) begin
      for (int l = 0; l < H; l++)
        if (lane_we[l]) mem[addr][l] <= wdata[l];
    end else begin
      rdata <= mem[addr];
    end
  end

endmodule
