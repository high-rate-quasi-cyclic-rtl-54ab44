// sector_err_counter: error statistics of the simulator. For each sector it
// counts the decoded bits that differ from the transmitted codeword, K bits
// per cycle as the decoder streams them out; 'frame_start' clears the count
// of the current decoding pass. 'commit' closes the sector: the sector count
// increases, the bit errors of the last pass are added to the total, and the
// sector error count increases if any bit was wrong. 'clear_all' clears the
// totals. frame_errs is valid the cycle after the last compare. Counting
// sector errors is what the simulator is for; the counter widths and this
// interface are this design's choices.
module sector_err_counter #(
  parameter int K = 144
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear_all,
  input  logic         frame_start,
  input  logic         cmp_valid,
  input  logic [K-1:0] dec_bits,
  input  logic [K-1:0] ref_bits,
  input  logic         commit,
  output logic [31:0]  frame_errs,
  output logic [31:0]  sectors,
  output logic [31:0]  sector_errs,
  output logic [31:0]  bit_errs
);

  logic [31:0] diff_cnt;
  always_comb begin
    diff_cnt = '0;
    for (int i = 0; i < K; i++) diff_cnt += 32'(dec_bits[i] ^ ref_bits[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame_errs  <= '0;
      sectors     <= '0;
      sector_errs <= '0;
      bit_errs    <= '0;
    end else begin
      if (clear_all) begin
        sectors     <= '0;
        sector_errs <= '0;
        bit_errs    <= '0;
      end else if (commit) begin
        sectors  <= sectors + 1;
        bit_errs <= bit_errs + frame_errs;
        if (frame_errs != 0) sector_errs <= sector_errs + 1;
      end
      if (frame_start)    frame_errs <= '0;
      else if (cmp_valid) frame_errs <= frame_errs + diff_cnt;
    end
  end

endmodule
