// hamming_distance: bit-serial Hamming distance.
//
// The cell's chemical stream (a) and a table entry (b) arrive one bit per
// clock over a molecular cycle. While en=1 the block counts the positions
// where they differ; first=1 marks the first bit and restarts the count.
// After 16 bits dist_q holds the distance, 0..16, summed over the four 4-bit
// signals as the matching rule prescribes. dist_q holds its value while en=0.
module hamming_distance
  import morpho_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  first,
  input  logic  a,
  input  logic  b,
  output dist_t dist_q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  dist_q <= '0;
    else if (en) dist_q <= (first ? dist_t'(0) : dist_q) + {{(DIST_W-1){1'b0}}, a ^ b};
  end

endmodule
