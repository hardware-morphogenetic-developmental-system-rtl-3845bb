// compare_distance: bit-serial magnitude comparison of two distances.
//
// During an EXPR-0 molecular cycle (en=1) the shortest distance so far (a)
// and the new Hamming distance (b) are scanned LSB first, bit bit_idx at clock
// bit_idx for bit_idx < DIST_W. A flag flip-flop keeps "a > b so far": a bit
// where the two differ overrides it with that bit of a, so after the MSB it
// holds a > b. first=1 (bit 0) clears it. a_gt_b means the new entry is a
// strictly better match; on equal distances the earlier entry is kept (this
// design's choice). On the last clock of the cycle the distance is copied to
// dist_q (the original's DistBuffer), from where the shortest-distance register
// takes it in the next EXPR-1 cycle.
module compare_distance
  import morpho_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [3:0] bit_idx,
  input  dist_t      a,
  input  dist_t      b,
  output logic       a_gt_b,
  output dist_t      dist_q
);

  logic abit, bbit, gt_prev;

  always_comb begin
    abit    = (bit_idx < 4'(DIST_W)) ? a[bit_idx[2:0]] : 1'b0;
    bbit    = (bit_idx < 4'(DIST_W)) ? b[bit_idx[2:0]] : 1'b0;
    gt_prev = (bit_idx == 4'd0) ? 1'b0 : a_gt_b;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_gt_b <= 1'b0;
      dist_q <= '0;
    end else if (en) begin
      a_gt_b <= (abit != bbit) ? abit : gt_prev;
      if (bit_idx == 4'(MC_LEN - 1)) dist_q <= b;
    end
  end

endmodule
