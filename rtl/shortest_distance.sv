// shortest_distance: shortest Hamming distance found in this expression pass.
//
// init=1 sets it to the largest representable value (31), above any real
// distance (at most 16), so the first entry always becomes the best. On an upd
// pulse (first clock of an EXPR-1 cycle) it takes dist_in if compare_distance
// found the new distance strictly shorter (a_gt_b).
module shortest_distance
  import morpho_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  init,
  input  logic  upd,
  input  logic  a_gt_b,
  input  dist_t dist_in,
  output dist_t dist_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                dist_out <= '1;
    else if (init)             dist_out <= '1;
    else if (upd && a_gt_b)    dist_out <= dist_in;
  end

endmodule
