// best_function: best-matching entry and the element's Function output.
//
// best is cleared while init=1 and, on an upd pulse with a_gt_b set, takes the
// function counter value: the index of the entry that has just beaten the
// shortest distance. On the expend pulse (EXPREND, first clock of the last
// molecular cycle) best is copied to func_out, the output that tells the
// phenotype layer which of the four cell functions to take. func_out changes
// only there, once per developmental step, and keeps its value otherwise.
module best_function
  import morpho_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  init,
  input  logic  upd,
  input  logic  a_gt_b,
  input  func_t fcn_in,
  input  logic  expend,
  output func_t best,
  output func_t func_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best     <= '0;
      func_out <= '0;
    end else begin
      if (init)                best <= '0;
      else if (upd && a_gt_b)  best <= fcn_in;
      if (expend)              func_out <= best;
    end
  end

endmodule
