// function_counter: index of the expression table entry under evaluation.
//
// Cleared while init=1 (the expression initialisation cycles) and advanced
// by one on each inc pulse (end of an EXPR-1 molecular cycle). Because the
// function of entry j is j, the counter value is also the candidate function
// that best_function stores when the entry is the best match so far.
module function_counter
  import morpho_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  init,
  input  logic  inc,
  output func_t fcn
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    fcn <= '0;
    else if (init) fcn <= '0;
    else if (inc)  fcn <= fcn + func_t'(1);
  end

endmodule
