// tb_best_function: random init/upd/a_gt_b/expend sequences against a model:
// best takes fcn_in on upd with a_gt_b and clears on init; func_out changes
// only on expend, to the best value before that clock.
module tb_best_function;
  import morpho_pkg::*;
  logic clk = 0, rst_n = 0, init = 0, upd = 0, a_gt_b = 0, expend = 0;
  func_t fcn_in = '0, best, func_out;
  int m_best = 0, m_out = 0, checks = 0, failures = 0;

  best_function dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 1500; t++) begin
      @(negedge clk);
      init   = ($urandom_range(9) == 0);
      upd    = $urandom;
      a_gt_b = $urandom;
      expend = ($urandom_range(5) == 0);
      fcn_in = func_t'($urandom);
      if (expend) m_out = m_best;
      if (init) m_best = 0; else if (upd && a_gt_b) m_best = fcn_in;
      @(negedge clk);
      init = 0; upd = 0; expend = 0;
      checks++;
      if (best != func_t'(m_best) || func_out != func_t'(m_out)) begin
        failures++;
        if (failures < 20) $display("FAIL: t=%0d best=%0d/%0d out=%0d/%0d", t, best, m_best, func_out, m_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
