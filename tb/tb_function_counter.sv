// tb_function_counter: random init/inc sequences checked against a model
// counter modulo 4; init has priority over inc.
module tb_function_counter;
  import morpho_pkg::*;
  logic clk = 0, rst_n = 0, init = 0, inc = 0;
  func_t fcn;
  int model = 0, checks = 0, failures = 0;

  function_counter dut (.*);
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
    @(negedge clk);
    init = 1; model = 0;
    @(negedge clk);
    for (int t = 0; t < 1000; t++) begin
      init = ($urandom_range(15) == 0);
      inc  = $urandom;
      if (init) model = 0; else if (inc) model = (model + 1) % 4;
      @(negedge clk);
      checks++;
      if (fcn != func_t'(model)) begin
        failures++;
        if (failures < 20) $display("FAIL: t=%0d fcn=%0d want %0d", t, fcn, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
