// tb_normalize: exhaustive check of the signalling rule over the stored
// signal, the diffuser flag, any_valid, the decremented value and the
// below-zero flag (2 x 16 x 2 x 2 x 16 x 2 combinations).
module tb_normalize;
  import morpho_pkg::*;
  signal_t prev, next, exp_next;
  logic diff, any_valid, zero;
  intensity_t sig_dec;
  int checks = 0, failures = 0;
  logic clk = 0;

  normalize dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2 * 16 * 2 * 2 * 16 * 2; i++) begin
      {prev.valid, prev.value, diff, any_valid, sig_dec, zero} = 12'(i);
      #1;
      if (diff || prev.valid)  exp_next = prev;
      else if (!any_valid)     exp_next = '{valid: 0, value: 0};
      else if (zero)           exp_next = '{valid: 1, value: 0};
      else                     exp_next = '{valid: 1, value: sig_dec};
      checks++;
      if (next !== exp_next) begin
        failures++;
        if (failures < 20) $display("FAIL: i=%0d next=%p want %p", i, next, exp_next);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
