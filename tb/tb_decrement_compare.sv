// tb_decrement_compare: every 4-bit value is fed LSB first; after four bits
// sig_dec must equal value-1 (mod 16) and zero must be set only for value 0.
// Idle clocks between operands must not change the result.
module tb_decrement_compare;
  import morpho_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, start = 0, sig_in = 0;
  intensity_t sig_dec;
  logic zero;
  int checks = 0, failures = 0;

  decrement_compare dut (.*);
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
    for (int rep = 0; rep < 3; rep++)
      for (int v = 0; v < 16; v++) begin
        for (int b = 0; b < 4; b++) begin
          @(negedge clk);
          en = 1; start = (b == 0); sig_in = v[b];
        end
        @(negedge clk);
        en = 0; start = 0; sig_in = $urandom;
        repeat (rep) @(negedge clk);
        checks++;
        if (sig_dec != 4'(v - 1) || zero != (v == 0)) begin
          failures++;
          $display("FAIL: v=%0d sig_dec=%0d zero=%0b", v, sig_dec, zero);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
