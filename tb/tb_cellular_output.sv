// tb_cellular_output: with random stored signals, steps through the 256
// clocks of a developmental step and checks the line one clock after each
// frame position: valid bit at position 0, intensity LSB first at 1..4 and
// zeros elsewhere in molecular cycles 0..3, zero in cycles 4..15.
module tb_cellular_output;
  import morpho_pkg::*;
  logic clk = 0, rst_n = 0, out;
  logic [3:0] mc = '0, clk_idx = '0;
  signal_t sig [NSIG];
  int checks = 0, failures = 0;

  cellular_output dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (8000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expected;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int run = 0; run < 10; run++) begin
      for (int s = 0; s < NSIG; s++) sig[s] = 5'($urandom);
      sig[run % 4].valid = 1'b1;
      for (int n = 0; n < 256; n++) begin
        @(negedge clk);
        mc = 4'(n / 16); clk_idx = 4'(n % 16);
        if (n / 16 >= 4)          expected = 0;
        else if (n % 16 == 0)     expected = sig[n / 16].valid;
        else if (n % 16 <= 4)     expected = sig[n / 16].value[n % 16 - 1];
        else                      expected = 0;
        @(negedge clk);   // registered: visible one clock later
        checks++;
        if (out !== expected) begin
          failures++;
          if (failures < 20) $display("FAIL: run %0d pos %0d out=%b want %b", run, n, out, expected);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
