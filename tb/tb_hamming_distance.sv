// tb_hamming_distance: random 16-bit pairs are streamed one bit per clock;
// the result must equal the population count of their XOR. Disabled clocks
// between operands must hold the result.
module tb_hamming_distance;
  import morpho_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, first = 0, a = 0, b = 0;
  dist_t dist_q;
  int checks = 0, failures = 0;

  hamming_distance dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] x, y;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 300; t++) begin
      x = 16'($urandom); y = 16'($urandom);
      if (t == 0) y = ~x;   // maximum distance 16
      if (t == 1) y = x;    // distance 0
      for (int i = 0; i < 16; i++) begin
        @(negedge clk);
        en = 1; first = (i == 0); a = x[i]; b = y[i];
      end
      @(negedge clk);
      en = 0; a = $urandom; b = $urandom;
      repeat (t % 3) @(negedge clk);
      checks++;
      if (dist_q != dist_t'($countones(x ^ y))) begin
        failures++;
        if (failures < 20) $display("FAIL: %h %h got %0d", x, y, dist_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
