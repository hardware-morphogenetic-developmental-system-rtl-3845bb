// tb_compare_distance: for random and all-equal distance pairs, one enabled
// 16-clock cycle must leave a_gt_b = (a > b) and dist_q = b.
module tb_compare_distance;
  import morpho_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, a_gt_b;
  logic [3:0] bit_idx = '0;
  dist_t a = '0, b = '0, dist_q;
  int checks = 0, failures = 0;

  compare_distance dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 1024 + 200; t++) begin
      if (t < 1024) {a, b} = 10'(t);
      else begin a = dist_t'($urandom); b = dist_t'($urandom); end
      for (int i = 0; i < 16; i++) begin
        @(negedge clk);
        en = 1; bit_idx = 4'(i);
      end
      @(negedge clk);
      en = 0;
      checks++;
      if (a_gt_b != (a > b) || dist_q != b) begin
        failures++;
        if (failures < 20) $display("FAIL: a=%0d b=%0d gt=%0b dist_q=%0d", a, b, a_gt_b, dist_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
