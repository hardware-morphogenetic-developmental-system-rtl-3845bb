// tb_shortest_distance: init must give 31; an upd pulse with a_gt_b must
// take dist_in, without a_gt_b or without upd the value must hold.
module tb_shortest_distance;
  import morpho_pkg::*;
  logic clk = 0, rst_n = 0, init = 0, upd = 0, a_gt_b = 0;
  dist_t dist_in = '0, dist_out;
  int model = 31, checks = 0, failures = 0;

  shortest_distance dut (.*);
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
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      init    = ($urandom_range(9) == 0);
      upd     = $urandom;
      a_gt_b  = $urandom;
      dist_in = dist_t'($urandom_range(16));
      if (init) model = 31; else if (upd && a_gt_b) model = dist_in;
      @(negedge clk);
      init = 0; upd = 0;
      checks++;
      if (dist_out != dist_t'(model)) begin
        failures++;
        if (failures < 20) $display("FAIL: t=%0d got %0d want %0d", t, dist_out, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
