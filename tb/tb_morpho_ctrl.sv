// tb_morpho_ctrl: checks every control signal of the sequencer against the
// per-molecular-cycle table of the timing diagram for two full steps, that
// dev_done rises exactly 4096 clocks after restart, and that a restart in
// the middle of a step returns the counters to zero.
module tb_morpho_ctrl;
  import morpho_pkg::*;
  logic clk = 0, rst_n = 0, restart = 0;
  ctrl_t ctrl;
  logic dev_done;
  int checks = 0, failures = 0;

  morpho_ctrl dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  task automatic check_cycle(int n);
    int mc = (n / 16) % 16, c = n % 16;
    check(ctrl.clk_idx == 4'(c) && ctrl.mc == 4'(mc), $sformatf("n=%0d counters %0d/%0d", n, ctrl.mc, ctrl.clk_idx));
    check(ctrl.s_f_n == (mc <= 4), $sformatf("n=%0d s_f_n", n));
    check(ctrl.pmrst == (mc == 5 || mc == 6), $sformatf("n=%0d pmrst", n));
    check(ctrl.pm15 == (mc == 15), $sformatf("n=%0d pm15", n));
    check(ctrl.pmeven == (mc % 2 == 1), $sformatf("n=%0d pmeven", n));
    check(ctrl.exprtblshift == (mc inside {6, 8, 10, 12}), $sformatf("n=%0d exprtblshift", n));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // run a while, then restart in the middle of a step
    repeat (300) @(posedge clk);
    restart <= 1;
    @(posedge clk); restart <= 0;
    for (int n = 0; n < 4096 + 600; n++) begin
      @(negedge clk);
      if (n < 512) check_cycle(n);
      check(dev_done == (n >= 4096), $sformatf("n=%0d dev_done=%0b", n, dev_done));
    end
    // restart clears dev_done
    restart <= 1;
    @(posedge clk); restart <= 0;
    @(negedge clk);
    check(!dev_done && ctrl.mc == 0 && ctrl.clk_idx == 0, "restart did not clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
