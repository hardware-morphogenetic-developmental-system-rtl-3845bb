// tb_input_select: random valid patterns are latched; the forwarded serial
// bit must follow the lowest-numbered valid link while the link bits change,
// and any_valid must report whether any link was valid at the latch.
module tb_input_select;
  import morpho_pkg::*;
  logic clk = 0, rst_n = 0, latch = 0;
  logic [3:0] in_q = '0;
  logic sig_out, any_valid;
  int checks = 0, failures = 0;

  input_select dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    logic [3:0] v;
    int exp_sel;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      v = 4'($urandom);
      in_q = v; latch = 1;
      exp_sel = 0;
      for (int i = 3; i >= 0; i--) if (v[i]) exp_sel = i;
      @(negedge clk);
      latch = 0;
      check(any_valid == (v != 0), $sformatf("any_valid for %b", v));
      for (int b = 0; b < 6; b++) begin
        in_q = 4'($urandom);
        #1;
        check(sig_out == in_q[exp_sel], $sformatf("valid %b link %0d bit", v, exp_sel));
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
