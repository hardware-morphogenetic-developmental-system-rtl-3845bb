// tb_expression_table: loads a random table, then shifts for 4 x 16 clocks
// and checks that out streams entry 0..3, each LSB first; a pause with
// shift=0 must hold the position, and after 64 shifts the table must stream
// entry 0 again.
module tb_expression_table;
  import morpho_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, shift = 0, out;
  entry_t table_cfg [N_ENTRY];
  int checks = 0, failures = 0;

  expression_table dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int run = 0; run < 10; run++) begin
      @(negedge clk);
      foreach (table_cfg[j]) table_cfg[j] = 16'($urandom);
      load = 1;
      @(negedge clk);
      load = 0;
      for (int pass = 0; pass < 2; pass++)
        for (int i = 0; i < 64; i++) begin
          checks++;
          if (out !== table_cfg[i / 16][i % 16]) begin
            failures++;
            if (failures < 20) $display("FAIL: run %0d bit %0d", run, i);
          end
          if (i % 16 == 7) repeat (3) @(negedge clk);   // shift=0: hold
          shift = 1;
          @(negedge clk);
          shift = 0;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
