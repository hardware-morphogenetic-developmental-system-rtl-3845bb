// tb_diffusion_memory: load must set diffused signals to valid 15 and the
// others to invalid 0; random writes must land in the addressed signal only;
// the serial chemical stream must give bit (i mod 4) of signal (i / 4) at
// index i. Checked against a shadow copy.
module tb_diffusion_memory;
  import morpho_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, wr_en = 0;
  logic [3:0] diffuser_cfg = '0, diff, bit_idx = '0;
  logic [1:0] wr_idx = '0;
  signal_t wr_data = '0, sig [NSIG], shadow [NSIG];
  logic chem_bit;
  int checks = 0, failures = 0;

  diffusion_memory dut (.*);
  always #50 clk = ~clk;

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

  task automatic compare(string when);
    for (int s = 0; s < NSIG; s++)
      check(sig[s] == shadow[s], $sformatf("%s: signal %0d %p want %p", when, s, sig[s], shadow[s]));
    check(diff == diffuser_cfg, $sformatf("%s: diff %b", when, diff));
    for (int i = 0; i < 16; i++) begin
      bit_idx = 4'(i);
      #1;
      check(chem_bit == shadow[i / 4].value[i % 4], $sformatf("%s: chem bit %0d", when, i));
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int run = 0; run < 20; run++) begin
      @(negedge clk);
      diffuser_cfg = 4'($urandom);
      load = 1;
      for (int s = 0; s < NSIG; s++)
        shadow[s] = diffuser_cfg[s] ? '{valid: 1, value: 15} : '{valid: 0, value: 0};
      @(negedge clk);
      load = 0;
      compare("after load");
      for (int w = 0; w < 20; w++) begin
        wr_en = ($urandom_range(3) != 0);
        wr_idx = 2'($urandom);
        wr_data = 5'($urandom);
        if (wr_en) shadow[wr_idx] = wr_data;
        @(negedge clk);
        wr_en = 0;
        compare("after write");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
