// tb_cellular_input: random link bits must appear one clock later, with the
// link of the absent neighbour (PRESENT = 4'b1101, east missing) forced to 0.
module tb_cellular_input;
  import morpho_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] in, in_q, prev;
  int checks = 0, failures = 0;

  cellular_input #(.PRESENT(4'b1101)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    for (int i = 0; i < 500; i++) begin
      prev = in;
      in = 4'($urandom);
      @(negedge clk);
      checks++;
      if (in_q !== (in & 4'b1101)) begin
        failures++;
        $display("FAIL: in=%b in_q=%b", in, in_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
