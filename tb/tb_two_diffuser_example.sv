// tb_two_diffuser_example: the single-signal example organism with two diffusers.
//
// An 8-row x 7-column organism with diffusers of signal 0 in cells (3,3) and
// (7,6) and an expression table whose signal-0 fields are A, F, 3, 1 (entries
// 0..3, other signals 0). Expected values are the published snapshots of this
// example, typed in below: after 2 steps only the cells within Manhattan
// distance 2 of a diffuser are set (15, 14, 13 = F, E, D); after 15 steps
// every cell holds 15 minus its distance to the nearest diffuser. A cell
// holding D must express entry 1 (F is at Hamming distance 1). Functions of all
// cells are also checked against the reference model.
module tb_two_diffuser_example;
  import morpho_pkg::*;
  import morpho_ref_pkg::*;

  localparam int ROWS = 8;
  localparam int COLS = 7;

  logic clk = 0, rst_n = 0, load = 0;
  logic [NSIG-1:0] diffuser_cfg [ROWS][COLS];
  entry_t          table_cfg [N_ENTRY];
  func_t           func [ROWS][COLS];
  signal_t         sig [ROWS][COLS][NSIG];
  logic            developed;
  int checks = 0, failures = 0;

  morpho_array #(.ROWS(ROWS), .COLS(COLS)) dut (.*);
  always #5 clk = ~clk;

  // Published snapshots, row 0 first; '.' is an uninitialised cell.
  string t2  [ROWS] = '{".......", "...D...", "..DED..", ".DEFED.", "..DED..", "...D..D", ".....DE", "....DEF"};
  string t15 [ROWS] = '{"9ABCBA9", "ABCDCBA", "BCDEDCB", "CDEFEDC", "BCDEDCC", "ABCDCCD", "9ABCCDE", "9ABCDEF"};

  function automatic int hexval(byte ch);
    return (ch >= "A") ? ch - "A" + 10 : ch - "0";
  endfunction

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  morpho_model m;
  int n_d = 0;

  initial begin
    m = new(ROWS, COLS);
    foreach (diffuser_cfg[r, c]) diffuser_cfg[r][c] = '0;
    diffuser_cfg[3][3][0] = 1'b1;
    diffuser_cfg[7][6][0] = 1'b1;
    foreach (diffuser_cfg[r, c, s]) m.diff[r][c][s] = diffuser_cfg[r][c][s];
    table_cfg = '{16'h000A, 16'h000F, 16'h0003, 16'h0001};
    foreach (table_cfg[j]) m.tbl[j] = table_cfg[j];
    m.reset_state();
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); load <= 1;
    @(posedge clk); load <= 0;
    @(negedge clk);
    for (int t = 1; t <= N_STEPS; t++) begin
      repeat (MC_LEN * N_MC) @(negedge clk);
      m.step();
      if (t == 2 || t >= 15) begin
        foreach (sig[r, c]) begin
          byte ch;
          ch = (t == 2) ? t2[r][c] : t15[r][c];
          if (ch == ".")
            check(!sig[r][c][0].valid, $sformatf("t=%0d (%0d,%0d) should be unset", t, r, c));
          else
            check(sig[r][c][0].valid && sig[r][c][0].value == 4'(hexval(ch)),
                  $sformatf("t=%0d (%0d,%0d) got %0b/%h want %c", t, r, c,
                            sig[r][c][0].valid, sig[r][c][0].value, ch));
          check(func[r][c] == func_t'(m.func(r, c)),
                $sformatf("t=%0d (%0d,%0d) func %0d want %0d", t, r, c, func[r][c], m.func(r, c)));
          if (t == 15 && ch == "D") begin
            n_d++;
            check(func[r][c] == 1, $sformatf("D cell (%0d,%0d) expressed %0d", r, c, func[r][c]));
          end
        end
      end
    end
    check(developed, "not developed after 4096 clocks");
    check(n_d > 0, "no D cell seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
