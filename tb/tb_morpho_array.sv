// tb_morpho_array: full-size test of the organism at its default 3 x 3 size.
//
// Eight runs with random genomes (diffuser flags with about 1 in 12
// probability per cell and signal, plus one fixed diffuser of signal 0 in
// cell (0,0), random expression table), each one complete development of
// 4096 clocks. After every developmental step all stored signals and cell
// functions are compared with the reference model, and developed must rise
// exactly 4096 clocks after load. Only the below-zero clamp cannot occur in
// a 3 x 3 array, so it is not required here (see tb_morpho_array_e2e).
module tb_morpho_array;
  import morpho_pkg::*;
  import morpho_ref_pkg::*;

  localparam int ROWS = 3;
  localparam int COLS = 3;
  localparam int RUNS = 8;

  logic clk = 0, rst_n = 0, load = 0;
  logic [NSIG-1:0] diffuser_cfg [ROWS][COLS];
  entry_t          table_cfg [N_ENTRY];
  func_t           func [ROWS][COLS];
  signal_t         sig [ROWS][COLS][NSIG];
  logic            developed;

  int checks = 0, failures = 0;

  morpho_array dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (RUNS * 4500 + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  morpho_model m;
  int n_done_seen = 0;

  initial begin
    m = new(ROWS, COLS);
    foreach (diffuser_cfg[r, c]) diffuser_cfg[r][c] = '0;
    foreach (table_cfg[j]) table_cfg[j] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int run = 0; run < RUNS; run++) begin
      foreach (diffuser_cfg[r, c])
        for (int s = 0; s < NSIG; s++) begin
          diffuser_cfg[r][c][s] = ($urandom_range(11) == 0);
          m.diff[r][c][s] = diffuser_cfg[r][c][s];
        end
      diffuser_cfg[0][0][0] = 1'b1; m.diff[0][0][0] = 1;
      foreach (table_cfg[j]) begin
        table_cfg[j] = 16'($urandom);
        m.tbl[j] = table_cfg[j];
      end
      m.reset_state();
      @(posedge clk); load <= 1;
      @(posedge clk); load <= 0;
      @(negedge clk);
      for (int t = 1; t <= N_STEPS + 1; t++) begin
        repeat (MC_LEN * N_MC - ((t == N_STEPS) ? 1 : 0)) @(negedge clk);
        if (t == N_STEPS) begin
          check(!developed, $sformatf("run %0d: developed early", run));
          @(negedge clk);
        end
        m.step();
        check(developed == (t >= N_STEPS), $sformatf("run %0d step %0d: developed=%0b", run, t, developed));
        if (developed) n_done_seen++;
        foreach (sig[r, c, s]) begin
          check(sig[r][c][s].valid == m.vld[r][c][s] && sig[r][c][s].value == 4'(m.val[r][c][s]),
                $sformatf("run %0d step %0d cell (%0d,%0d) sig %0d: got %0b/%h want %0b/%h", run, t, r, c, s,
                          sig[r][c][s].valid, sig[r][c][s].value, m.vld[r][c][s], m.val[r][c][s]));
        end
        foreach (func[r, c])
          check(func[r][c] == func_t'(m.func(r, c, t == N_STEPS)),
                $sformatf("run %0d step %0d cell (%0d,%0d): func %0d want %0d", run, t, r, c,
                          func[r][c], m.func(r, c)));
      end
    end
    $display("mechanisms: from_nb=%0d clamp=%0d multi_nb=%0d stay_invalid=%0d diffuser=%0d func_nonzero=%0d tie=%0d developed=%0d",
             m.n_init_from_nb, m.n_clamp, m.n_multi_nb, m.n_stay_invalid, m.n_diffuser_kept,
             m.n_func_nonzero, m.n_tie, n_done_seen);
    check(m.n_init_from_nb > 0, "no neighbour initialisation");
    check(m.n_multi_nb > 0, "no multi-neighbour selection");
    check(m.n_stay_invalid > 0, "no cell stayed uninitialised");
    check(m.n_diffuser_kept > 0, "no diffuser");
    check(m.n_func_nonzero > 0, "no non-zero function expressed");
    check(m.n_tie > 0, "no tie in the expression table");
    check(n_done_seen > 0, "developed never seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
