// tb_morpho_element: one element with four modelled neighbours.
//
// The testbench plays the four neighbours: each developmental step it draws
// random neighbour signals (valid with probability 1/2, random intensity, a
// few zero intensities) and sends them on the serial links in the element's
// frame format and timing (frame bit c of molecular cycle k during clock
// 16k + c + 1). After every step it checks, against its own model of the
// signalling rule and of minimum-Hamming-distance expression, the stored
// signals, the Function output (updated at clock 240 of the step) and the
// element's own transmitted frames. Each run loads a random genome.
module tb_morpho_element;
  import morpho_pkg::*;
  logic clk = 0, rst_n = 0, load = 0;
  logic [NSIG-1:0] diffuser_cfg = '0;
  entry_t table_cfg [N_ENTRY];
  logic [3:0] nb_in = '0;
  logic sig_out, dev_done;
  func_t func_out;
  signal_t sig [NSIG];
  int checks = 0, failures = 0;

  morpho_element dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20 * 16 * 256 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  // model state
  bit mv [4]; int ml [4];
  bit nv [4][4]; int nl [4][4];   // [neighbour][signal]
  int n_clamp = 0, n_nb = 0, n_func = 0;

  function automatic bit [15:0] frame(bit v, int l);
    return {11'b0, 4'(l), v};
  endfunction

  function automatic int exp_func();
    int best = 0, bd = 99;
    bit [15:0] x;
    for (int s = 0; s < 4; s++) x[4*s +: 4] = 4'(ml[s]);
    for (int j = 0; j < 4; j++)
      if ($countones(x ^ table_cfg[j]) < bd) begin bd = $countones(x ^ table_cfg[j]); best = j; end
    return best;
  endfunction

  initial begin
    bit [15:0] own [4];
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int run = 0; run < 20; run++) begin
      @(negedge clk);
      diffuser_cfg = 4'($urandom) & 4'($urandom);
      foreach (table_cfg[j]) table_cfg[j] = 16'($urandom);
      for (int s = 0; s < 4; s++) begin
        mv[s] = diffuser_cfg[s]; ml[s] = diffuser_cfg[s] ? 15 : 0;
      end
      load = 1;
      @(negedge clk);          // clock 0 of step 0 follows this edge
      load = 0;
      for (int t = 0; t < 16; t++) begin
        for (int i = 0; i < 4; i++)
          for (int s = 0; s < 4; s++) begin
            nv[i][s] = $urandom_range(1);
            nl[i][s] = ($urandom_range(5) == 0) ? 0 : $urandom_range(15);
          end
        for (int s = 0; s < 4; s++) own[s] = frame(mv[s], ml[s]);
        // 256 clocks of the step; the clock index is n
        for (int n = 0; n < 256; n++) begin
          int p, k, c;
          p = n - 1;
          k = (p >= 0) ? p / 16 : 15;
          c = (p >= 0) ? p % 16 : 15;
          for (int i = 0; i < 4; i++) begin
            bit [15:0] f;
            f = (k < 4) ? frame(nv[i][k], nl[i][k]) : 16'h0;
            nb_in[i] = f[c];
          end
          if (n >= 1 && n <= 64)
            check(sig_out == ((k < 4) ? own[k][c] : 1'b0),
                  $sformatf("run %0d step %0d clock %0d: sig_out", run, t, n));
          @(negedge clk);
        end
        // model of the step
        for (int s = 0; s < 4; s++)
          if (!mv[s]) begin
            for (int i = 0; i < 4; i++)
              if (nv[i][s]) begin
                mv[s] = 1; ml[s] = (nl[i][s] == 0) ? 0 : nl[i][s] - 1;
                n_nb++; if (nl[i][s] == 0) n_clamp++;
                break;
              end
          end
        for (int s = 0; s < 4; s++)
          check(sig[s].valid == mv[s] && sig[s].value == 4'(ml[s]),
                $sformatf("run %0d step %0d signal %0d: %0b/%0d want %0b/%0d", run, t, s,
                          sig[s].valid, sig[s].value, mv[s], ml[s]));
        check(func_out == func_t'(exp_func()),
              $sformatf("run %0d step %0d: func %0d want %0d", run, t, func_out, exp_func()));
        if (exp_func() != 0) n_func++;
      end
      check(dev_done, $sformatf("run %0d: dev_done not set after 16 steps", run));
    end
    check(n_clamp > 0 && n_nb > 0 && n_func > 0, "mechanisms not all exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
