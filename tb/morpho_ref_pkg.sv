// morpho_ref_pkg: untimed reference model of morphogenetic development, for
// the testbenches.
//
// It applies the signalling rule step by step on a whole array (each
// uninitialised signal takes the first initialised neighbour's intensity,
// north, east, south, west, minus one, clamped at 0; diffusers and
// initialised signals never change) and computes each cell's function as the
// first table entry at minimum Hamming distance. It also counts how often
// each mechanism occurred, so a testbench can require that all of them were
// exercised.
package morpho_ref_pkg;

  class morpho_model;
    int rows, cols;
    bit diff [][][];   // [r][c][s]
    bit vld  [][][];
    int val  [][][];
    bit [15:0] tbl [4];

    // mechanism counters
    int n_init_from_nb;     // a signal took neighbour - 1
    int n_clamp;            // ... where the neighbour was 0
    int n_multi_nb;         // ... where several neighbours were valid
    int n_stay_invalid;     // no valid neighbour, stayed uninitialised
    int n_diffuser_kept;    // diffuser cell-signal kept at 15
    int n_func_nonzero;     // a cell expressed an entry other than 0
    int n_tie;              // minimum distance shared by several entries

    function new(int r, int c);
      rows = r; cols = c;
      diff = new[r]; vld = new[r]; val = new[r];
      foreach (diff[i]) begin
        diff[i] = new[c]; vld[i] = new[c]; val[i] = new[c];
        foreach (diff[i][j]) begin
          diff[i][j] = new[4]; vld[i][j] = new[4]; val[i][j] = new[4];
        end
      end
    endfunction

    function void reset_state();
      foreach (diff[r, c, s]) begin
        vld[r][c][s] = diff[r][c][s];
        val[r][c][s] = diff[r][c][s] ? 15 : 0;
      end
    endfunction

    function bit nb_ok(int r, int c);
      return r >= 0 && r < rows && c >= 0 && c < cols;
    endfunction

    // One synchronous signalling step.
    function void step();
      bit nv [][][];
      int nl [][][];
      int dr[4] = '{-1, 0, 1, 0};
      int dc[4] = '{0, 1, 0, -1};
      nv = new[rows]; nl = new[rows];
      foreach (nv[i]) begin
        nv[i] = new[cols]; nl[i] = new[cols];
        foreach (nv[i][j]) begin nv[i][j] = new[4]; nl[i][j] = new[4]; end
      end
      foreach (diff[r, c, s]) begin
        nv[r][c][s] = vld[r][c][s];
        nl[r][c][s] = val[r][c][s];
        if (diff[r][c][s]) n_diffuser_kept++;
        if (!diff[r][c][s] && !vld[r][c][s]) begin
          int found = 0;
          for (int k = 0; k < 4; k++) begin
            int rr = r + dr[k], cc = c + dc[k];
            if (nb_ok(rr, cc) && vld[rr][cc][s]) begin
              if (found == 0) begin
                nv[r][c][s] = 1;
                nl[r][c][s] = (val[rr][cc][s] == 0) ? 0 : val[rr][cc][s] - 1;
                n_init_from_nb++;
                if (val[rr][cc][s] == 0) n_clamp++;
              end
              found++;
            end
          end
          if (found > 1) n_multi_nb++;
          if (found == 0) n_stay_invalid++;
        end
      end
      vld = nv; val = nl;
    endfunction

    function bit [15:0] chem(int r, int c);
      bit [15:0] x;
      for (int s = 0; s < 4; s++) x[4*s +: 4] = 4'(val[r][c][s]);
      return x;
    endfunction

    function int func(int r, int c, bit count = 0);
      int best = 0, bd = 99, nmin = 0;
      for (int j = 0; j < 4; j++) begin
        int d = $countones(chem(r, c) ^ tbl[j]);
        if (d < bd) begin bd = d; best = j; nmin = 1; end
        else if (d == bd) nmin++;
      end
      if (count) begin
        if (best != 0) n_func_nonzero++;
        if (nmin > 1) n_tie++;
      end
      return best;
    endfunction
  endclass

endpackage
