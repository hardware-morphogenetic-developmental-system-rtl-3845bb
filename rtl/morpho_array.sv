// morpho_array: a ROWS x COLS organism of morphogenetic elements.
//
// Every element runs the same developmental program in lock step. The
// evolved genome is the set of diffuser positions (diffuser_cfg, four flags
// per cell: which signals the cell diffuses) and the expression table
// (table_cfg, shared by all cells). After load the signals spread one cell
// per developmental step, their intensity falling by one per step of
// Manhattan distance from the nearest diffuser, and each cell picks the table
// entry closest in Hamming distance to its four intensities. Complete
// development takes 16 steps of 256 clocks, 4096 clocks whatever the array
// size; developed then rises and func holds each cell's function.
//
// Each element's serial output goes to its four neighbours; border elements
// see absent neighbours as uninitialised. In the original the links are built
// at run time by the dynamic routing layer of the platform; here they are
// fixed wires. The default 3 x 3 size is that of the original's example
// array; ROWS and COLS may be set freely.
//
// Interface: load is a synchronous one-clock pulse that reloads the genome
// and restarts development; func[r][c] and sig[r][c] are cell (r, c)'s
// function and stored signals, row 0 at the north, column 0 at the west.
module morpho_array
  import morpho_pkg::*;
#(
  parameter int ROWS = 3,
  parameter int COLS = 3
)(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            load,
  input  logic [NSIG-1:0] diffuser_cfg [ROWS][COLS],
  input  entry_t          table_cfg [N_ENTRY],
  output func_t           func [ROWS][COLS],
  output signal_t         sig [ROWS][COLS][NSIG],
  output logic            developed
);

  logic link [ROWS][COLS];
  logic done [ROWS][COLS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam logic [NNEIGH-1:0] PRES = {c > 0, r < ROWS - 1, c < COLS - 1, r > 0};
      logic [NNEIGH-1:0] nb;
      assign nb[0] = (r > 0)        ? link[(r > 0) ? r - 1 : 0][c] : 1'b0;
      assign nb[1] = (c < COLS - 1) ? link[r][(c < COLS - 1) ? c + 1 : c] : 1'b0;
      assign nb[2] = (r < ROWS - 1) ? link[(r < ROWS - 1) ? r + 1 : r][c] : 1'b0;
      assign nb[3] = (c > 0)        ? link[r][(c > 0) ? c - 1 : 0] : 1'b0;

      morpho_element #(.PRESENT(PRES)) u_elem (
        .clk, .rst_n, .load,
        .diffuser_cfg(diffuser_cfg[r][c]),
        .table_cfg,
        .nb_in(nb),
        .sig_out(link[r][c]),
        .func_out(func[r][c]),
        .sig(sig[r][c]),
        .dev_done(done[r][c])
      );
    end
  end

  // All elements are restarted together, so any one's flag tells the time.
  assign developed = done[0][0];

endmodule
