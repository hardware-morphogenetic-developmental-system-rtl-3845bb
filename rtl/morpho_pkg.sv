// morpho_pkg: constants and types shared by the morphogenetic element.
//
// The development hardware works in "molecular cycles" of 16 clocks (one full
// rotation of a 16-bit shift memory). A developmental step is 16 molecular
// cycles and complete development is 16 steps, i.e. 4096 clocks. Four signal
// (chemical) types with 4-bit intensities, and an expression table of four
// 16-bit entries selecting one of four cell functions, are the sizes of the
// original design. The struct and control-bundle layouts are this design's own.
package morpho_pkg;

  localparam int NSIG      = 4;             // signal (chemical) types
  localparam int SIG_W     = 4;             // intensity width
  localparam int CHEM_W    = NSIG * SIG_W;  // 16 bits: one table entry
  localparam int MC_LEN    = 16;            // clocks per molecular cycle
  localparam int N_MC      = 16;            // molecular cycles per step
  localparam int N_STEPS   = 16;            // steps for complete development
  localparam int N_ENTRY   = 4;             // expression table entries
  localparam int FUNC_W    = 2;             // cell function (entry index) width
  localparam int DIST_W    = 5;             // Hamming distance 0..16
  localparam int NNEIGH    = 4;             // neighbour inputs: 0 N, 1 E, 2 S, 3 W

  localparam logic [SIG_W-1:0] SIG_MAX = '1;   // diffuser intensity, 15

  typedef logic [SIG_W-1:0]  intensity_t;
  typedef logic [CHEM_W-1:0] entry_t;       // {T4, T3, T2, T1}, T1 in bits 3:0
  typedef logic [FUNC_W-1:0] func_t;
  typedef logic [DIST_W-1:0] dist_t;

  // One signal as held in the diffusion memory.
  typedef struct packed {
    logic       valid;   // intensity is initialised
    intensity_t value;
  } signal_t;

  // Control bundle produced by morpho_ctrl (names after the timing diagram).
  typedef struct packed {
    logic [3:0] clk_idx;      // clock within the molecular cycle, 0..15
    logic [3:0] mc;           // molecular cycle within the step, 0..15
    logic       s_f_n;        // 1: signalling (I/O and diffusion), 0: expression
    logic       pmrst;        // expression initialisation (EXPR-0-R, EXPR-1-R)
    logic       pm15;         // last molecular cycle (EXPREND)
    logic       pmeven;       // 1: EXPR-0 phase, 0: EXPR-1 phase
    logic       exprtblshift; // expression table rotates
  } ctrl_t;

endpackage
