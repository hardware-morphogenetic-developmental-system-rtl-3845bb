// morpho_ctrl: sequencer of one morphogenetic element.
//
// A free-running 8-bit counter splits into the clock index inside a molecular
// cycle (low nibble) and the molecular cycle inside the developmental step
// (high nibble). The control signals are decoded from the molecular cycle
// following the per-cycle sequence of operations of the original timing
// diagram:
//   MC 0..4   s_f_n=1   I/O in MC 0..3, diffusion update in MC 1..4
//   MC 5,6    pmrst=1   EXPR-0-R / EXPR-1-R, initialise the search
//   MC 7..14  alternating EXPR-0 (odd MC, pmeven=1) and EXPR-1 (even MC)
//   MC 15     pm15=1    EXPREND, the best entry goes to the Function output
// exprtblshift is high in the EXPR-1 cycles 6, 8, 10 and 12, where the
// Hamming distance against table entries 0..3 is computed; four 16-clock
// shifts bring the 64-bit table back to its start for the next step.
// In the original the control lines are rotating memory molecules; here they
// are decoded from the counter, which gives the same waveforms. The polarity
// of pmeven (high in EXPR-0) and the step counter with dev_done are this
// design's choices.
//
// Timing: restart (synchronous) sets both counters to zero, so the next clock
// is clock 0 of molecular cycle 0 of step 0. dev_done rises after 16 complete
// steps (4096 clocks) and stays high while the element keeps running.
module morpho_ctrl
  import morpho_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  restart,
  output ctrl_t ctrl,
  output logic  dev_done
);

  logic [7:0] cyc;
  logic [4:0] step;   // saturates at N_STEPS

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc  <= '0;
      step <= '0;
    end else if (restart) begin
      cyc  <= '0;
      step <= '0;
    end else begin
      cyc <= cyc + 8'd1;
      if (cyc == 8'hFF && step != 5'(N_STEPS)) step <= step + 5'd1;
    end
  end

  always_comb begin
    ctrl.clk_idx      = cyc[3:0];
    ctrl.mc           = cyc[7:4];
    ctrl.s_f_n        = (cyc[7:4] <= 4'd4);
    ctrl.pmrst        = (cyc[7:4] == 4'd5) || (cyc[7:4] == 4'd6);
    ctrl.pm15         = (cyc[7:4] == 4'd15);
    ctrl.pmeven       = cyc[4];
    ctrl.exprtblshift = (cyc[7:4] == 4'd6) || (cyc[7:4] == 4'd8) ||
                        (cyc[7:4] == 4'd10) || (cyc[7:4] == 4'd12);
  end

  assign dev_done = (step == 5'(N_STEPS));

endmodule
