// input_select: choose one initialised neighbour signal.
//
// The signalling rule takes "the value of any initialized signal in a
// neighbouring cell". On the clock where the registered links carry the valid
// bits of a frame (latch=1), this block records which neighbours are valid
// and selects the lowest-numbered one (N, E, S, W priority: this design's
// choice). For the rest of the frame it forwards that neighbour's serial
// intensity bits. any_valid stays set until the next latch and tells the
// normalize stage whether any neighbour was initialised.
//
// Timing: sel and any_valid change on the clock edge that ends the latch
// clock; sig_out is combinational from the current link bits.
module input_select
  import morpho_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              latch,     // links carry the valid bits now
  input  logic [NNEIGH-1:0] in_q,
  output logic              sig_out,   // serial intensity of the chosen link
  output logic              any_valid
);

  logic [1:0] sel, sel_d;

  always_comb begin
    sel_d = 2'd0;
    for (int i = NNEIGH - 1; i >= 0; i--)
      if (in_q[i]) sel_d = 2'(i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel       <= '0;
      any_valid <= 1'b0;
    end else if (latch) begin
      sel       <= sel_d;
      any_valid <= |in_q;
    end
  end

  assign sig_out = in_q[sel];

endmodule
