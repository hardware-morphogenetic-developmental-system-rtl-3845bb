// decrement_compare: bit-serial decrement of the selected intensity.
//
// The intensity arrives LSB first, one bit per clock while en=1; start marks
// its first bit. A borrow flip-flop (set to 1 at start) implements the
// subtract-one: result bit = in ^ borrow, next borrow = borrow & ~in, the
// serial scheme of a single 3-LUT molecule with its flip-flop in the
// original. The result bits are shifted into sig_dec (LSB first). After
// SIG_W enabled clocks sig_dec holds intensity-1 and zero is 1 when the
// intensity was 0, i.e. the decrement went below zero. Both hold until the
// next start.
module decrement_compare
  import morpho_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       start,
  input  logic       sig_in,
  output intensity_t sig_dec,
  output logic       zero
);

  logic b_eff;
  assign b_eff = start ? 1'b1 : zero;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sig_dec <= '0;
      zero    <= 1'b0;
    end else if (en) begin
      sig_dec <= {sig_in ^ b_eff, sig_dec[SIG_W-1:1]};
      zero    <= b_eff & ~sig_in;
    end
  end

endmodule
