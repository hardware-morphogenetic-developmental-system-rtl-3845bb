// normalize: the signalling rule for one signal of one element.
//
// Combinational. Given the stored signal (prev), whether this element is a
// diffuser of it, and the decremented neighbour intensity with its flags, it
// returns the new stored signal:
//   diffuser or already initialised      -> unchanged (set once, never again)
//   a neighbour was initialised           -> valid, neighbour - 1
//       ... and the decrement went below 0 -> valid, clamped to 0
//   no initialised neighbour              -> invalid, intensity forced to 0
// The first three lines follow the signalling algorithm of the original. Its
// text says only that the block "renormalizes the signal if it is invalid or
// below zero"; clamping to a valid 0 and zeroing invalid intensities are this
// design's reading of that.
module normalize
  import morpho_pkg::*;
(
  input  signal_t    prev,
  input  logic       diff,       // element diffuses this signal
  input  logic       any_valid,  // some neighbour was initialised
  input  intensity_t sig_dec,    // neighbour intensity - 1
  input  logic       zero,       // decrement went below zero
  output signal_t    next
);

  always_comb begin
    if (diff || prev.valid)  next = prev;
    else if (any_valid)      next = '{valid: 1'b1, value: zero ? '0 : sig_dec};
    else                     next = '{valid: 1'b0, value: '0};
  end

endmodule
