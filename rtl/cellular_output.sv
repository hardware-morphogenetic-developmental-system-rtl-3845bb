// cellular_output: transmit side of the serial link to the neighbours.
//
// During molecular cycles 0..3 of a developmental step the element sends its
// signal k in cycle k as a 16-bit frame: bit 0 the valid flag, bits 1..4 the
// intensity, bits 5..15 zero (frame layout from the original; intensity LSB
// first is this design's choice). In the other twelve molecular cycles the
// line is held at 0. One output line feeds all four neighbours.
//
// Timing: the frame bit for clock index c is registered on the edge that ends
// clock c, so the line carries bit c during clock c+1.
module cellular_output
  import morpho_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] mc,
  input  logic [3:0] clk_idx,
  input  signal_t    sig [NSIG],
  output logic       out
);

  signal_t cur;
  logic    bit_d;

  always_comb begin
    cur   = sig[mc[1:0]];
    bit_d = 1'b0;
    if (mc < 4'(NSIG)) begin
      if (clk_idx == 4'd0)                             bit_d = cur.valid;
      else if (clk_idx <= 4'(SIG_W))                   bit_d = cur.value[clk_idx[1:0] - 2'd1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out <= 1'b0;
    else        out <= bit_d;
  end

endmodule
