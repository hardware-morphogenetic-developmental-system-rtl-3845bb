// cellular_input: receive side of the serial links from the four neighbours.
//
// Each neighbour sends its signals on one wire, one 16-bit frame per
// molecular cycle (valid bit first, then the 4-bit intensity LSB first, then
// zeros). This block registers the four wires (one clock of latency) and
// forces to zero the links of neighbours that do not exist, so a border
// element sees them as permanently uninitialised ("if all existing
// neighbouring cells are uninitialized"). The original places its input
// molecules on the dynamic routing layer; the input register and the
// PRESENT mask are this design's choices.
//
// Interface: in[i] serial bit from neighbour i (0 N, 1 E, 2 S, 3 W);
// in_q[i] the same bit one clock later.
module cellular_input
  import morpho_pkg::*;
#(
  parameter logic [NNEIGH-1:0] PRESENT = '1   // neighbour i exists
)(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NNEIGH-1:0] in,
  output logic [NNEIGH-1:0] in_q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) in_q <= '0;
    else        in_q <= in & PRESENT;
  end

endmodule
