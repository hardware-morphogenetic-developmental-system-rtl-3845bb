// expression_table: the genome's expression table as a rotating shift memory.
//
// Four 16-bit entries (four 16-bit memory molecules in the original), entry j
// holding the intensities T1..T4 it matches, T1 in bits 3:0. The function of
// entry j is its index j. On load the table is written in parallel from the
// configuration. While shift=1 the 64-bit memory rotates by one bit per clock
// and out presents the bit at its end, so one molecular cycle of shifting
// streams one entry LSB first, in the same order as the diffusion memory's
// chemical stream. Four such cycles per developmental step bring the memory
// back to its start. The parallel load port stands in for the configuration
// access of the platform and is this design's choice.
module expression_table
  import morpho_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,
  input  entry_t table_cfg [N_ENTRY],
  input  logic   shift,
  output logic   out
);

  logic [N_ENTRY*CHEM_W-1:0] mem;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem <= '0;
    end else if (load) begin
      for (int j = 0; j < N_ENTRY; j++) mem[j*CHEM_W +: CHEM_W] <= table_cfg[j];
    end else if (shift) begin
      mem <= {mem[0], mem[N_ENTRY*CHEM_W-1:1]};
    end
  end

  assign out = mem[0];

endmodule
