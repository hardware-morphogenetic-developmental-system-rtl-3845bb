// diffusion_memory: the signal state of one element.
//
// Holds, for each of the four signal types, a valid flag, a 4-bit intensity
// and a diffuser flag (the original's ValidMem, ChemMem and DiffuserMem
// molecules). On load the diffuser flags are taken from the configuration
// and the state is reset as the signalling algorithm prescribes: diffused
// signals valid at the maximum intensity 15, all others uninitialised. During
// the diffusion cycles one signal per molecular cycle is rewritten (wr_en,
// wr_idx, wr_data from normalize).
//
// For the expression phase the four intensities are read out as a serial
// 16-bit stream: chem_bit is bit (bit_idx mod 4) of signal (bit_idx / 4),
// so one molecular cycle delivers T1 LSB first, then T2, T3, T4. This is the
// order of a 16-bit rotating shift memory read at its end; here it is a
// register file with an index multiplexer, which gives the same stream.
module diffusion_memory
  import morpho_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            load,
  input  logic [NSIG-1:0] diffuser_cfg,
  input  logic            wr_en,
  input  logic [1:0]      wr_idx,
  input  signal_t         wr_data,
  input  logic [3:0]      bit_idx,
  output signal_t         sig [NSIG],
  output logic [NSIG-1:0] diff,
  output logic            chem_bit
);

  signal_t mem [NSIG];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      diff <= '0;
      for (int s = 0; s < NSIG; s++) mem[s] <= '0;
    end else if (load) begin
      diff <= diffuser_cfg;
      for (int s = 0; s < NSIG; s++)
        mem[s] <= diffuser_cfg[s] ? '{valid: 1'b1, value: SIG_MAX}
                                  : '{valid: 1'b0, value: '0};
    end else if (wr_en) begin
      mem[wr_idx] <= wr_data;
    end
  end

  always_comb begin
    for (int s = 0; s < NSIG; s++) sig[s] = mem[s];
  end

  assign chem_bit = mem[bit_idx[3:2]].value[bit_idx[1:0]];

endmodule
