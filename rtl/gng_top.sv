// gng_top: N_INST Gaussian noise generators side by side.
//
// The output rate grows with parallel generators, provided each one's LFSRs
// start from different seeds; instance i gets SEED + i * 0xD1B54A32D192ED03,
// from which its 50 LFSR seeds are derived. The default N_INST = 1 is the
// single-generator design (one sample per clock); the design's parallel
// variant uses three. Distinct-seed parallelism follows the design; the seed
// spacing is this implementation's choice.
//
// Interface: common clock, synchronous active-high reset and clock enable;
// valid[i] and noise[i] are instance i's outputs (signed, 11 fraction bits,
// unit variance), with the timing of gng_core.
module gng_top
  import gng_pkg::*;
#(
  parameter int unsigned N_INST = 1,
  parameter logic [63:0] SEED   = 64'h0123_4567_89AB_CDEF
) (
  input  logic                               clk,
  input  logic                               rst,
  input  logic                               en,
  output logic [N_INST-1:0]                  valid,
  output logic [N_INST-1:0][OUT_W-1:0]       noise
);

  for (genvar i = 0; i < N_INST; i++) begin : g_inst
    gng_core #(
      .SEED (SEED + 64'(i) * 64'hD1B5_4A32_D192_ED03)
    ) u_core (
      .clk   (clk),
      .rst   (rst),
      .en    (en),
      .valid (valid[i]),
      .noise (noise[i])
    );
  end

endmodule
