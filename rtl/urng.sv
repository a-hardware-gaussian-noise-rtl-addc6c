// urng: uniform random number generator, the first stage of the noise generator.
//
// Every bit of u1 (32 bits) and u2 (18 bits) is the output of its own 60-bit
// LFSR, 50 registers in all, as the design prescribes: independent registers
// per bit avoid the strong correlation between neighbouring bits of a single
// shift register. All 50 advance together, giving a fresh (u1, u2) pair on
// every enabled clock.
//
// The 50 seeds are this implementation's choice: they are derived from the
// 64-bit SEED parameter with a splitmix64-style mixing function, so generators
// given different SEED values start from unrelated states (needed when several
// generators run in parallel).
//
// Interface: synchronous active-high reset, clock enable en. u1 and u2 are
// register outputs, valid from the cycle after reset; after each enabled edge
// they hold the next value.
module urng
  import gng_pkg::*;
#(
  parameter logic [63:0] SEED = 64'h0123_4567_89AB_CDEF
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            en,
  output logic [U1_W-1:0] u1,
  output logic [U2_W-1:0] u2
);

  localparam int unsigned NBITS = U1_W + U2_W;

  // splitmix64 step applied to SEED + (i+1) * golden-ratio constant.
  function automatic logic [LFSR_W-1:0] lane_seed(input logic [63:0] s, input int unsigned i);
    logic [63:0] z;
    z = s + 64'h9E37_79B9_7F4A_7C15 * 64'(i + 1);
    z = (z ^ (z >> 30)) * 64'hBF58_476D_1CE4_E5B9;
    z = (z ^ (z >> 27)) * 64'h94D0_49BB_1331_11EB;
    z = z ^ (z >> 31);
    if (z[LFSR_W-1:0] == '0) z = 64'd1;
    return z[LFSR_W-1:0];
  endfunction

  logic [NBITS-1:0] bits;

  for (genvar i = 0; i < NBITS; i++) begin : g_lane
    lfsr #(
      .W    (LFSR_W),
      .SEED (lane_seed(SEED, i))
    ) u_lfsr (
      .clk   (clk),
      .rst   (rst),
      .en    (en),
      .bit_o (bits[i])
    );
  end

  assign u1 = bits[U1_W-1:0];
  assign u2 = bits[NBITS-1:U1_W];

endmodule
