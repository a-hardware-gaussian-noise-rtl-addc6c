// lfsr: one maximal-length Fibonacci linear feedback shift register.
//
// The generator needs one independent pseudo-random bit stream per bit of the
// uniform inputs u1 and u2; each stream comes from its own W-bit LFSR, as the
// design prescribes. With the default W = 60 the register uses the primitive
// trinomial x^60 + x^59 + 1 (feedback from stages 60 and 59), so its period is
// 2^60 - 1, about 1.15e18. The choice of polynomial is this implementation's;
// the design asks only for a 60-bit register of maximal period.
//
// Interface: synchronous active-high reset loads SEED (zero is replaced by 1,
// since the all-zero state locks up). While en is high the register shifts
// once per clock. bit_o is the register's last stage, so it is a registered
// output that changes one cycle after each enabled edge.
module lfsr #(
  parameter int unsigned  W    = 60,
  parameter int unsigned  TAP_A = 60,   // feedback stages (1-based)
  parameter int unsigned  TAP_B = 59,
  parameter logic [W-1:0] SEED = W'(1)
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  output logic bit_o
);

  localparam logic [W-1:0] INIT = (SEED == '0) ? W'(1) : SEED;

  logic [W-1:0] state;
  logic         fb;

  assign fb = state[TAP_A-1] ^ state[TAP_B-1];

  always_ff @(posedge clk) begin
    if (rst)      state <= INIT;
    else if (en)  state <= {state[W-2:0], fb};
  end

  assign bit_o = state[W-1];

endmodule
