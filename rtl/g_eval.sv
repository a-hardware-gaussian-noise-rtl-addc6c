// g_eval: piecewise linear evaluation of g1 = sin(2*pi*u2) and g2 = cos(2*pi*u2).
//
// The design drops the sqrt(2) factor of the Box-Muller g functions (the
// central-limit stage divides by sqrt(2) and the two cancel), so both outputs
// lie in [-1, 1]. The two MSBs of u2 select one of four quadrants and only one
// quarter period, s(x) = sin(pi/2 * x) for the 16-bit position x in [0, 1), is
// approximated. With phi = pi/2 * x the quadrants follow by symmetry:
//   quadrant 0:  g1 =  s(x)    g2 =  s(1-x)
//   quadrant 1:  g1 =  s(1-x)  g2 = -s(x)
//   quadrant 2:  g1 = -s(x)    g2 = -s(1-x)
//   quadrant 3:  g1 = -s(1-x)  g2 =  s(x)
// g1 and g2 share one coefficient table (read through two ports), evaluating
//   s = m * 2^-(sm+7) * x + c * 2^-(14+sc)
// for x and for the mirrored position 1 - x, formed exactly as 2^16 - x on 17
// bits. The quadrant scheme and table sharing follow the design.
//
// Segments (this implementation's choice, 21 as in the design): 4 of width 1/8
// on [0, 1/2), 16 of width 1/32 on [1/2, 1), where sin bends most, and one for
// the exact point x = 1. The index comes straight from the top bits of x.
// Worst-case absolute error about 0.0021.
//
// Interface and timing: three register stages, held while en is low. g1_o and
// g2_o (signed, 16 fraction bits) belong to the u2 presented three enabled
// clock edges earlier. Stage 1 reads the table, stage 2 multiplies and aligns,
// stage 3 adds, rounds, clamps to [0, 1] and applies the quadrant.
module g_eval
  import gng_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  en,
  input  logic [U2_W-1:0]       u2,
  output logic signed [G_W-1:0] g1_o,
  output logic signed [G_W-1:0] g2_o
);

  localparam int unsigned XW = GX_W + 1;   // position incl. the point x = 1
  localparam int unsigned TW = 36;         // term width, 2^-32 units

  function automatic logic [G_AW-1:0] seg_of(input logic [XW-1:0] x);
    if (x[XW-1])         return G_AW'(G_SEGS - 1);
    else if (!x[XW-2])   return G_AW'(x[XW-3:XW-4]);
    else                 return G_AW'(4 + x[XW-3:XW-6]);
  endfunction

  // ---- stage 0: positions --------------------------------------------
  logic [1:0]    quad;
  logic [XW-1:0] xs, xm;

  assign quad = u2[U2_W-1:U2_W-2];
  assign xs   = {1'b0, u2[GX_W-1:0]};
  assign xm   = XW'(1 << GX_W) - xs;

  // ---- stage 1: table read ------------------------------------------------
  logic [31:0]   rec_a, rec_b;
  g_coeff_t      ca, cb;
  logic [XW-1:0] xs_d1, xm_d1;
  logic [1:0]    quad_d1, quad_d2;

  g_coeff_rom u_rom (
    .clk    (clk),
    .en     (en),
    .addr_a (seg_of(xs)),
    .addr_b (seg_of(xm)),
    .data_a (rec_a),
    .data_b (rec_b)
  );
  assign ca = g_coeff_t'(rec_a);
  assign cb = g_coeff_t'(rec_b);

  // ---- stage 2: gradient and intercept terms in units of 2^-32 ---------
  function automatic logic signed [TW-1:0] slope_term(input logic [7:0] m, input logic [3:0] sm,
                                                       input logic [XW-1:0] x);
    logic [TW-1:0] p;
    p = TW'(m) * TW'(x);
    return $signed((p << 9) >> sm);
  endfunction

  function automatic logic signed [TW-1:0] icpt_term(input logic signed [15:0] c, input logic [3:0] sc);
    logic signed [TW-1:0] v;
    v = TW'(c);
    return (v <<< 18) >>> sc;
  endfunction

  logic signed [TW-1:0] sa_m, sa_c, sb_m, sb_c;

  // ---- stage 3: add, round to 16 fraction bits, clamp, quadrant ------------
  function automatic logic signed [G_W-1:0] finish(input logic signed [TW-1:0] m_t,
                                                   input logic signed [TW-1:0] c_t);
    logic signed [TW-1:0] v;
    v = (m_t + c_t + TW'(1 << 15)) >>> 16;
    if (v < 0)                         return '0;
    else if (v > TW'(1 << G_FRAC))     return G_W'(1 << G_FRAC);
    else                               return v[G_W-1:0];
  endfunction

  logic signed [G_W-1:0] s_val, c_val;

  assign s_val = finish(sa_m, sa_c);
  assign c_val = finish(sb_m, sb_c);

  always_ff @(posedge clk) begin
    if (rst) begin
      xs_d1   <= '0;
      xm_d1   <= '0;
      quad_d1 <= '0;
      quad_d2 <= '0;
      sa_m    <= '0;
      sa_c    <= '0;
      sb_m    <= '0;
      sb_c    <= '0;
      g1_o    <= '0;
      g2_o    <= '0;
    end else if (en) begin
      xs_d1   <= xs;
      xm_d1   <= xm;
      quad_d1 <= quad;
      sa_m    <= slope_term(ca.m, ca.sm, xs_d1);
      sa_c    <= icpt_term(ca.c, ca.sc);
      sb_m    <= slope_term(cb.m, cb.sm, xm_d1);
      sb_c    <= icpt_term(cb.c, cb.sc);
      quad_d2 <= quad_d1;
      unique case (quad_d2)
        2'd0: begin g1_o <=  s_val; g2_o <=  c_val; end
        2'd1: begin g1_o <=  c_val; g2_o <= -s_val; end
        2'd2: begin g1_o <= -s_val; g2_o <= -c_val; end
        2'd3: begin g1_o <= -c_val; g2_o <=  s_val; end
      endcase
    end
  end

endmodule
