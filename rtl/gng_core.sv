// gng_core: one Box-Muller Gaussian noise generator, one sample per clock.
//
// Four stages, as in the design:
//   1. urng     - 50 independent 60-bit LFSRs give u1 (32 bits) and u2 (18 bits);
//   2. f_eval   - f(u1) = sqrt(-ln u1)  and  g_eval - g1, g2 = sin, cos(2*pi*u2),
//                 both by non-uniform piecewise linear approximation, followed
//                 by two multipliers x1 = f*g1 and x2 = f*g2;
//   3. acc2 x 2 - each sums two successive products (central limit step);
//   4. out_mux  - alternates between the two sums, one sample per clock.
// The sqrt(2) of the Box-Muller g functions and the 1/sqrt(2) of the sum of
// two cancel and are both omitted, so each output is (x(2k) + x(2k+1)) with
// x = sqrt(-ln u1) * sin or cos(2*pi*u2), an approximately N(0,1) sample.
//
// Interface: synchronous active-high reset; en is a clock enable for every
// register (the pipeline freezes while en is low, this implementation's
// addition). noise is signed with 11 fraction bits (1.0 = 2048) and valid is
// high with every new sample. Timing, counted in enabled cycles after reset:
// u is ready at once, f and g after 3, the products after 4; the first pair of
// sums is registered on enabled edge 6, so valid first rises after 7 edges and
// then stays high, one new sample per enabled clock.
module gng_core
  import gng_pkg::*;
#(
  parameter logic [63:0] SEED = 64'h0123_4567_89AB_CDEF
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    en,
  output logic                    valid,
  output logic signed [OUT_W-1:0] noise
);

  localparam int unsigned PROD_LAT = EVAL_LAT + 1;

  // ---- stage 1 ----
  logic [U1_W-1:0] u1;
  logic [U2_W-1:0] u2;

  urng #(.SEED(SEED)) u_urng (
    .clk (clk), .rst (rst), .en (en), .u1 (u1), .u2 (u2)
  );

  // ---- stage 2 ----
  logic [F_W-1:0]        f;
  logic signed [G_W-1:0] g1, g2;

  f_eval u_f (.clk (clk), .rst (rst), .en (en), .u1 (u1), .f_o (f));
  g_eval u_g (.clk (clk), .rst (rst), .en (en), .u2 (u2), .g1_o (g1), .g2_o (g2));

  localparam int unsigned PW = F_W + 1 + G_W;           // full product width
  localparam int unsigned PSHIFT = F_FRAC + G_FRAC - X_FRAC;

  logic signed [PW-1:0]  p1, p2;
  logic signed [X_W-1:0] x1, x2;

  assign p1 = PW'($signed({1'b0, f})) * PW'(g1);
  assign p2 = PW'($signed({1'b0, f})) * PW'(g2);

  // valid pipeline up to the products
  logic [PROD_LAT-1:0] vpipe;

  always_ff @(posedge clk) begin
    if (rst) begin
      vpipe <= '0;
      x1    <= '0;
      x2    <= '0;
    end else if (en) begin
      vpipe <= {vpipe[PROD_LAT-2:0], 1'b1};
      x1    <= X_W'(p1 >>> PSHIFT);
      x2    <= X_W'(p2 >>> PSHIFT);
    end
  end

  // ---- stage 3 ----
  logic                    s1_valid, s2_valid;
  logic signed [OUT_W-1:0] s1, s2;

  acc2 #(.IN_W(X_W), .OUT_W(OUT_W), .DROP(X_FRAC - OUT_FRAC)) u_acc1 (
    .clk (clk), .rst (rst), .en (en), .in_valid (vpipe[PROD_LAT-1]),
    .x (x1), .sum_valid (s1_valid), .sum (s1)
  );
  acc2 #(.IN_W(X_W), .OUT_W(OUT_W), .DROP(X_FRAC - OUT_FRAC)) u_acc2 (
    .clk (clk), .rst (rst), .en (en), .in_valid (vpipe[PROD_LAT-1]),
    .x (x2), .sum_valid (s2_valid), .sum (s2)
  );

  // ---- stage 4 ----
  out_mux #(.W(OUT_W)) u_mux (
    .clk (clk), .rst (rst), .en (en), .load (s1_valid),
    .a (s1), .b (s2), .y_valid (valid), .y (noise)
  );

  // Both ACC(2) units see the same valid stream and so finish together.
  assert property (@(posedge clk) disable iff (rst) s1_valid == s2_valid)
    else $error("gng_core: ACC(2) units out of step");

endmodule
