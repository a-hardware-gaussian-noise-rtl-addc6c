// f_eval: piecewise linear evaluation of f(u1) = sqrt(-ln u1).
//
// f is steep near u1 = 0 and near u1 = 1, so the segments are non-uniform:
// below 1/2 the boundaries sit at powers of two, 2^(n-32), and at or above 1/2
// at 1 - 2^-n. The segment of an input is then given directly by its count of
// leading zeros (u1 < 1/2) or leading ones (u1 >= 1/2), a priority encoder
// rather than a comparison against stored boundaries. The segment addresses a
// table of (gradient, gradient scale, intercept, intercept scale) records and
//   f = c * 2^(sc-40) - m * 2^(sm-5) * u1
// is formed with one 6 x 32 multiply, two shifts and one subtraction. The
// power-of-two scale factors keep the gradient at 6 bits although it spans
// about 1 to 5e8 across the segments. This structure follows the design.
//
// This implementation's choices: the table has the design's 59 records, so the
// innermost segments at each end are merged (u1 < 2^-30 forms one segment and
// u1 >= 1 - 2^-29 another), giving F_LO + F_HI = 30 + 29 segments; u1 = 0 is evaluated as
// u1 = 2^-32, which bounds f at sqrt(32 ln 2) = 4.71; the output is clamped to
// be non-negative. Worst-case absolute error of the output against the exact
// function is about 0.013 (at u1 = 2^-32) and below 0.005 elsewhere.
//
// Interface and timing: three register stages, all held while en is low.
// f_o (unsigned, 29 fraction bits) belongs to the u1 presented three enabled
// clock edges earlier. Stage 1 reads the table, stage 2 multiplies and shifts,
// stage 3 subtracts and clamps.
module f_eval
  import gng_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            en,
  input  logic [U1_W-1:0] u1,
  output logic [F_W-1:0]  f_o
);

  localparam int unsigned ACC_W = 74;

  // ---- segment address: leading-zero / leading-one count -----------------
  logic [U1_W-1:0] u_nz;      // u1 with 0 replaced by 1
  logic [U1_W-1:0] u_cnt;     // u1 (MSB 0) or its complement (MSB 1)
  int unsigned     lead;      // leading zeros of u_cnt
  logic [F_AW-1:0] seg;

  always_comb begin
    u_nz  = (u1 == '0) ? U1_W'(1) : u1;
    u_cnt = u_nz[U1_W-1] ? ~u_nz : u_nz;
    lead  = U1_W;
    for (int i = 0; i < U1_W; i++) begin
      if (u_cnt[i]) lead = U1_W - 1 - i;
    end
    if (!u_nz[U1_W-1]) seg = F_AW'(((lead < F_LO) ? lead : F_LO) - 1);
    else               seg = F_AW'(F_LO + ((lead < F_HI) ? lead : F_HI) - 1);
  end

  // ---- stage 1: table read ----------------------------------------------
  logic [47:0]     rec;
  f_coeff_t        co;
  logic [U1_W-1:0] u_d1;

  f_coeff_rom u_rom (
    .clk  (clk),
    .en   (en),
    .addr (seg),
    .data (rec)
  );
  assign co = f_coeff_t'(rec);

  // ---- stage 2: gradient product and intercept, both aligned to 2^-40 ---
  logic [ACC_W-1:0] slope_t, icpt_t;
  logic [37:0]      prod;

  assign prod = 38'(co.m) * 38'(u_d1);

  // ---- stage 3: subtract, scale to 29 fraction bits, clamp -------------
  logic signed [ACC_W-1:0] diff;
  logic signed [ACC_W-1:0] fv;

  assign diff = $signed(icpt_t) - $signed(slope_t);
  assign fv   = diff >>> 11;

  always_ff @(posedge clk) begin
    if (rst) begin
      u_d1    <= '0;
      slope_t <= '0;
      icpt_t  <= '0;
      f_o     <= '0;
    end else if (en) begin
      u_d1    <= u_nz;
      slope_t <= ACC_W'(prod) << ({1'b0, co.sm} + 6'd3);
      icpt_t  <= ACC_W'(co.c) << co.sc;
      if (fv < 0)                              f_o <= '0;
      else if (fv > $signed(ACC_W'({F_W{1'b1}}))) f_o <= '1;
      else                                     f_o <= fv[F_W-1:0];
    end
  end

endmodule
