// gng_coeff_pkg: elaboration-time computation of the coefficient tables.
//
// f_record(k) and g_record(k) return the coefficient record of segment k of
// f(u) = sqrt(-ln u) and of s(x) = sin(pi/2 * x). They run only on constants
// (the ROMs call them to build their contents), so no table file is needed.
// Per segment:
//   1. sample the function at NS points spread evenly over the segment and fit
//      the least-squares line;
//   2. round the gradient magnitude to a normalised mantissa
//      (f: 6 bits, M = m * 2^(sm-5);  s: 8 bits, M = m * 2^-(sm+7));
//   3. refit the intercept for the rounded gradient (mean of y + M*u for f,
//      of y - M*x for s);
//   4. round the intercept (f: normalised 32 bits, C = c * 2^(sc-40);
//      s: signed 16 bits, C = c * 2^-(14+sc), largest sc that fits).
// The least-squares fit and the field widths follow the design; the sampling,
// the order of rounding and the scale encodings are this implementation's.
// For f segments at or above 1/2 the fit is done in delta = 1 - u, where the
// function is well conditioned, and the line is then moved back to u.
package gng_coeff_pkg;
  import gng_pkg::*;

  localparam int NS = 2049;   // sample points per segment

  typedef struct packed {
    logic [63:0]        m;   // mantissa
    logic signed [31:0] e;   // exponent
  } mant_t;

  // v > 0  ->  mantissa in [2^(bits-1), 2^bits) and exponent, v ~ m * 2^e
  function automatic mant_t quant_mant(input real v, input int bits);
    real    r;
    longint m;
    int     e;
    r = v;
    e = 0;
    while (r >= real'(longint'(1) << bits)) begin
      r = r / 2.0;
      e++;
    end
    while (r < real'(longint'(1) << (bits - 1))) begin
      r = r * 2.0;
      e--;
    end
    m = longint'(r);            // round to nearest
    if (m >= (longint'(1) << bits)) begin
      m = m / 2;
      e++;
    end
    return '{m: m, e: e};
  endfunction

  function automatic f_coeff_t f_record(input int k);
    real      lo, hi, uu, x, y, sx, sy, sxx, sxy, n, slope, mq, cq;
    mant_t    qm, qc;
    int       j;
    f_coeff_t r;
    // integer range [lo, hi] of u1 in segment k
    if (k < F_LO) begin
      hi = real'((longint'(1) << (31 - k)) - 1);
      lo = (k < F_LO - 1) ? real'(longint'(1) << (30 - k)) : 1.0;
    end else begin
      j  = k - F_LO;
      lo = real'(((longint'(1) << (j + 1)) - 1) << (31 - j));
      hi = (j < F_HI - 1) ? lo + real'((longint'(1) << (30 - j)) - 1) : 4294967295.0;
    end
    sx = 0.0; sy = 0.0; sxx = 0.0; sxy = 0.0;
    for (int i = 0; i < NS; i++) begin
      uu = lo + (hi - lo) * real'(i) / real'(NS - 1);
      if (k < F_LO) begin
        x = uu / 4294967296.0;
        y = $sqrt(-$ln(x));
      end else begin
        x = (4294967296.0 - uu) / 4294967296.0;
        y = $sqrt(-$ln(1.0 - x));
      end
      sx += x; sy += y; sxx += x * x; sxy += x * y;
    end
    n     = real'(NS);
    slope = (n * sxy - sx * sy) / (n * sxx - sx * sx);
    if (k < F_LO) slope = -slope;
    qm = quant_mant(slope, 6);
    mq = real'(qm.m) * $pow(2.0, real'(qm.e));
    // intercept of y = C - mq*u: below 1/2 mean(y + mq*u); above, mean(y - mq*d) + mq
    if (k < F_LO) cq = (sy + mq * sx) / n;
    else          cq = (sy - mq * sx) / n + mq;
    qc = quant_mant(cq, 32);
    r.m  = 6'(qm.m);
    r.sm = 5'(qm.e + 5);
    r.c  = 32'(qc.m);
    r.sc = 5'(qc.e + 40);
    return r;
  endfunction

  function automatic g_coeff_t g_record(input int k);
    real      lo, hi, x, y, sx, sy, sxx, sxy, n, slope, mq, cq, a;
    mant_t    qm;
    int       sc;
    g_coeff_t r;
    if (k == G_SEGS - 1) begin        // the single point x = 1
      r.m = '0; r.sm = '0; r.c = 16'sd16384; r.sc = '0;
      return r;
    end
    if (k < 4) begin
      lo = real'(k * 8192);
      hi = lo + 8191.0;
    end else begin
      lo = real'(32768 + (k - 4) * 2048);
      hi = lo + 2047.0;
    end
    sx = 0.0; sy = 0.0; sxx = 0.0; sxy = 0.0;
    for (int i = 0; i < NS; i++) begin
      x = (lo + (hi - lo) * real'(i) / real'(NS - 1)) / 65536.0;
      y = $sin(1.5707963267948966 * x);
      sx += x; sy += y; sxx += x * x; sxy += x * y;
    end
    n     = real'(NS);
    slope = (n * sxy - sx * sy) / (n * sxx - sx * sx);
    qm = quant_mant(slope, 8);
    mq = real'(qm.m) * $pow(2.0, real'(qm.e));
    cq = (sy - mq * sx) / n;
    a  = (cq < 0.0) ? -cq : cq;
    sc = 0;
    while (a * $pow(2.0, real'(15 + sc)) < 32767.0 && sc < 15) sc++;
    r.m  = 8'(qm.m);
    r.sm = 4'(-(qm.e + 7));
    r.c  = 16'(longint'(cq * $pow(2.0, real'(14 + sc))));
    r.sc = 4'(sc);
    return r;
  endfunction

endpackage
