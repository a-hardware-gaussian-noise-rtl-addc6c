// tb_stats_pkg: statistics helpers for the noise generator testbenches.
//
// norm_cdf is the standard normal CDF, Phi(x) = erfc(-x / sqrt 2) / 2, with
// erfc from a Chebyshev fit (fractional error below 1.2e-7). code_cdf gives
// the probability that a true N(0,1) value rounds to an output code at or
// below c, for codes with FRAC fraction bits (code c stands for
// [c - 1/2, c + 1/2) LSB). chi2_pvalue uses the Wilson-Hilferty normal
// approximation of the chi-square distribution.
package tb_stats_pkg;

  function automatic real erfc_approx(input real z);
    real t, ans, az;
    az  = (z < 0.0) ? -z : z;
    t   = 1.0 / (1.0 + 0.5 * az);
    ans = t * $exp(-az * az - 1.26551223 + t * (1.00002368 + t * (0.37409196 + t * (0.09678418 +
          t * (-0.18628806 + t * (0.27886807 + t * (-1.13520398 + t * (1.48851587 +
          t * (-0.82215223 + t * 0.17087277)))))))));
    return (z >= 0.0) ? ans : 2.0 - ans;
  endfunction

  function automatic real norm_cdf(input real x);
    return 0.5 * erfc_approx(-x / 1.4142135623730951);
  endfunction

  function automatic real code_cdf(input int c, input int frac);
    return norm_cdf((real'(c) + 0.5) / real'(1 << frac));
  endfunction

  function automatic real chi2_pvalue(input real chi2, input int df);
    real k, z;
    k = 2.0 / (9.0 * real'(df));
    z = ($pow(chi2 / real'(df), 1.0 / 3.0) - (1.0 - k)) / $sqrt(k);
    return 1.0 - norm_cdf(z);
  endfunction

  // Chi-square test over bins of width 0.02 on [-7, 7) (700 bins), bins with
  // fewer than 5 expected samples pooled into the two tails. hist is indexed
  // by code + 2^(W-1).
  function automatic void chi2_test(ref longint hist [], input int w, input int frac,
                                    output real chi2, output int df);
    longint n, obs;
    real    lo_p, p, e;
    int     c_lo, c_hi, first_bin;
    real    pool_obs, pool_p;
    n = 0;
    foreach (hist[i]) n += hist[i];
    chi2 = 0.0; df = -1;
    pool_obs = 0.0; pool_p = 0.0;
    c_lo = -(1 << (w - 1));
    // everything below -7 starts the left pool
    for (int b = 0; b <= 700; b++) begin
      // bin b covers codes [c_lo, c_hi]; b = 700 is the right tail
      if (b < 700) c_hi = int'($floor((-7.0 + 0.02 * real'(b + 1)) * real'(1 << frac))) - 1;
      else         c_hi = (1 << (w - 1)) - 1;
      obs = 0;
      for (int c = c_lo; c <= c_hi; c++) obs += hist[c + (1 << (w - 1))];
      p = code_cdf(c_hi, frac) - ((c_lo == -(1 << (w - 1))) ? 0.0 : code_cdf(c_lo - 1, frac));
      pool_obs += real'(obs);
      pool_p   += p;
      if (real'(n) * pool_p >= 5.0) begin
        e = real'(n) * pool_p;
        chi2 += (pool_obs - e) * (pool_obs - e) / e;
        df++;
        pool_obs = 0.0; pool_p = 0.0;
      end
      c_lo = c_hi + 1;
    end
    if (pool_p > 0.0) begin
      e = real'(n) * pool_p;
      chi2 += (pool_obs - e) * (pool_obs - e) / e;
      df++;
    end
  endfunction

  // Kolmogorov-Smirnov distance between the sample and N(0,1).
  function automatic real ks_distance(ref longint hist [], input int w, input int frac);
    longint n, cum;
    real    d, dd;
    n = 0;
    foreach (hist[i]) n += hist[i];
    cum = 0; d = 0.0;
    foreach (hist[i]) begin
      cum += hist[i];
      dd = real'(cum) / real'(n) - code_cdf(i - (1 << (w - 1)), frac);
      if (dd < 0.0) dd = -dd;
      if (dd > d) d = dd;
    end
    return d;
  endfunction

endpackage
