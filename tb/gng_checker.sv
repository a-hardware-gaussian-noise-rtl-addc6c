// gng_checker: reference model and statistics monitor for one generator.
//
// Holds its own urng with the generator's seed and the same reset and enable,
// so it sees the generator's (u1, u2) stream. On every enabled edge it forms
// the ideal products sqrt(-ln u1) * sin(2*pi*u2) and * cos(2*pi*u2) in double
// precision and, for each pair of inputs, the two ideal outputs (sin sum first,
// then cos sum). Every output sample is compared with its ideal value
// (tolerance 0.052), valid must rise exactly 7 enabled edges after reset and
// stay high, and noise must hold while en is low. When done rises it computes
// mean, variance, lag-1 correlation, chi-square (700 bins on [-7, 7]) and
// Kolmogorov-Smirnov statistics, counts samples beyond 4 and 5 sigma against
// the Gaussian expectation, and reports checks and failures.
module gng_checker
  import gng_pkg::*;
  import tb_stats_pkg::*;
#(
  parameter logic [63:0] SEED = 64'h0123_4567_89AB_CDEF,
  parameter int          ID   = 0
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    en,
  input  logic                    valid,
  input  logic signed [OUT_W-1:0] noise,
  input  logic                    done,
  output int                      n_out,
  output int                      n_tail4,
  output int                      checks,
  output int                      failures,
  output logic                    finished
);

  localparam real TWO_PI = 6.283185307179586;

  logic [U1_W-1:0] r_u1;
  logic [U2_W-1:0] r_u2;

  urng #(.SEED(SEED)) ref_urng (.clk, .rst, .en, .u1(r_u1), .u2(r_u2));

  function automatic real fref(input logic [31:0] u);
    return $sqrt(-$ln(((u == 0) ? 1.0 : real'(u)) / 4294967296.0));
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL [%0d]: %s", ID, what);
    end
  endtask

  real    ps [$], pc [$], expq [$];
  real    y, e, worst, sum, sum2, lag, prev, mean, var_, corr, d, chi2, pv, exp4, exp5;
  longint hist [];
  int     edges, hidx, df, n_tail5;
  bit     took;
  logic signed [OUT_W-1:0] held;

  initial begin
    hist = new [1 << OUT_W];
    foreach (hist[i]) hist[i] = 0;
    n_out = 0; n_tail4 = 0; n_tail5 = 0; checks = 0; failures = 0; finished = 1'b0;
    edges = 0; took = 1'b0;
    worst = 0.0; sum = 0.0; sum2 = 0.0; lag = 0.0; prev = 0.0;
  end

  always @(posedge clk) begin
    took = !rst && en;
    held = noise;
    if (took) begin
      ps.push_back(fref(r_u1) * $sin(TWO_PI * real'(r_u2) / 262144.0));
      pc.push_back(fref(r_u1) * $cos(TWO_PI * real'(r_u2) / 262144.0));
      if (ps.size() == 2) begin
        expq.push_back(ps[0] + ps[1]);
        expq.push_back(pc[0] + pc[1]);
        ps.delete(); pc.delete();
      end
    end
  end

  always @(negedge clk) begin
    if (!rst && !finished) begin
      if (!took) begin
        check(noise == held, "noise changed while en low");
      end else begin
        edges++;
        if (edges <= 7) check(valid == (edges == 7), $sformatf("valid=%0d after %0d enabled edges", valid, edges));
        else            check(valid, "valid dropped in an enabled cycle");
        if (valid) begin
          y = real'(noise) / real'(1 << OUT_FRAC);
          e = y - expq.pop_front();
          if (e < 0) e = -e;
          if (e > worst) worst = e;
          check(e <= 0.052, $sformatf("sample %0d: %f off by %f", n_out, y, e));
          hidx = int'(noise) + (1 << (OUT_W - 1));
          hist[hidx] = hist[hidx] + 1;
          sum += y; sum2 += y * y;
          if (n_out > 0) lag += y * prev;
          prev = y;
          if (y > 4.0 || y < -4.0) n_tail4++;
          if (y > 5.0 || y < -5.0) n_tail5++;
          n_out++;
        end
      end
    end
  end

  always @(posedge done) begin
    mean = sum / n_out;
    var_ = sum2 / n_out - mean * mean;
    corr = (lag / (n_out - 1) - mean * mean) / var_;
    d    = ks_distance(hist, OUT_W, OUT_FRAC);
    chi2_test(hist, OUT_W, OUT_FRAC, chi2, df);
    pv   = chi2_pvalue(chi2, df);
    exp4 = 2.0 * (1.0 - norm_cdf(4.0)) * n_out;
    exp5 = 2.0 * (1.0 - norm_cdf(5.0)) * n_out;
    $display("[%0d] samples %0d  worst error %f  mean %f  variance %f  lag-1 corr %f",
             ID, n_out, worst, mean, var_, corr);
    $display("[%0d] chi-square %f with %0d dof, p = %f;  K-S D = %f (5%% limit %f)",
             ID, chi2, df, pv, d, 1.36 / $sqrt(real'(n_out)));
    $display("[%0d] beyond 4 sigma %0d (expected %f), beyond 5 sigma %0d (expected %f)",
             ID, n_tail4, exp4, n_tail5, exp5);
    check(n_out > 1000, "enough samples");
    check(mean > -5.0 / $sqrt(real'(n_out)) && mean < 5.0 / $sqrt(real'(n_out)), "mean near 0");
    check(var_ > 1.0 - 0.015 - 8.0 / $sqrt(real'(n_out)) && var_ < 1.0 + 8.0 / $sqrt(real'(n_out)), "variance near 1");
    check(corr > -5.0 / $sqrt(real'(n_out)) && corr < 5.0 / $sqrt(real'(n_out)), "no lag-1 correlation");
    check(pv > 0.001, "chi-square p-value");
    check(d < 1.63 / $sqrt(real'(n_out)), "K-S distance at the 1% level");
    check($itor(n_tail4) > exp4 - 5.0 * $sqrt(exp4) - 2.0 && $itor(n_tail4) < exp4 + 5.0 * $sqrt(exp4) + 2.0,
          "count beyond 4 sigma");
    finished = 1'b1;
  end

endmodule
