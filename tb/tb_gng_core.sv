// tb_gng_core: end-to-end test of one noise generator.
//
// A second urng with the same seed, driven by the same reset and enable,
// reproduces the generator's (u1, u2) stream. From it the testbench computes
// in double precision the ideal output: for each pair of successive inputs,
// first sum_k sqrt(-ln u1_k) * sin(2*pi*u2_k), then the same with cos. Every
// output sample must match within 0.052 (the sum of the evaluators' worst
// errors). Also checked: valid rises exactly 7 enabled cycles after reset and
// then stays high in every enabled cycle; en = 0 freezes the output; over
// N samples the mean, variance, lag-1 correlation, chi-square (700 bins on
// [-7, 7]) and Kolmogorov-Smirnov statistics are those of N(0,1).
module tb_gng_core;
  import gng_pkg::*;
  import tb_stats_pkg::*;

  localparam logic [63:0] SEED = 64'h0123_4567_89AB_CDEF;
  localparam int N = 200000;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic en  = 1'b0;
  logic valid;
  logic signed [OUT_W-1:0] noise;
  logic [U1_W-1:0] r_u1;
  logic [U2_W-1:0] r_u2;
  int checks = 0, failures = 0;

  gng_core #(.SEED(SEED)) dut (.clk, .rst, .en, .valid, .noise);
  urng     #(.SEED(SEED)) ref_urng (.clk, .rst, .en, .u1(r_u1), .u2(r_u2));

  always #5 clk = ~clk;

  initial begin
    repeat (2 * N + 100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  localparam real TWO_PI = 6.283185307179586;

  function automatic real fref(input logic [31:0] u);
    return $sqrt(-$ln(((u == 0) ? 1.0 : real'(u)) / 4294967296.0));
  endfunction

  real    uq_s [$], uq_c [$];   // ideal products, in input order
  real    exp_q [$];            // ideal outputs, in output order
  real    ys, yc, y, e, worst, sum, sum2, prev, lag, mean, var_, corr, d, chi2, pv;
  logic signed [OUT_W-1:0] held;
  longint hist [];
  int     n_out, edges, first_valid, stalls, df, hidx;

  initial begin
    hist = new [1 << OUT_W];
    foreach (hist[i]) hist[i] = 0;
    n_out = 0; edges = 0; first_valid = -1; stalls = 0;
    worst = 0.0; sum = 0.0; sum2 = 0.0; lag = 0.0; prev = 0.0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst <= 1'b0;
    while (n_out < N) begin
      en = (edges < 20) ? 1'b1 : ($urandom_range(15, 0) != 0);
      if (en) begin
        // the inputs taken on this edge
        uq_s.push_back(fref(r_u1) * $sin(TWO_PI * real'(r_u2) / 262144.0));
        uq_c.push_back(fref(r_u1) * $cos(TWO_PI * real'(r_u2) / 262144.0));
        if (uq_s.size() == 2) begin
          exp_q.push_back(uq_s[0] + uq_s[1]);
          exp_q.push_back(uq_c[0] + uq_c[1]);
          uq_s.delete(); uq_c.delete();
        end
      end
      held = noise;
      @(posedge clk);
      @(negedge clk);
      if (!en) begin
        stalls++;
        check(noise == held, "noise changed while en low");
        continue;
      end
      edges++;
      if (first_valid < 0) begin
        if (valid) begin
          first_valid = edges;
          check(edges == 7, $sformatf("first valid after %0d enabled edges, expected 7", edges));
        end
      end else begin
        check(valid, "valid dropped in an enabled cycle");
      end
      if (valid) begin
        y = real'(noise) / real'(1 << OUT_FRAC);
        ys = exp_q.pop_front();
        e = y - ys;
        if (e < 0) e = -e;
        if (e > worst) worst = e;
        check(e <= 0.052, $sformatf("sample %0d: %f, ideal %f", n_out, y, ys));
        hidx = int'(noise) + (1 << (OUT_W - 1));
        hist[hidx] = hist[hidx] + 1;
        sum += y; sum2 += y * y;
        if (n_out > 0) lag += y * prev;
        prev = y;
        n_out++;
      end
    end
    mean = sum / N;
    var_ = sum2 / N - mean * mean;
    corr = (lag / (N - 1) - mean * mean) / var_;
    d    = ks_distance(hist, OUT_W, OUT_FRAC);
    chi2_test(hist, OUT_W, OUT_FRAC, chi2, df);
    pv   = chi2_pvalue(chi2, df);
    $display("samples %0d  worst error %f  mean %f  variance %f  lag-1 corr %f", N, worst, mean, var_, corr);
    $display("chi-square %f with %0d dof, p = %f;  K-S D = %f (5%% limit %f)", chi2, df, pv, d, 1.36 / $sqrt(real'(N)));
    $display("stall cycles %0d", stalls);
    check(mean > -0.01 && mean < 0.01, "mean near 0");
    check(var_ > 0.985 && var_ < 1.015, "variance near 1");
    check(corr > -0.01 && corr < 0.01, "no lag-1 correlation");
    check(pv > 0.001, "chi-square p-value");
    check(d < 1.63 / $sqrt(real'(N)), "K-S distance at the 1% level");
    check(stalls > 0, "stalls exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
