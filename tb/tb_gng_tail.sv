// tb_gng_tail: high-sigma test of the generator at its default configuration.
//
// Large noise values are the ones that make a channel decoder fail, so their
// frequency matters more than the shape of the centre of the distribution.
// This testbench runs gng_top with default parameters for 20 million samples
// and counts samples with |x| in [3, 4), [4, 4.5), [4.5, 5) and beyond 5, and
// separately the positive and negative samples beyond 3. Each count must lie
// within 5 standard deviations (Poisson) of its Gaussian expectation, which
// is computed for the output codes (11 fraction bits, rounded).
module tb_gng_tail;
  import gng_pkg::*;
  import tb_stats_pkg::*;

  localparam int N = 20_000_000;
  localparam int NB = 4;
  localparam real EDGE [NB+1] = '{3.0, 4.0, 4.5, 5.0, 100.0};

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic en  = 1'b1;
  logic [0:0]            valid;
  logic [0:0][OUT_W-1:0] noise;
  int checks = 0, failures = 0;

  gng_top dut (.clk, .rst, .en, .valid, .noise);

  always #5 clk = ~clk;

  initial begin
    repeat (N + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // probability that |x| rounds to a code in [lo, hi) sigma, one side
  function automatic real band_p(input real lo, input real hi);
    int clo, chi;
    clo = int'($ceil(lo * 2048.0));
    chi = (hi > 16.0) ? 32767 : int'($ceil(hi * 2048.0)) - 1;
    return code_cdf(chi, OUT_FRAC) - code_cdf(clo - 1, OUT_FRAC);
  endfunction

  int  band [NB];
  int  pos3, neg3, n, a;
  int  lim [NB+1];
  real e, ep;
  logic signed [OUT_W-1:0] y;

  initial begin
    foreach (band[b]) band[b] = 0;
    for (int b = 0; b <= NB; b++) lim[b] = (EDGE[b] > 16.0) ? 32768 : int'($ceil(EDGE[b] * 2048.0));
    pos3 = 0; neg3 = 0; n = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    while (n < N) begin
      @(posedge clk);
      if (valid[0]) begin
        y = $signed(noise[0]);
        a = (y < 0) ? -int'(y) : int'(y);
        if (a >= lim[0]) begin
          if (y > 0) pos3++; else neg3++;
          for (int b = 0; b < NB; b++) if (a >= lim[b] && a < lim[b+1]) band[b]++;
        end
        n++;
      end
    end
    for (int b = 0; b < NB; b++) begin
      e = 2.0 * band_p(EDGE[b], EDGE[b+1]) * real'(N);
      $display("|x| in [%0.1f, %0.1f): %0d, expected %0.1f", EDGE[b], EDGE[b+1], band[b], e);
      check($itor(band[b]) > e - 5.0 * $sqrt(e) - 3.0 && $itor(band[b]) < e + 5.0 * $sqrt(e) + 3.0,
            $sformatf("band %0d count", b));
    end
    ep = band_p(3.0, 100.0) * real'(N);
    $display("x >= 3: %0d, x <= -3: %0d, expected %0.1f each", pos3, neg3, ep);
    check($itor(pos3) > ep - 5.0 * $sqrt(ep) && $itor(pos3) < ep + 5.0 * $sqrt(ep), "positive tail");
    check($itor(neg3) > ep - 5.0 * $sqrt(ep) && $itor(neg3) < ep + 5.0 * $sqrt(ep), "negative tail");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
