// tb_g_eval: self-checking test of the g1/g2 (sine/cosine) evaluator.
//
// Drives every quadrant with the end points 0 and 2^16 - 1 of the position,
// every segment boundary, and random u2, one per cycle with en dropped at
// random. Each output pair is compared, three enabled cycles after its
// input, with sin(2*pi*u2/2^18) and cos(2*pi*u2/2^18) in double precision;
// allowed absolute error 0.0025. Also checks that sin^2 + cos^2 stays near 1,
// that all four quadrants and both signs occur, and that en = 0 freezes the
// outputs.
module tb_g_eval;
  import gng_pkg::*;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic en  = 1'b0;
  logic [U2_W-1:0] u2 = '0;
  logic signed [G_W-1:0] g1, g2;
  int checks = 0, failures = 0;

  g_eval dut (.clk, .rst, .en, .u2, .g1_o(g1), .g2_o(g2));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  function automatic logic [17:0] stim(input int n);
    logic [15:0] pos;
    if (n < 4 * 40) begin
      // per quadrant: 0, 2^16-1, and both sides of 19 boundaries
      int k = n % 40;
      if (k == 0)      pos = 16'h0000;
      else if (k == 1) pos = 16'hFFFF;
      else begin
        int b = (k - 2) / 2;
        int edge_pos = (b < 3) ? (b + 1) * 8192 : 32768 + (b - 3) * 2048;
        pos = 16'((k % 2) ? edge_pos : edge_pos - 1);
      end
      return {2'(n / 40), pos};
    end
    return 18'($urandom);
  endfunction

  logic [17:0] hist [$];
  logic [17:0] u_exp;
  logic signed [G_W-1:0] h1, h2;
  real  a, s, c, e1, e2, worst, r2;
  int   n_in;
  int   quad_seen [4];
  int   neg1, pos1;

  initial begin
    worst = 0.0;
    n_in = 0; neg1 = 0; pos1 = 0;
    foreach (quad_seen[q]) quad_seen[q] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst <= 1'b0;
    for (int cyc = 0; cyc < 40000; cyc++) begin
      en = ($urandom_range(7, 0) != 0);
      if (en) begin
        u2 = stim(n_in);
        n_in++;
      end
      h1 = g1; h2 = g2;
      @(posedge clk);
      if (en) hist.push_back(u2);
      @(negedge clk);
      if (!en) begin
        check(g1 == h1 && g2 == h2, "outputs changed while en low");
      end else if (hist.size() >= 3) begin
        u_exp = hist[hist.size() - 3];
        a  = TWO_PI * real'(u_exp) / 262144.0;
        s  = $sin(a);
        c  = $cos(a);
        e1 = real'(g1) / 65536.0 - s;
        e2 = real'(g2) / 65536.0 - c;
        if (e1 < 0) e1 = -e1;
        if (e2 < 0) e2 = -e2;
        if (e1 > worst) worst = e1;
        if (e2 > worst) worst = e2;
        check(e1 <= 0.0025, $sformatf("u2=%05h g1=%f sin=%f", u_exp, real'(g1) / 65536.0, s));
        check(e2 <= 0.0025, $sformatf("u2=%05h g2=%f cos=%f", u_exp, real'(g2) / 65536.0, c));
        r2 = (real'(g1) * real'(g1) + real'(g2) * real'(g2)) / 4294967296.0;
        check(r2 > 0.995 && r2 < 1.005, $sformatf("u2=%05h sin^2+cos^2=%f", u_exp, r2));
        quad_seen[u_exp[17:16]]++;
        if (g1 < 0) neg1++;
        if (g1 > 0) pos1++;
        if (hist.size() > 8) void'(hist.pop_front());
      end
    end
    foreach (quad_seen[q]) check(quad_seen[q] > 1000, $sformatf("quadrant %0d seen %0d times", q, quad_seen[q]));
    check(neg1 > 1000 && pos1 > 1000, "both signs of g1");
    $display("worst abs error %g", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
