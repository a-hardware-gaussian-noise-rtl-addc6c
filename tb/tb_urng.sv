// tb_urng: self-checking test of the uniform random number generator.
//
// Records 400 cycles of u1 and u2 and checks, lane by lane (one lane per bit),
// that every lane follows the x^60 + x^59 + 1 recurrence
// o(t+60) = o(t) XOR o(t+1), that no lane is constant, that no two lanes carry
// the same or the inverted sequence (independent registers per bit), that the
// mean of u1 and u2 is near 1/2, and that en = 0 freezes both outputs.
module tb_urng;
  import gng_pkg::*;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic en  = 1'b0;
  logic [U1_W-1:0] u1;
  logic [U2_W-1:0] u2;
  int checks = 0, failures = 0;

  localparam int unsigned NB = U1_W + U2_W;
  localparam int unsigned T  = 400;

  urng dut (.clk, .rst, .en, .u1, .u2);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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

  logic [NB-1:0] rec [T];
  real  m1, m2;
  int   ones, agree;
  logic [U1_W-1:0] h1;
  logic [U2_W-1:0] h2;

  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    en  <= 1'b1;
    @(negedge clk);
    m1 = 0.0; m2 = 0.0;
    for (int t = 0; t < T; t++) begin
      rec[t] = {u2, u1};
      m1 += real'(u1) / 4294967296.0;
      m2 += real'(u2) / 262144.0;
      @(negedge clk);
    end
    m1 /= T; m2 /= T;
    check(m1 > 0.42 && m1 < 0.58, $sformatf("mean of u1 %f", m1));
    check(m2 > 0.42 && m2 < 0.58, $sformatf("mean of u2 %f", m2));
    for (int i = 0; i < NB; i++) begin
      ones = 0;
      for (int t = 0; t < T; t++) ones += int'(rec[t][i]);
      check(ones > T/4 && ones < 3*T/4, $sformatf("lane %0d has %0d ones in %0d", i, ones, T));
      for (int t = 0; t + 60 < T; t++)
        check(rec[t+60][i] == (rec[t][i] ^ rec[t+1][i]), $sformatf("lane %0d recurrence at %0d", i, t));
      for (int j = 0; j < i; j++) begin
        agree = 0;
        for (int t = 0; t < T; t++) agree += int'(rec[t][i] == rec[t][j]);
        check(agree > T/4 && agree < 3*T/4, $sformatf("lanes %0d and %0d agree %0d of %0d", i, j, agree, T));
      end
    end
    en <= 1'b0;
    @(negedge clk);
    h1 = u1; h2 = u2;
    repeat (10) begin
      @(negedge clk);
      check(u1 == h1 && u2 == h2, "outputs changed while en low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
