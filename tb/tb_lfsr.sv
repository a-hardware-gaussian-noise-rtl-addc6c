// tb_lfsr: self-checking test of the LFSR.
//
// Three instances: the full 60-bit register and two small ones (4 and 7 bits,
// taps 4/3 and 7/6) whose maximal periods, 15 and 127, can be measured
// exactly. For the 60-bit register the test checks that the first 60 output
// bits are the seed (MSB first), that the output obeys the recurrence
// o(t+60) = o(t) XOR o(t+1) of x^60 + x^59 + 1, that en = 0 freezes it and that
// reset reloads the seed.
module tb_lfsr;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic en  = 1'b0;
  logic b60, b4, b7;
  int   checks = 0, failures = 0;

  localparam logic [59:0] SEED60 = 60'hA5C_3F01_9E77_D2B4;

  lfsr #(.W(60), .TAP_A(60), .TAP_B(59), .SEED(SEED60)) dut60 (.clk, .rst, .en, .bit_o(b60));
  lfsr #(.W(4),  .TAP_A(4),  .TAP_B(3),  .SEED(4'h9))   dut4  (.clk, .rst, .en, .bit_o(b4));
  lfsr #(.W(7),  .TAP_A(7),  .TAP_B(6),  .SEED(7'h01))  dut7  (.clk, .rst, .en, .bit_o(b7));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  bit o   [0:2047];
  bit s4  [0:63];
  bit s7  [0:511];
  int period4, period7;
  bit held;
  bit same;

  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    en  <= 1'b1;
    @(negedge clk);
    for (int t = 0; t < 2048; t++) begin
      o[t] = b60;
      if (t < 64)  s4[t] = b4;
      if (t < 512) s7[t] = b7;
      @(negedge clk);
    end
    // seed comes out first, MSB first
    for (int t = 0; t < 60; t++)
      check(o[t] == SEED60[59-t], $sformatf("seed bit %0d", t));
    // recurrence of x^60 + x^59 + 1
    for (int t = 0; t + 60 < 2048; t++)
      check(o[t+60] == (o[t] ^ o[t+1]), $sformatf("recurrence at %0d", t));
    // exact periods of the small registers
    period4 = 0;
    for (int p = 1; p < 32 && period4 == 0; p++) begin
      same = 1;
      for (int t = 0; t < 32; t++) if (s4[t] != s4[t+p]) same = 0;
      if (same) period4 = p;
    end
    check(period4 == 15, $sformatf("4-bit period %0d, expected 15", period4));
    period7 = 0;
    for (int p = 1; p < 256 && period7 == 0; p++) begin
      same = 1;
      for (int t = 0; t < 256; t++) if (s7[t] != s7[t+p]) same = 0;
      if (same) period7 = p;
    end
    check(period7 == 127, $sformatf("7-bit period %0d, expected 127", period7));
    // en low freezes the state
    en <= 1'b0;
    @(negedge clk);
    held = b60;
    for (int t = 0; t < 70; t++) begin
      @(negedge clk);
      check(b60 == held, "output changed while en low");
    end
    // reset reloads the seed
    rst <= 1'b1;
    @(negedge clk);
    rst <= 1'b0;
    en  <= 1'b1;
    for (int t = 0; t < 60; t++) begin
      check(b60 == SEED60[59-t], $sformatf("seed bit %0d after reset", t));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
