// tb_acc2: self-checking test of the ACC(2) pairwise accumulator.
//
// Feeds random signed products (including the largest magnitudes) with
// in_valid and en dropped at random. A reference pairs the accepted inputs
// itself and computes round((x0 + x1) / 2^9) with integer arithmetic; each
// sum_valid pulse must carry the next expected sum, pulses must come exactly
// once per two accepted inputs, and sum must not change between pulses.
module tb_acc2;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic en = 1'b0, in_valid = 1'b0;
  logic signed [24:0] x = '0;
  logic sum_valid;
  logic signed [15:0] sum;
  int checks = 0, failures = 0;

  acc2 #(.IN_W(25), .OUT_W(16), .DROP(9)) dut (.clk, .rst, .en, .in_valid, .x, .sum_valid, .sum);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  longint pend, exp_sum;
  bit     have_first, exp_pulse;
  int     pulses, expected_pulses;
  logic signed [15:0] last_sum;

  initial begin
    have_first = 0; pulses = 0; expected_pulses = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst <= 1'b0;
    last_sum = 0;
    for (int cyc = 0; cyc < 50000; cyc++) begin
      en       = ($urandom_range(5, 0) != 0);
      in_valid = ($urandom_range(5, 0) != 0);
      case ($urandom_range(3, 0))
        0: x = 25'sd4938000;           // about +4.71
        1: x = -25'sd4938000;
        default: x = 25'($signed($urandom) >>> 9);
      endcase
      exp_pulse = 0;
      if (en && in_valid) begin
        if (!have_first) begin
          pend = longint'(x);
          have_first = 1;
        end else begin
          exp_sum = (pend + longint'(x) + 256) >>> 9;
          have_first = 0;
          exp_pulse = 1;
          expected_pulses++;
        end
      end
      @(posedge clk);
      @(negedge clk);
      if (en) begin
        check(sum_valid == exp_pulse, $sformatf("sum_valid=%0d expected %0d", sum_valid, exp_pulse));
        if (exp_pulse) check(longint'(sum) == exp_sum, $sformatf("sum=%0d expected %0d", sum, exp_sum));
        else           check(sum == last_sum, "sum changed without a pulse");
      end
      if (sum_valid && en) pulses++;
      last_sum = sum;
    end
    check(pulses == expected_pulses && pulses > 1000, $sformatf("%0d pulses, expected %0d", pulses, expected_pulses));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
