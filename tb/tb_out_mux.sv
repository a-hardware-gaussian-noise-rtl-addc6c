// tb_out_mux: self-checking test of the toggle-controlled output multiplexor.
//
// Loads random (a, b) pairs every other enabled cycle, as the two ACC(2)
// units do, with en dropped at random, and checks that y carries a, then b,
// then the next a, one new sample per enabled cycle, with y_valid high on
// every such cycle after the first load and y frozen while en is low.
module tb_out_mux;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic en = 1'b0, load = 1'b0;
  logic signed [15:0] a = '0, b = '0;
  logic y_valid;
  logic signed [15:0] y;
  int checks = 0, failures = 0;

  out_mux #(.W(16)) dut (.clk, .rst, .en, .load, .a, .b, .y_valid, .y);

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

  logic signed [15:0] q [$];
  logic signed [15:0] hy, e;
  int phase, nout;

  initial begin
    phase = 0; nout = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst <= 1'b0;
    for (int cyc = 0; cyc < 40000; cyc++) begin
      en   = ($urandom_range(4, 0) != 0);
      load = en && (phase == 0);
      a    = 16'($urandom);
      b    = 16'($urandom);
      hy   = y;
      @(posedge clk);
      if (en) begin
        if (load) begin
          q.push_back(a);
          q.push_back(b);
        end
        phase ^= 1;
      end
      @(negedge clk);
      if (en) begin
        check(y_valid, "y_valid low in an enabled cycle");
        e = q.pop_front();
        check(y == e, $sformatf("y=%0d expected %0d", y, e));
        nout++;
      end else begin
        check(y == hy, "y changed while en low");
      end
    end
    check(nout > 20000, "enough samples");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
