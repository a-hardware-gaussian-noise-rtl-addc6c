// tb_f_eval: self-checking test of the f(u1) = sqrt(-ln u1) evaluator.
//
// Drives segment boundaries, the extremes (u1 = 0, 1, 2^32 - 1) and random
// inputs spread over all magnitudes (uniform, and with random numbers of
// leading zeros or ones), one per cycle, with en dropped at random. Every
// output is compared, three enabled cycles after its input, with
// sqrt(-ln(u1 / 2^32)) computed in double precision (u1 = 0 taken as 1); the
// allowed absolute error is 0.0135 (the 6-bit gradient limits the
// accuracy at segment ends). Also
// checks that f_o is frozen while en is low.
module tb_f_eval;
  import gng_pkg::*;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic en  = 1'b0;
  logic [U1_W-1:0] u1 = '0;
  logic [F_W-1:0]  f_o;
  int checks = 0, failures = 0;

  f_eval dut (.clk, .rst, .en, .u1, .f_o);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real f_ref(input logic [31:0] u);
    real x;
    x = (u == 0) ? 1.0 : real'(u);
    return $sqrt(-$ln(x / 4294967296.0));
  endfunction

  function automatic logic [31:0] stim(input int n);
    int k;
    logic [31:0] r;
    if (n < 64) begin
      k = n / 2;
      return (n % 2) ? (32'h1 << k) : ((32'h1 << k) - 1);
    end
    if (n < 128) begin
      k = (n - 64) / 2;
      return (n % 2) ? ~(32'h1 << k) + 1 : ~((32'h1 << k) - 1);
    end
    r = $urandom;
    case ($urandom_range(2, 0))
      0: return r;
      1: return r >> $urandom_range(31, 0);
      default: return ~(r >> $urandom_range(31, 0));
    endcase
  endfunction

  logic [31:0] hist [$];   // inputs taken on enabled edges
  real  err, worst;
  logic [31:0] u_exp;
  logic [F_W-1:0] held;
  int   n_in;

  initial begin
    worst = 0.0;
    n_in  = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst <= 1'b0;
    for (int cyc = 0; cyc < 60000; cyc++) begin
      en = ($urandom_range(7, 0) != 0);
      if (en) begin
        u1 = stim(n_in);
        n_in++;
      end
      held = f_o;
      @(posedge clk);
      if (en) hist.push_back(u1);
      @(negedge clk);
      if (!en) begin
        check(f_o == held, "f_o changed while en low");
      end else if (hist.size() >= 3) begin
        u_exp = hist[hist.size() - 3];
        err = real'(f_o) / 536870912.0 - f_ref(u_exp);
        if (err < 0) err = -err;
        if (err > worst) worst = err;
        check(err <= 0.0135,
              $sformatf("u1=%08h f=%f ref=%f", u_exp, real'(f_o) / 536870912.0, f_ref(u_exp)));
        if (hist.size() > 8) void'(hist.pop_front());
      end
    end
    $display("worst abs error %g", worst);
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
endmodule
