// tb_gng_full: the generator at its default configuration, four million samples.
//
// gng_top with every parameter at its default (one generator, default seed)
// runs from reset until 4,000,000 samples have been produced, with the clock
// enable dropped now and then. gng_checker compares every sample with the
// ideal Box-Muller output and, at the end, applies the chi-square test
// (700 bins on [-7, 7]), the Kolmogorov-Smirnov test, the mean, variance and
// lag-1 correlation checks and the count of samples beyond 4 sigma. It also
// checks that one sample leaves per enabled clock once the pipeline is full.
module tb_gng_full;
  import gng_pkg::*;

  localparam int N = 4_000_000;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic en  = 1'b0;
  logic done = 1'b0;
  logic [0:0]            valid;
  logic [0:0][OUT_W-1:0] noise;
  int   n_out, n_tail4, c_chk, c_fail;
  logic fin;
  int   checks = 0, failures = 0;
  int   en_cycles, stalls;

  gng_top dut (.clk, .rst, .en, .valid, .noise);

  gng_checker u_chk (
    .clk, .rst, .en, .valid(valid[0]), .noise($signed(noise[0])), .done,
    .n_out, .n_tail4, .checks(c_chk), .failures(c_fail), .finished(fin)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (N + N / 4) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en_cycles = 0; stalls = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    while (n_out < N) begin
      en = ($urandom_range(63, 0) != 0);
      if (en) en_cycles++; else stalls++;
      @(posedge clk);
      @(negedge clk);
      #1;
    end
    done = 1'b1;
    wait (fin);
    checks = c_chk + 1;
    failures = c_fail;
    // 6 enabled edges fill the pipeline, then one sample per enabled edge
    if (n_out != en_cycles - 6) begin
      failures++;
      $display("FAIL: %0d samples in %0d enabled cycles", n_out, en_cycles);
    end
    $display("%0d samples in %0d enabled cycles, %0d stall cycles", n_out, en_cycles, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
