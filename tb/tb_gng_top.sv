// tb_gng_top: end-to-end test of the parallel configuration, three generators.
//
// Drives gng_top with N_INST = 3 and a random clock enable. A gng_checker per
// instance, seeded with that instance's seed, checks every sample against the
// ideal Box-Muller output and the statistics of N(0,1). The testbench also
// checks that the instances produce different, uncorrelated streams, and that
// each mechanism of the design was exercised: pipeline stalls, both outputs of
// the multiplexor (g1 and g2 branches), all four quadrants of u2, u1 in both
// halves of the f segmentation (below and above 1/2) and within 2^-14 of
// either end, and samples beyond 4 sigma.
module tb_gng_top;
  import gng_pkg::*;

  localparam int          NI   = 3;
  localparam logic [63:0] SEED = 64'h0123_4567_89AB_CDEF;
  localparam int          N    = 300000;   // samples per instance

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic en  = 1'b0;
  logic done = 1'b0;
  logic [NI-1:0]            valid;
  logic [NI-1:0][OUT_W-1:0] noise;
  int n_out [NI], n_tail4 [NI], c_chk [NI], c_fail [NI];
  logic [NI-1:0] fin;
  int checks = 0, failures = 0;

  gng_top #(.N_INST(NI), .SEED(SEED)) dut (.clk, .rst, .en, .valid, .noise);

  for (genvar i = 0; i < NI; i++) begin : g_chk
    gng_checker #(.SEED(SEED + 64'(i) * 64'hD1B5_4A32_D192_ED03), .ID(i)) u_chk (
      .clk, .rst, .en, .valid(valid[i]), .noise($signed(noise[i])), .done,
      .n_out(n_out[i]), .n_tail4(n_tail4[i]), .checks(c_chk[i]), .failures(c_fail[i]),
      .finished(fin[i])
    );
  end

  always #5 clk = ~clk;

  initial begin
    repeat (N * 3) @(posedge clk);
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

  // mechanism counters
  int stalls, mux_a, mux_b, quad [4], u1_low, u1_high, u1_steep0, u1_steep1, diff01, diff12;
  real c01, c12, s0, s1, s2, q0, q1, q2;
  int  nc;
  bit  phase_b;

  initial begin
    stalls = 0; mux_a = 0; mux_b = 0; u1_low = 0; u1_high = 0; u1_steep0 = 0; u1_steep1 = 0;
    diff01 = 0; diff12 = 0; nc = 0; phase_b = 0;
    c01 = 0; c12 = 0; s0 = 0; s1 = 0; s2 = 0; q0 = 0; q1 = 0; q2 = 0;
    foreach (quad[q]) quad[q] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    while (n_out[0] < N) begin
      en = ($urandom_range(9, 0) != 0);
      if (!en) stalls++;
      if (en) begin
        quad[dut.g_inst[0].u_core.u_urng.u2[17:16]]++;
        if (dut.g_inst[0].u_core.u_urng.u1[31]) u1_high++; else u1_low++;
        if (dut.g_inst[0].u_core.u_urng.u1 < 32'h0004_0000) u1_steep0++;
        if (dut.g_inst[0].u_core.u_urng.u1 > ~(32'h0004_0000)) u1_steep1++;
      end
      @(posedge clk);
      @(negedge clk);
      if (en && valid[0]) begin
        if (phase_b) mux_b++; else mux_a++;
        phase_b = !phase_b;
        s0 += real'($signed(noise[0])); s1 += real'($signed(noise[1])); s2 += real'($signed(noise[2]));
        q0 += real'($signed(noise[0])) ** 2; q1 += real'($signed(noise[1])) ** 2; q2 += real'($signed(noise[2])) ** 2;
        c01 += real'($signed(noise[0])) * real'($signed(noise[1]));
        c12 += real'($signed(noise[1])) * real'($signed(noise[2]));
        if (noise[0] != noise[1]) diff01++;
        if (noise[1] != noise[2]) diff12++;
        nc++;
      end
    end
    done = 1'b1;
    wait (&fin);
    c01 = (c01 / nc - (s0 / nc) * (s1 / nc)) / $sqrt((q0 / nc - (s0 / nc) ** 2) * (q1 / nc - (s1 / nc) ** 2));
    c12 = (c12 / nc - (s1 / nc) * (s2 / nc)) / $sqrt((q1 / nc - (s1 / nc) ** 2) * (q2 / nc - (s2 / nc) ** 2));
    $display("cross-correlation 0-1 %f, 1-2 %f", c01, c12);
    $display("stalls %0d, mux g1 %0d, mux g2 %0d, quadrants %0d %0d %0d %0d",
             stalls, mux_a, mux_b, quad[0], quad[1], quad[2], quad[3]);
    $display("u1 < 1/2: %0d, >= 1/2: %0d, u1 < 2^-14: %0d, u1 > 1 - 2^-14: %0d, beyond 4 sigma %0d %0d %0d",
             u1_low, u1_high, u1_steep0, u1_steep1, n_tail4[0], n_tail4[1], n_tail4[2]);
    for (int i = 0; i < NI; i++) begin
      checks += c_chk[i];
      failures += c_fail[i];
    end
    check(c01 > -0.01 && c01 < 0.01 && c12 > -0.01 && c12 < 0.01, "instances uncorrelated");
    check(diff01 > nc * 9 / 10 && diff12 > nc * 9 / 10, "instances differ");
    check(stalls > 0, "stall exercised");
    check(mux_a > 0 && mux_b > 0, "both multiplexor inputs used");
    foreach (quad[q]) check(quad[q] > 0, $sformatf("quadrant %0d exercised", q));
    check(u1_low > 0 && u1_high > 0, "both halves of the f segmentation exercised");
    check(u1_steep0 > 0 && u1_steep1 > 0, "outer segments of f (within 2^-14 of 0 and of 1) exercised");
    check(n_tail4[0] + n_tail4[1] + n_tail4[2] > 0, "samples beyond 4 sigma");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
