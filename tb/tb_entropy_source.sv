// tb_entropy_source: checks the noise source and sampler with all 36 rings.
//   * raw_bit is the XOR of the four groups as it stood at the previous
//     rising clock edge (one flip-flop, no other logic);
//   * with the rings held at rest the XOR of four high groups is 0;
//   * with restarts every 40 us, as in the design, the sampled stream is
//     not stuck and its share of ones lies between 40 % and 60 %;
//   * the raw stream, as the design without post-processing would send it,
//     passes the NIST SP 800-22 frequency and runs tests (P >= 0.01) on
//     its 20000 samples.
module tb_entropy_source;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 1'b0;
  logic start_n;
  logic noise;
  logic raw_bit;
  int   checks = 0;
  int   failures = 0;

  entropy_source dut (.*);

  always #10 clk = ~clk;   // 50 MHz

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%0t FAIL %s", $time, what);
    end
  endtask

  // Complementary error function (Chebyshev fit, relative error < 1.2e-7).
  function automatic real erfc(input real x);
    real z, t, r;
    z = x < 0.0 ? -x : x;
    t = 1.0 / (1.0 + 0.5 * z);
    r = t * $exp(-z*z - 1.26551223 + t*(1.00002368 + t*(0.37409196 + t*(0.09678418 +
        t*(-0.18628806 + t*(0.27886807 + t*(-1.13520398 + t*(1.48851587 +
        t*(-0.82215223 + t*0.17087277)))))))));
    return x >= 0.0 ? r : 2.0 - r;
  endfunction

  // Expected sample: XOR of the four group outputs seen at the clock edge.
  logic expect_bit;
  int   sample_bad = 0;
  int   ones = 0;
  int   samples = 0;
  int   toggles = 0;
  logic prev_bit;
  bit   counting = 0;

  always @(posedge clk) begin
    expect_bit <= ^{dut.u_ro9.group_out, dut.u_ro13.group_out,
                    dut.u_ro15.group_out, dut.u_ro21.group_out};
  end
  always @(negedge clk) if (counting) begin
    if (raw_bit !== expect_bit) sample_bad++;
    samples++;
    if (raw_bit) ones++;
    if (raw_bit != prev_bit) toggles++;
    prev_bit = raw_bit;
  end

  initial begin
    real pi1, dev, p_val;
    start_n = 1'b0;
    repeat (20) @(negedge clk);
    check(noise == 1'b0 && raw_bit == 1'b0, "rest value of the XOR is 0");
    counting = 1;
    prev_bit = raw_bit;
    // 20000 samples with a 40 ns restart pulse every 40 us (2000 clocks).
    for (int p = 0; p < 10; p++) begin
      start_n = 1'b1;
      repeat (1998) @(negedge clk);
      start_n = 1'b0;
      repeat (2) @(negedge clk);
    end
    counting = 0;
    check(sample_bad == 0, $sformatf("%0d samples differ from the XOR at the clock edge", sample_bad));
    check(ones > samples * 4 / 10 && ones < samples * 6 / 10,
          $sformatf("%0d ones in %0d samples", ones, samples));
    check(toggles > samples / 4, $sformatf("%0d changes in %0d samples", toggles, samples));
    $display("samples=%0d ones=%0d changes=%0d", samples, ones, toggles);
    // NIST frequency test, then the runs test (runs = changes + 1).
    dev = real'(2 * ones - samples);
    p_val = erfc((dev < 0.0 ? -dev : dev) / $sqrt(2.0 * samples));
    check(p_val >= 0.01, $sformatf("NIST frequency on raw bits: P = %0.4f", p_val));
    $display("NIST frequency on raw bits: P = %0.4f", p_val);
    pi1 = real'(ones) / samples;
    dev = real'(toggles + 1) - 2.0 * samples * pi1 * (1.0 - pi1);
    p_val = erfc((dev < 0.0 ? -dev : dev) / (2.0 * $sqrt(2.0 * samples) * pi1 * (1.0 - pi1)));
    check(p_val >= 0.01, $sformatf("NIST runs on raw bits: P = %0.4f", p_val));
    $display("NIST runs on raw bits: P = %0.4f", p_val);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
