// tb_trng_top_full: the TRNG with every parameter at its default, run until
// its Von Neumann corrector has delivered 20000 bits (about 1.6 ms of
// operation, 40 ring restarts), with the shared monitor checking restarts,
// corrector, byte assembly and every UART frame sent meanwhile.
//
// The 20000 corrected bits then go through the FIPS 140-1 statistical tests
// (monobit, poker, runs, long run) and, for information, the tighter
// FIPS 140-2 bounds. They also go through two tests of the NIST SP 800-22
// suite that need no incomplete gamma function (frequency, cumulative sums
// in forward mode and runs, pass at P >= 0.01) and through test T5 of the AIS 31 procedure A
// (autocorrelation: the worst shift of the first 10000 bits, re-tested on
// the second 10000 bits, must give 2326 < Z < 2674). Note that the noise here comes from the behavioural
// ring models, whose jitter is drawn from a pseudo-random generator: the
// tests show that the datapath preserves the statistics of its source, not
// that a physical implementation would pass.
module tb_trng_top_full;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int NBITS = 20000;

  logic       clk = 1'b0;
  logic       reset;
  logic       tx, led_active, led_done, bit_valid, bit_value, byte_ready;
  logic [7:0] byte_data;
  int         mchecks, mfails, n_restarts, n_merged, n_vn, n_disc, n_bytes, n_drop, n_frames;

  always #10 clk = ~clk;

  trng_top dut (.*);

  trng_monitor #(.PP(1'b1)) mon (
    .clk(clk), .reset(reset), .ring_start_n(dut.ring_start_n),
    .raw_bit(dut.u_src.raw_bit), .bit_valid(bit_valid), .bit_value(bit_value),
    .byte_ready(byte_ready), .led_active(led_active), .tx(tx),
    .ring_merges(dut.u_src.u_ro9.g_ring[0].u_ro.merges),
    .checks(mchecks), .failures(mfails), .n_restarts(n_restarts),
    .n_merged_rings(n_merged), .n_vn_bits(n_vn), .n_vn_discards(n_disc),
    .n_bytes(n_bytes), .n_dropped(n_drop), .n_frames(n_frames)
  );

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end else $display("pass %s", what);
  endtask

  initial begin : watchdog
    repeat (400_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + mchecks, failures + mfails);
    $finish;
  end

  bit seq [NBITS];
  int nseq = 0;
  always @(negedge clk) if (!reset && bit_valid && nseq < NBITS) begin
    seq[nseq] = bit_value;
    nseq++;
  end

  // FIPS 140 runs intervals, lengths 1..5 and 6 or more.
  localparam int R1_MIN [6] = '{2267, 1079, 502, 223, 90, 90};
  localparam int R1_MAX [6] = '{2733, 1421, 748, 402, 223, 223};
  localparam int R2_MIN [6] = '{2343, 1135, 542, 251, 111, 111};
  localparam int R2_MAX [6] = '{2657, 1365, 708, 373, 201, 201};

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

  // Standard normal distribution function.
  function automatic real phi(input real x);
    return 0.5 * erfc(-x / $sqrt(2.0));
  endfunction

  initial begin
    int   ones, longest, run, f [16];
    int   s_sum, v_obs, z, worst, worst_tau, walk, zmax;
    real  sq, acc;
    real  pi1, p_val, dev;
    int   runs [2][6];
    real  poker;
    bit   ok1, ok2;
    reset = 1'b1;
    repeat (5) @(negedge clk);
    reset = 1'b0;
    wait (nseq == NBITS);
    repeat (10) @(negedge clk);

    // Monobit.
    ones = 0;
    foreach (seq[i]) ones += int'(seq[i]);
    check(ones > 9654 && ones < 10346, $sformatf("FIPS 140-1 monobit: %0d ones", ones));
    // Poker on 5000 4-bit nibbles.
    foreach (f[i]) f[i] = 0;
    for (int i = 0; i < NBITS / 4; i++)
      f[{seq[4*i], seq[4*i+1], seq[4*i+2], seq[4*i+3]}]++;
    poker = 0;
    foreach (f[i]) poker += real'(f[i]) * real'(f[i]);
    poker = 16.0 / 5000.0 * poker - 5000.0;
    check(poker > 1.03 && poker < 57.4, $sformatf("FIPS 140-1 poker: X = %0.2f", poker));
    // Runs and long run.
    foreach (runs[b, k]) runs[b][k] = 0;
    longest = 0; run = 1;
    for (int i = 1; i <= NBITS; i++) begin
      if (i < NBITS && seq[i] == seq[i-1]) run++;
      else begin
        runs[seq[i-1]][run > 6 ? 5 : run - 1]++;
        if (run > longest) longest = run;
        run = 1;
      end
    end
    ok1 = 1; ok2 = 1;
    for (int b = 0; b < 2; b++)
      for (int k = 0; k < 6; k++) begin
        if (runs[b][k] < R1_MIN[k] || runs[b][k] > R1_MAX[k]) ok1 = 0;
        if (runs[b][k] < R2_MIN[k] || runs[b][k] > R2_MAX[k]) ok2 = 0;
      end
    $display("runs of 0s (lengths 1..5, 6+): %0d %0d %0d %0d %0d %0d", runs[0][0], runs[0][1], runs[0][2], runs[0][3], runs[0][4], runs[0][5]);
    $display("runs of 1s (lengths 1..5, 6+): %0d %0d %0d %0d %0d %0d", runs[1][0], runs[1][1], runs[1][2], runs[1][3], runs[1][4], runs[1][5]);
    check(ok1, "FIPS 140-1 runs");
    check(longest < 34, $sformatf("FIPS 140-1 long run: longest %0d", longest));
    $display("FIPS 140-2 (information): monobit %s, poker %s, runs %s, long run %s",
             (ones > 9725 && ones < 10275) ? "pass" : "fail",
             (poker > 2.16 && poker < 46.17) ? "pass" : "fail",
             ok2 ? "pass" : "fail", longest < 26 ? "pass" : "fail");

    // NIST SP 800-22 frequency (monobit) test.
    s_sum = 2 * ones - NBITS;
    p_val = erfc(real'(s_sum < 0 ? -s_sum : s_sum) / $sqrt(2.0 * NBITS));
    check(p_val >= 0.01, $sformatf("NIST frequency: P = %0.4f", p_val));
    // NIST SP 800-22 cumulative sums test, forward mode.
    walk = 0; zmax = 0;
    foreach (seq[i]) begin
      walk += seq[i] ? 1 : -1;
      if ((walk < 0 ? -walk : walk) > zmax) zmax = walk < 0 ? -walk : walk;
    end
    sq = $sqrt(real'(NBITS));
    acc = 1.0;
    for (int k = (-NBITS / zmax + 1) / 4; k <= (NBITS / zmax - 1) / 4; k++)
      acc -= phi(real'(4*k+1) * zmax / sq) - phi(real'(4*k-1) * zmax / sq);
    for (int k = (-NBITS / zmax - 3) / 4; k <= (NBITS / zmax - 1) / 4; k++)
      acc += phi(real'(4*k+3) * zmax / sq) - phi(real'(4*k+1) * zmax / sq);
    check(acc >= 0.01, $sformatf("NIST cumulative sums: max excursion %0d, P = %0.4f", zmax, acc));
    // NIST SP 800-22 runs test (its frequency prerequisite is checked too).
    pi1 = real'(ones) / NBITS;
    v_obs = 1;
    for (int i = 1; i < NBITS; i++) if (seq[i] != seq[i-1]) v_obs++;
    dev = real'(v_obs) - 2.0 * NBITS * pi1 * (1.0 - pi1);
    p_val = erfc((dev < 0.0 ? -dev : dev) / (2.0 * $sqrt(2.0 * NBITS) * pi1 * (1.0 - pi1)));
    check((pi1 - 0.5 < 2.0 / $sqrt(real'(NBITS))) && (0.5 - pi1 < 2.0 / $sqrt(real'(NBITS)))
          && p_val >= 0.01, $sformatf("NIST runs: %0d runs, P = %0.4f", v_obs, p_val));
    // AIS 31 T5 autocorrelation.
    worst = -1; worst_tau = 1;
    for (int tau = 1; tau <= 5000; tau++) begin
      z = 0;
      for (int j = 0; j < 5000; j++) z += int'(seq[j] ^ seq[j+tau]);
      if ((z > 2500 ? z - 2500 : 2500 - z) > worst) begin
        worst = z > 2500 ? z - 2500 : 2500 - z;
        worst_tau = tau;
      end
    end
    z = 0;
    for (int j = 10000; j < 15000; j++) z += int'(seq[j] ^ seq[j+worst_tau]);
    check(z > 2326 && z < 2674, $sformatf("AIS 31 T5: worst shift %0d (|Z-2500| = %0d), re-test Z = %0d",
                                          worst_tau, worst, z));

    // The design's mechanisms all occurred during the run.
    $display("restarts=%0d merged=%0d bits=%0d discarded_pairs=%0d bytes=%0d dropped=%0d frames=%0d",
             n_restarts, n_merged, n_vn, n_disc, n_bytes, n_drop, n_frames);
    check(n_restarts > 10 && n_merged > 0 && n_disc > 0 && n_drop > 0 && n_frames > 5,
          "restarts, ring collapse, discarded pairs, dropped bytes and frames all occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks + mchecks, failures + mfails);
    $finish;
  end
endmodule
