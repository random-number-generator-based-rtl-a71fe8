// tb_multimode_ro: checks the stage-level multimode ring model for the four
// ring lengths used (9, 13, 15, 21) with their jitter figures, over ten
// restarts 40 us apart (the design's restart rate). Expected values are
// computed here from the length, the 0.7 ns stage delay and the inverter
// runs (2,2,2 / 4,4,2 / 4,4,4 / 6,6,6):
//   * the output rests high while start_n is low, with no edge in the ring;
//   * a restart puts three edges in the ring;
//   * the first output change comes after the last NAND and its inverter
//     run, (1 + last run) stage delays after the restart;
//   * while three edges circulate, output changes are on average LENGTH*tau/3
//     apart (three times the nominal frequency);
//   * before the next restart every ring has collapsed to one edge;
//   * once collapsed, the half period is LENGTH*tau (f0 = 1/(2 L tau)) and
//     the cycle-to-cycle jitter of full periods is close to the figure.
module tb_multimode_ro;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int NR       = 4;
  localparam int RESTARTS = 10;
  localparam int unsigned LEN  [NR] = '{9, 13, 15, 21};
  localparam int unsigned JIT  [NR] = '{172, 1850, 812, 844};
  localparam int unsigned LAST [NR] = '{2, 2, 4, 6};   // inverters after the last NAND
  localparam int unsigned TAU = 700;
  localparam longint PERIOD_PS = 40_000_000;

  logic          start_n;
  logic [NR-1:0] ro_out;
  int            checks = 0;
  int            failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%0t FAIL %s", $time, what);
    end
  endtask

  initial begin : watchdog
    #(longint'(RESTARTS + 2) * PERIOD_PS);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Results per ring, filled by the generate blocks.
  int  n_start3    [NR];
  int  n_collapsed [NR];
  int  first_bad   [NR];
  real fast_sum    [NR];
  int  fast_n      [NR];
  real slow_sum    [NR];
  int  slow_n      [NR];
  real ccj_ss      [NR];
  int  ccj_n       [NR];

  for (genvar r = 0; r < NR; r++) begin : g_ring
    localparam int unsigned L = LEN[r];
    multimode_ro #(.LENGTH(L), .JITTER_PS(JIT[r]), .SEED(17 + 31 * r)) dut (
      .start_n(start_n),
      .ro_out (ro_out[r])
    );

    // Per-transition spread of the first output change: LAST+1 stages.
    localparam real SIG = real'(JIT[r]) / (2.0 * $sqrt(real'(L)));
    localparam real FIRST_NOM = real'((LAST[r] + 1) * TAU);
    localparam real FIRST_TOL = FIRST_NOM * 0.05 + 6.0 * SIG * $sqrt(real'(LAST[r] + 1)) + 1.0;

    initial begin
      longint t_start, t_prev, t_rise_prev, p_prev, p;
      bit     fast;
      n_start3[r] = 0; n_collapsed[r] = 0; first_bad[r] = 0;
      fast_sum[r] = 0; fast_n[r] = 0; slow_sum[r] = 0; slow_n[r] = 0;
      ccj_ss[r] = 0; ccj_n[r] = 0;
      forever begin
        @(posedge start_n);
        t_start = $time;
        #1;
        if (dut.edges_in_ring == 3) n_start3[r]++;
        @(ro_out[r]);
        if (real'($time - t_start) < FIRST_NOM - FIRST_TOL ||
            real'($time - t_start) > FIRST_NOM + FIRST_TOL) begin
          first_bad[r]++;
          $display("L=%0d first change after %0d ps, expected %0.0f", L, $time - t_start, FIRST_NOM);
        end
        t_prev = $time;
        t_rise_prev = -1;
        p_prev = -1;
        while (start_n) begin
          fast = (dut.edges_in_ring == 3);
          @(ro_out[r] or start_n);
          if (!start_n) break;
          if (fast && dut.edges_in_ring == 3) begin
            fast_sum[r] += real'($time - t_prev);
            fast_n[r]++;
          end else if (dut.edges_in_ring == 1 && dut.merges > 0 && !fast) begin
            slow_sum[r] += real'($time - t_prev);
            slow_n[r]++;
            if (ro_out[r]) begin
              if (t_rise_prev >= 0) begin
                p = $time - t_rise_prev;
                if (p_prev >= 0) begin
                  ccj_ss[r] += real'(p - p_prev) * real'(p - p_prev);
                  ccj_n[r]++;
                end
                p_prev = p;
              end
              t_rise_prev = $time;
            end
          end
          t_prev = $time;
        end
        if (dut.edges_in_ring == 1 || dut.merges > 0) n_collapsed[r]++;
      end
    end
  end

  initial begin
    real nominal, fast_mean, slow_mean, ccj;
    start_n = 1'b0;
    #(100_000);
    check(ro_out == '1, "all rings rest high while start_n is low");
    check(g_ring[0].dut.edges_in_ring == 0 && g_ring[3].dut.edges_in_ring == 0,
          "no edges in a ring at rest");
    for (int k = 0; k < RESTARTS; k++) begin
      start_n = 1'b1;
      #(PERIOD_PS - 40_000);
      check(g_ring[0].dut.edges_in_ring == 1 && g_ring[1].dut.edges_in_ring == 1 &&
            g_ring[2].dut.edges_in_ring == 1 && g_ring[3].dut.edges_in_ring == 1,
            "every ring collapsed to one edge before the restart");
      start_n = 1'b0;
      #(40_000);
      check(ro_out == '1, "rings forced back to rest by the restart pulse");
    end
    for (int r = 0; r < NR; r++) begin
      nominal   = real'(LEN[r] * TAU);
      fast_mean = fast_sum[r] / real'(fast_n[r] > 0 ? fast_n[r] : 1);
      slow_mean = slow_sum[r] / real'(slow_n[r] > 0 ? slow_n[r] : 1);
      ccj       = $sqrt(ccj_ss[r] / real'(ccj_n[r] > 0 ? ccj_n[r] : 1));
      check(n_start3[r] == RESTARTS, $sformatf("L=%0d three edges after %0d of %0d restarts",
                                               LEN[r], n_start3[r], RESTARTS));
      check(first_bad[r] == 0, $sformatf("L=%0d first output change timing", LEN[r]));
      check(n_collapsed[r] == RESTARTS, $sformatf("L=%0d collapsed in %0d of %0d runs",
                                                  LEN[r], n_collapsed[r], RESTARTS));
      check(fast_n[r] >= 3 && fast_mean > nominal / 3.0 * 0.85 && fast_mean < nominal / 3.0 * 1.15,
            $sformatf("L=%0d three-edge half period %0.1f ps over %0d, expected %0.0f",
                      LEN[r], fast_mean, fast_n[r], nominal / 3.0));
      check(slow_n[r] > 1000 && slow_mean > nominal * 0.95 && slow_mean < nominal * 1.05,
            $sformatf("L=%0d collapsed half period %0.1f ps, expected %0.0f", LEN[r], slow_mean, nominal));
      check(ccj > 0.6 * real'(JIT[r]) && ccj < 1.4 * real'(JIT[r]),
            $sformatf("L=%0d cycle-to-cycle jitter %0.1f ps, target %0d", LEN[r], ccj, JIT[r]));
      $display("L=%0d: f0 %0.1f MHz, fast half period %0.0f ps (%0d), ccj %0.0f ps",
               LEN[r], 1.0e6 / (2.0 * slow_mean), fast_mean, fast_n[r], ccj);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
