// multimode_ro: behavioural model of one 3-edge (multimode) ring oscillator.
// This is a simulation model, not synthesizable logic: a real ring is a
// combinational loop whose period comes from gate delays and noise, which a
// cycle-based simulator cannot reproduce.
//
// Structure modelled, stage by stage: LENGTH inverting stages in a loop, of
// which INJECTIONS (three) are two-input NAND gates whose second input is the
// shared start_n line; each NAND is followed by an even run of inverters
// (2,2,2 for length 9; 4,4,2 for 13; 4,4,4 for 15; 6,6,6 for 21) and the
// output is the last inverter of the loop.
//
// Timing model: every stage has its own fixed delay, drawn once within
// +-5 % of TAU_PS, plus a fresh random deviation on every transition (sum of
// two uniform draws, standard deviation JITTER_PS / (2*sqrt(LENGTH)), which
// makes the cycle-to-cycle jitter of the collapsed ring about JITTER_PS).
// Stages are inertial: when a stage's input returns before its output has
// switched, the pending switch is cancelled and the pulse is swallowed.
//
// Behaviour that follows from it:
//   * start_n low forces every NAND output high, so the ring rests with all
//     run ends high and the output high;
//   * the rising edge of start_n makes all NANDs switch at once: three edges
//     circulate and the output toggles about three times per nominal period
//     f0 = 1 / (2 * LENGTH * tau);
//   * the jitter moves the edges relative to each other; when two meet, the
//     pulse between them is swallowed and the ring continues with one edge
//     at f0 (edges can only vanish in pairs in a loop with an odd number of
//     inversions). How long that takes depends on the jitter and on the
//     spacing of the edges, so it differs from ring to ring.
// The NAND-and-inverter structure, the three injections, tau_d = 0.7 ns and
// the measured jitter per ring length come from the design's description.
// The split of inverters for lengths 13, 15 and 21, the +-5 % stage spread,
// the jitter distribution and the inertial rule are this model's choices.
//
// Interface: start_n (active-low restart), ro_out (ring output). No clock.
// A change of start_n is acted on at the ring's next internal event, at most
// one stage delay late, or at once when the ring is at rest. For
// observation, edges_in_ring counts the edges circulating and merges counts
// the swallowed pulses since the last restart.
module multimode_ro #(
  parameter int unsigned LENGTH     = 9,
  parameter int unsigned INJECTIONS = 3,
  parameter int unsigned TAU_PS     = 700,
  parameter int unsigned JITTER_PS  = 172,
  parameter int unsigned SEED       = 1
) (
  input  logic start_n,
  output logic ro_out
);
  timeunit 1ps;
  timeprecision 1ps;

  // Inverters after each NAND: equal even runs, remainder in the last run.
  localparam int unsigned INVS = LENGTH - INJECTIONS;
  localparam int unsigned RUN  = 2 * ((INVS + 2 * INJECTIONS - 1) / (2 * INJECTIONS));

  function automatic bit is_nand(input int unsigned k);
    for (int unsigned j = 0; j < INJECTIONS; j++)
      if (k == j * (RUN + 1)) return 1'b1;
    return 1'b0;
  endfunction

  // Jitter per transition: the sum of two uniform draws on [-SPAN, SPAN] has
  // a standard deviation of SPAN * sqrt(2/3). A collapsed period spans
  // 2*LENGTH transitions, and the difference of two periods 4*LENGTH, so a
  // per-transition deviation of JITTER_PS / (2*sqrt(LENGTH)) gives a
  // cycle-to-cycle jitter of JITTER_PS.
  localparam real SIGMA_STAGE = real'(JITTER_PS) / (2.0 * $sqrt(real'(LENGTH)));
  localparam int unsigned SPAN = int'(SIGMA_STAGE * 1.2247449);
  localparam int unsigned MIN_DELAY_PS = 10;

  logic [31:0]    rng;
  bit             node    [LENGTH];
  bit             pending [LENGTH];
  longint         due     [LENGTH];
  int unsigned    tau_k   [LENGTH];
  int             edges_in_ring;
  int             merges;
  logic           last_start;

  function automatic logic [31:0] next_rand(input logic [31:0] s);
    logic [31:0] x;
    x = s;
    x = x ^ (x << 13);
    x = x ^ (x >> 17);
    x = x ^ (x << 5);
    return x;
  endfunction

  task automatic draw(output int unsigned r);
    rng = next_rand(rng);
    r   = rng;
  endtask

  function automatic bit target(input int unsigned k);
    bit in;
    in = node[(k + LENGTH - 1) % LENGTH];
    return is_nand(k) ? !(in && last_start) : !in;
  endfunction

  // Re-evaluate stage k at time now: schedule, keep or cancel its switch.
  task automatic evaluate(input int unsigned k, input longint now);
    int          d;
    int unsigned r1, r2;
    if (target(k) == node[k]) begin
      if (pending[k]) begin
        pending[k] = 1'b0;
        edges_in_ring--;
      end
    end else if (!pending[k]) begin
      draw(r1);
      draw(r2);
      d = int'(tau_k[k]) + int'(r1 % (2 * SPAN + 1)) + int'(r2 % (2 * SPAN + 1))
          - 2 * int'(SPAN);
      if (d < int'(MIN_DELAY_PS)) d = MIN_DELAY_PS;
      pending[k] = 1'b1;
      due[k]     = now + longint'(d);
      edges_in_ring++;
    end
  endtask

  initial begin
    int     next_k;
    int     n_before;
    longint t_next;
    int unsigned r;
    rng = 32'(SEED) * 32'h9E37_79B9;
    if (rng == 32'd0) rng = 32'h1234_5678;
    for (int unsigned k = 0; k < LENGTH; k++) begin
      draw(r);
      tau_k[k]   = TAU_PS - TAU_PS / 20 + (r % (TAU_PS / 10 + 1));
      pending[k] = 1'b0;
    end
    // Rest state: NAND outputs high, each run alternating back to high.
    for (int unsigned k = 0; k < LENGTH; k++)
      node[k] = is_nand(k) ? 1'b1 : !node[(k + LENGTH - 1) % LENGTH];
    edges_in_ring = 0;
    merges        = 0;
    last_start    = 1'b0;
    ro_out        = node[LENGTH-1];
    forever begin
      if (start_n !== last_start) begin
        last_start = start_n;
        if (start_n) merges = 0;
        for (int unsigned k = 0; k < LENGTH; k++)
          if (is_nand(k)) evaluate(k, longint'($time));
      end
      if (edges_in_ring == 0) begin
        wait (start_n !== last_start);
        continue;
      end
      next_k = -1;
      t_next = 0;
      for (int k = 0; k < int'(LENGTH); k++)
        if (pending[k] && (next_k < 0 || due[k] < t_next)) begin
          next_k = k;
          t_next = due[k];
        end
      if (t_next > longint'($time)) #(t_next - longint'($time));
      node[next_k]    = !node[next_k];
      pending[next_k] = 1'b0;
      edges_in_ring--;
      if (next_k == int'(LENGTH) - 1) ro_out = node[next_k];
      n_before = edges_in_ring;
      evaluate((next_k + 1) % LENGTH, longint'($time));
      // The edge moved on unless the next stage's pending switch was
      // cancelled, which swallows a pulse: two edges gone.
      if (edges_in_ring < n_before) merges++;
    end
  end
endmodule
