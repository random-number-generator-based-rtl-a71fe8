// ro_group: NUM_RINGS multimode ring oscillators of one length, XORed.
//
// The entropy source holds four such groups (ring lengths 9, 13, 15 and 21),
// each of nine rings that share one restart line. The nine outputs are
// combined by an XOR reduction, so the group output toggles whenever any one
// ring toggles, and its jitter is the accumulation of all nine rings'.
// Nine rings per group, the lengths and the XOR come from the design's
// description; each ring gets its own SEED so that the behavioural models
// draw independent delays and jitter.
//
// The rings are behavioural models (see multimode_ro), so this group is a
// simulation model as a whole; the XOR itself is ordinary logic.
//
// Interface: start_n (active-low restart shared by every ring), group_out
// (XOR of all ring outputs). Purely combinational after the rings.
module ro_group #(
  parameter int unsigned LENGTH     = 9,
  parameter int unsigned NUM_RINGS  = 9,
  parameter int unsigned INJECTIONS = 3,
  parameter int unsigned TAU_PS     = 700,
  parameter int unsigned JITTER_PS  = 172,
  parameter int unsigned SEED_BASE  = 1
) (
  input  logic start_n,
  output logic group_out
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [NUM_RINGS-1:0] ring_out;

  for (genvar i = 0; i < int'(NUM_RINGS); i++) begin : g_ring
    multimode_ro #(
      .LENGTH    (LENGTH),
      .INJECTIONS(INJECTIONS),
      .TAU_PS    (TAU_PS),
      .JITTER_PS (JITTER_PS),
      .SEED      (SEED_BASE + 7919 * i)
    ) u_ro (
      .start_n(start_n),
      .ro_out (ring_out[i])
    );
  end

  assign group_out = ^ring_out;
endmodule
