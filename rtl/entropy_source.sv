// entropy_source: the noise source and sampler of the TRNG.
//
// Four groups of nine multimode ring oscillators, of lengths 9, 13, 15 and
// 21, are combined by a four-input XOR. A single D flip-flop samples that
// signal on every rising edge of the system clock (50 MHz in the reference
// build), producing one raw bit per clock. All 36 rings share one active-low
// restart line driven by the pulse generator, which keeps them from settling
// into their collapsed, nominal-frequency mode for long.
//
// The four lengths, nine rings per length, the XOR and the single sampling
// flip-flop follow the design's description; the sampler has no extra
// synchronising stage there either, because metastability is part of the
// noise being collected. The per-length jitter figures feed the behavioural
// ring models only.
//
// Interface: clk (sampling clock), start_n (ring restart, active low),
// noise (asynchronous XOR of all rings, for observation), raw_bit (sampled
// bit, valid every clock, one clock of latency after the sampling edge).
module entropy_source
  import trng_pkg::*;
#(
  parameter int unsigned NUM_RINGS = RINGS_PER_GROUP
) (
  input  logic clk,
  input  logic start_n,
  output logic noise,
  output logic raw_bit
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [3:0] group_out;

  ro_group #(.LENGTH(RO_LEN_A), .NUM_RINGS(NUM_RINGS), .INJECTIONS(RO_INJECTIONS),
             .TAU_PS(RO_TAU_PS), .JITTER_PS(RO_JITTER_A_PS), .SEED_BASE(101))
    u_ro9  (.start_n(start_n), .group_out(group_out[0]));
  ro_group #(.LENGTH(RO_LEN_B), .NUM_RINGS(NUM_RINGS), .INJECTIONS(RO_INJECTIONS),
             .TAU_PS(RO_TAU_PS), .JITTER_PS(RO_JITTER_B_PS), .SEED_BASE(202))
    u_ro13 (.start_n(start_n), .group_out(group_out[1]));
  ro_group #(.LENGTH(RO_LEN_C), .NUM_RINGS(NUM_RINGS), .INJECTIONS(RO_INJECTIONS),
             .TAU_PS(RO_TAU_PS), .JITTER_PS(RO_JITTER_C_PS), .SEED_BASE(303))
    u_ro15 (.start_n(start_n), .group_out(group_out[2]));
  ro_group #(.LENGTH(RO_LEN_D), .NUM_RINGS(NUM_RINGS), .INJECTIONS(RO_INJECTIONS),
             .TAU_PS(RO_TAU_PS), .JITTER_PS(RO_JITTER_D_PS), .SEED_BASE(404))
    u_ro21 (.start_n(start_n), .group_out(group_out[3]));

  assign noise = ^group_out;

  always_ff @(posedge clk) raw_bit <= noise;
endmodule
