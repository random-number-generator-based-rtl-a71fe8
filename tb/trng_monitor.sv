// trng_monitor: checker shared by the whole-design testbenches.
//
// It watches one TRNG instance on the falling clock edge and checks it
// against its own models, without using the design's modules:
//   * restart pulses: falling edges of the ring restart line PERIOD clocks
//     apart;
//   * corrector (PP = 1): its own pairing of the sampled raw bits and the
//     Von Neumann rule predict every bit impulse and value; (PP = 0): every
//     raw bit is passed on, one per clock;
//   * bytes: its own grouping of the delivered bits in eights, first bit in
//     bit 0;
//   * serial line: decodes 8N1 frames at CPB clocks per bit, checks that
//     every level change inside a frame falls on a bit boundary, and that
//     each frame carries the byte that completed just before its start bit.
// It counts each mechanism so that a testbench can require that it occurred.
module trng_monitor #(
  parameter int unsigned CPB    = 434,
  parameter int unsigned PERIOD = 2000,
  parameter bit          PP     = 1'b1
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       ring_start_n,
  input  logic       raw_bit,
  input  logic       bit_valid,
  input  logic       bit_value,
  input  logic       byte_ready,
  input  logic       led_active,
  input  logic       tx,
  input  int         ring_merges,
  output int         checks,
  output int         failures,
  output int         n_restarts,
  output int         n_merged_rings,
  output int         n_vn_bits,
  output int         n_vn_discards,
  output int         n_bytes,
  output int         n_dropped,
  output int         n_frames
);
  timeunit 1ns;
  timeprecision 1ps;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%0t %m FAIL %s", $time, what);
    end
  endtask

  initial begin
    checks = 0; failures = 0; n_restarts = 0; n_merged_rings = 0;
    n_vn_bits = 0; n_vn_discards = 0; n_bytes = 0; n_dropped = 0; n_frames = 0;
  end

  longint cyc = 0;
  longint last_restart = -1;
  logic   prev_start_n = 1'b0;
  bit     have_first = 0;
  logic   first_bit;
  bit     exp_valid = 0;
  logic   exp_value;
  logic [7:0] group;
  int     nbits = 0;
  logic [7:0] last_group = '0;
  int     prev_merges = 0;

  always @(negedge clk) begin
    cyc++;
    if (reset) begin
      have_first = 0;
      exp_valid  = 0;
      nbits      = 0;
      last_restart = -1;
    end else begin
      // Ring restarts.
      if (prev_start_n && !ring_start_n) begin
        if (last_restart >= 0)
          check(cyc - last_restart == longint'(PERIOD),
                $sformatf("restart period %0d", cyc - last_restart));
        last_restart = cyc;
        n_restarts++;
      end
      if (ring_merges > 0 && prev_merges == 0) n_merged_rings++;
      prev_merges = ring_merges;

      // Bit delivery.
      if (PP) begin
        check(bit_valid == exp_valid && (!exp_valid || bit_value == exp_value),
              $sformatf("corrector output %0b/%0b expected %0b/%0b",
                        bit_valid, bit_value, exp_valid, exp_value));
        exp_valid = 0;
        if (!have_first) begin
          first_bit  = raw_bit;
          have_first = 1;
        end else begin
          have_first = 0;
          if (first_bit != raw_bit) begin
            exp_valid = 1;
            exp_value = first_bit;
          end else n_vn_discards++;
        end
      end else begin
        check(bit_valid && bit_value == raw_bit, "raw bit passed through");
      end

      // Byte assembly, taken by the design on the next rising edge.
      if (bit_valid) begin
        n_vn_bits++;
        group[nbits] = bit_value;
        nbits++;
        if (nbits == 8) begin
          nbits      = 0;
          last_group = group;
        end
      end
      if (byte_ready) begin
        n_bytes++;
        if (led_active) n_dropped++;
      end
    end
    prev_start_n = ring_start_n;
  end

  // Serial line decoder.
  initial begin
    logic [7:0] expect_b, got;
    longint     t0;
    logic       level;
    @(negedge reset);
    forever begin
      @(negedge clk);
      if (!reset && tx == 1'b0) begin
        t0 = cyc;
        expect_b = last_group;
        level = 1'b0;
        // Follow the frame clock by clock up to the middle of the stop bit.
        for (int k = 1; k < int'(CPB * 19 / 2); k++) begin
          @(negedge clk);
          if (tx != level) begin
            check((cyc - t0) % longint'(CPB) == 0,
                  $sformatf("line change %0d clocks into a frame", cyc - t0));
            level = tx;
          end
          if (k == int'(CPB / 2)) check(tx == 1'b0, "start bit");
          for (int b = 0; b < 8; b++)
            if (k == int'(CPB / 2 + (b + 1) * CPB)) got[b] = tx;
        end
        check(tx == 1'b1, "stop bit");
        check(got == expect_b, $sformatf("frame %02h expected %02h", got, expect_b));
        n_frames++;
      end
    end
  end
endmodule
