// pulse_generator: periodic active-low restart pulse for the ring oscillators.
//
// Multimode rings start at a multiple of their nominal frequency and lose it
// as their injected edges merge, so all rings are restarted at a slow,
// regular rate. A counter divides the system clock down to a square wave at
// PULSE_FREQ_HZ (25 kHz from 50 MHz: it toggles every 1000 clocks). A short
// delay line copies that wave, and the pulse is the NAND of the divided clock
// with the inverted delayed copy: it is low for PULSE_WIDTH_CYCLES clocks
// right after each rising edge of the divided clock and high otherwise.
//
// The divider, the delay chain and the NAND follow the design's description.
// There the delay is a chain of 51 inverters (about 36 ns at 0.7 ns per
// stage); here it is a shift register of PULSE_WIDTH_CYCLES flip-flops
// (two clocks, 40 ns, by default) so that the block is synchronous and the
// pulse width does not depend on placement. The output is registered.
// While reset is high the output is held low, so the rings stay at rest; the
// first restart is the rising edge of pulse_n one clock after reset falls.
//
// Interface: clk, reset (synchronous, active high), pulse_n (to every ring's
// start_n). Period: 2 * HALF_PERIOD clocks; low time: PULSE_WIDTH_CYCLES.
module pulse_generator #(
  parameter int unsigned CLK_FREQ_HZ        = trng_pkg::CLK_FREQ_HZ,
  parameter int unsigned PULSE_FREQ_HZ      = trng_pkg::PULSE_FREQ_HZ,
  parameter int unsigned PULSE_WIDTH_CYCLES = 2
) (
  input  logic clk,
  input  logic reset,
  output logic pulse_n
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned HALF_PERIOD = CLK_FREQ_HZ / (2 * PULSE_FREQ_HZ);
  localparam int unsigned CW          = $clog2(HALF_PERIOD + 1);

  initial begin
    assert (HALF_PERIOD >= 2) else $error("pulse_generator: PULSE_FREQ_HZ too high");
    assert (PULSE_WIDTH_CYCLES >= 1 && PULSE_WIDTH_CYCLES < HALF_PERIOD)
      else $error("pulse_generator: PULSE_WIDTH_CYCLES out of range");
  end

  logic [CW-1:0]                 div_cnt;
  logic                          div_clk;
  logic [PULSE_WIDTH_CYCLES-1:0] delay_line;

  always_ff @(posedge clk) begin
    if (reset) begin
      div_cnt    <= '0;
      div_clk    <= 1'b0;
      delay_line <= '0;
      pulse_n    <= 1'b0;
    end else begin
      if (div_cnt == CW'(HALF_PERIOD - 1)) begin
        div_cnt <= '0;
        div_clk <= ~div_clk;
      end else begin
        div_cnt <= div_cnt + 1'b1;
      end
      delay_line <= (delay_line << 1) | PULSE_WIDTH_CYCLES'(div_clk);
      pulse_n    <= ~(div_clk & ~delay_line[PULSE_WIDTH_CYCLES-1]);
    end
  end
endmodule
