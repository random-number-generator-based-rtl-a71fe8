// trng_top: true random number generator built on multimode ring oscillators.
//
// Datapath, one raw bit per clock:
//   pulse_generator -> restart of all 36 rings, a short low pulse at 25 kHz
//   entropy_source  -> 4 groups x 9 multimode rings (lengths 9, 13, 15, 21),
//                      XORed and sampled by one flip-flop at the clock rate
//   von_neumann_corrector (POST_PROCESS = 1) -> unbiased bits, one per
//                      unequal pair of raw bits, each with a one-clock impulse
//   simple_uart     -> 8-bit shift register + counter + 8N1 UART at 115200
//                      baud; a byte is sent when it completes while the line
//                      is idle
// With POST_PROCESS = 0 the corrector is left out and every raw bit is
// taken, as in the variant without post-processing: the bit impulse is then
// high on every clock.
//
// The block structure and all rates follow the design's description. The
// synchronous active-high reset reaching every clocked block, not only the
// pulse generator, is this design's own choice, as are the byte and impulse
// outputs brought out for observation.
//
// Interface: clk (50 MHz), reset, tx (RS-232 output), led_active, led_done.
// The rings are behavioural models, so the top simulates with --timing; on
// hardware they become gate rings that need placement constraints and must
// be kept from being optimised away.
module trng_top #(
  parameter int unsigned CLK_FREQ_HZ        = trng_pkg::CLK_FREQ_HZ,
  parameter int unsigned PULSE_FREQ_HZ      = trng_pkg::PULSE_FREQ_HZ,
  parameter int unsigned BAUD_RATE          = trng_pkg::BAUD_RATE,
  parameter int unsigned PULSE_WIDTH_CYCLES = 2,
  parameter int unsigned NUM_RINGS          = trng_pkg::RINGS_PER_GROUP,
  parameter bit          POST_PROCESS       = 1'b1
) (
  input  logic       clk,
  input  logic       reset,
  output logic       tx,
  output logic       led_active,
  output logic       led_done,
  output logic       bit_valid,
  output logic       bit_value,
  output logic [7:0] byte_data,
  output logic       byte_ready
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned CLKS_PER_BIT = CLK_FREQ_HZ / BAUD_RATE;

  logic ring_start_n;
  logic raw_bit;

  pulse_generator #(
    .CLK_FREQ_HZ       (CLK_FREQ_HZ),
    .PULSE_FREQ_HZ     (PULSE_FREQ_HZ),
    .PULSE_WIDTH_CYCLES(PULSE_WIDTH_CYCLES)
  ) u_pulse (
    .clk    (clk),
    .reset  (reset),
    .pulse_n(ring_start_n)
  );

  entropy_source #(.NUM_RINGS(NUM_RINGS)) u_src (
    .clk    (clk),
    .start_n(ring_start_n),
    .noise  (),
    .raw_bit(raw_bit)
  );

  if (POST_PROCESS) begin : g_pp
    von_neumann_corrector u_vn (
      .clk        (clk),
      .rst        (reset),
      .data_in    (raw_bit),
      .impulse_bit(bit_valid),
      .data_out   (bit_value)
    );
  end else begin : g_no_pp
    assign bit_valid = 1'b1;
    assign bit_value = raw_bit;
  end

  simple_uart #(.CLKS_PER_BIT(CLKS_PER_BIT), .DATA_BITS(8)) u_if (
    .clk          (clk),
    .rst          (reset),
    .serial_in    (bit_value),
    .receive_pulse(bit_valid),
    .tx           (tx),
    .led_active   (led_active),
    .led_done     (led_done),
    .byte_data    (byte_data),
    .byte_ready   (byte_ready)
  );
endmodule
