// simple_uart: output interface of the TRNG.
//
// Corrected random bits arrive one at a time on serial_in, each flagged by a
// one-clock receive_pulse. An 8-bit shift register collects them, a counter
// counts them, and every eighth bit the counter pulses transmit so that the
// UART transmitter sends the completed byte at 115200 baud (8N1). Bits keep
// flowing while a frame is on the line; bytes completed during a frame are
// not sent (see uart_tx). The three parts and their connections follow the
// design's description of this interface block.
//
// Interface: clk, rst (synchronous, active high), serial_in, receive_pulse,
// tx (RS-232 serial output, idles high), led_active and led_done (status
// for LEDs), byte_data and byte_ready (the byte offered to the UART and its
// one-clock transmit request, for observation).
module simple_uart #(
  parameter int unsigned CLKS_PER_BIT = trng_pkg::CLKS_PER_BIT,
  parameter int unsigned DATA_BITS    = trng_pkg::DATA_BITS
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 serial_in,
  input  logic                 receive_pulse,
  output logic                 tx,
  output logic                 led_active,
  output logic                 led_done,
  output logic [DATA_BITS-1:0] byte_data,
  output logic                 byte_ready
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [$clog2(DATA_BITS+1)-1:0] bit_count;

  shift_register_8 #(.WIDTH(DATA_BITS)) u_sr (
    .clk      (clk),
    .rst      (rst),
    .shift    (receive_pulse),
    .serial_in(serial_in),
    .data     (byte_data)
  );

  bit_counter #(.COUNT(DATA_BITS)) u_cnt (
    .clk     (clk),
    .rst     (rst),
    .pulse   (receive_pulse),
    .transmit(byte_ready),
    .count   (bit_count)
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT), .DATA_BITS(DATA_BITS)) u_tx (
    .clk     (clk),
    .rst     (rst),
    .transmit(byte_ready),
    .data    (byte_data),
    .tx      (tx),
    .active  (led_active),
    .done    (led_done)
  );
endmodule
