// shift_register_8: serial-in, parallel-out register that gathers corrected
// random bits into a byte for the UART.
//
// On every clock with shift high the register moves one place and takes
// serial_in at its top end, so after eight shifts data[0] holds the oldest
// of the eight bits and data[WIDTH-1] the newest. The UART sends data[0]
// first, which puts the bits on the serial line in the order they were
// generated. The chain of D flip-flops advanced by the bit impulse follows
// the design's description; there the impulse clocks the flip-flops, here
// it is a clock enable on the system clock, and the bit order on the
// parallel bus is this design's own choice.
//
// Interface: clk, rst (synchronous, active high), shift (clock enable),
// serial_in, data (parallel contents, updated on the clock edge where shift
// is high).
module shift_register_8 #(
  parameter int unsigned WIDTH = trng_pkg::DATA_BITS
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             shift,
  input  logic             serial_in,
  output logic [WIDTH-1:0] data
);
  timeunit 1ns;
  timeprecision 1ps;

  always_ff @(posedge clk) begin
    if (rst)        data <= '0;
    else if (shift) data <= {serial_in, data[WIDTH-1:1]};
  end
endmodule
