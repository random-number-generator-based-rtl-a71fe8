// baud_generator: bit-period timer for the UART transmitter.
//
// It counts clock cycles and flags tick for one clock every CLKS_PER_BIT
// cycles: 50 MHz / 115200 baud = 434 clocks per bit. While clear is high the
// count is held at zero, so the first tick after clear falls comes exactly
// CLKS_PER_BIT clocks after the last clock in which clear was high.
// Counting clocks to the rounded quotient follows the design's description;
// the clear input is this design's own addition, used to line the first bit
// period up with the start of a frame. The rounding makes the line 0.007 %
// faster than 115200 baud.
//
// Interface: clk, rst (synchronous, active high), clear (hold the count at
// zero), tick (combinational, one clock wide).
module baud_generator #(
  parameter int unsigned CLKS_PER_BIT = trng_pkg::CLKS_PER_BIT
) (
  input  logic clk,
  input  logic rst,
  input  logic clear,
  output logic tick
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned CW = $clog2(CLKS_PER_BIT);

  logic [CW-1:0] cnt;

  assign tick = !clear && (cnt == CW'(CLKS_PER_BIT - 1));

  always_ff @(posedge clk) begin
    if (rst || clear) cnt <= '0;
    else if (tick)    cnt <= '0;
    else              cnt <= cnt + 1'b1;
  end
endmodule
