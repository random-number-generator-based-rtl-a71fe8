// bit_counter: tells the UART when a full byte has been shifted in.
//
// It counts the bit impulses that also advance the shift register. On the
// COUNT-th impulse (eight by default) it wraps to zero and raises transmit
// for one clock, in the clock after the shift register took its last bit,
// so the byte on the register's outputs is complete when transmit is seen.
// Counting the impulses and triggering the transmitter follows the design's
// description; the one-clock transmit pulse and the synchronous reset are
// this design's own choices.
//
// Interface: clk, rst (synchronous, active high), pulse (one bit arrived),
// transmit (one-clock pulse after every COUNT pulses), count (bits held).
module bit_counter #(
  parameter int unsigned COUNT = trng_pkg::DATA_BITS
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       pulse,
  output logic                       transmit,
  output logic [$clog2(COUNT+1)-1:0] count
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned CW = $clog2(COUNT + 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      count    <= '0;
      transmit <= 1'b0;
    end else begin
      transmit <= 1'b0;
      if (pulse) begin
        if (count == CW'(COUNT - 1)) begin
          count    <= '0;
          transmit <= 1'b1;
        end else begin
          count <= count + 1'b1;
        end
      end
    end
  end
endmodule
