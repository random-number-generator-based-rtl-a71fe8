// von_neumann_corrector: removes bias from the raw bit stream.
//
// The raw bits are taken in consecutive, non-overlapping pairs. A pair of
// equal bits (00 or 11) produces nothing; 01 produces a 0 and 10 produces a
// 1, i.e. the output is the first bit of an unequal pair. If the raw bits are
// independent, 0 and 1 leave with equal probability whatever the bias, at a
// data-dependent rate of at most one bit per two inputs (one in four for
// unbiased input). When the input carries no usable pairs, nothing is sent.
//
// The pair rule follows the design's description. Taking the earlier bit of
// the pair as "first", the pairing on every clock without a valid input,
// the registered outputs and the synchronous reset are this design's own
// choices.
//
// Interface: clk, rst (synchronous, active high), data_in (one raw bit per
// clock). impulse_bit is high for exactly one clock when data_out holds a new
// corrected bit; the bit appears one clock after the second bit of its pair
// is presented. data_out keeps its value between impulses.
module von_neumann_corrector (
  input  logic clk,
  input  logic rst,
  input  logic data_in,
  output logic impulse_bit,
  output logic data_out
);
  timeunit 1ns;
  timeprecision 1ps;

  logic have_first;
  logic first_bit;
  trng_pkg::vn_action_e action;

  assign action = trng_pkg::vn_rule(first_bit, data_in);

  always_ff @(posedge clk) begin
    if (rst) begin
      have_first  <= 1'b0;
      first_bit   <= 1'b0;
      impulse_bit <= 1'b0;
      data_out    <= 1'b0;
    end else begin
      impulse_bit <= 1'b0;
      if (!have_first) begin
        first_bit  <= data_in;
        have_first <= 1'b1;
      end else begin
        have_first <= 1'b0;
        unique case (action)
          trng_pkg::VN_EMIT0: begin data_out <= 1'b0; impulse_bit <= 1'b1; end
          trng_pkg::VN_EMIT1: begin data_out <= 1'b1; impulse_bit <= 1'b1; end
          default: ;
        endcase
      end
    end
  end
endmodule
