// map_subtractor: two's-complement negation of one complex butterfly operand.
//
// In both butterfly types the lower adder computes "memory word minus input
// word" by adding the negated input: this block produces that negated
// input. The result is one bit wider than the operand so that negating the
// most negative value cannot overflow.
//
// Interface: a_re/a_im (W bits, signed) in, y_re/y_im (W+1 bits) out.
// Timing: purely combinational.
//
// The block and its place in front of the lower adder follow the
// butterfly drawings; two's-complement negation (not one's complement) is
// this design's reading of "negative conversion of the input value".
module map_subtractor #(
  parameter int unsigned W = 2
) (
  input  logic signed [W-1:0] a_re,
  input  logic signed [W-1:0] a_im,
  output logic signed [W:0]   y_re,
  output logic signed [W:0]   y_im
);
  always_comb begin
    y_re = -(W+1)'(a_re);
    y_im = -(W+1)'(a_im);
  end
endmodule
