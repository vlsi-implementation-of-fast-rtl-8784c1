// bf1: radix-2 butterfly with pass-through mode (butterfly type 1).
//
// The block sits between the pipeline input of its stage and that stage's
// feedback memory. Port a is the word read from the memory, b the word
// arriving on the stage input; c1 goes to the stage output and c2 is
// written back into the memory.
//
//   sel = 0 : c1 = a         (memory drains to the output)
//             c2 = b         (the new input is stored)
//   sel = 1 : c1 = a + b     (upper adder)
//             c2 = a - b     (lower adder fed through map_subtractor)
//
// The operand widths follow the word growth of the pipeline: b is W bits
// wide, a, c1 and c2 are W+1 bits. While sel = 1 the memory holds an input
// word stored during the previous sel = 0 half, so a then carries a W-bit
// value and neither sum nor difference can overflow W+1 bits.
//
// Timing: purely combinational; the stage memory supplies the delay.
//
// The four multiplexers, two adders and the negating block follow the
// butterfly-1 drawing; the single select for all four multiplexers is
// this design's choice.
module bf1 #(
  parameter int unsigned W = 2
) (
  input  logic               sel,
  input  logic signed [W:0]  a_re,
  input  logic signed [W:0]  a_im,
  input  logic signed [W-1:0] b_re,
  input  logic signed [W-1:0] b_im,
  output logic signed [W:0]  c1_re,
  output logic signed [W:0]  c1_im,
  output logic signed [W:0]  c2_re,
  output logic signed [W:0]  c2_im
);
  logic signed [W:0] nb_re, nb_im;
  logic signed [W:0] sum_re, sum_im, dif_re, dif_im;

  map_subtractor #(.W(W)) u_neg (
    .a_re(b_re), .a_im(b_im), .y_re(nb_re), .y_im(nb_im)
  );

  always_comb begin
    sum_re = a_re + (W+1)'(b_re);
    sum_im = a_im + (W+1)'(b_im);
    dif_re = a_re + nb_re;
    dif_im = a_im + nb_im;
    if (sel) begin
      c1_re = sum_re;
      c1_im = sum_im;
      c2_re = dif_re;
      c2_im = dif_im;
    end else begin
      c1_re = a_re;
      c1_im = a_im;
      c2_re = (W+1)'(b_re);
      c2_im = (W+1)'(b_im);
    end
  end
endmodule
