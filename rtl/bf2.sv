// bf2: radix-2 butterfly with a trivial -j rotator on its input
// (butterfly type 2).
//
// When neg_j is high the incoming word b is multiplied by -j before it
// enters the butterfly: (re, im) becomes (im, -re). The rest is the same
// butterfly as bf1:
//
//   sel = 0 : c1 = a,      c2 = b'
//   sel = 1 : c1 = a + b', c2 = a - b'      (b' = b or -j*b)
//
// In the pipeline neg_j is raised only for words that left the preceding
// type-1 butterfly as differences. A difference of two words of the same
// range is symmetric about zero, so negating its real part stays inside W
// bits.
//
// Interface: b is W bits, a, c1 and c2 are W+1 bits (see bf1).
// Timing: purely combinational.
//
// The -j multiplier at the input and the reuse of the butterfly-1 datapath
// follow the butterfly-2 drawing. The drawing also places a block named
// "Mapper" on the output; its function is not described, so it is not part
// of this module (the pipeline widens its words between stages instead).
module bf2 #(
  parameter int unsigned W = 4
) (
  input  logic               sel,
  input  logic               neg_j,
  input  logic signed [W:0]  a_re,
  input  logic signed [W:0]  a_im,
  input  logic signed [W-1:0] b_re,
  input  logic signed [W-1:0] b_im,
  output logic signed [W:0]  c1_re,
  output logic signed [W:0]  c1_im,
  output logic signed [W:0]  c2_re,
  output logic signed [W:0]  c2_im
);
  logic signed [W-1:0] r_re, r_im;

  always_comb begin
    if (neg_j) begin
      r_re = b_im;
      r_im = -b_re;
    end else begin
      r_re = b_re;
      r_im = b_im;
    end
  end

  bf1 #(.W(W)) u_bf (
    .sel(sel), .a_re(a_re), .a_im(a_im), .b_re(r_re), .b_im(r_im),
    .c1_re(c1_re), .c1_im(c1_im), .c2_re(c2_re), .c2_im(c2_im)
  );
endmodule
