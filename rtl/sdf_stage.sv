// sdf_stage: one stage of the single-path delay-feedback pipeline, a
// butterfly and its feedback memory.
//
// During the first DEPTH words of each 2*DEPTH block (sel = 0) the input
// words are stored and the differences left in the memory by the previous
// block drain to the output. During the second DEPTH words (sel = 1) each
// input word meets the word stored DEPTH samples earlier: their sum leaves
// at once and their difference goes into the memory, to leave during the
// next block. The output stream is therefore the input stream delayed by
// DEPTH samples, with each pair (p, p+DEPTH) replaced by (sum, difference).
//
// TYPE selects butterfly 1 (bf1) or butterfly 2 (bf2, with the -j rotator
// steered by neg_j; a type-1 stage ignores neg_j). Words grow by one bit: W in, W+1 out and stored.
// en advances the stage by one sample; sel and neg_j come from the
// controller and must belong to the word on in_re/in_im.
//
// The pairing of a butterfly with a memory of depth N/2^s follows the
// pipeline drawing; the stage wrapper itself is this design's packaging.
module sdf_stage #(
  parameter int unsigned W     = 3,
  parameter int unsigned DEPTH = 512,
  parameter int unsigned TYPE  = 1
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               en,
  input  logic               sel,
  input  logic               neg_j,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic signed [W:0]  out_re,
  output logic signed [W:0]  out_im
);
  logic signed [W:0] m_re, m_im, w_re, w_im;

  if (TYPE == 1) begin : g_bf1
    bf1 #(.W(W)) u_bf (
      .sel(sel), .a_re(m_re), .a_im(m_im), .b_re(in_re), .b_im(in_im),
      .c1_re(out_re), .c1_im(out_im), .c2_re(w_re), .c2_im(w_im)
    );
  end else begin : g_bf2
    bf2 #(.W(W)) u_bf (
      .sel(sel), .neg_j(neg_j), .a_re(m_re), .a_im(m_im), .b_re(in_re), .b_im(in_im),
      .c1_re(out_re), .c1_im(out_im), .c2_re(w_re), .c2_im(w_im)
    );
  end

  fb_memory #(.DW(2 * (W + 1)), .DEPTH(DEPTH)) u_mem (
    .clk(clk), .rst(rst), .en(en),
    .din({w_re, w_im}),
    .dout({m_re, m_im})
  );
endmodule
