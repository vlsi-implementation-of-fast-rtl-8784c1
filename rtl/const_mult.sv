// const_mult: multiplier by the few constants W_16^e that sit in the middle
// of each radix-2^4 group of stages.
//
// A group of four stages computes 16-point transforms whose inputs lie
// P = M/16 samples apart (M is the transform size the group works on).
// Split as 4 x 4, the two halves of the group are joined by the factor
// W_16^(a2*c1), where for a sample at frame position pos
//   a2 = (pos / P) mod 4                 (input index of the second half)
//   c1 = bitrev2((pos / 4P) mod 4)       (output index of the first half)
// Only e = a2*c1 in {0,1,2,3,4,6,9} occurs, so the coefficient is picked
// from a ten-entry constant table rather than a ROM addressed by a
// counter.
//
// Interface: pos is the frame position of the word on in_re/in_im. The
// product is registered: out follows one enabled clock later.
//
// Its position (after stages 2 and 6, without a coefficient store) comes
// from the source architecture; that it multiplies by powers of W_16 is
// this design's reading, the one that makes that stage grouping compute
// the transform.
module const_mult #(
  parameter int unsigned W     = 12,
  parameter int unsigned CW    = 16,
  parameter int unsigned LOG2N = 10,
  parameter int unsigned M     = 1024
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 en,
  input  logic [LOG2N-1:0]     pos,
  input  logic signed [W-1:0]  in_re,
  input  logic signed [W-1:0]  in_im,
  output logic signed [W-1:0]  out_re,
  output logic signed [W-1:0]  out_im
);
  localparam int unsigned LP = $clog2(M) - 4;

  typedef logic signed [CW-1:0] coef_t;
  typedef coef_t [9:0] table_t;

  function automatic table_t make_table(bit imag);
    table_t t;
    for (int unsigned i = 0; i < 10; i++)
      t[i] = coef_t'(imag ? fft_pkg::coef_im(i, 16, CW) : fft_pkg::coef_re(i, 16, CW));
    return t;
  endfunction

  localparam table_t TAB_RE = make_table(1'b0);
  localparam table_t TAB_IM = make_table(1'b1);

  logic [1:0] a2, c1;
  logic [3:0] e;
  coef_t      k_re, k_im;

  always_comb begin
    a2   = pos[LP +: 2];
    c1   = {pos[LP + 2], pos[LP + 3]};
    e    = 4'(a2 * c1);
    k_re = TAB_RE[e];
    k_im = TAB_IM[e];
  end

  cmult #(.W(W), .CW(CW)) u_mul (
    .clk(clk), .rst(rst), .en(en),
    .a_re(in_re), .a_im(in_im), .c_re(k_re), .c_im(k_im),
    .y_re(out_re), .y_im(out_im)
  );

  initial begin
    assert (M >= 16 && M <= (1 << LOG2N)) else $error("const_mult: M out of range");
  end
endmodule
