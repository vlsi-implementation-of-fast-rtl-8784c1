// twiddle_rom: table of the L twiddle factors W_L^e = exp(-j*2*pi*e/L).
//
// The table is computed at elaboration from the cosine and sine functions
// and rounded to signed CW-bit words with CW-2 fractional bits:
//   c_re[e] = round( cos(2*pi*e/L) * 2^(CW-2))
//   c_im[e] = round(-sin(2*pi*e/L) * 2^(CW-2))
// Synthesis turns it into a constant read-only table.
//
// Interface: e selects the entry; c_re/c_im follow combinationally.
//
// The twiddle coefficient stores W1 and W2 appear in the pipeline drawing;
// their contents and format are this design's.
module twiddle_rom #(
  parameter int unsigned L  = 1024,
  parameter int unsigned CW = 16
) (
  input  logic [$clog2(L)-1:0] e,
  output logic signed [CW-1:0] c_re,
  output logic signed [CW-1:0] c_im
);
  typedef logic signed [CW-1:0] coef_t;
  typedef coef_t [L-1:0] table_t;

  function automatic table_t make_table(bit imag);
    table_t t;
    for (int unsigned i = 0; i < L; i++)
      t[i] = coef_t'(imag ? fft_pkg::coef_im(i, L, CW) : fft_pkg::coef_re(i, L, CW));
    return t;
  endfunction

  localparam table_t TAB_RE = make_table(1'b0);
  localparam table_t TAB_IM = make_table(1'b1);

  always_comb begin
    c_re = TAB_RE[e];
    c_im = TAB_IM[e];
  end
endmodule
