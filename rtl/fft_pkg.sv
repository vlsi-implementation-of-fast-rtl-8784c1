// fft_pkg: constants and helper functions shared by the 1024-point
// single-path delay-feedback (SDF) FFT pipeline.
//
// The pipeline has LOG2N radix-2 butterfly stages. Stage i (1-based) holds
// a feedback memory of N/2**i words and is steered by one bit of the
// sample position within the frame. The functions here give the data
// width at each point of the pipeline, the latency from the input to each
// stage, and bit reversal, so that the top level, the controller and the
// testbenches all derive these numbers from one place.
//
// Word growth (a choice of this design): every butterfly stage adds one
// integer bit, so no stage can overflow and no scaling is needed. The
// first two stages work on small integers (the input alphabet is small);
// after stage 2 one guard bit and FRAC fractional bits are appended and the
// words keep that fractional format through the multipliers.
package fft_pkg;

  // Stage after which the reduced-width front end ends and the fractional
  // datapath starts.
  localparam int unsigned FRONT_STAGES = 2;

  // Width of the data entering stage s (1-based); s = LOG2N+1 gives the
  // output width of the pipeline.
  function automatic int unsigned stage_in_w(int unsigned s, int unsigned in_w,
                                             int unsigned frac);
    if (s <= FRONT_STAGES) return in_w + s - 1;
    return in_w + s + frac;  // + guard bit + fractional bits
  endfunction

  // Width of the front-end words after FRONT_STAGES stages, before mapping.
  function automatic int unsigned front_out_w(int unsigned in_w);
    return in_w + FRONT_STAGES;
  endfunction

  // Reverse the lowest nbits bits of v.
  function automatic int unsigned bitrev(int unsigned v, int unsigned nbits);
    int unsigned r;
    r = 0;
    for (int unsigned b = 0; b < nbits; b++) r |= ((v >> b) & 1) << (nbits - 1 - b);
    return r;
  endfunction

  // The pipeline places a registered multiplier after every stage s with
  // has_mult(s, log2n) true: after each pair of stages except the last.
  function automatic bit has_mult(int unsigned s, int unsigned log2n);
    return (s % 2 == 0) && (s < log2n);
  endfunction

  // Cycles from the pipeline input to the input of stage s: the delay of
  // each earlier stage (its memory depth) plus one per earlier multiplier.
  function automatic int unsigned stage_offset(int unsigned s, int unsigned log2n);
    int unsigned off;
    off = 0;
    for (int unsigned j = 1; j < s; j++) begin
      off += 1 << (log2n - j);
      if (has_mult(j, log2n)) off += 1;
    end
    return off;
  endfunction

  // Twiddle factor W_L^e = exp(-j*2*pi*e/L) as signed cw-bit words with
  // cw-2 fractional bits, rounded to nearest (ties away from zero).
  function automatic int coef_re(int unsigned e, int unsigned l, int unsigned cw);
    real v;
    v = $cos(2.0 * 3.14159265358979323846 * real'(e) / real'(l)) * (2.0 ** (cw - 2));
    return (v < 0.0) ? $rtoi(v - 0.5) : $rtoi(v + 0.5);
  endfunction

  function automatic int coef_im(int unsigned e, int unsigned l, int unsigned cw);
    real v;
    v = -$sin(2.0 * 3.14159265358979323846 * real'(e) / real'(l)) * (2.0 ** (cw - 2));
    return (v < 0.0) ? $rtoi(v - 0.5) : $rtoi(v + 0.5);
  endfunction

endpackage
