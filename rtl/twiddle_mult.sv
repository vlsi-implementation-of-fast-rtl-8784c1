// twiddle_mult: general twiddle factor multiplier at the end of a
// radix-2^4 group of stages.
//
// After a group of four stages has computed the 16-point transforms over
// inputs P = M/16 apart, each result is multiplied by W_M^(n2*k1) before
// the next group starts, where for a sample at frame position pos
//   n2 = pos mod P                       (which 16-point transform)
//   k1 = bitrev4((pos / P) mod 16)       (its output index)
// The exponent n2*k1 < M addresses a twiddle_rom of M entries.
//
// Interface: pos is the frame position of the word on in_re/in_im. The
// product is registered: out follows one enabled clock later.
//
// The multiplier with its coefficient store (W1 after stage 4, W2 after
// stage 8) comes from the pipeline drawing; the exponent rule and the
// table organisation are this design's.
module twiddle_mult #(
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
  localparam int unsigned LM = $clog2(M);
  localparam int unsigned LP = LM - 4;

  logic [LM-1:0]          e;
  logic signed [CW-1:0]   k_re, k_im;

  if (LP == 0) begin : g_trivial
    assign e = '0;
  end else begin : g_exp
    logic [LP-1:0] n2;
    logic [3:0]    k1;
    always_comb begin
      n2 = pos[LP-1:0];
      k1 = {pos[LP], pos[LP + 1], pos[LP + 2], pos[LP + 3]};
      e  = LM'(n2 * k1);
    end
  end

  twiddle_rom #(.L(M), .CW(CW)) u_rom (.e(e), .c_re(k_re), .c_im(k_im));

  cmult #(.W(W), .CW(CW)) u_mul (
    .clk(clk), .rst(rst), .en(en),
    .a_re(in_re), .a_im(in_im), .c_re(k_re), .c_im(k_im),
    .y_re(out_re), .y_im(out_im)
  );

  initial begin
    assert (M >= 16 && M <= (1 << LOG2N)) else $error("twiddle_mult: M out of range");
  end
endmodule
