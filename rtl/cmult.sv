// cmult: registered complex multiplier with rounding.
//
// Computes (a_re + j a_im) * (c_re + j c_im) where the coefficient has
// CW-2 fractional bits (so +1.0 = 2^(CW-2)). The full products are summed,
// rounded to nearest by adding half an LSB before the arithmetic shift, and
// cut back to the W bits of the data input. In the pipeline the
// coefficients have magnitude at most one and every data word carries a
// guard bit, so the result always fits.
//
// Interface: en loads the result register; y is valid one enabled clock
// after a and c. Reset clears the register.
//
// A complex multiplier is one of the three building blocks the pipeline
// is made of; the four-multiplier form, rounding and register are this
// design's choices.
module cmult #(
  parameter int unsigned W  = 12,
  parameter int unsigned CW = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic signed [W-1:0]  a_re,
  input  logic signed [W-1:0]  a_im,
  input  logic signed [CW-1:0] c_re,
  input  logic signed [CW-1:0] c_im,
  output logic signed [W-1:0]  y_re,
  output logic signed [W-1:0]  y_im
);
  localparam int unsigned PW = W + CW + 1;
  localparam logic signed [PW-1:0] HALF = PW'(1) <<< (CW - 3);

  logic signed [PW-1:0] p_re, p_im;

  always_comb begin
    p_re = PW'(a_re) * PW'(c_re) - PW'(a_im) * PW'(c_im);
    p_im = PW'(a_re) * PW'(c_im) + PW'(a_im) * PW'(c_re);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      y_re <= '0;
      y_im <= '0;
    end else if (en) begin
      y_re <= W'((p_re + HALF) >>> (CW - 2));
      y_im <= W'((p_im + HALF) >>> (CW - 2));
    end
  end
endmodule
