// tb_bf1: exhaustive test of butterfly type 1 with the 2-bit operands used
// for the stand-alone butterfly (memory word a and input word b, 3-bit
// results). For every a, b and select value the four outputs are compared
// with the arithmetic worked out here: pass mode (c1 = a, c2 = b) and
// butterfly mode (c1 = a + b, c2 = a - b). Imaginary parts use a different
// operand pairing so that crossed real/imaginary wires are caught.
module tb_bf1;
  localparam int unsigned W = 2;
  logic              sel;
  logic signed [W:0]  a_re, a_im;
  logic signed [W-1:0] b_re, b_im;
  logic signed [W:0]  c1_re, c1_im, c2_re, c2_im;
  int checks = 0, failures = 0;

  bf1 #(.W(W)) u_dut (
    .sel(sel), .a_re(a_re), .a_im(a_im), .b_re(b_re), .b_im(b_im),
    .c1_re(c1_re), .c1_im(c1_im), .c2_re(c2_re), .c2_im(c2_im)
  );

  task automatic expect4(int e1r, int e1i, int e2r, int e2i);
    checks++;
    if (int'(c1_re) != e1r || int'(c1_im) != e1i || int'(c2_re) != e2r || int'(c2_im) != e2i) begin
      failures++;
      $display("FAIL: sel=%0d a=(%0d,%0d) b=(%0d,%0d): c1=(%0d,%0d) c2=(%0d,%0d), expected (%0d,%0d) (%0d,%0d)",
               sel, a_re, a_im, b_re, b_im, c1_re, c1_im, c2_re, c2_im, e1r, e1i, e2r, e2i);
    end
  endtask

  initial begin
    for (int s = 0; s < 2; s++)
      for (int a = -2; a < 2; a++)
        for (int b = -2; b < 2; b++) begin
          int ai, bi;
          ai = (a == 1) ? -2 : a + 1;
          bi = -1 - b;
          sel = s[0];
          a_re = (W+1)'(a); a_im = (W+1)'(ai);
          b_re = W'(b);     b_im = W'(bi);
          #1;
          if (s == 0) expect4(a, ai, b, bi);
          else        expect4(a + b, ai + bi, a - b, ai - bi);
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
