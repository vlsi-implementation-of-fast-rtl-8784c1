// tb_bf2: exhaustive test of butterfly type 2 with 4-bit input words.
// For each select, -j flag, memory word a and input word b (b drawn from a
// range symmetric about zero, as in the pipeline) the outputs are compared
// with b' = b or -j*b = (b_im, -b_re) and c1 = a (+ b'), c2 = b' (or a - b').
module tb_bf2;
  localparam int unsigned W = 4;
  logic              sel, neg_j;
  logic signed [W:0]  a_re, a_im;
  logic signed [W-1:0] b_re, b_im;
  logic signed [W:0]  c1_re, c1_im, c2_re, c2_im;
  int checks = 0, failures = 0;

  bf2 #(.W(W)) u_dut (
    .sel(sel), .neg_j(neg_j), .a_re(a_re), .a_im(a_im), .b_re(b_re), .b_im(b_im),
    .c1_re(c1_re), .c1_im(c1_im), .c2_re(c2_re), .c2_im(c2_im)
  );

  initial begin
    for (int s = 0; s < 4; s++)
      for (int a = -8; a < 8; a += 3)
        for (int br = -7; br < 8; br++)
          for (int bi = -7; bi < 8; bi += 2) begin
            int ai, rr, ri, e1r, e1i, e2r, e2i;
            ai = -1 - a;
            sel = s[0]; neg_j = s[1];
            a_re = (W+1)'(a); a_im = (W+1)'(ai);
            b_re = W'(br);    b_im = W'(bi);
            if (neg_j) begin rr = bi; ri = -br; end
            else       begin rr = br; ri = bi;  end
            if (sel) begin e1r = a + rr; e1i = ai + ri; e2r = a - rr; e2i = ai - ri; end
            else     begin e1r = a;      e1i = ai;      e2r = rr;     e2i = ri;      end
            #1;
            checks++;
            if (int'(c1_re) != e1r || int'(c1_im) != e1i || int'(c2_re) != e2r || int'(c2_im) != e2i) begin
              failures++;
              if (failures < 10)
                $display("FAIL: sel=%0d negj=%0d a=(%0d,%0d) b=(%0d,%0d)", sel, neg_j, a, ai, br, bi);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
