// tb_map_subtractor: exhaustive test of the operand negation for 3-bit
// operands: y must equal -a as a 4-bit signed value for every a, in both
// the real and the imaginary path.
module tb_map_subtractor;
  localparam int unsigned W = 3;
  logic signed [W-1:0] a_re, a_im;
  logic signed [W:0]   y_re, y_im;
  int checks = 0, failures = 0;

  map_subtractor #(.W(W)) u_dut (.a_re(a_re), .a_im(a_im), .y_re(y_re), .y_im(y_im));

  initial begin
    for (int r = -(1 << (W - 1)); r < (1 << (W - 1)); r++) begin
      for (int i = -(1 << (W - 1)); i < (1 << (W - 1)); i++) begin
        a_re = W'(r);
        a_im = W'(i);
        #1;
        checks++;
        if (int'(y_re) != -r || int'(y_im) != -i) begin
          failures++;
          $display("FAIL: -(%0d,%0d) gave (%0d,%0d)", r, i, y_re, y_im);
        end
      end
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
