// tb_const_mult: random test of the W_16 constant multiplier placed after stage 2 of a 1024-point pipeline (M = 1024, inputs P = 64 apart). For a random frame position the expected factor is W_16^(a2*c1) with a2 = (pos/64) mod 4 and c1 the 2-bit reversal of (pos/256) mod 4.
// The product is computed here in floating point; the registered output
// must be within one output LSB of it (half an LSB of rounding plus the
// coefficient quantisation), one enabled clock after the operands.
module tb_const_mult;
  localparam int unsigned W = 12, CW = 16, LOG2N = 10, M = 1024, P = M / 16;
  localparam real PI = 3.14159265358979323846;
  logic clk = 1'b0, rst, en;
  logic [LOG2N-1:0] pos;
  logic signed [W-1:0] in_re, in_im, out_re, out_im;
  int checks = 0, failures = 0;
  int used [int];

  const_mult #(.W(W), .CW(CW), .LOG2N(LOG2N), .M(M)) u_dut (
    .clk(clk), .rst(rst), .en(en), .pos(pos),
    .in_re(in_re), .in_im(in_im), .out_re(out_re), .out_im(out_im)
  );

  always #5 clk = ~clk;

  initial begin
    rst = 1'b1; en = 1'b0; pos = '0; in_re = '0; in_im = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int t = 0; t < 2000; t++) begin
      int e, l;
      real cr, ci, xr, xi, dr, di;
      pos   = LOG2N'($urandom);
      in_re = W'(int'($urandom_range(2047)) - 1024);
      in_im = W'(int'($urandom_range(2047)) - 1024);
      en    = 1'b1;
      e = ((pos / P) % 4) * int'(fft_pkg::bitrev((pos / (4 * P)) % 4, 2)); l = 16;
      used[e] = 1;
      cr = $cos(2.0 * PI * e / l);
      ci = -$sin(2.0 * PI * e / l);
      xr = in_re * cr - in_im * ci;
      xi = in_re * ci + in_im * cr;
      @(posedge clk);
      #1;
      dr = real'(out_re) - xr;
      di = real'(out_im) - xi;
      checks++;
      if (dr > 1.0 || dr < -1.0 || di > 1.0 || di < -1.0) begin
        failures++;
        if (failures < 10)
          $display("FAIL: pos=%0d e=%0d (%0d,%0d) -> (%0d,%0d), expected (%f,%f)",
                   pos, e, in_re, in_im, out_re, out_im, xr, xi);
      end
    end
    $display("distinct exponents exercised: %0d", used.num());
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
