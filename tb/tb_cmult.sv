// tb_cmult: random test of the registered complex multiplier (12-bit data,
// 16-bit coefficients with 14 fractional bits). The expected result is
// computed here with 64-bit integers: each component of the exact product,
// plus half an LSB, shifted right by 14. It must appear one enabled clock
// after the operands, and a disabled clock must hold the output.
module tb_cmult;
  localparam int unsigned W = 12, CW = 16;
  logic clk = 1'b0, rst, en;
  logic signed [W-1:0]  a_re, a_im, y_re, y_im;
  logic signed [CW-1:0] c_re, c_im;
  int checks = 0, failures = 0;

  cmult #(.W(W), .CW(CW)) u_dut (
    .clk(clk), .rst(rst), .en(en), .a_re(a_re), .a_im(a_im),
    .c_re(c_re), .c_im(c_im), .y_re(y_re), .y_im(y_im)
  );

  always #5 clk = ~clk;

  initial begin
    longint pr, pi, er, ei;
    logic signed [W-1:0] hr, hi;
    rst = 1'b1; en = 1'b0; a_re = '0; a_im = '0; c_re = '0; c_im = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int t = 0; t < 500; t++) begin
      // Data within the guard-bit range used in the pipeline.
      a_re = W'(int'($urandom_range(2047)) - 1024);
      a_im = W'(int'($urandom_range(2047)) - 1024);
      if (t < 4) begin
        c_re = (t == 0) ? 16'sd16384 : (t == 1) ? -16'sd16384 : 16'sd0;
        c_im = (t == 2) ? 16'sd16384 : (t == 3) ? -16'sd16384 : 16'sd0;
      end else begin
        c_re = CW'(int'($urandom_range(32768)) - 16384);
        c_im = CW'(int'($urandom_range(32768)) - 16384);
      end
      en = 1'b1;
      pr = longint'(a_re) * c_re - longint'(a_im) * c_im;
      pi = longint'(a_re) * c_im + longint'(a_im) * c_re;
      er = (pr + 8192) >>> 14;
      ei = (pi + 8192) >>> 14;
      @(posedge clk);
      #1;
      checks++;
      if (longint'(y_re) != er || longint'(y_im) != ei) begin
        failures++;
        if (failures < 10)
          $display("FAIL: (%0d,%0d)*(%0d,%0d) = (%0d,%0d), expected (%0d,%0d)",
                   a_re, a_im, c_re, c_im, y_re, y_im, er, ei);
      end
      // Hold check.
      en = 1'b0; hr = y_re; hi = y_im;
      a_re = ~a_re;
      @(posedge clk);
      #1;
      checks++;
      if (y_re != hr || y_im != hi) begin
        failures++;
        $display("FAIL: output changed while disabled");
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
