// tb_twiddle_rom: reads all 1024 entries of the default table and compares
// them with cos(2*pi*e/1024) and -sin(2*pi*e/1024) scaled by 2^14, computed
// here in floating point; each entry must be within half an LSB (the
// rounding) and the four quadrant points must be exact.
module tb_twiddle_rom;
  localparam int unsigned L = 1024, CW = 16;
  localparam real PI = 3.14159265358979323846;
  logic [$clog2(L)-1:0] e;
  logic signed [CW-1:0] c_re, c_im;
  int checks = 0, failures = 0;

  twiddle_rom u_dut (.e(e), .c_re(c_re), .c_im(c_im));

  initial begin
    for (int i = 0; i < L; i++) begin
      real xr, xi, dr, di;
      e = 10'(i);
      #1;
      xr = $cos(2.0 * PI * i / L) * 16384.0;
      xi = -$sin(2.0 * PI * i / L) * 16384.0;
      dr = real'(c_re) - xr;
      di = real'(c_im) - xi;
      checks++;
      if (dr > 0.5 || dr < -0.5 || di > 0.5 || di < -0.5) begin
        failures++;
        if (failures < 10) $display("FAIL: e=%0d (%0d,%0d) vs (%f,%f)", i, c_re, c_im, xr, xi);
      end
      if (i % (L / 4) == 0) begin
        checks++;
        if (c_re != CW'($rtoi(xr + (xr < 0 ? -0.5 : 0.5))) ||
            c_im != CW'($rtoi(xi + (xi < 0 ? -0.5 : 0.5)))) begin
          failures++;
          $display("FAIL: quadrant point e=%0d is (%0d,%0d)", i, c_re, c_im);
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
