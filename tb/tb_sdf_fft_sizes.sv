// tb_sdf_fft_sizes: runs the pipelined FFT at three sizes other than the
// default, N = 16, 64 and 256, side by side (see fft_size_check). N = 16
// has a single radix-2^4 group, N = 64 and 256 end with a group of two and
// of four stages, so together they cover every multiplier placement rule.
module tb_sdf_fft_sizes;
  logic clk = 1'b0, rst = 1'b1;
  logic done16, done64, done256;
  int c16, c64, c256, f16, f64, f256;

  fft_size_check #(.N(16))  u_16  (.clk(clk), .rst(rst), .done(done16),  .checks(c16),  .failures(f16));
  fft_size_check #(.N(64))  u_64  (.clk(clk), .rst(rst), .done(done64),  .checks(c64),  .failures(f64));
  fft_size_check #(.N(256)) u_256 (.clk(clk), .rst(rst), .done(done256), .checks(c256), .failures(f256));

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    wait (done16 && done64 && done256);
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c16 + c64 + c256, f16 + f64 + f256);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c16 + c64 + c256, f16 + f64 + f256 + 1);
    $finish;
  end
endmodule
