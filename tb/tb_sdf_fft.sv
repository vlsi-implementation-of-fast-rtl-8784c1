// tb_sdf_fft: end-to-end test of the 1024-point pipelined FFT at its
// default parameters.
//
// Four frames are streamed back to back: a unit impulse, a frame of the
// most negative corner symbol (the largest possible DC value, to show that
// the word growth leaves no overflow) and two frames of random symbols
// from the 64-point input alphabet (3-bit signed real and imaginary
// parts). During the last two frames in_valid drops at random to hold the
// pipeline. Every output word is compared with a direct DFT computed here
// in floating point; the error allowed per component is 1.0 (the output
// LSB is 1/64). The testbench also checks that the first result appears
// exactly 1027 accepted samples after the first input, that out_index runs
// through the bit-reversed order, and counts the mechanisms exercised:
// both butterfly modes, -j rotations, holds and frame changes.
module tb_sdf_fft;
  import fft_pkg::*;

  localparam int unsigned N     = 1024;
  localparam int unsigned LOG2N = 10;
  localparam int unsigned IN_W  = 3;
  localparam int unsigned FRAC  = 6;
  localparam int unsigned OUT_W = stage_in_w(LOG2N + 1, IN_W, FRAC);
  localparam int unsigned LAT   = stage_offset(LOG2N + 1, LOG2N);
  localparam int unsigned NF    = 4;
  localparam real         TOL   = 1.0;
  localparam real         PI    = 3.14159265358979323846;

  logic clk = 1'b0;
  logic rst;
  logic in_valid;
  logic signed [IN_W-1:0]  in_re, in_im;
  logic                    out_valid;
  logic [LOG2N-1:0]        out_index;
  logic signed [OUT_W-1:0] out_re, out_im;

  sdf_fft u_dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_re(in_re), .in_im(in_im),
    .out_valid(out_valid), .out_index(out_index), .out_re(out_re), .out_im(out_im)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int x_re [NF][N];
  int x_im [NF][N];
  real ref_re [NF][N];
  real ref_im [NF][N];
  real cos_t [N];
  real sin_t [N];
  real max_err = 0.0;

  int n_in = 0, n_out = 0, n_hold = 0, n_negj = 0, n_frame_change = 0;
  int n_bf_pass = 0, n_bf_comp = 0;
  int first_out_at = -1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Reference transform, X[k] = sum x[n] exp(-j 2 pi n k / N).
  task automatic make_ref(int f);
    for (int k = 0; k < N; k++) begin
      real sr, si;
      sr = 0.0; si = 0.0;
      for (int n = 0; n < N; n++) begin
        int m;
        m = (n * k) % N;
        sr += x_re[f][n] * cos_t[m] + x_im[f][n] * sin_t[m];
        si += x_im[f][n] * cos_t[m] - x_re[f][n] * sin_t[m];
      end
      ref_re[f][k] = sr;
      ref_im[f][k] = si;
    end
  endtask

  initial begin
    for (int m = 0; m < N; m++) begin
      cos_t[m] = $cos(2.0 * PI * m / N);
      sin_t[m] = $sin(2.0 * PI * m / N);
    end
    for (int n = 0; n < N; n++) begin
      x_re[0][n] = (n == 0) ? 3 : 0;
      x_im[0][n] = 0;
      x_re[1][n] = -4;
      x_im[1][n] = -4;
      for (int f = 2; f < NF; f++) begin
        x_re[f][n] = int'($urandom_range(7)) - 4;
        x_im[f][n] = int'($urandom_range(7)) - 4;
      end
    end
    for (int f = 0; f < NF; f++) make_ref(f);

    rst = 1'b1; in_valid = 1'b0; in_re = '0; in_im = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    // Stream the frames, then flush with zero frames until all outputs
    // have been seen.
    while (n_out < NF * N) begin
      @(posedge clk);
      if (n_in >= 2 * N && n_in < NF * N + N && ($urandom_range(4) == 0)) begin
        in_valid <= 1'b0;
        n_hold++;
      end else begin
        in_valid <= 1'b1;
        if (n_in < NF * N) begin
          in_re <= IN_W'(x_re[n_in / N][n_in % N]);
          in_im <= IN_W'(x_im[n_in / N][n_in % N]);
        end else begin
          in_re <= '0;
          in_im <= '0;
        end
        n_in++;
      end
    end
    @(posedge clk);
    check(first_out_at == int'(LAT), $sformatf("latency %0d, expected %0d", first_out_at, LAT));
    check(n_hold > 0, "pipeline hold never exercised");
    check(n_negj > 0, "-j rotation never exercised");
    check(n_bf_pass > 0 && n_bf_comp > 0, "butterfly modes not both exercised");
    check(n_frame_change >= NF - 1, "back-to-back frames not exercised");
    $display("mechanisms: holds=%0d negj=%0d bf_pass=%0d bf_compute=%0d frame_changes=%0d",
             n_hold, n_negj, n_bf_pass, n_bf_comp, n_frame_change);
    $display("max error per component = %f (output LSB = %f)", max_err, 1.0 / (1 << FRAC));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Counting accepted inputs seen by the DUT and checking outputs.
  int accepted = 0;
  always @(posedge clk) begin
    if (!rst && in_valid) begin
      n_negj    += $countones(u_dut.negj_bits);
      n_bf_comp += $countones(u_dut.sel_bits);
      n_bf_pass += LOG2N - $countones(u_dut.sel_bits);
      if (out_valid && n_out < NF * N) begin
        int f, pos, k;
        real er, ei;
        if (first_out_at < 0) first_out_at = accepted;
        f   = n_out / N;
        pos = n_out % N;
        k   = int'(bitrev(pos, LOG2N));
        check(int'(out_index) == k, $sformatf("out_index %0d, expected %0d", out_index, k));
        if (pos == 0 && f > 0) n_frame_change++;
        er = real'(out_re) / (1 << FRAC) - ref_re[f][k];
        ei = real'(out_im) / (1 << FRAC) - ref_im[f][k];
        if (er < 0) er = -er;
        if (ei < 0) ei = -ei;
        if (er > max_err) max_err = er;
        if (ei > max_err) max_err = ei;
        check(er <= TOL && ei <= TOL,
              $sformatf("frame %0d X[%0d] = (%f, %f), expected (%f, %f)", f, k,
                        real'(out_re) / (1 << FRAC), real'(out_im) / (1 << FRAC),
                        ref_re[f][k], ref_im[f][k]));
        n_out++;
      end
      accepted++;
    end
  end

  initial begin
    repeat (20 * N) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
