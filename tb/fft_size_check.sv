// fft_size_check: one pipelined FFT of size N with its own stimulus and
// floating-point reference, for the multi-size testbench. It streams three
// back-to-back frames (an impulse, a corner-symbol frame and a random frame
// from the 64-point alphabet) with random holds, compares every output word
// with a direct DFT (tolerance 1.0 per component) and checks the latency
// against fft_pkg::stage_offset. It raises done when all results were seen.
module fft_size_check #(
  parameter int unsigned N = 64
) (
  input  logic clk,
  input  logic rst,
  output logic done,
  output int   checks,
  output int   failures
);
  import fft_pkg::*;

  localparam int unsigned LOG2N = $clog2(N);
  localparam int unsigned IN_W  = 3;
  localparam int unsigned FRAC  = 6;
  localparam int unsigned OUT_W = stage_in_w(LOG2N + 1, IN_W, FRAC);
  localparam int unsigned LAT   = stage_offset(LOG2N + 1, LOG2N);
  localparam int unsigned NF    = 3;
  localparam real         PI    = 3.14159265358979323846;

  logic in_valid;
  logic signed [IN_W-1:0]  in_re, in_im;
  logic                    out_valid;
  logic [LOG2N-1:0]        out_index;
  logic signed [OUT_W-1:0] out_re, out_im;

  sdf_fft #(.N(N)) u_dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_re(in_re), .in_im(in_im),
    .out_valid(out_valid), .out_index(out_index), .out_re(out_re), .out_im(out_im)
  );

  int x_re [NF][N];
  int x_im [NF][N];
  real ref_re [NF][N];
  real ref_im [NF][N];
  int n_in, n_out, accepted, first_out_at;

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    n_in = 0; n_out = 0; accepted = 0; first_out_at = -1;
    in_valid = 1'b0; in_re = '0; in_im = '0;
    for (int n = 0; n < N; n++) begin
      x_re[0][n] = (n == 1) ? -4 : 0;
      x_im[0][n] = (n == 1) ? 3 : 0;
      x_re[1][n] = 3;
      x_im[1][n] = -4;
      x_re[2][n] = int'($urandom_range(7)) - 4;
      x_im[2][n] = int'($urandom_range(7)) - 4;
    end
    for (int f = 0; f < NF; f++)
      for (int k = 0; k < N; k++) begin
        real sr, si;
        sr = 0.0; si = 0.0;
        for (int n = 0; n < N; n++) begin
          real c, s;
          c = $cos(2.0 * PI * ((n * k) % N) / N);
          s = $sin(2.0 * PI * ((n * k) % N) / N);
          sr += x_re[f][n] * c + x_im[f][n] * s;
          si += x_im[f][n] * c - x_re[f][n] * s;
        end
        ref_re[f][k] = sr;
        ref_im[f][k] = si;
      end
  end

  // Stimulus: frames, then zeros to flush; holds inside the last frames.
  always @(posedge clk) begin
    if (rst || done) begin
      in_valid <= 1'b0;
    end else if (n_in >= N && n_in < NF * N && $urandom_range(4) == 0) begin
      in_valid <= 1'b0;
    end else begin
      in_valid <= 1'b1;
      in_re <= (n_in < NF * N) ? IN_W'(x_re[n_in / N][n_in % N]) : '0;
      in_im <= (n_in < NF * N) ? IN_W'(x_im[n_in / N][n_in % N]) : '0;
      n_in  <= n_in + 1;
    end
  end

  always @(posedge clk) begin
    if (!rst && in_valid && !done) begin
      if (out_valid && n_out < NF * N) begin
        int f, k;
        real er, ei;
        if (first_out_at < 0) begin
          first_out_at = accepted;
          checks++;
          if (accepted != int'(LAT)) begin
            failures++;
            $display("FAIL: N=%0d latency %0d, expected %0d", N, accepted, LAT);
          end
        end
        f  = n_out / N;
        k  = int'(bitrev(n_out % N, LOG2N));
        er = real'(out_re) / (1 << FRAC) - ref_re[f][k];
        ei = real'(out_im) / (1 << FRAC) - ref_im[f][k];
        checks++;
        if (int'(out_index) != k || er > 1.0 || er < -1.0 || ei > 1.0 || ei < -1.0) begin
          failures++;
          if (failures < 10)
            $display("FAIL: N=%0d frame %0d X[%0d] (index %0d) off by (%f, %f)", N, f, k, out_index, er, ei);
        end
        n_out++;
        if (n_out == NF * N) done = 1'b1;
      end
      accepted++;
    end
  end
endmodule
