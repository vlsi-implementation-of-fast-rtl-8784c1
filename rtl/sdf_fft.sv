// sdf_fft: N-point pipelined FFT, radix-2^2/2^4 single-path delay feedback.
//
// One complex sample enters per enabled clock in natural order; after the
// pipeline latency one transform result leaves per enabled clock in
// bit-reversed order, with no gap between frames. LOG2N butterfly stages
// alternate type 1 (bf1) and type 2 (bf2, with the -j rotator); stage s has
// a feedback memory of N/2^s words. After every second stage except the
// last a registered multiplier joins the stage pairs: within each group of
// four stages a W_16 constant multiplier (after stages 2, 6, ...), at the
// end of the group a twiddle multiplier with its coefficient table (after
// stages 4, 8, ...). For N = 1024 this is stages 1..10 with memories
// 512 ... 1, constant multipliers after 2 and 6 and twiddle multipliers W1
// after 4 and W2 after 8. A single controller supplies all control bits.
//
// Word lengths. The input alphabet of an OFDM receiver FFT is small, so
// samples enter as IN_W-bit signed integers per component and every
// butterfly adds one bit. Stages 1 and 2, whose memories hold 3/4 of all
// stored words, thus keep (IN_W+1)- and (IN_W+2)-bit words. After stage 2
// the words are extended by one guard bit and FRAC fractional bits and the
// multipliers round back to that format; the output has
// IN_W + LOG2N + 1 + FRAC bits (FRAC of them fractional) and never
// overflows. The result is the unscaled DFT X[k] = sum x[n] W_N^(nk).
//
// Interface: in_valid accepts in_re/in_im; the whole pipeline holds when it
// is low. out_valid marks output words; out_index is the frequency index k
// of the word on out_re/out_im. Latency: a sample's frame is complete at
// the output TOTAL_LAT = (N-1) + (number of multipliers) accepted samples
// after it entered (1027 for N = 1024).
//
// From the source architecture: the stage sequence, memory depths,
// butterfly types, the positions of the multipliers and coefficient stores,
// the shared controller, and reduced word lengths for the stages that see
// the limited input alphabet. This design's own: all word lengths, the
// coefficient format, the grouping rule of the multipliers for other N,
// rounding, registering of the multipliers and the valid/hold interface.
module sdf_fft #(
  parameter int unsigned N     = 1024,
  parameter int unsigned IN_W  = 3,
  parameter int unsigned FRAC  = 6,
  parameter int unsigned CW    = 16,
  localparam int unsigned LOG2N = $clog2(N),
  localparam int unsigned OUT_W = fft_pkg::stage_in_w(LOG2N + 1, IN_W, FRAC)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_re,
  input  logic signed [IN_W-1:0]  in_im,
  output logic                    out_valid,
  output logic [LOG2N-1:0]        out_index,
  output logic signed [OUT_W-1:0] out_re,
  output logic signed [OUT_W-1:0] out_im
);
  // d_* [s-1] carries the input of stage s; slots are OUT_W wide and the
  // stages use the low bits they need.
  logic signed [OUT_W-1:0] d_re [LOG2N+1];
  logic signed [OUT_W-1:0] d_im [LOG2N+1];

  logic [LOG2N-1:0] sel_bits, negj_bits;
  logic [LOG2N-1:0] mult_pos [LOG2N];

  controller #(.LOG2N(LOG2N)) u_ctrl (
    .clk(clk), .rst(rst), .en(in_valid),
    .sel_bits(sel_bits), .negj_bits(negj_bits), .mult_pos(mult_pos),
    .out_index(out_index), .out_valid(out_valid)
  );

  assign d_re[0] = OUT_W'(in_re);
  assign d_im[0] = OUT_W'(in_im);

  for (genvar s = 1; s <= LOG2N; s++) begin : g_st
    localparam int unsigned WI = fft_pkg::stage_in_w(s, IN_W, FRAC);
    localparam int unsigned WN = fft_pkg::stage_in_w(s + 1, IN_W, FRAC);
    localparam int unsigned G  = (s - 1) / 4;           // radix-2^4 group
    localparam int unsigned MG = N >> (4 * G);          // its transform size

    logic signed [WI:0]   so_re, so_im;                 // stage output
    logic signed [WN-1:0] nx_re, nx_im;                 // next stage input

    sdf_stage #(.W(WI), .DEPTH(N >> s), .TYPE(2 - (s % 2))) u_stage (
      .clk(clk), .rst(rst), .en(in_valid),
      .sel(sel_bits[s-1]), .neg_j(negj_bits[s-1]),
      .in_re(d_re[s-1][WI-1:0]), .in_im(d_im[s-1][WI-1:0]),
      .out_re(so_re), .out_im(so_im)
    );

    if (!fft_pkg::has_mult(s, LOG2N)) begin : g_wire
      assign nx_re = so_re;
      assign nx_im = so_im;
    end else begin : g_mult
      logic signed [WN-1:0] mi_re, mi_im;
      if (s == fft_pkg::FRONT_STAGES) begin : g_widen
        // End of the reduced-width front end: guard bit and FRAC
        // fractional bits are appended.
        assign mi_re = WN'(so_re) <<< FRAC;
        assign mi_im = WN'(so_im) <<< FRAC;
      end else begin : g_same
        assign mi_re = so_re;
        assign mi_im = so_im;
      end
      if (s % 4 == 2) begin : g_const
        const_mult #(.W(WN), .CW(CW), .LOG2N(LOG2N), .M(MG)) u_mul (
          .clk(clk), .rst(rst), .en(in_valid), .pos(mult_pos[s-1]),
          .in_re(mi_re), .in_im(mi_im), .out_re(nx_re), .out_im(nx_im)
        );
      end else begin : g_tw
        twiddle_mult #(.W(WN), .CW(CW), .LOG2N(LOG2N), .M(MG)) u_mul (
          .clk(clk), .rst(rst), .en(in_valid), .pos(mult_pos[s-1]),
          .in_re(mi_re), .in_im(mi_im), .out_re(nx_re), .out_im(nx_im)
        );
      end
    end

    assign d_re[s] = OUT_W'(nx_re);
    assign d_im[s] = OUT_W'(nx_im);
  end

  assign out_re = d_re[LOG2N];
  assign out_im = d_im[LOG2N];

  // A result is only ever presented together with an accepted sample.
  a_valid_with_input : assert property (@(posedge clk) disable iff (rst) out_valid |-> in_valid)
    else $error("sdf_fft: out_valid without in_valid");

  initial begin
    assert (N == (1 << LOG2N) && LOG2N % 2 == 0 && LOG2N >= 4)
      else $error("sdf_fft: N must be 4^k with k >= 2");
  end
endmodule
