// controller: frame position counter and stage control bits (S1 ... S10).
//
// One counter counts the accepted input samples modulo N; its value is the
// frame position of the word now at the pipeline input. Each stage and
// each multiplier sees words that entered a fixed number of enabled clocks
// earlier (the memory depths of the stages before it plus one per
// registered multiplier, see fft_pkg::stage_offset), so its position is
// the counter minus that constant. From these positions:
//   sel[s]   = bit (LOG2N-s) of the stage-s position: 0 in the first half
//              of each 2*N/2^s block (store/drain), 1 in the second half
//              (butterfly);
//   neg_j[s] = sel[s] and bit (LOG2N-s+1): for the type-2 stages, the word
//              is a difference from the preceding type-1 stage and belongs
//              to the odd half, so it is rotated by -j;
//   mult_pos[s] = position of the word entering the multiplier after s.
// A fill counter saturating at the total latency marks out_valid: the
// first output word of frame 0 appears TOTAL_LAT accepted samples after
// frame 0 started; out_index = bitrev(its frame position) is the
// frequency index it carries.
//
// Interface: en is high for every cycle in which the pipeline accepts a
// sample. All outputs describe the current (enabled) cycle.
//
// The shared controller driving every stage is taken from the pipeline
// drawing; the derivation of the bits from a single counter is this
// design's.
module controller #(
  parameter int unsigned LOG2N = 10
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  output logic [LOG2N-1:0] sel_bits,   // bit s-1: stage s
  output logic [LOG2N-1:0] negj_bits,  // bit s-1: stage s
  output logic [LOG2N-1:0] mult_pos [LOG2N],  // index s-1: after stage s
  output logic [LOG2N-1:0] out_index,
  output logic             out_valid
);
  localparam int unsigned TOTAL_LAT = fft_pkg::stage_offset(LOG2N + 1, LOG2N);
  localparam int unsigned FW = $clog2(TOTAL_LAT + 1);

  logic [LOG2N-1:0] cnt;
  logic [FW-1:0]    fill;
  logic [LOG2N-1:0] spos [LOG2N];
  logic [LOG2N-1:0] out_pos;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= '0;
      fill <= '0;
    end else if (en) begin
      cnt <= cnt + 1'b1;
      if (fill != FW'(TOTAL_LAT)) fill <= fill + 1'b1;
    end
  end

  for (genvar s = 1; s <= LOG2N; s++) begin : g_stage
    localparam int unsigned OFF  = fft_pkg::stage_offset(s, LOG2N);
    localparam int unsigned MOFF = OFF + (1 << (LOG2N - s));
    assign spos[s-1]     = cnt - LOG2N'(OFF);
    assign mult_pos[s-1] = cnt - LOG2N'(MOFF);
    assign sel_bits[s-1] = spos[s-1][LOG2N-s];
    if (s % 2 == 0) begin : g_negj
      assign negj_bits[s-1] = spos[s-1][LOG2N-s] & spos[s-1][LOG2N-s+1];
    end else begin : g_nonegj
      assign negj_bits[s-1] = 1'b0;
    end
  end

  always_comb begin
    out_pos   = cnt - LOG2N'(TOTAL_LAT);
    out_index = LOG2N'(fft_pkg::bitrev(32'(out_pos), LOG2N));
    out_valid = en && (fill == FW'(TOTAL_LAT));
  end
endmodule
