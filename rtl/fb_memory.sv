// fb_memory: feedback delay memory of one single-path delay-feedback stage.
//
// A word written at one enabled clock edge is read back DEPTH enabled
// edges later. The memory is a circular buffer of DEPTH words with one
// pointer: the word under the pointer is presented on dout
// (combinational read) and replaced by din at the next enabled edge, after
// which the pointer advances. A depth of one is a plain register.
//
// Interface: en advances the memory by one word; when en is low nothing
// changes. Only the pointer (or the single register of depth one) is
// reset; the stored words are not, and the pipeline does not use them
// before they have been written.
// Timing: dout(t) = din at the DEPTH-th previous enabled edge.
//
// The depths 512, 256, ..., 1 come from the pipeline drawing; the circular
// buffer organisation is this design's choice.
module fb_memory #(
  parameter int unsigned DW    = 8,
  parameter int unsigned DEPTH = 512
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic [DW-1:0] din,
  output logic [DW-1:0] dout
);
  if (DEPTH == 1) begin : g_reg
    logic [DW-1:0] q;
    always_ff @(posedge clk) begin
      if (rst)     q <= '0;
      else if (en) q <= din;
    end
    assign dout = q;
  end else begin : g_ram
    localparam int unsigned AW = $clog2(DEPTH);
    logic [DW-1:0] mem [DEPTH];
    logic [AW-1:0] ptr;

    always_ff @(posedge clk) begin
      if (rst) begin
        ptr <= '0;
      end else if (en) begin
        ptr <= (ptr == AW'(DEPTH - 1)) ? '0 : ptr + 1'b1;
      end
    end

    always_ff @(posedge clk) begin
      if (en) mem[ptr] <= din;
    end

    assign dout = mem[ptr];
  end
endmodule
