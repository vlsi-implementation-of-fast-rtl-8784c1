// tb_fb_memory: checks the feedback delay memory at depth 5 and depth 1.
// Random words are written under a random enable; every enabled cycle the
// word read must equal the one written DEPTH enabled cycles earlier (kept
// here in a software history), and with enable low the output must hold.
module tb_fb_memory;
  localparam int unsigned DW = 8;
  logic clk = 1'b0, rst, en;
  logic [DW-1:0] din, dout5, dout1;
  int checks = 0, failures = 0;
  logic [DW-1:0] hist [$];

  fb_memory #(.DW(DW), .DEPTH(5)) u_d5 (.clk(clk), .rst(rst), .en(en), .din(din), .dout(dout5));
  fb_memory #(.DW(DW), .DEPTH(1)) u_d1 (.clk(clk), .rst(rst), .en(en), .din(din), .dout(dout1));

  always #5 clk = ~clk;

  initial begin
    logic [DW-1:0] held;
    rst = 1'b1; en = 1'b0; din = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int t = 0; t < 400; t++) begin
      en  = ($urandom_range(3) != 0);
      din = DW'($urandom);
      held = dout5;
      #1;
      if (en) begin
        if (hist.size() >= 5) begin
          checks++;
          if (dout5 !== hist[hist.size() - 5]) begin
            failures++;
            $display("FAIL: depth 5 read %h, expected %h", dout5, hist[hist.size() - 5]);
          end
        end
        if (hist.size() >= 1) begin
          checks++;
          if (dout1 !== hist[hist.size() - 1]) begin
            failures++;
            $display("FAIL: depth 1 read %h, expected %h", dout1, hist[hist.size() - 1]);
          end
        end
        hist.push_back(din);
      end
      @(posedge clk);
      #1;
      if (!en) begin
        checks++;
        if (dout5 !== held) begin
          failures++;
          $display("FAIL: depth 5 output changed while disabled");
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
