// tb_controller: checks the stage control bits of the 1024-point pipeline
// against a sample counter kept here. With a random enable, for every
// accepted sample number i: stage s must see position (i - off_s) mod 1024,
// where off_s is the sum of the memory depths 512, 256, ... of the stages
// before s plus one per multiplier before s (after stages 2, 4, 6, 8);
// sel of stage s is bit 10-s of that position, -j of an even stage s also
// needs bit 11-s. out_valid must first rise for sample 1027, and out_index
// must be the bit reversal of (i - 1027) mod 1024.
module tb_controller;
  localparam int unsigned LOG2N = 10, N = 1024, LAT = 1027;
  logic clk = 1'b0, rst, en;
  logic [LOG2N-1:0] sel_bits, negj_bits, out_index;
  logic [LOG2N-1:0] mult_pos [LOG2N];
  logic out_valid;
  int checks = 0, failures = 0;
  int off [LOG2N + 1];

  controller #(.LOG2N(LOG2N)) u_dut (
    .clk(clk), .rst(rst), .en(en), .sel_bits(sel_bits), .negj_bits(negj_bits),
    .mult_pos(mult_pos), .out_index(out_index), .out_valid(out_valid)
  );

  always #5 clk = ~clk;

  function automatic int rev10(int v);
    int r = 0;
    for (int b = 0; b < 10; b++) if (v & (1 << b)) r |= 1 << (9 - b);
    return r;
  endfunction

  initial begin
    int i, first_valid;
    off[1] = 0;
    for (int s = 1; s <= LOG2N; s++)
      off[s + 1] = off[s] + (N >> s) + ((s % 2 == 0 && s < LOG2N) ? 1 : 0);
    i = 0; first_valid = -1;
    rst = 1'b1; en = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    while (i < 3 * N) begin
      en = ($urandom_range(5) != 0);
      #1;
      if (en) begin
        for (int s = 1; s <= LOG2N; s++) begin
          int p, ex_sel, ex_negj;
          p = (i - off[s] + 4 * N) % N;
          ex_sel  = (p >> (LOG2N - s)) & 1;
          ex_negj = (s % 2 == 0) ? (ex_sel & ((p >> (LOG2N - s + 1)) & 1)) : 0;
          checks++;
          if (sel_bits[s-1] != ex_sel[0] || negj_bits[s-1] != ex_negj[0]) begin
            failures++;
            if (failures < 10) $display("FAIL: sample %0d stage %0d", i, s);
          end
          if (s % 2 == 0 && s < LOG2N) begin
            checks++;
            if (int'(mult_pos[s-1]) != (i - off[s] - (N >> s) + 4 * N) % N) begin
              failures++;
              if (failures < 10) $display("FAIL: sample %0d multiplier after stage %0d", i, s);
            end
          end
        end
        checks++;
        if (out_valid != (i >= LAT)) begin
          failures++;
          if (failures < 10) $display("FAIL: sample %0d out_valid=%0d", i, out_valid);
        end
        if (out_valid && first_valid < 0) first_valid = i;
        if (i >= LAT) begin
          checks++;
          if (int'(out_index) != rev10((i - LAT) % N)) begin
            failures++;
            if (failures < 10) $display("FAIL: sample %0d out_index=%0d", i, out_index);
          end
        end
        i++;
      end else begin
        checks++;
        if (out_valid) begin
          failures++;
          $display("FAIL: out_valid while not enabled");
        end
      end
      @(posedge clk);
      #1;
    end
    checks++;
    if (first_valid != LAT) begin
      failures++;
      $display("FAIL: first output at sample %0d, expected %0d", first_valid, LAT);
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
