// tb_sdf_stage: checks one pipeline stage (type 2, memory depth 4) over a
// stream of random 4-bit words with random holds. The select and -j bits
// are generated from a sample counter as the controller does. The check
// works on whole blocks of 2*DEPTH input words x[0..7]: the output, DEPTH
// samples later, must be x[p] + x'[p+4] for p = 0..3 followed by
// x[p] - x'[p+4], where x' is x rotated by -j when the -j flag was set.
// A second instance of type 1 (no rotation) is checked the same way.
module tb_sdf_stage;
  localparam int unsigned W = 4;
  localparam int unsigned D = 4;
  logic clk = 1'b0, rst, en;
  logic sel, negj;
  logic signed [W-1:0] in_re, in_im;
  logic signed [W:0] o2_re, o2_im, o1_re, o1_im;
  int checks = 0, failures = 0;

  sdf_stage #(.W(W), .DEPTH(D), .TYPE(2)) u_dut2 (
    .clk(clk), .rst(rst), .en(en), .sel(sel), .neg_j(negj),
    .in_re(in_re), .in_im(in_im), .out_re(o2_re), .out_im(o2_im)
  );
  sdf_stage #(.W(W), .DEPTH(D), .TYPE(1)) u_dut1 (
    .clk(clk), .rst(rst), .en(en), .sel(sel), .neg_j(negj),
    .in_re(in_re), .in_im(in_im), .out_re(o1_re), .out_im(o1_im)
  );

  always #5 clk = ~clk;

  // The -j flag follows one more position bit, as for a type-2 stage whose
  // preceding stage has memory depth 8.
  logic [3:0] pos16;
  always_comb begin
    sel  = pos16[2];
    negj = pos16[2] & pos16[3];
  end

  int xr [$], xi [$], yr2 [$], yi2 [$], yr1 [$], yi1 [$];
  int nj [$];

  always_ff @(posedge clk) begin
    if (rst) pos16 <= '0;
    else if (en) pos16 <= pos16 + 1'b1;
  end

  initial begin
    int nin;
    nin = 0;
    rst = 1'b1; en = 1'b0; in_re = '0; in_im = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    while (nin < 16 * 20 + D) begin
      en = ($urandom_range(4) != 0);
      in_re = W'(int'($urandom_range(14)) - 7);
      in_im = W'(int'($urandom_range(14)) - 7);
      #1;
      if (en) begin
        xr.push_back(in_re); xi.push_back(in_im); nj.push_back(negj);
        yr2.push_back(o2_re); yi2.push_back(o2_im);
        yr1.push_back(o1_re); yi1.push_back(o1_im);
        nin++;
      end
      @(posedge clk);
      #1;
    end
    // Blocks of 8 input words starting at multiples of 8; output of the
    // block appears D samples later.
    for (int b = 0; b + 8 + D <= nin; b += 8) begin
      for (int p = 0; p < D; p++) begin
        int ar, ai, br, bi, rr, ri;
        ar = xr[b + p]; ai = xi[b + p];
        br = xr[b + p + D]; bi = xi[b + p + D];
        if (nj[b + p + D]) begin rr = bi; ri = -br; end else begin rr = br; ri = bi; end
        checks += 2;
        if (yr2[b + p + D] != ar + rr || yi2[b + p + D] != ai + ri ||
            yr2[b + p + 2 * D] != ar - rr || yi2[b + p + 2 * D] != ai - ri) begin
          failures++;
          $display("FAIL: type 2 block %0d pair %0d", b, p);
        end
        if (yr1[b + p + D] != ar + br || yi1[b + p + D] != ai + bi ||
            yr1[b + p + 2 * D] != ar - br || yi1[b + p + 2 * D] != ai - bi) begin
          failures++;
          $display("FAIL: type 1 block %0d pair %0d", b, p);
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
