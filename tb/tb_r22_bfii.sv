// tb_r22_bfii: checks the second radix-2^2 butterfly: a +/- b, where b is
// first multiplied by -j when neg_j is high.
module tb_r22_bfii;
  localparam int W = 14;
  logic neg_j;
  logic signed [W-1:0] a_re, a_im, b_re, b_im, sum_re, sum_im, dif_re, dif_im;
  int checks = 0, failures = 0;

  r22_bfii #(.W(W)) dut (.*);

  task automatic apply(bit nj, int ar, int ai, int br, int bi);
    int cr, ci;
    neg_j = nj; a_re = W'(ar); a_im = W'(ai); b_re = W'(br); b_im = W'(bi);
    #1;
    // b' = b or -j*b
    cr = nj ? bi : br;
    ci = nj ? -br : bi;
    checks++;
    if (int'(sum_re) != ar + cr || int'(sum_im) != ai + ci ||
        int'(dif_re) != ar - cr || int'(dif_im) != ai - ci) begin
      failures++;
      $display("FAIL nj=%0d a=(%0d,%0d) b=(%0d,%0d)", nj, ar, ai, br, bi);
    end
  endtask

  initial begin
    for (int i = 0; i < 400; i++)
      apply(1'(i % 2), int'($urandom_range(8191)) - 4096, int'($urandom_range(8191)) - 4096,
            int'($urandom_range(8191)) - 4096, int'($urandom_range(8191)) - 4096);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
