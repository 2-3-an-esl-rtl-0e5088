// tb_r22_bf: checks the radix-2 butterfly (sum and difference of two complex
// samples) on random inputs and on corner values.
module tb_r22_bf;
  localparam int W = 14;
  logic signed [W-1:0] a_re, a_im, b_re, b_im, sum_re, sum_im, dif_re, dif_im;
  int checks = 0, failures = 0;

  r22_bf #(.W(W)) dut (.*);

  task automatic apply(int ar, int ai, int br, int bi);
    a_re = W'(ar); a_im = W'(ai); b_re = W'(br); b_im = W'(bi);
    #1;
    checks++;
    if (int'(sum_re) != ar + br || int'(sum_im) != ai + bi ||
        int'(dif_re) != ar - br || int'(dif_im) != ai - bi) begin
      failures++;
      $display("FAIL a=(%0d,%0d) b=(%0d,%0d)", ar, ai, br, bi);
    end
  endtask

  initial begin
    apply(4095, -4096, 4095, -4096);
    apply(-4096, 4095, 4095, -4096);
    for (int i = 0; i < 300; i++)
      apply(int'($urandom_range(8191)) - 4096, int'($urandom_range(8191)) - 4096,
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
