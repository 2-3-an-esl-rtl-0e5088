// tb_r22_neg_j: checks the trivial -j multiplier on random samples and on the
// four unit values: with en high (a + jb) becomes (b - ja), with en low the
// sample passes unchanged.
module tb_r22_neg_j;
  localparam int W = 12;
  logic en;
  logic signed [W-1:0] in_re, in_im, out_re, out_im;
  int checks = 0, failures = 0;

  r22_neg_j #(.W(W)) dut (.*);

  task automatic apply(bit e, int re, int im);
    int xr, xi;
    en = e; in_re = W'(re); in_im = W'(im);
    #1;
    // -j*(re + j im) = im - j re
    xr = e ? im : re;
    xi = e ? -re : im;
    checks++;
    if (int'(out_re) != xr || int'(out_im) != xi) begin
      failures++;
      $display("FAIL en=%0d in=(%0d,%0d) out=(%0d,%0d) exp=(%0d,%0d)", e, re, im, out_re, out_im, xr, xi);
    end
  endtask

  initial begin
    apply(1, 1, 0);  apply(1, 0, 1);  apply(1, -1, 0);  apply(1, 0, -1);
    for (int i = 0; i < 200; i++)
      apply(1'($urandom_range(1)), int'($urandom_range(4094)) - 2047, int'($urandom_range(4094)) - 2047);
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
