// tb_r22_cmult: checks the twiddle multiplier against a floating-point
// complex product (rounded result must be within one LSB), using random
// samples and random unit-magnitude twiddles as well as W^0 and -j.
module tb_r22_cmult;
  localparam int W  = 21;
  localparam int TW = 16;
  localparam real PI = 3.14159265358979323846;
  logic signed [W-1:0]  a_re, a_im, p_re, p_im;
  logic signed [TW-1:0] w_re, w_im;
  int checks = 0, failures = 0;

  r22_cmult #(.W(W), .TW(TW)) dut (.*);

  task automatic apply(int ar, int ai, int wr, int wi);
    real er, ei, s;
    a_re = W'(ar); a_im = W'(ai); w_re = TW'(wr); w_im = TW'(wi);
    #1;
    s  = real'(1 << (TW - 1));
    er = (real'(ar) * real'(wr) - real'(ai) * real'(wi)) / s;
    ei = (real'(ar) * real'(wi) + real'(ai) * real'(wr)) / s;
    checks++;
    if ((real'(p_re) - er) > 1.0 || (er - real'(p_re)) > 1.0 ||
        (real'(p_im) - ei) > 1.0 || (ei - real'(p_im)) > 1.0) begin
      failures++;
      $display("FAIL a=(%0d,%0d) w=(%0d,%0d) p=(%0d,%0d) exp=(%0.2f,%0.2f)", ar, ai, wr, wi,
               p_re, p_im, er, ei);
    end
  endtask

  initial begin
    apply(700000, -300000, 32767, 0);
    apply(700000, -300000, 0, -32768);
    for (int i = 0; i < 500; i++) begin
      real ang;
      ang = 2.0 * PI * real'($urandom_range(1023)) / 1024.0;
      apply(int'($urandom_range(1400000)) - 700000, int'($urandom_range(1400000)) - 700000,
            int'(32767.0 * $cos(ang)), int'(-32767.0 * $sin(ang)));
    end
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
