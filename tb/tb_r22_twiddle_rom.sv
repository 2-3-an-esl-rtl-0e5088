// tb_r22_twiddle_rom: reads every entry of a 16- and a 64-entry twiddle table
// and compares it with cos(2*pi*e/N) and -sin(2*pi*e/N) scaled to Q1.15
// (within one LSB), plus the exact codes of W^0 and W^(N/4) = -j.
module tb_r22_twiddle_rom;
  localparam int TW = 16;
  localparam real PI = 3.14159265358979323846;
  logic [3:0] a16;
  logic [5:0] a64;
  logic signed [TW-1:0] r16, i16, r64, i64;
  int checks = 0, failures = 0;

  r22_twiddle_rom #(.N(16), .TW(TW)) u16 (.addr(a16), .w_re(r16), .w_im(i16));
  r22_twiddle_rom #(.N(64), .TW(TW)) u64 (.addr(a64), .w_re(r64), .w_im(i64));

  function automatic bit near(int got, real exp_v);
    return (real'(got) - exp_v) <= 1.0 && (exp_v - real'(got)) <= 1.0;
  endfunction

  initial begin
    for (int e = 0; e < 64; e++) begin
      a64 = 6'(e); a16 = 4'(e % 16);
      #1;
      checks++;
      if (!near(int'(r64), 32768.0 * $cos(2.0 * PI * e / 64.0)) ||
          !near(int'(i64), -32768.0 * $sin(2.0 * PI * e / 64.0))) begin
        failures++; $display("FAIL N=64 e=%0d (%0d,%0d)", e, r64, i64);
      end
      checks++;
      if (!near(int'(r16), 32768.0 * $cos(2.0 * PI * (e % 16) / 16.0)) ||
          !near(int'(i16), -32768.0 * $sin(2.0 * PI * (e % 16) / 16.0))) begin
        failures++; $display("FAIL N=16 e=%0d (%0d,%0d)", e % 16, r16, i16);
      end
    end
    a16 = 4'd0; #1;
    checks++; if (r16 != 16'sd32767 || i16 != 16'sd0) begin failures++; $display("FAIL W^0 (%0d,%0d)", r16, i16); end
    a16 = 4'd4; #1;
    checks++; if (r16 != 16'sd0 || i16 != -16'sd32768) begin failures++; $display("FAIL W^4 (%0d,%0d)", r16, i16); end
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
