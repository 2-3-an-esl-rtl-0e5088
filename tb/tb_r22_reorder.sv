// tb_r22_reorder: checks the natural-order output buffer for N = 16 with
// T = 2 (4 beats per frame) and T = 8 (1 beat per frame). Beats arrive in the
// FFT core's bit-reversed order, each sample tagged 100*frame + bin; the
// buffer must return lane q, beat c = bin q*N/(2T) + c of the previous
// frame, with out_valid only for beats of complete frames and out_last on the
// last beat. The input pauses at random.
module tb_r22_reorder;
  import r22_pkg::*;
  localparam int N = 16;
  localparam int W = 16;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int beats_in = 0;         // beats accepted so far

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  for (genvar i = 0; i < 2; i++) begin : g_cfg
    localparam int T  = (i == 0) ? 2 : 8;
    localparam int P  = 2 * T;
    localparam int NB = N / P;
    logic signed [W-1:0] in_re [P], in_im [P], out_re [P], out_im [P];
    logic [3:0] in_bin [P], out_bin [P];
    logic out_valid, out_last;
    int outs = 0;

    r22_reorder #(.N(N), .T(T), .W(W)) dut (.*);

    always_comb begin
      for (int q = 0; q < P; q++) begin
        int f, c, b;
        f = beats_in / NB;
        c = beats_in % NB;
        b = 0;
        // bit-reverse of (q/2)*(N/T) + 2c + q%2 over 4 bits, written out
        for (int k = 0; k < 4; k++) b |= ((((q / 2) * (N / T) + 2 * c + (q % 2)) >> k) & 1) << (3 - k);
        in_bin[q] = 4'(b);
        in_re[q]  = W'(100 * f + b);
        in_im[q]  = W'(-(100 * f + b));
      end
    end

    always @(posedge clk) begin
      if (rst_n && out_valid) begin
        int f, c;
        f = outs / NB;
        c = outs % NB;
        for (int q = 0; q < P; q++) begin
          check(int'(out_re[q]) == 100 * f + q * NB + c && int'(out_im[q]) == -(100 * f + q * NB + c),
                $sformatf("T=%0d frame %0d beat %0d lane %0d: %0d", T, f, c, q, out_re[q]));
          check(int'(out_bin[q]) == q * NB + c, "out_bin");
        end
        check(out_last == (c == NB - 1), "out_last");
        outs++;
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 60; n++) begin
      in_valid <= ($urandom_range(3) != 0);
      @(posedge clk);
      #1 if (in_valid) beats_in++;
    end
    in_valid <= 1'b0;
    repeat (2) @(posedge clk);
    // every beat after the first frame produced one output beat
    check(g_cfg[0].outs == beats_in - 4, "T=2 output beat count");
    check(g_cfg[1].outs == beats_in - 1, "T=8 output beat count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
