// tb_r22_emdc_fft: end-to-end test of the R2^2EMDC FFT at its default size.
//
// Streams a series of frames through the pipeline (random data, an impulse,
// a single tone, a full-scale frame that exercises the guard bits, and a
// zero frame that flushes the last result), sometimes pausing the input to
// exercise the stall, and compares every output bin with a direct DFT
// computed here in floating point. Also checks the output order (bin index of
// every lane), the one-frame latency, the 2T/N transforms-per-cycle rate when
// the input does not pause, and that each mechanism of the datapath was used:
// lane permutation, delay-commutator switching, -j swaps, non-trivial twiddle
// multiplications, stalls and the full-scale frame.
module tb_r22_emdc_fft;
  import r22_pkg::*;

  localparam int N  = DEF_N;
  localparam int T  = DEF_T;
  localparam int W  = DEF_W;
  localparam int TW = DEF_TW;
  localparam int M  = $clog2(N);
  localparam int P  = 2 * T;
  localparam int NB = N / P;          // beats per frame
  localparam int OW = W + M + 1;
  localparam int NF = 12;             // frames with data, plus one flush frame
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [W-1:0]  in_re [P], in_im [P];
  logic                 out_valid, out_last;
  logic signed [OW-1:0] out_re [P], out_im [P];
  logic [M-1:0]         out_bin [P];

  r22_emdc_fft dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int xr [NF+1][N], xi [NF+1][N];
  int out_count = 0;             // output beats seen
  int in_count  = 0;             // input beats accepted
  int stalls = 0, fullscale_frames = 0, negj_uses = 0, comm_cross = 0;
  int tw_uses = 0, perm_frames = 0;
  longint cyc = 0, first_out_cyc [NF];
  int max_err = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ------------------------------------------------------------- stimulus
  initial begin
    for (int f = 0; f <= NF; f++)
      for (int n = 0; n < N; n++) begin
        case (f)
          1: begin xr[f][n] = (n == 3) ? 20000 : 0; xi[f][n] = (n == 3) ? -7000 : 0; end
          2: begin
               xr[f][n] = int'(12000.0 * $cos(2.0 * PI * 5 * n / N));
               xi[f][n] = int'(12000.0 * $sin(2.0 * PI * 5 * n / N));
             end
          3: begin xr[f][n] = 32767; xi[f][n] = -32768; end
          4: begin xr[f][n] = (n % 2 == 1) ? -32768 : 32767; xi[f][n] = (n % 3 != 0) ? 32767 : -32768; end
          NF: begin xr[f][n] = 0; xi[f][n] = 0; end
          default: begin
            xr[f][n] = int'($urandom_range(65535)) - 32768;
            xi[f][n] = int'($urandom_range(65535)) - 32768;
          end
        endcase
      end
  end

  // ---------------------------------------------------------------- driver
  initial begin
    for (int l = 0; l < P; l++) begin in_re[l] = '0; in_im[l] = '0; end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int f = 0; f <= NF; f++) begin
      if (f == 3 || f == 4) fullscale_frames++;
      for (int c = 0; c < NB; c++) begin
        // frames 6..8 pause now and then; the others stream back to back
        while (f >= 6 && f <= 8 && $urandom_range(3) == 0) begin
          in_valid <= 1'b0;
          stalls++;
          @(posedge clk);
        end
        in_valid <= 1'b1;
        for (int l = 0; l < P; l++) begin
          in_re[l] <= W'(xr[f][l * NB + c]);
          in_im[l] <= W'(xi[f][l * NB + c]);
        end
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    repeat (4) @(posedge clk);
    // the flush frame pushes out the last data frame plus its own first NB-1 beats
    check(out_count == (NF + 1) * NB - (NB - 1),
          $sformatf("output beats %0d, expected %0d", out_count, (NF + 1) * NB - (NB - 1)));
    // rate: frames 9..11 streamed without pauses, one frame every NB cycles
    for (int f = 10; f < NF; f++)
      check(first_out_cyc[f] - first_out_cyc[f-1] == longint'(NB),
            $sformatf("frame %0d started %0d cycles after the previous one", f,
                      first_out_cyc[f] - first_out_cyc[f-1]));
    check(stalls > 0,           "no stall happened");
    check(fullscale_frames > 0, "no full-scale frame");
    check(negj_uses > 0,        "no -j swap happened");
    check(comm_cross > 0,       "commutators never crossed");
    check(tw_uses > 0,          "no non-trivial twiddle multiplication");
    check(perm_frames > 0,      "lane permutation never exercised");
    $display("mechanisms: stalls=%0d fullscale=%0d negj=%0d commutator_cross=%0d twiddles=%0d perm_frames=%0d max_err=%0d",
             stalls, fullscale_frames, negj_uses, comm_cross, tw_uses, perm_frames, max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // -------------------------------------------------- latency bookkeeping
  logic prev_valid = 1'b0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    prev_valid <= in_valid && rst_n;
    if (in_valid && rst_n) in_count <= in_count + 1;
    // mechanism probes (names of the default configuration: N = 16, T = 2)
    if (in_valid && rst_n) begin
      if (dut.g_stage[3].g_bf[0].g_b2.negj || dut.g_stage[3].g_bf[1].g_b2.negj) negj_uses++;
      if (dut.g_stage[2].g_comm.g_dc[0].u_dc.sel) comm_cross++;
      if (dut.g_stage[1].g_tw[1].g_mul.addr != 0 || dut.g_stage[1].g_tw[3].g_mul.addr != 0) tw_uses++;
    end
  end

  // ---------------------------------------------------------- output check
  always @(posedge clk) begin
    if (rst_n) begin
      // out_valid must follow exactly the input beats from the NB-th on
      check(out_valid == (prev_valid && in_count >= NB), "out_valid timing");
    end
    if (rst_n && out_valid) begin
      int f, c, tol;
      real sabs;
      f = out_count / NB;
      c = out_count % NB;
      if (c == 0 && f < NF) first_out_cyc[f] = cyc;
      check(out_last == (c == NB - 1), "out_last");
      sabs = 0.0;
      for (int n = 0; n < N; n++) sabs += real'((xr[f][n] < 0 ? -xr[f][n] : xr[f][n]) + (xi[f][n] < 0 ? -xi[f][n] : xi[f][n]));
      tol = 4 + int'(sabs / real'(1 << (TW - 3)));
      for (int q = 0; q < P; q++) begin
        int k, er, ei;
        real re, im;
        k = int'(bitrev((q / 2) * (N / T) + 2 * c + (q % 2), M));
        check(int'(out_bin[q]) == k, $sformatf("bin of lane %0d beat %0d: %0d, expected %0d", q, c, out_bin[q], k));
        re = 0.0; im = 0.0;
        for (int n = 0; n < N; n++) begin
          real a;
          a = -2.0 * PI * real'((k * n) % N) / real'(N);
          re += real'(xr[f][n]) * $cos(a) - real'(xi[f][n]) * $sin(a);
          im += real'(xr[f][n]) * $sin(a) + real'(xi[f][n]) * $cos(a);
        end
        er = int'(re) - int'(out_re[q]);  if (er < 0) er = -er;
        ei = int'(im) - int'(out_im[q]);  if (ei < 0) ei = -ei;
        if (er > max_err) max_err = er;
        if (ei > max_err) max_err = ei;
        check(er <= tol && ei <= tol,
              $sformatf("frame %0d bin %0d: got (%0d,%0d) expected (%0.1f,%0.1f) tol %0d",
                        f, k, out_re[q], out_im[q], re, im, tol));
      end
      if (c == NB - 1) perm_frames++;
      out_count <= out_count + 1;
    end
  end

  // --------------------------------------------------------------- watchdog
  initial begin
    repeat (200 * (NF + 2) * NB + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
