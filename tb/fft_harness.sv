// fft_harness: drives one R2^2EMDC FFT instance of a given size and degree of
// parallelism with NF random frames (the first one an impulse, the second a
// full-scale frame) and flush frames, checks every output bin against a
// direct floating-point DFT and the bin order, and reports its counts.
// With NAT set the core's natural-order output buffer is switched on and the
// bins are expected in natural order, one frame later.
// Frames are streamed back to back, except that every third frame pauses its
// input now and then; the rate check covers the pause-free frames.
module fft_harness #(
  parameter int N  = 16,
  parameter int T  = 1,
  parameter int NF = 3,
  parameter bit NAT = 1'b0   // natural-order output buffer on
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  import r22_pkg::*;

  localparam int W  = DEF_W;
  localparam int TW = DEF_TW;
  localparam int M  = $clog2(N);
  localparam int P  = 2 * T;
  localparam int NB = N / P;
  localparam int OW = W + M + 1;
  localparam real PI = 3.14159265358979323846;

  logic rst_n = 1'b0, in_valid = 1'b0;
  logic signed [W-1:0]  in_re [P], in_im [P];
  logic                 out_valid, out_last;
  logic signed [OW-1:0] out_re [P], out_im [P];
  logic [M-1:0]         out_bin [P];

  r22_emdc_fft #(.N(N), .T(T), .W(W), .TW(TW), .NATURAL_OUT(NAT)) dut (.*);

  localparam int NFL = NAT ? 2 : 1;  // flush frames (zeros) after the data
  int xr [NF+NFL][N], xi [NF+NFL][N];
  int out_count = 0, max_err = 0;
  longint cyc = 0;
  longint first_out_cyc [NF+NFL];

  initial begin
    done = 1'b0; checks = 0; failures = 0;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d T=%0d NAT=%0d: %s", N, T, NAT, what);
    end
  endtask

  initial begin
    for (int f = 0; f < NF + NFL; f++)
      for (int n = 0; n < N; n++) begin
        if (f >= NF) begin
          xr[f][n] = 0; xi[f][n] = 0;
        end else if (f == 0) begin
          xr[f][n] = (n == 1) ? 30000 : 0;  xi[f][n] = (n == N - 1) ? -30000 : 0;
        end else if (f == 1) begin
          xr[f][n] = (n % 2 == 1) ? -32768 : 32767;  xi[f][n] = -32768;
        end else begin
          xr[f][n] = int'($urandom_range(65535)) - 32768;
          xi[f][n] = int'($urandom_range(65535)) - 32768;
        end
      end
    for (int l = 0; l < P; l++) begin in_re[l] = '0; in_im[l] = '0; end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int f = 0; f < NF + NFL; f++)
      for (int c = 0; c < NB; c++) begin
        while (f % 3 == 2 && $urandom_range(4) == 0) begin
          in_valid <= 1'b0;
          @(posedge clk);
        end
        in_valid <= 1'b1;
        for (int l = 0; l < P; l++) begin
          in_re[l] <= W'(xr[f][l * NB + c]);
          in_im[l] <= W'(xi[f][l * NB + c]);
        end
        @(posedge clk);
      end
    in_valid <= 1'b0;
    repeat (4) @(posedge clk);
    // the flush frames push out the last data frame, plus one beat
    check(out_count == NF * NB + 1, "number of output beats");
    // frames input without pauses leave one frame every N/(2T) cycles:
    // without the buffer frames 0 and 1, with it frames 1 and 2
    if (NF > 2)
      check(first_out_cyc[NAT ? 2 : 1] - first_out_cyc[NAT ? 1 : 0] == longint'(NB),
            "one frame every N/(2T) cycles");
    $display("N=%0d T=%0d NAT=%0d: checks=%0d failures=%0d max_err=%0d", N, T, NAT, checks, failures, max_err);
    done = 1'b1;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid) begin
      int f, c, tol;
      real sabs;
      f = out_count / NB;
      c = out_count % NB;
      if (c == 0) first_out_cyc[f] = cyc;
      check(out_last == (c == NB - 1), "out_last");
      sabs = 0.0;
      for (int n = 0; n < N; n++)
        sabs += real'((xr[f][n] < 0 ? -xr[f][n] : xr[f][n]) + (xi[f][n] < 0 ? -xi[f][n] : xi[f][n]));
      tol = 4 + int'(sabs / real'(1 << (TW - 3)));
      for (int q = 0; q < P; q++) begin
        int k, er, ei;
        real re, im;
        k = NAT ? q * NB + c : int'(bitrev((q / 2) * (N / T) + 2 * c + (q % 2), M));
        check(int'(out_bin[q]) == k, "bin order");
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
              $sformatf("frame %0d bin %0d: got (%0d,%0d) expected (%0.1f,%0.1f)", f, k,
                        out_re[q], out_im[q], re, im));
      end
      out_count <= out_count + 1;
    end
  end
endmodule
