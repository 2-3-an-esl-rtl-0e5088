// tb_r22_configs: runs the R2^2EMDC FFT in the configurations the
// architecture is described with: N = 16 at every degree of parallelism
// t = 1, 2, 4, 8 (t = 8 is the fully parallel case without delay registers),
// N = 32 (odd log2 N: one radix-2 column is left over), and the 256- and
// 1024-point transforms, each with random, impulse and full-scale frames,
// the smallest sizes N = 2, 4, 8, N = 64, and four cases with the
// natural-order output buffer.
module tb_r22_configs;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NH = 19;
  logic done [NH];
  int   chk [NH], fail [NH];

  fft_harness #(.N(16),   .T(1), .NF(4)) h0 (.clk(clk), .done(done[0]), .checks(chk[0]), .failures(fail[0]));
  fft_harness #(.N(16),   .T(2), .NF(4)) h1 (.clk(clk), .done(done[1]), .checks(chk[1]), .failures(fail[1]));
  fft_harness #(.N(16),   .T(4), .NF(4)) h2 (.clk(clk), .done(done[2]), .checks(chk[2]), .failures(fail[2]));
  fft_harness #(.N(16),   .T(8), .NF(4)) h3 (.clk(clk), .done(done[3]), .checks(chk[3]), .failures(fail[3]));
  fft_harness #(.N(32),   .T(1), .NF(4)) h4 (.clk(clk), .done(done[4]), .checks(chk[4]), .failures(fail[4]));
  fft_harness #(.N(32),   .T(4), .NF(4)) h5 (.clk(clk), .done(done[5]), .checks(chk[5]), .failures(fail[5]));
  fft_harness #(.N(256),  .T(2), .NF(3)) h6 (.clk(clk), .done(done[6]), .checks(chk[6]), .failures(fail[6]));
  fft_harness #(.N(1024), .T(1), .NF(3)) h7 (.clk(clk), .done(done[7]), .checks(chk[7]), .failures(fail[7]));
  fft_harness #(.N(1024), .T(8), .NF(3)) h8 (.clk(clk), .done(done[8]), .checks(chk[8]), .failures(fail[8]));
  // the smallest sizes: one column, a single commutator, odd log2 N
  fft_harness #(.N(2),    .T(1), .NF(4)) h9  (.clk(clk), .done(done[9]),  .checks(chk[9]),  .failures(fail[9]));
  fft_harness #(.N(4),    .T(1), .NF(4)) h10 (.clk(clk), .done(done[10]), .checks(chk[10]), .failures(fail[10]));
  fft_harness #(.N(4),    .T(2), .NF(4)) h11 (.clk(clk), .done(done[11]), .checks(chk[11]), .failures(fail[11]));
  fft_harness #(.N(8),    .T(1), .NF(4)) h12 (.clk(clk), .done(done[12]), .checks(chk[12]), .failures(fail[12]));
  fft_harness #(.N(8),    .T(4), .NF(4)) h13 (.clk(clk), .done(done[13]), .checks(chk[13]), .failures(fail[13]));
  fft_harness #(.N(64),   .T(4), .NF(4)) h14 (.clk(clk), .done(done[14]), .checks(chk[14]), .failures(fail[14]));
  // natural-order outputs
  fft_harness #(.N(16), .T(2), .NF(4), .NAT(1)) h15 (.clk(clk), .done(done[15]), .checks(chk[15]), .failures(fail[15]));
  fft_harness #(.N(16), .T(8), .NF(4), .NAT(1)) h16 (.clk(clk), .done(done[16]), .checks(chk[16]), .failures(fail[16]));
  fft_harness #(.N(64), .T(1), .NF(4), .NAT(1)) h17 (.clk(clk), .done(done[17]), .checks(chk[17]), .failures(fail[17]));
  fft_harness #(.N(8),  .T(2), .NF(4), .NAT(1)) h18 (.clk(clk), .done(done[18]), .checks(chk[18]), .failures(fail[18]));

  int checks, failures;

  initial begin
    bit all_done;
    do begin
      @(posedge clk);
      all_done = 1'b1;
      for (int i = 0; i < NH; i++) all_done &= done[i];
    end while (!all_done);
    checks = 0; failures = 0;
    for (int i = 0; i < NH; i++) begin checks += chk[i]; failures += fail[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
