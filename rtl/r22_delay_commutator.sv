// r22_delay_commutator: delay-switch-delay commutator of a multi-path delay
// commutator (MDC) FFT.
//
// It re-pairs two streams so that the next butterfly receives the two samples
// that differ in the next index bit. Stream `b` is delayed by D beats, a 2x2
// switch either passes {a, b_delayed} straight or crossed, and the upper
// switch output is delayed by another D beats:
//   sel = 0: up = a,         lo = b delayed;   sel = 1: up = b delayed, lo = a
//   o0 = up delayed by D,    o1 = lo
// With `sel` equal to beat bit log2(D) (beat counted at the input), the two
// ports exchange roles with that beat bit: port o0 carries the samples whose
// old beat bit was 0, o1 those whose bit was 1, and the new beat bit (one
// frame latency of D beats later) tells which input port they came from.
// 2*D registers per unit, the count the architecture gives (N - 2t in total).
// All registers advance only when `en` is high (the pipeline stalls with it).
// The delay lines are not reset: their content before the first frame is
// never marked valid.
module r22_delay_commutator #(
  parameter int unsigned W = 21,
  parameter int unsigned D = 1
) (
  input  logic                clk,
  input  logic                en,
  input  logic                sel,
  input  logic signed [W-1:0] a_re,
  input  logic signed [W-1:0] a_im,
  input  logic signed [W-1:0] b_re,
  input  logic signed [W-1:0] b_im,
  output logic signed [W-1:0] o0_re,
  output logic signed [W-1:0] o0_im,
  output logic signed [W-1:0] o1_re,
  output logic signed [W-1:0] o1_im
);
  logic signed [W-1:0] bd_re [D];
  logic signed [W-1:0] bd_im [D];
  logic signed [W-1:0] ud_re [D];
  logic signed [W-1:0] ud_im [D];
  logic signed [W-1:0] up_re, up_im;

  // switch
  always_comb begin
    if (sel) begin
      up_re = bd_re[D-1];  up_im = bd_im[D-1];
      o1_re = a_re;        o1_im = a_im;
    end else begin
      up_re = a_re;        up_im = a_im;
      o1_re = bd_re[D-1];  o1_im = bd_im[D-1];
    end
    o0_re = ud_re[D-1];
    o0_im = ud_im[D-1];
  end

  // the two delay lines
  always_ff @(posedge clk) begin
    if (en) begin
      bd_re[0] <= b_re;   bd_im[0] <= b_im;
      ud_re[0] <= up_re;  ud_im[0] <= up_im;
      for (int i = 1; i < int'(D); i++) begin
        bd_re[i] <= bd_re[i-1];  bd_im[i] <= bd_im[i-1];
        ud_re[i] <= ud_re[i-1];  ud_im[i] <= ud_im[i-1];
      end
    end
  end
endmodule
