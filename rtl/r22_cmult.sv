// r22_cmult: complex multiplier for the non-trivial twiddle factors.
//
// (a_re + j a_im) * (w_re + j w_im) with four real multiplications and two
// additions. The twiddle is Q1.(TW-1); the full-precision products are
// rounded to nearest (add half an LSB, arithmetic shift by TW-1) and returned
// at the data width W. |w| <= 1, so the result keeps the magnitude of the
// input; the datapath's guard bit absorbs the sqrt(2) growth a rotation can
// give one component, so the bits of the rounded product above W are only
// copies of its sign and are dropped (a lint tool reports them as unused).
// Combinational (the architecture has no register here).
module r22_cmult #(
  parameter int unsigned W  = 21,
  parameter int unsigned TW = 16
) (
  input  logic signed [W-1:0]  a_re,
  input  logic signed [W-1:0]  a_im,
  input  logic signed [TW-1:0] w_re,
  input  logic signed [TW-1:0] w_im,
  output logic signed [W-1:0]  p_re,
  output logic signed [W-1:0]  p_im
);
  localparam int unsigned PW = W + TW + 1;
  localparam logic signed [PW-1:0] HALF = PW'(1) <<< (TW - 2);

  logic signed [PW-1:0] acc_re, acc_im, rnd_re, rnd_im;

  always_comb begin
    acc_re = PW'(a_re * w_re) - PW'(a_im * w_im);
    acc_im = PW'(a_re * w_im) + PW'(a_im * w_re);
    rnd_re = (acc_re + HALF) >>> (TW - 1);
    rnd_im = (acc_im + HALF) >>> (TW - 1);
    p_re   = rnd_re[W-1:0];
    p_im   = rnd_im[W-1:0];
  end
endmodule
