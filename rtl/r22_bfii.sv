// r22_bfii: radix-2^2 second butterfly (BF II).
//
// A radix-2 butterfly whose lower input first passes the trivial -j
// multiplier. `neg_j` is asserted by the stage control for the samples whose
// radix-2 twiddle is -j (both index bits of the radix-2^2 pair equal to 1);
// the remaining, non-trivial twiddle is applied by complex multipliers after
// this butterfly, on both its outputs.
// Combinational, same width in and out (headroom is provided by the caller).
module r22_bfii #(
  parameter int unsigned W = 21
) (
  input  logic                neg_j,
  input  logic signed [W-1:0] a_re,
  input  logic signed [W-1:0] a_im,
  input  logic signed [W-1:0] b_re,
  input  logic signed [W-1:0] b_im,
  output logic signed [W-1:0] sum_re,
  output logic signed [W-1:0] sum_im,
  output logic signed [W-1:0] dif_re,
  output logic signed [W-1:0] dif_im
);
  logic signed [W-1:0] bj_re, bj_im;

  r22_neg_j #(.W(W)) u_negj (
    .en(neg_j), .in_re(b_re), .in_im(b_im), .out_re(bj_re), .out_im(bj_im)
  );

  r22_bf #(.W(W)) u_bf (
    .a_re(a_re), .a_im(a_im), .b_re(bj_re), .b_im(bj_im),
    .sum_re(sum_re), .sum_im(sum_im), .dif_re(dif_re), .dif_im(dif_im)
  );
endmodule
