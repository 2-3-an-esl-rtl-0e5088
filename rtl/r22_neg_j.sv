// r22_neg_j: trivial multiplication by -j.
//
// -j * (a + jb) = b - ja, so the product needs no multiplier: the real and
// imaginary parts are swapped and the new imaginary part is negated. When `en`
// is low the sample passes unchanged. The radix-2^2 algorithm moves every
// trivial -j twiddle of the radix-2 flow graph into this unit, which is why
// only every second butterfly column needs real multipliers.
// Purely combinational. The caller leaves one bit of headroom so that negating
// the most negative value cannot occur (this design's convention).
module r22_neg_j #(
  parameter int unsigned W = 21
) (
  input  logic                en,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);
  always_comb begin
    if (en) begin
      out_re = in_im;
      out_im = -in_re;
    end else begin
      out_re = in_re;
      out_im = in_im;
    end
  end
endmodule
