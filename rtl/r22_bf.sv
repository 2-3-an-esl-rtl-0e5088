// r22_bf: radix-2 butterfly (BF I of the radix-2^2 pipeline).
//
// Two complex adders: sum = a + b and diff = a - b. In the decimation in
// frequency flow graph the sum feeds the half of the transform whose current
// index bit is 0 and the difference the half whose bit is 1.
// Combinational; the width does not grow inside the unit, the datapath that
// instantiates it carries enough guard bits (log2 N + 1) that no sum overflows.
module r22_bf #(
  parameter int unsigned W = 21
) (
  input  logic signed [W-1:0] a_re,
  input  logic signed [W-1:0] a_im,
  input  logic signed [W-1:0] b_re,
  input  logic signed [W-1:0] b_im,
  output logic signed [W-1:0] sum_re,
  output logic signed [W-1:0] sum_im,
  output logic signed [W-1:0] dif_re,
  output logic signed [W-1:0] dif_im
);
  always_comb begin
    sum_re = a_re + b_re;
    sum_im = a_im + b_im;
    dif_re = a_re - b_re;
    dif_im = a_im - b_im;
  end
endmodule
