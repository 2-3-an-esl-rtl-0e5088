// r22_perm: interconnection permutation between two butterfly columns of the
// vertically expanded (t-path) R2^2MDC FFT.
//
// While the index bit a butterfly column works on is still one of the lane
// (spatial) bits, no delay commutator is needed: the partner samples already
// arrive in the same beat on different lanes, and a fixed permutation of the
// 2t lanes brings them to the two inputs of one butterfly. A column pairing on
// spatial address bit j feeds lane {a without bit j, a[j]} with the sample of
// spatial address a. This unit maps the lanes of a column pairing on bit
// FROM_J (or the natural input order a = lane when FROM_J < 0) to those of a
// column pairing on bit TO_J. It is wiring only: no logic and no delay.
module r22_perm
  import r22_pkg::*;
#(
  parameter int unsigned P      = 4,
  parameter int unsigned W      = 21,
  parameter int          FROM_J = -1,
  parameter int          TO_J   = 1
) (
  input  logic signed [W-1:0] in_re  [P],
  input  logic signed [W-1:0] in_im  [P],
  output logic signed [W-1:0] out_re [P],
  output logic signed [W-1:0] out_im [P]
);
  for (genvar q = 0; q < int'(P); q++) begin : g_lane
    localparam int unsigned A  = (FROM_J < 0) ? q : addr_of(q, FROM_J);
    localparam int unsigned QO = lane_of(A, TO_J);
    assign out_re[QO] = in_re[q];
    assign out_im[QO] = in_im[q];
  end
endmodule
