// sigma_delta2d: sum/difference stage that turns the four dual-tree outputs
// of one 2D subband type into complex subbands.
//
// Inputs are the outputs of the four tree combinations for the same subband
// type: r (row tree a, column tree a), t1 (row b, column a), t2 (row a,
// column b) and u = t1t2 (row b, column b). Writing the output as
// r + t1*i1 + t2*i2 + u*i1*i2 and setting i1 = i2 = i (subband "a") or
// -i1 = i2 = i (subband "b") gives
//   re_a = r - u,  im_a = t1 + t2,  re_b = r + u,  im_b = t2 - t1
// The 4-tuple and the two substitutions follow the document; no 1/sqrt(2)
// normalisation is applied (this design's choice: the result grows by one
// bit instead). Purely combinational.
module sigma_delta2d #(
  parameter int unsigned W = 20
) (
  input  logic signed [W-1:0] r,
  input  logic signed [W-1:0] t1,
  input  logic signed [W-1:0] t2,
  input  logic signed [W-1:0] u,
  output logic signed [W:0]   re_a,
  output logic signed [W:0]   re_b,
  output logic signed [W:0]   im_a,
  output logic signed [W:0]   im_b
);
  always_comb begin
    re_a = (W+1)'(r) - (W+1)'(u);
    re_b = (W+1)'(r) + (W+1)'(u);
    im_a = (W+1)'(t1) + (W+1)'(t2);
    im_b = (W+1)'(t2) - (W+1)'(t1);
  end
endmodule
