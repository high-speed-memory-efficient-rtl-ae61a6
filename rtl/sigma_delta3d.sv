// sigma_delta3d: sum/difference stage of the 3D transform for one subband
// type (one low/high choice per dimension).
//
// Inputs are the tree outputs aaa, bba, bab and abb (trees of row, column and
// time filters). With i1, i2, i3 = +-i the real part of
// r + ... is aaa - s1s2*bba - s1s3*bab - s2s3*abb; the four sign choices
// (s1,s2,s3) = (+,+,+), (-,+,+), (+,-,+), (+,+,-) give the four real subbands
//   o[0] = aaa - bba - bab - abb
//   o[1] = aaa + bba + bab - abb
//   o[2] = aaa + bba - bab + abb
//   o[3] = aaa - bba + bab + abb
// Eight subband types times four gives the 32 real subbands (4 low, 28 high).
// Only real parts are formed, as the document does; no normalisation (the
// result grows by two bits). Purely combinational.
module sigma_delta3d #(
  parameter int unsigned W = 20
) (
  input  logic signed [W-1:0] aaa,
  input  logic signed [W-1:0] bba,
  input  logic signed [W-1:0] bab,
  input  logic signed [W-1:0] abb,
  output logic signed [W+1:0] o [4]
);
  typedef logic signed [W+1:0] o_t;
  always_comb begin
    o[0] = o_t'(aaa) - o_t'(bba) - o_t'(bab) - o_t'(abb);
    o[1] = o_t'(aaa) + o_t'(bba) + o_t'(bab) - o_t'(abb);
    o[2] = o_t'(aaa) + o_t'(bba) - o_t'(bab) + o_t'(abb);
    o[3] = o_t'(aaa) - o_t'(bba) + o_t'(bab) + o_t'(abb);
  end
endmodule
