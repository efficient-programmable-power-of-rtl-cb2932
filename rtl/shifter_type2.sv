// shifter_type2 -- type-II shifter: circular left shift.
//
// q = CLS(d, amt), d rotated left by amt positions, for amt in 0..W
// (a rotation by W returns d). The rotation is taken from the upper half
// of {d,d} shifted left by amt. Used as Shifters 2, 4, 6 and 8 of the
// s2 and s3 generators, where rotation implements multiplication by a
// power of two modulo 2^W-1. Values of amt above W are outside the
// contract and give an undefined result. Purely combinational.
module shifter_type2 #(
  parameter int unsigned W  = 16,
  parameter int unsigned SW = 5
) (
  input  logic [W-1:0]  d,
  input  logic [SW-1:0] amt,
  output logic [W-1:0]  q
);

  always_comb q = W'(({d, d} << amt) >> W);

endmodule
