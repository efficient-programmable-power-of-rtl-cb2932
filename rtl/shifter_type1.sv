// shifter_type1 -- type-I shifter: logical right shift.
//
// q = d >> amt; the vacated most significant bits are filled with zeros.
// In the scaler it is Shifter 1 of the s1 generator, which shifts the
// (3n+p+1)-bit word Y||x1 right by lambda. Purely combinational; the
// barrel structure is left to synthesis.
module shifter_type1 #(
  parameter int unsigned W  = 16,
  parameter int unsigned SW = 4
) (
  input  logic [W-1:0]  d,
  input  logic [SW-1:0] amt,
  output logic [W-1:0]  q
);

  always_comb q = d >> amt;

endmodule
