// shifter_type3 -- type-III shifter: logical left shift of the one's
// complement of the input, with ones shifted in at the bottom.
//
// The WI-bit input is zero-extended (or truncated) to W bits and inverted;
// the result is shifted left by amt (0..W) and the amt vacated least
// significant bits are set to one. Input bits that would land above bit
// W-1 are dropped. Since the complement is the negation modulo 2^k-1 and
// the padded ones add a zero modulo 2^k-1, the output represents
// -(d mod 2^(W-amt)) * 2^amt in one or two k-bit chunks. Used as
// Shifters 3, 5, 7 and 9 of the s2 and s3 generators. Purely combinational.
module shifter_type3 #(
  parameter int unsigned WI = 16,
  parameter int unsigned W  = 16,
  parameter int unsigned SW = 5
) (
  input  logic [WI-1:0] d,
  input  logic [SW-1:0] amt,
  output logic [W-1:0]  q
);

  logic [W-1:0] dc;
  logic [W-1:0] pad;

  always_comb begin
    dc  = ~W'(d);
    pad = ~({W{1'b1}} << amt);
    q   = (dc << amt) | pad;
  end

endmodule
