// eac_csa -- W-bit carry-save adder with end-around carry (modulo 2^W-1).
//
// Three W-bit operands are reduced to a sum vector and a carry vector with
// one row of full adders. The carry of bit i has weight 2^(i+1); the carry
// out of the top bit has weight 2^W, which is 1 modulo 2^W-1, so it wraps
// around to bit 0. Hence <a+b+c> = <sum+carry> modulo 2^W-1.
// Follows the CSA-with-EAC used by the scaler's v2, s2 and s3 paths.
// Purely combinational, one full-adder delay.
module eac_csa #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  logic [W-1:0] maj;

  always_comb begin
    sum   = a ^ b ^ c;
    maj   = (a & b) | (a & c) | (b & c);
    carry = {maj[W-2:0], maj[W-1]};
  end

endmodule
