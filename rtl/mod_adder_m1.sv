// mod_adder_m1 -- modulo 2^W-1 adder with a single representation of zero.
//
// sum = <a + b> mod (2^W - 1). Both a+b and a+b+1 are formed; when a+b+1
// carries out of W bits the sum has reached the modulus and the wrapped
// value a+b+1-2^W is taken, otherwise a+b. A result of all ones (the second
// code of zero, reached only when both inputs are all ones) is mapped to 0,
// so the output is always a canonical residue in [0, 2^W-2]. Inputs may be
// any W-bit values, including the all-ones code.
//
// Two side outputs serve the v2/v3 datapath of the scaler:
//   cout     : carry out of the plain sum a+b (a+b > 2^W-1)
//   all_prop : a and b are bitwise complements (a+b == 2^W-1)
//
// The scaler uses "modulo 2^n-1 adders" after its end-around-carry CSAs;
// their internal structure (a parallel-prefix adder in the published
// evaluation) is not reproduced: this is the plain behavioural form, left
// to synthesis. Forcing the single zero is a choice of this design, needed
// because v2 and v3 enter the mixed-radix sum as plain integers.
// Purely combinational.
module mod_adder_m1 #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum,
  output logic         cout,
  output logic         all_prop
);

  logic [W:0]   sum0, sum1;
  logic [W-1:0] wrapped;

  always_comb begin
    sum0     = {1'b0, a} + {1'b0, b};
    sum1     = sum0 + 1'b1;
    wrapped  = sum1[W] ? sum1[W-1:0] : sum0[W-1:0];
    sum      = (&wrapped) ? '0 : wrapped;
    cout     = sum0[W];
    all_prop = &(a ^ b);
  end

endmodule
