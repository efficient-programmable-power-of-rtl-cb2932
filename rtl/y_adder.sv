// y_adder -- modified (2n+1)-bit adder of the Y generator.
//
// y = <yx + yy + 1> modulo 2^(2n+1): a binary adder with its carry-in tied
// to one and its carry-out dropped. With the operands of y_operand_prep
// this yields Y = v2 + (2^n-1)*v3. Follows the published description; the
// adder's internal structure is left to synthesis. Purely combinational.
module y_adder #(
  parameter int unsigned N = 16
) (
  input  logic [2*N:0] yx,
  input  logic [2*N:0] yy,
  output logic [2*N:0] y
);

  always_comb y = yx + yy + 1'b1;

endmodule
