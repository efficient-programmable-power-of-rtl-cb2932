// y_operand_prep -- operand preparation unit of the Y generator.
//
// Y = v2 + (2^n-1)*v3 = v3||v2 - v3. The subtraction is turned into an
// addition in (2n+1)-bit two's complement:
//   Yx = v3 || v2            (2n+1 bits)
//   Yy = 1^n || ~v3          (2n+1 bits, = -v3 - 1)
// so that Y = Yx + Yy + 1. Only wiring and inverters. Follows the
// published operand formulation. Purely combinational.
module y_operand_prep #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]  v2,
  input  logic [N:0]    v3,
  output logic [2*N:0]  yx,
  output logic [2*N:0]  yy
);

  always_comb begin
    yx = {v3, v2};
    yy = {{N{1'b1}}, ~v3};
  end

endmodule
