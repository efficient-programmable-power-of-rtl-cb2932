// y_gen -- Y generator: mixed-radix conversion for the scaler.
//
// With m1 = 2^(n+p), m2 = 2^n-1, m3 = 2^(n+1)-1, the integer X of the
// residues (x1, x2, x3) is X = x1 + 2^(n+p) * Y with Y = v2 + (2^n-1)*v3,
// 0 <= Y < (2^n-1)(2^(n+1)-1) < 2^(2n+1). This block produces Y:
//   v2_gen  -> v2 and the S/C vectors of its carry-save adder
//   v3_gen  -> v3, computed from x1, x3 and S/C in parallel with v2
//   y_operand_prep + y_adder -> Y = v3||v2 - v3
// The block split follows the published Y generator. Inputs must be
// canonical residues. Purely combinational.
module y_gen #(
  parameter int unsigned N = 16,
  parameter int unsigned P = 16
) (
  input  logic [N+P-1:0] x1,
  input  logic [N-1:0]   x2,
  input  logic [N:0]     x3,
  output logic [2*N:0]   y
);

  logic [N-1:0] v2, s_vec, c_vec;
  logic         lsb2v2;
  logic [N:0]   v3;
  logic [2*N:0] yx, yy;

  v2_gen #(.N(N), .P(P)) u_v2 (
    .x1(x1), .x2(x2), .v2(v2), .s_vec(s_vec), .c_vec(c_vec), .lsb2v2(lsb2v2)
  );

  v3_gen #(.N(N), .P(P)) u_v3 (
    .x1(x1), .x3(x3), .s_vec(s_vec), .c_vec(c_vec), .lsb2v2(lsb2v2), .v3(v3)
  );

  y_operand_prep #(.N(N)) u_prep (.v2(v2), .v3(v3), .yx(yx), .yy(yy));

  y_adder #(.N(N)) u_add (.yx(yx), .yy(yy), .y(y));

endmodule
