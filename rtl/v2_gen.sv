// v2_gen -- v2 generation unit of the Y generator.
//
// Computes the second mixed-radix digit
//   v2 = < 2^(n-p) * (x2 - x1) >  modulo 2^n-1,
// using <2^(n+p)>^-1 = 2^(n-p) modulo 2^n-1.
//   P == 0 : S = x2 and C = ~x1; v2 = <S + C>.
//   P >  0 : an n-bit carry-save adder with end-around carry reduces
//            v2a = CLS(x2, n-p), v2b = ~x1[n+p-1:p] and
//            v2c = ~x1[p-1:0] || 1^(n-p) to S and C; v2 = <S + C>.
// v2b and v2c are the two n-bit halves of -(x1 || 0^(n-p)) modulo 2^n-1.
//
// Outputs S, C and lsb2v2 feed the v3 unit so that v3 need not wait for
// the modulo adder: <2*v2> modulo 2^(n+1)-1 equals S||0 + C||lsb2v2, where
// lsb2v2 is 1 when S+C carries out (S+C > 2^n-1) or when S and C are bitwise
// complements (S+C = 2^n-1, i.e. v2 = 0, the correction bit xi).
// The split into S/C/CSA and the xi correction follow the published
// architecture; the modulo adder's inner structure is left to synthesis.
// Inputs must be canonical residues (x2 < 2^n-1); S = C = all ones then
// cannot occur. Purely combinational.
module v2_gen #(
  parameter int unsigned N = 16,
  parameter int unsigned P = 16
) (
  input  logic [N+P-1:0] x1,
  input  logic [N-1:0]   x2,
  output logic [N-1:0]   v2,
  output logic [N-1:0]   s_vec,
  output logic [N-1:0]   c_vec,
  output logic           lsb2v2
);

  logic c0, xi;

  if (P == 0) begin : g_p0
    always_comb begin
      s_vec = x2;
      c_vec = ~x1;
    end
  end else begin : g_pn
    logic [N-1:0]   v2a, v2b, v2c;
    always_comb begin
      // CLS(x2, n-p) is a rotation right by p.
      v2a             = N'({x2, x2} >> P);
      v2b             = ~x1[N+P-1:P];
      v2c             = '1;
      v2c[N-1 -: P]   = ~x1[P-1:0];
    end
    eac_csa #(.W(N)) u_csa (
      .a(v2a), .b(v2b), .c(v2c), .sum(s_vec), .carry(c_vec)
    );
  end

  mod_adder_m1 #(.W(N)) u_add (
    .a(s_vec), .b(c_vec), .sum(v2), .cout(c0), .all_prop(xi)
  );

  always_comb lsb2v2 = c0 | xi;

endmodule
