// s2_gen -- s2 generator: scaled residue of the modulo 2^n-1 channel.
//
// s2 = < (x2 - <x1>_(2^lambda)) * 2^-lambda >_(2^n-1), with 2^-lambda a
// rotation of x2 and the x1 part a complemented, one-padded shift.
//   P == 0 : Shifter 2 (type II, n bits) rotates x2 left by lam1 = n-lambda;
//            Shifter 3 (type III, n bits) gives ~x1[lambda-1:0] || 1^(n-lambda)
//            (shift lam2 = n-lambda); one modulo 2^n-1 adder sums them.
//   P >  0 : Shifter 4 (type II, n bits) rotates x2 by lam1 = <2n-lambda>_n;
//            Shifter 5 (type III, 2n bits) shifts ~x1 by lam2 = 2n-lambda.
//            Its upper and lower n bits are the second and third terms for
//            both lambda <= n and lambda > n (for lambda <= n the lower half
//            is all ones, a zero modulo 2^n-1), so no lambda-dependent
//            selection is needed. An EAC CSA and a modulo 2^n-1 adder add
//            the three terms.
// Structure follows the published s2 generator. The output is canonical.
// Purely combinational.
module s2_gen
  import rns_scaler_pkg::*;
#(
  parameter int unsigned N = 16,
  parameter int unsigned P = 16
) (
  input  logic [N+P-1:0]     x1,
  input  logic [N-1:0]       x2,
  input  logic [sh_w(N)-1:0] lam1,
  input  logic [sh_w(N)-1:0] lam2,
  output logic [N-1:0]       s2
);

  localparam int unsigned SW = sh_w(N);

  logic [N-1:0] rot_x2;
  logic         unused_cout, unused_prop;

  shifter_type2 #(.W(N), .SW(SW)) u_rot (.d(x2), .amt(lam1), .q(rot_x2));

  if (P == 0) begin : g_p0
    logic [N-1:0] t_x1;
    shifter_type3 #(.WI(N + P), .W(N), .SW(SW)) u_sh3 (.d(x1), .amt(lam2), .q(t_x1));
    mod_adder_m1 #(.W(N)) u_add (
      .a(rot_x2), .b(t_x1), .sum(s2), .cout(unused_cout), .all_prop(unused_prop)
    );
  end else begin : g_pn
    logic [2*N-1:0] t_x1;
    logic [N-1:0]   cs_s, cs_c;
    shifter_type3 #(.WI(N + P), .W(2 * N), .SW(SW)) u_sh5 (.d(x1), .amt(lam2), .q(t_x1));
    eac_csa #(.W(N)) u_csa (
      .a(rot_x2), .b(t_x1[2*N-1:N]), .c(t_x1[N-1:0]), .sum(cs_s), .carry(cs_c)
    );
    mod_adder_m1 #(.W(N)) u_add (
      .a(cs_s), .b(cs_c), .sum(s2), .cout(unused_cout), .all_prop(unused_prop)
    );
  end

endmodule
