// s3_gen -- s3 generator: scaled residue of the modulo 2^(n+1)-1 channel.
//
// s3 = < (x3 - <x1>_(2^lambda)) * 2^-lambda >_(2^(n+1)-1).
//   P <= 1 : Shifter 6 (type II, n+1 bits) rotates x3 left by
//            lam3 = n+1-lambda; Shifter 7 (type III, n+1 bits) gives
//            ~x1[lambda-1:0] || 1^(n+1-lambda) (shift lam4 = n+1-lambda);
//            a modulo 2^(n+1)-1 adder sums them.
//   P >  1 : Shifter 8 (type II, n+1 bits) rotates x3 by
//            lam3 = <2n+2-lambda>_(n+1); Shifter 9 (type III, 2n+2 bits)
//            shifts ~x1 by lam4 = 2n+2-lambda and its upper and lower n+1
//            bits are the second and third terms for both lambda <= n+1 and
//            lambda > n+1. An EAC CSA and a modulo 2^(n+1)-1 adder add the
//            three terms.
// Structure follows the published s3 generator. The output is canonical.
// Purely combinational.
module s3_gen
  import rns_scaler_pkg::*;
#(
  parameter int unsigned N = 16,
  parameter int unsigned P = 16
) (
  input  logic [N+P-1:0]     x1,
  input  logic [N:0]         x3,
  input  logic [sh_w(N)-1:0] lam3,
  input  logic [sh_w(N)-1:0] lam4,
  output logic [N:0]         s3
);

  localparam int unsigned SW = sh_w(N);
  localparam int unsigned M  = N + 1;

  logic [M-1:0] rot_x3;
  logic         unused_cout, unused_prop;

  shifter_type2 #(.W(M), .SW(SW)) u_rot (.d(x3), .amt(lam3), .q(rot_x3));

  if (P <= 1) begin : g_p01
    logic [M-1:0] t_x1;
    shifter_type3 #(.WI(N + P), .W(M), .SW(SW)) u_sh7 (.d(x1), .amt(lam4), .q(t_x1));
    mod_adder_m1 #(.W(M)) u_add (
      .a(rot_x3), .b(t_x1), .sum(s3), .cout(unused_cout), .all_prop(unused_prop)
    );
  end else begin : g_pn
    logic [2*M-1:0] t_x1;
    logic [M-1:0]   cs_s, cs_c;
    shifter_type3 #(.WI(N + P), .W(2 * M), .SW(SW)) u_sh9 (.d(x1), .amt(lam4), .q(t_x1));
    eac_csa #(.W(M)) u_csa (
      .a(rot_x3), .b(t_x1[2*M-1:M]), .c(t_x1[M-1:0]), .sum(cs_s), .carry(cs_c)
    );
    mod_adder_m1 #(.W(M)) u_add (
      .a(cs_s), .b(cs_c), .sum(s3), .cout(unused_cout), .all_prop(unused_prop)
    );
  end

endmodule
