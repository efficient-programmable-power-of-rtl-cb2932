// rns_pow2_scaler -- programmable power-of-two scaler for the residue
// number system {2^(n+p), 2^n-1, 2^(n+1)-1}, 0 <= p <= n.
//
// Given the residues (x1, x2, x3) of an integer X in [0, M),
// M = 2^(n+p)(2^n-1)(2^(n+1)-1), and a run-time exponent lambda in 0..n+p,
// it returns the residues (s1, s2, s3) of S = floor(X / 2^lambda).
// Four parallel parts, no tables:
//   y_gen         Y with X = x1 + 2^(n+p)*Y (mixed-radix conversion)
//   s1_gen        s1 = low n+p bits of (Y||x1) >> lambda
//   lambda_decode shift values lambda_1..lambda_4 for the other channels
//   s2_gen/s3_gen s2, s3 straight from x2/x3 and the low bits of x1
// Only the s1 channel depends on Y, so Y generation plus Shifter 1 is the
// critical path. The p = 0, p = 1 and p > 1 variants of the s2 and s3
// generators are chosen at elaboration from P.
//
// Interface: all inputs must be canonical residues (x2 < 2^n-1,
// x3 < 2^(n+1)-1) and lambda <= n+p; outputs are then canonical residues.
// Timing: purely combinational, no clock; registers around it are left to
// the user. Defaults N = P = 16 are the largest configuration of the
// published evaluation (p = n, the upper bound of p).
module rns_pow2_scaler
  import rns_scaler_pkg::*;
#(
  parameter int unsigned N = 16,
  parameter int unsigned P = 16
) (
  input  logic [N+P-1:0]         x1,
  input  logic [N-1:0]           x2,
  input  logic [N:0]             x3,
  input  logic [lam_w(N, P)-1:0] lambda,
  output logic [N+P-1:0]         s1,
  output logic [N-1:0]           s2,
  output logic [N:0]             s3
);

  logic [2*N:0]       y;
  logic [sh_w(N)-1:0] lam1, lam2, lam3, lam4;

  y_gen #(.N(N), .P(P)) u_ygen (.x1(x1), .x2(x2), .x3(x3), .y(y));

  s1_gen #(.N(N), .P(P)) u_s1 (.y(y), .x1(x1), .lambda(lambda), .s1(s1));

  lambda_decode #(.N(N), .P(P)) u_lam (
    .lambda(lambda), .lam1(lam1), .lam2(lam2), .lam3(lam3), .lam4(lam4)
  );

  s2_gen #(.N(N), .P(P)) u_s2 (.x1(x1), .x2(x2), .lam1(lam1), .lam2(lam2), .s2(s2));

  s3_gen #(.N(N), .P(P)) u_s3 (.x1(x1), .x3(x3), .lam3(lam3), .lam4(lam4), .s3(s3));

  // Input contract, checked in simulation at the end of each time step:
  // lambda within 0..N+P and x2, x3 not in their all-ones (non-canonical)
  // form.
  always_comb begin
    assert final (32'(lambda) <= N + P && x2 != '1 && x3 != '1)
      else $error("rns_pow2_scaler: input outside the contract (lambda=%0d x2=%0h x3=%0h)",
                  lambda, x2, x3);
  end

endmodule
