// s1_gen -- s1 generator: scaled residue of the modulo 2^(n+p) channel.
//
// S = floor(X / 2^lambda) with X = Y * 2^(n+p) + x1, so S is the word
// Y||x1 shifted right by lambda and s1 = <S>_(2^(n+p)) is its n+p least
// significant bits. A (3n+p+1)-bit type-I shifter (Shifter 1) does this
// for every lambda in 0..n+p, covering both cases (lambda < n+p and
// lambda = n+p) of the published formula. Purely combinational.
module s1_gen
  import rns_scaler_pkg::*;
#(
  parameter int unsigned N = 16,
  parameter int unsigned P = 16
) (
  input  logic [2*N:0]           y,
  input  logic [N+P-1:0]         x1,
  input  logic [lam_w(N, P)-1:0] lambda,
  output logic [N+P-1:0]         s1
);

  localparam int unsigned W = 3 * N + P + 1;

  // Shifter 1 keeps its full (3n+p+1)-bit width as in the published
  // architecture; only its n+p low output bits form s1, so the upper bits
  // are left unused (a lint tool reports them; synthesis removes them).
  logic [W-1:0] shifted;

  shifter_type1 #(.W(W), .SW(lam_w(N, P))) u_sh1 (
    .d({y, x1}), .amt(lambda), .q(shifted)
  );

  always_comb s1 = shifted[N+P-1:0];

endmodule
