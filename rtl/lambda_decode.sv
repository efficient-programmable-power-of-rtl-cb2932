// lambda_decode -- shift values lambda_1..lambda_4 of the s2 and s3
// generators, derived from the run-time scaling exponent lambda.
//
//   s2 path, P == 0 : lam1 = lam2 = n - lambda          (Shifters 2 and 3)
//   s2 path, P >  0 : lam1 = <2n - lambda>_n           (Shifter 4)
//                     lam2 = 2n - lambda               (Shifter 5)
//   s3 path, P <= 1 : lam3 = lam4 = n + 1 - lambda      (Shifters 6 and 7)
//   s3 path, P >  1 : lam3 = <2n + 2 - lambda>_(n+1)   (Shifter 8)
//                     lam4 = 2n + 2 - lambda           (Shifter 9)
// The values are those of the published shifter descriptions; the
// subtract-and-compare circuit that forms them is this design's own (the
// residues are taken with at most two conditional subtractions, since
// 2n+2-lambda < 2(n+1)). lambda must lie in 0..n+p. All outputs share the
// width sh_w(N). Purely combinational.
module lambda_decode
  import rns_scaler_pkg::*;
#(
  parameter int unsigned N = 16,
  parameter int unsigned P = 16
) (
  input  logic [lam_w(N, P)-1:0] lambda,
  output logic [sh_w(N)-1:0]     lam1,
  output logic [sh_w(N)-1:0]     lam2,
  output logic [sh_w(N)-1:0]     lam3,
  output logic [sh_w(N)-1:0]     lam4
);

  localparam int unsigned SW = sh_w(N);

  logic [SW-1:0] lam, t2, t3;

  always_comb begin
    lam = SW'(lambda);
    t2  = SW'(2 * N) - lam;
    t3  = SW'(2 * N + 2) - lam;

    if (P == 0) begin
      lam1 = SW'(N) - lam;
      lam2 = SW'(N) - lam;
    end else begin
      lam2 = t2;
      if (t2 >= SW'(2 * N))  lam1 = t2 - SW'(2 * N);
      else if (t2 >= SW'(N)) lam1 = t2 - SW'(N);
      else                   lam1 = t2;
    end

    if (P <= 1) begin
      lam3 = SW'(N + 1) - lam;
      lam4 = SW'(N + 1) - lam;
    end else begin
      lam4 = t3;
      if (t3 >= SW'(2 * N + 2))  lam3 = t3 - SW'(2 * N + 2);
      else if (t3 >= SW'(N + 1)) lam3 = t3 - SW'(N + 1);
      else                       lam3 = t3;
    end
  end

endmodule
