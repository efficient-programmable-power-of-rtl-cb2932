// scaler_harness -- self-checking stimulus and reference for one
// configuration (N, P) of rns_pow2_scaler, used by tb_rns_pow2_scaler.
//
// Each vector picks an integer X in [0, M), M = 2^(N+P)(2^N-1)(2^(N+1)-1),
// and a scaling exponent lambda in 0..N+P, drives the residues of X and
// compares (s1, s2, s3) with the residues of floor(X / 2^lambda), all
// worked out with 128-bit integer arithmetic. X is drawn uniformly, from
// mixed-radix digits with v2 forced to 0 (to reach the xi correction of the
// v2/v3 units), or from the ends of the range. lambda favours 0, N, N+1,
// N+P and the values either side of them. The harness counts how often the
// mechanisms of the scaler are exercised and reports them with its check
// counts. With USE_DEFAULT = 1 the scaler is instantiated without a
// parameter list (its own defaults, which must equal N and P here).
module scaler_harness
  import rns_scaler_pkg::*;
#(
  parameter int unsigned N           = 4,
  parameter int unsigned P           = 0,
  parameter bit          USE_DEFAULT = 1'b0,
  parameter int unsigned NVEC        = 1000,
  parameter int unsigned SEED        = 1
) (
  output int unsigned checks,
  output int unsigned failures,
  output int unsigned n_xi,        // S and C of the v2 CSA were complements
  output int unsigned n_c0,        // S + C carried out
  output int unsigned n_sel1,      // v3 took the +1 candidate
  output int unsigned n_lam_gt_n,  // s2: second case (lambda > n), P > 0
  output int unsigned n_lam_gt_n1, // s3: second case (lambda > n+1), P > 1
  output int unsigned n_lam_full,  // s1: lambda = n+p
  output int unsigned n_lam_zero,  // lambda = 0 (no scaling)
  output bit          done
);

  typedef logic [127:0] big_t;

  localparam int unsigned LW = lam_w(N, P);

  logic [N+P-1:0] x1;
  logic [N-1:0]   x2;
  logic [N:0]     x3;
  logic [LW-1:0]  lambda;
  logic [N+P-1:0] s1;
  logic [N-1:0]   s2;
  logic [N:0]     s3;

  if (USE_DEFAULT) begin : g_dut
    rns_pow2_scaler u_dut (
      .x1(x1), .x2(x2), .x3(x3), .lambda(lambda), .s1(s1), .s2(s2), .s3(s3)
    );
  end else begin : g_dut
    rns_pow2_scaler #(.N(N), .P(P)) u_dut (
      .x1(x1), .x2(x2), .x3(x3), .lambda(lambda), .s1(s1), .s2(s2), .s3(s3)
    );
  end

  big_t m1, m2, m3, mm;

  function automatic big_t rand_big();
    return {$urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

  function automatic int unsigned pick_lambda();
    int unsigned r;
    int unsigned special[8];
    special = '{0, 1, N - 1, N, N + 1, N + 2, N + P - 1, N + P};
    r = $urandom_range(0, 3);
    if (r == 0) begin
      r = special[$urandom_range(0, 7)];
      return (r > N + P) ? N + P : r;
    end
    return $urandom_range(0, N + P);
  endfunction

  task automatic run_one(input big_t xv, input int unsigned lam);
    big_t sv, e1, e2, e3;
    x1     = (N + P)'(xv % m1);
    x2     = N'(xv % m2);
    x3     = (N + 1)'(xv % m3);
    lambda = LW'(lam);
    #1;
    sv = xv >> lam;
    e1 = sv % m1;
    e2 = sv % m2;
    e3 = sv % m3;
    checks = checks + 3;
    if (big_t'(s1) != e1 || big_t'(s2) != e2 || big_t'(s3) != e3) begin
      failures = failures + 1;
      if (failures < 10)
        $display("FAIL N=%0d P=%0d X=%0d lambda=%0d: s=(%0d,%0d,%0d) expected (%0d,%0d,%0d)",
                 N, P, xv, lam, s1, s2, s3, e1, e2, e3);
    end
    if (g_dut.u_dut.u_ygen.u_v2.xi) n_xi++;
    if (g_dut.u_dut.u_ygen.u_v2.c0) n_c0++;
    if (g_dut.u_dut.u_ygen.u_v2.lsb2v2) n_sel1++;
    if (P > 0 && lam > N) n_lam_gt_n++;
    if (P > 1 && lam > N + 1) n_lam_gt_n1++;
    if (lam == N + P) n_lam_full++;
    if (lam == 0) n_lam_zero++;
  endtask

  initial begin
    big_t xv, d1, d2, d3;
    int unsigned mode;
    void'($urandom(SEED));
    checks = 0; failures = 0; done = 1'b0;
    n_xi = 0; n_c0 = 0; n_sel1 = 0;
    n_lam_gt_n = 0; n_lam_gt_n1 = 0; n_lam_full = 0; n_lam_zero = 0;
    m1 = big_t'(1) << (N + P);
    m2 = (big_t'(1) << N) - 1;
    m3 = (big_t'(1) << (N + 1)) - 1;
    mm = m1 * m2 * m3;
    if (USE_DEFAULT && (N != 16 || P != 16)) begin
      $display("FAIL harness: USE_DEFAULT needs N = P = 16");
      failures = failures + 1;
    end
    // Every lambda at both ends of the range.
    for (int unsigned l = 0; l <= N + P; l++) begin
      run_one(0, l);
      run_one(mm - 1, l);
    end
    for (int unsigned i = 0; i < NVEC; i++) begin
      mode = $urandom_range(0, 9);
      if (mode < 6) begin
        xv = rand_big() % mm;
      end else if (mode < 9) begin
        // Mixed-radix digits with v2 = 0, so S + C is 0 or 2^n-1.
        d1 = rand_big() % m1;
        d3 = rand_big() % m3;
        d2 = 0;
        xv = d1 + m1 * (d2 + m2 * d3);
      end else begin
        xv = (rand_big() % 2 == 0) ? mm - 1 - (rand_big() % 4) : rand_big() % 4;
      end
      run_one(xv, pick_lambda());
    end
    done = 1'b1;
  end

endmodule
