// tb_rns_pow2_scaler_full -- the scaler at its default size (n = p = 16,
// moduli {2^32, 2^16-1, 2^17-1}), instantiated with no parameter list.
//
// 2,000,000 vectors: X drawn uniformly from [0, M), from mixed-radix digits
// with v2 = 0 (reaching the xi correction of the v2/v3 units), and from the
// ends of the range; lambda drawn from 0..32 with extra weight on 0, 16, 17
// and 32. All three outputs are compared with the residues of
// floor(X / 2^lambda) worked out with 128-bit integer arithmetic. Counts of
// the xi correction, lambda > n and lambda > n+1 must be non-zero. The
// design is combinational: no clock, a time-based watchdog.
module tb_rns_pow2_scaler_full;
  import rns_scaler_pkg::*;

  localparam int unsigned N = 16;
  localparam int unsigned P = 16;
  localparam int unsigned NVEC = 2_000_000;
  typedef logic [127:0] big_t;

  logic [N+P-1:0]          x1, s1;
  logic [N-1:0]            x2, s2;
  logic [N:0]              x3, s3;
  logic [lam_w(N, P)-1:0]  lambda;

  rns_pow2_scaler u_dut (
    .x1(x1), .x2(x2), .x3(x3), .lambda(lambda), .s1(s1), .s2(s2), .s3(s3)
  );

  int unsigned checks = 0, failures = 0;
  int unsigned n_xi = 0, n_gt_n = 0, n_gt_n1 = 0, n_full = 0;
  big_t m1, m2, m3, mm;

  function automatic big_t rand_big();
    return {$urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

  task automatic run_one(input big_t xv, input int unsigned lam);
    big_t sv;
    x1 = (N + P)'(xv % m1);
    x2 = N'(xv % m2);
    x3 = (N + 1)'(xv % m3);
    lambda = lam_w(N, P)'(lam);
    #1;
    sv = xv >> lam;
    checks += 3;
    if (big_t'(s1) != sv % m1 || big_t'(s2) != sv % m2 || big_t'(s3) != sv % m3) begin
      failures++;
      if (failures < 10)
        $display("FAIL X=%0d lambda=%0d: (%0d,%0d,%0d) expected (%0d,%0d,%0d)",
                 xv, lam, s1, s2, s3, sv % m1, sv % m2, sv % m3);
    end
    if (u_dut.u_ygen.u_v2.xi) n_xi++;
    if (lam > N) n_gt_n++;
    if (lam > N + 1) n_gt_n1++;
    if (lam == N + P) n_full++;
  endtask

  initial begin : watchdog
    #100_000_000;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    big_t xv;
    int unsigned mode, lam;
    m1 = big_t'(1) << (N + P);
    m2 = (big_t'(1) << N) - 1;
    m3 = (big_t'(1) << (N + 1)) - 1;
    mm = m1 * m2 * m3;
    for (int unsigned i = 0; i < NVEC; i++) begin
      mode = $urandom_range(0, 9);
      if (mode < 6)      xv = rand_big() % mm;
      else if (mode < 9) xv = (rand_big() % m1) + m1 * m2 * (rand_big() % m3);
      else               xv = (i % 2 == 0) ? mm - 1 - (rand_big() % 8) : rand_big() % 8;
      case ($urandom_range(0, 7))
        0: lam = 0;
        1: lam = N;
        2: lam = N + 1;
        3: lam = N + P;
        default: lam = $urandom_range(0, N + P);
      endcase
      run_one(xv, lam);
    end
    $display("xi corrections %0d, lambda > n %0d, lambda > n+1 %0d, lambda = n+p %0d",
             n_xi, n_gt_n, n_gt_n1, n_full);
    if (n_xi == 0 || n_gt_n == 0 || n_gt_n1 == 0 || n_full == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
