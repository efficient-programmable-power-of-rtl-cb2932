// tb_rns_pow2_scaler -- end-to-end test of the programmable RNS scaler.
//
// Runs the scaler in every structural variant and at the default size:
//   (N,P) = (2,2) (3,3) (4,0) (4,1) (4,2) (4,4) (5,3) (8,0) (8,1) (8,8)
//   (16,0) and the defaults N = P = 16 (instantiated with no parameter list).
// Each configuration is driven by a scaler_harness that compares all
// three scaled residues with 128-bit reference arithmetic. In addition the
// worked example of the moduli set {64, 15, 31} (n = 4, p = 2) is replayed:
// X = 23456 = (32, 11, 20) scaled by 2^1, 2^2, 2^4 and 2^6 gives
// S = 11728, 5864, 1466 and 366, i.e. (16,13,10), (40,14,5), (58,11,9)
// and (46,6,25).
// Mechanisms that must each occur at least once: the xi correction (S and
// C complementary), the carry c0 of S+C, the +1 candidate of v3, lambda > n
// in the s2 generator, lambda > n+1 in the s3 generator, lambda = n+p in
// the s1 generator and lambda = 0. The design is combinational; the
// test has no clock and a time-based watchdog.
module tb_rns_pow2_scaler;
  import rns_scaler_pkg::*;

  localparam int NCFG = 12;

  int unsigned checks, failures;

  int unsigned c_chk [NCFG], c_fail [NCFG], c_xi [NCFG], c_c0 [NCFG], c_sel [NCFG];
  int unsigned c_gn [NCFG], c_gn1 [NCFG], c_full [NCFG], c_zero [NCFG];
  bit          c_done [NCFG];

  scaler_harness #(.N(4),  .P(0),  .NVEC(4000),  .SEED(11)) h0 (c_chk[0], c_fail[0], c_xi[0], c_c0[0], c_sel[0], c_gn[0], c_gn1[0], c_full[0], c_zero[0], c_done[0]);
  scaler_harness #(.N(4),  .P(1),  .NVEC(4000),  .SEED(12)) h1 (c_chk[1], c_fail[1], c_xi[1], c_c0[1], c_sel[1], c_gn[1], c_gn1[1], c_full[1], c_zero[1], c_done[1]);
  scaler_harness #(.N(4),  .P(2),  .NVEC(4000),  .SEED(13)) h2 (c_chk[2], c_fail[2], c_xi[2], c_c0[2], c_sel[2], c_gn[2], c_gn1[2], c_full[2], c_zero[2], c_done[2]);
  scaler_harness #(.N(4),  .P(4),  .NVEC(4000),  .SEED(14)) h3 (c_chk[3], c_fail[3], c_xi[3], c_c0[3], c_sel[3], c_gn[3], c_gn1[3], c_full[3], c_zero[3], c_done[3]);
  scaler_harness #(.N(5),  .P(3),  .NVEC(4000),  .SEED(15)) h4 (c_chk[4], c_fail[4], c_xi[4], c_c0[4], c_sel[4], c_gn[4], c_gn1[4], c_full[4], c_zero[4], c_done[4]);
  scaler_harness #(.N(8),  .P(0),  .NVEC(4000),  .SEED(16)) h5 (c_chk[5], c_fail[5], c_xi[5], c_c0[5], c_sel[5], c_gn[5], c_gn1[5], c_full[5], c_zero[5], c_done[5]);
  scaler_harness #(.N(8),  .P(1),  .NVEC(4000),  .SEED(17)) h6 (c_chk[6], c_fail[6], c_xi[6], c_c0[6], c_sel[6], c_gn[6], c_gn1[6], c_full[6], c_zero[6], c_done[6]);
  scaler_harness #(.N(8),  .P(8),  .NVEC(4000),  .SEED(18)) h7 (c_chk[7], c_fail[7], c_xi[7], c_c0[7], c_sel[7], c_gn[7], c_gn1[7], c_full[7], c_zero[7], c_done[7]);
  scaler_harness #(.N(16), .P(0),  .NVEC(4000),  .SEED(19)) h8 (c_chk[8], c_fail[8], c_xi[8], c_c0[8], c_sel[8], c_gn[8], c_gn1[8], c_full[8], c_zero[8], c_done[8]);
  scaler_harness #(.N(2),  .P(2),  .NVEC(2000),  .SEED(21)) h10 (c_chk[10], c_fail[10], c_xi[10], c_c0[10], c_sel[10], c_gn[10], c_gn1[10], c_full[10], c_zero[10], c_done[10]);
  scaler_harness #(.N(3),  .P(3),  .NVEC(2000),  .SEED(22)) h11 (c_chk[11], c_fail[11], c_xi[11], c_c0[11], c_sel[11], c_gn[11], c_gn1[11], c_full[11], c_zero[11], c_done[11]);
  scaler_harness #(.N(16), .P(16), .USE_DEFAULT(1'b1), .NVEC(20000), .SEED(20))
    h9 (c_chk[9], c_fail[9], c_xi[9], c_c0[9], c_sel[9], c_gn[9], c_gn1[9], c_full[9], c_zero[9], c_done[9]);

  // Worked example, n = 4, p = 2: moduli {64, 15, 31}.
  logic [5:0] ex_x1, ex_s1;
  logic [3:0] ex_x2, ex_s2;
  logic [4:0] ex_x3, ex_s3;
  logic [lam_w(4, 2)-1:0] ex_lam;

  rns_pow2_scaler #(.N(4), .P(2)) u_example (
    .x1(ex_x1), .x2(ex_x2), .x3(ex_x3), .lambda(ex_lam), .s1(ex_s1), .s2(ex_s2), .s3(ex_s3)
  );

  int unsigned ex_checks, ex_failures;

  initial begin
    static int unsigned lams [4] = '{1, 2, 4, 6};
    static int unsigned exp1 [4] = '{16, 40, 58, 46};
    static int unsigned exp2 [4] = '{13, 14, 11, 6};
    static int unsigned exp3 [4] = '{10, 5, 9, 25};
    ex_checks = 0; ex_failures = 0;
    ex_x1 = 6'd32; ex_x2 = 4'd11; ex_x3 = 5'd20;
    for (int i = 0; i < 4; i++) begin
      ex_lam = 3'(lams[i]);
      #1;
      ex_checks += 3;
      if (ex_s1 != 6'(exp1[i]) || ex_s2 != 4'(exp2[i]) || ex_s3 != 5'(exp3[i])) begin
        ex_failures++;
        $display("FAIL example lambda=%0d: (%0d,%0d,%0d) expected (%0d,%0d,%0d)",
                 lams[i], ex_s1, ex_s2, ex_s3, exp1[i], exp2[i], exp3[i]);
      end
    end
  end

  initial begin : watchdog
    #50_000_000;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic need(input string what, input int unsigned count);
    $display("  %-34s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    int unsigned xi, c0, sel, gn, gn1, full, zero;
    bit all_done;
    do begin
      #10;
      all_done = 1'b1;
      foreach (c_done[i]) all_done &= c_done[i];
    end while (!all_done);
    checks = ex_checks; failures = ex_failures;
    xi = 0; c0 = 0; sel = 0; gn = 0; gn1 = 0; full = 0; zero = 0;
    for (int i = 0; i < NCFG; i++) begin
      checks += c_chk[i]; failures += c_fail[i];
      xi += c_xi[i]; c0 += c_c0[i]; sel += c_sel[i];
      gn += c_gn[i]; gn1 += c_gn1[i]; full += c_full[i]; zero += c_zero[i];
    end
    $display("Mechanism counts:");
    need("xi correction (S, C complements)", xi);
    need("carry c0 of S + C", c0);
    need("v3 +1 candidate selected", sel);
    need("s2 second case, lambda > n", gn);
    need("s3 second case, lambda > n+1", gn1);
    need("s1 with lambda = n+p", full);
    need("lambda = 0", zero);
    need("default-size xi correction", c_xi[9]);
    need("default-size lambda > n+1", c_gn1[9]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
