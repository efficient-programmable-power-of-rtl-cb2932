// tb_s2_gen -- self-checking test of the s2 generator.
// Configurations (N,P): (4,0) (4,1) (4,2) (4,4) (8,1) (16,0) (16,16), which
// cover every structural variant. Random canonical residues x1 < 2^(N+P)
// and x2 < 2^(N)-1, every lambda in 0..N+P. The shift values are
// formed here from their definitions, and s2 must equal
//   ((x2 - (x1 mod 2^lambda)) * 2^-lambda) mod (2^(N)-1),
// the inverse of 2^lambda being 2^(k - lambda mod k), k = N.
module tb_s2_gen;
  import rns_scaler_pkg::*;

  int unsigned checks = 0, failures = 0;
  localparam int NC = 7;
  localparam int unsigned NS [NC] = '{4, 4, 4, 4, 8, 16, 16};
  localparam int unsigned PS [NC] = '{0, 1, 2, 4, 1, 0, 16};
  bit done [NC];

  for (genvar g = 0; g < NC; g++) begin : g_cfg
    localparam int unsigned N = NS[g];
    localparam int unsigned P = PS[g];
    localparam int unsigned K = N;
    logic [N+P-1:0] x1;
    logic [N-1:0]   xi, so;
    logic [sh_w(N)-1:0] la, lb;
    s2_gen #(.N(N), .P(P)) u_dut (.x1(x1), .x2(xi), .lam1(la), .lam2(lb), .s2(so));

    initial begin
      logic [127:0] m, a1, ai, low, t, e;
      int unsigned k;
      m = (128'd1 << K) - 1;
      for (int i = 0; i < 400; i++) begin
        a1 = 128'({$urandom(), $urandom()}) % (128'd1 << (N + P));
        ai = 128'($urandom()) % m;
        if (i == 0) begin a1 = (128'd1 << (N + P)) - 1; ai = m - 1; end
        if (i == 1) begin a1 = 0; ai = 0; end
        for (int unsigned l = 0; l <= N + P; l++) begin
          x1 = (N+P)'(a1); xi = K'(ai);
          // Shift values by definition (K = N for s2, N+1 for s3).
          if ((K == N && P == 0) || (K == N + 1 && P <= 1)) begin
            la = sh_w(N)'(K - l); lb = sh_w(N)'(K - l);
          end else begin
            la = sh_w(N)'((2 * K - l) % K); lb = sh_w(N)'(2 * K - l);
          end
          #1;
          low = a1 & ((128'd1 << l) - 1);
          t = (ai + m - (low % m)) % m;
          k = (K - (l % K)) % K;
          e = (t << k) % m;
          checks++;
          if (128'(so) != e) begin
            failures++;
            if (failures < 10) $display("FAIL N=%0d P=%0d x1=%0d x=%0d lambda=%0d: got %0d expected %0d", N, P, a1, ai, l, so, e);
          end
        end
      end
      done[g] = 1'b1;
    end
  end

  initial begin : watchdog
    #10_000_000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    bit all;
    do begin #10; all = 1'b1; foreach (done[i]) all &= done[i]; end while (!all);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
