// tb_s1_gen -- self-checking test of the s1 generator.
// Configurations (N,P): (4,0) (4,2) (8,8) (16,16). Random Y < 2^(2N+1)
// and x1 < 2^(N+P), every lambda in 0..N+P: s1 must equal
// floor((Y * 2^(N+P) + x1) / 2^lambda) mod 2^(N+P), in 128-bit arithmetic.
module tb_s1_gen;
  import rns_scaler_pkg::*;

  int unsigned checks = 0, failures = 0;
  localparam int NC = 4;
  localparam int unsigned NS [NC] = '{4, 4, 8, 16};
  localparam int unsigned PS [NC] = '{0, 2, 8, 16};
  bit done [NC];

  for (genvar g = 0; g < NC; g++) begin : g_cfg
    localparam int unsigned N = NS[g];
    localparam int unsigned P = PS[g];
    logic [2*N:0]   y;
    logic [N+P-1:0] x1, s1;
    logic [lam_w(N, P)-1:0] lambda;
    s1_gen #(.N(N), .P(P)) u_dut (.y(y), .x1(x1), .lambda(lambda), .s1(s1));

    initial begin
      logic [127:0] yv, xv, e, m1;
      m1 = 128'd1 << (N + P);
      for (int i = 0; i < 500; i++) begin
        yv = 128'({$urandom(), $urandom()}) % (128'd1 << (2 * N + 1));
        xv = 128'({$urandom(), $urandom()}) % m1;
        for (int unsigned l = 0; l <= N + P; l++) begin
          y = (2*N+1)'(yv); x1 = (N+P)'(xv); lambda = lam_w(N, P)'(l);
          #1;
          e = ((yv * m1 + xv) >> l) % m1;
          checks++;
          if (128'(s1) != e) begin
            failures++;
            if (failures < 10) $display("FAIL N=%0d P=%0d Y=%0d x1=%0d lambda=%0d: s1=%0d expected %0d", N, P, yv, xv, l, s1, e);
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
