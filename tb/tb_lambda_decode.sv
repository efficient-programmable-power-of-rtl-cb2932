// tb_lambda_decode -- self-checking test of the shift-value decoder.
// Configurations (N,P): (4,0) (4,1) (4,2) (4,4) (8,8) (16,16). For every
// lambda in 0..N+P the four outputs are compared with the shift values of
// the s2/s3 generators computed here with integer % :
//   P = 0: lam1 = lam2 = N - lambda;   P > 0: lam1 = (2N-lambda) % N, lam2 = 2N-lambda
//   P <= 1: lam3 = lam4 = N+1-lambda;  P > 1: lam3 = (2N+2-lambda) % (N+1), lam4 = 2N+2-lambda
module tb_lambda_decode;
  import rns_scaler_pkg::*;

  int unsigned checks = 0, failures = 0;
  localparam int NC = 6;
  localparam int unsigned NS [NC] = '{4, 4, 4, 4, 8, 16};
  localparam int unsigned PS [NC] = '{0, 1, 2, 4, 8, 16};
  bit done [NC];

  for (genvar g = 0; g < NC; g++) begin : g_cfg
    localparam int unsigned N = NS[g];
    localparam int unsigned P = PS[g];
    logic [lam_w(N, P)-1:0] lambda;
    logic [sh_w(N)-1:0] lam1, lam2, lam3, lam4;
    lambda_decode #(.N(N), .P(P)) u_dut (.lambda(lambda), .lam1(lam1), .lam2(lam2), .lam3(lam3), .lam4(lam4));

    initial begin
      int unsigned e1, e2, e3, e4;
      for (int unsigned l = 0; l <= N + P; l++) begin
        lambda = lam_w(N, P)'(l);
        #1;
        if (P == 0) begin e1 = N - l; e2 = N - l; end
        else begin e1 = (2 * N - l) % N; e2 = 2 * N - l; end
        if (P <= 1) begin e3 = N + 1 - l; e4 = N + 1 - l; end
        else begin e3 = (2 * N + 2 - l) % (N + 1); e4 = 2 * N + 2 - l; end
        checks++;
        if (32'(lam1) != e1 || 32'(lam2) != e2 || 32'(lam3) != e3 || 32'(lam4) != e4) begin
          failures++;
          $display("FAIL N=%0d P=%0d lambda=%0d: %0d %0d %0d %0d expected %0d %0d %0d %0d",
                   N, P, l, lam1, lam2, lam3, lam4, e1, e2, e3, e4);
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
