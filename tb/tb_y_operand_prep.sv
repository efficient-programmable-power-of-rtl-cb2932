// tb_y_operand_prep -- self-checking test of the Y operand preparation.
// For N = 4 and N = 16 with random digits v2 < 2^N-1, v3 < 2^(N+1)-1:
// Yx must equal v3 * 2^N + v2 and Yy + 1 must equal -v3 modulo 2^(2N+1).
module tb_y_operand_prep;

  int unsigned checks = 0, failures = 0;
  localparam int NC = 2;
  localparam int unsigned NS [NC] = '{4, 16};
  bit done [NC];

  for (genvar g = 0; g < NC; g++) begin : g_cfg
    localparam int unsigned N = NS[g];
    logic [N-1:0] v2;
    logic [N:0]   v3;
    logic [2*N:0] yx, yy;
    y_operand_prep #(.N(N)) u_dut (.v2(v2), .v3(v3), .yx(yx), .yy(yy));

    initial begin
      longint unsigned a2, a3, mod;
      mod = 64'd1 << (2 * N + 1);
      for (int i = 0; i < 20000; i++) begin
        a2 = 64'($urandom()) % ((64'd1 << N) - 1);
        a3 = 64'($urandom()) % ((64'd1 << (N + 1)) - 1);
        v2 = N'(a2); v3 = (N+1)'(a3);
        #1;
        checks++;
        if (64'(yx) != (a3 << N) + a2 || (64'(yy) + 1) % mod != (mod - a3) % mod) begin
          failures++;
          if (failures < 10) $display("FAIL N=%0d v2=%0d v3=%0d: yx=%h yy=%h", N, a2, a3, yx, yy);
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
