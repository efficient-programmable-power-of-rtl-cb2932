// tb_v2_gen -- self-checking test of the v2 generation unit.
// Configurations (N,P): (4,0) (4,1) (4,2) (4,4) (8,3) (16,16). Random
// canonical residues x1 < 2^(N+P), x2 < 2^N-1 (plus corner values). Checks:
//   v2 = ((x2 - x1) * 2^(N-P)) mod (2^N-1), computed with 64-bit integers,
//   (S + C) mod (2^N-1) = v2 for the vectors handed to the v3 unit, and
//   lsb2v2 = (S + C >= 2^N) or (S + C == 2^N-1).
module tb_v2_gen;

  int unsigned checks = 0, failures = 0;
  localparam int NC = 6;
  localparam int unsigned NS [NC] = '{4, 4, 4, 4, 8, 16};
  localparam int unsigned PS [NC] = '{0, 1, 2, 4, 3, 16};
  bit done [NC];

  for (genvar g = 0; g < NC; g++) begin : g_cfg
    localparam int unsigned N = NS[g];
    localparam int unsigned P = PS[g];
    logic [N+P-1:0] x1;
    logic [N-1:0]   x2, v2, s_vec, c_vec;
    logic           lsb2v2;
    v2_gen #(.N(N), .P(P)) u_dut (.x1(x1), .x2(x2), .v2(v2), .s_vec(s_vec), .c_vec(c_vec), .lsb2v2(lsb2v2));

    task automatic check(input longint unsigned a1, input longint unsigned a2);
      longint unsigned m2, e, sc;
      m2 = (64'd1 << N) - 1;
      x1 = (N+P)'(a1); x2 = N'(a2);
      #1;
      e  = (((a2 + m2 - (a1 % m2)) % m2) << (N - P)) % m2;
      sc = 64'(s_vec) + 64'(c_vec);
      checks++;
      if (64'(v2) != e || sc % m2 != e || lsb2v2 != (sc >= (64'd1 << N) || sc == m2)) begin
        failures++;
        if (failures < 10) $display("FAIL N=%0d P=%0d x1=%0d x2=%0d: v2=%0d expected %0d", N, P, a1, a2, v2, e);
      end
    endtask

    initial begin
      longint unsigned m1, m2;
      m1 = 64'd1 << (N + P);
      m2 = (64'd1 << N) - 1;
      check(0, 0); check(m1 - 1, m2 - 1); check(m1 - 1, 0); check(0, m2 - 1);
      for (int i = 0; i < 20000; i++)
        check({$urandom(), $urandom()} % m1, 64'($urandom()) % m2);
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
