// tb_y_gen -- self-checking test of the Y generator.
// Configurations (N,P): (4,0) (4,1) (4,2) (4,4) (8,8) (16,0) (16,16). A
// random X in [0, M) (uniform, or with mixed-radix digit v2 = 0) is turned
// into residues; Y must equal floor(X / 2^(N+P)).
module tb_y_gen;

  int unsigned checks = 0, failures = 0;
  localparam int NC = 7;
  localparam int unsigned NS [NC] = '{4, 4, 4, 4, 8, 16, 16};
  localparam int unsigned PS [NC] = '{0, 1, 2, 4, 8, 0, 16};
  bit done [NC];

  for (genvar g = 0; g < NC; g++) begin : g_cfg
    localparam int unsigned N = NS[g];
    localparam int unsigned P = PS[g];
    logic [N+P-1:0] x1;
    logic [N-1:0]   x2;
    logic [N:0]     x3;
    logic [2*N:0]   y;
    y_gen #(.N(N), .P(P)) u_dut (.x1(x1), .x2(x2), .x3(x3), .y(y));

    initial begin
      logic [127:0] m1, m2, m3, mm, xv;
      m1 = 128'd1 << (N + P);
      m2 = (128'd1 << N) - 1;
      m3 = (128'd1 << (N + 1)) - 1;
      mm = m1 * m2 * m3;
      for (int i = 0; i < 20000; i++) begin
        xv = {$urandom(), $urandom(), $urandom(), $urandom()} % mm;
        if (i % 3 == 0) xv = (xv % m1) + m1 * m2 * (xv % m3);
        if (i == 1) xv = mm - 1;
        x1 = (N+P)'(xv % m1); x2 = N'(xv % m2); x3 = (N+1)'(xv % m3);
        #1;
        checks++;
        if (128'(y) != xv >> (N + P)) begin
          failures++;
          if (failures < 10) $display("FAIL N=%0d P=%0d X=%0d: Y=%0d expected %0d", N, P, xv, y, xv >> (N + P));
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
