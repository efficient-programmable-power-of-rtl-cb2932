// tb_v3_gen -- self-checking test of the v3 generation unit.
// Configurations (N,P): (4,0) (4,1) (4,2) (4,4) (5,3) (16,16). Each vector
// draws mixed-radix digits x1 < 2^(N+P) and v3 < 2^(N+1)-1 and a random
// pair S, C of N-bit vectors (not both all ones); v2 = (S+C) mod (2^N-1)
// and the bit lsb2v2 follow from S and C as in the v2 unit. The integer
// X = x1 + 2^(N+P) * (v2 + (2^N-1) * v3) gives x3 = X mod (2^(N+1)-1), and
// the unit must return the digit v3 that was drawn.
module tb_v3_gen;

  int unsigned checks = 0, failures = 0;
  localparam int NC = 6;
  localparam int unsigned NS [NC] = '{4, 4, 4, 4, 5, 16};
  localparam int unsigned PS [NC] = '{0, 1, 2, 4, 3, 16};
  bit done [NC];

  for (genvar g = 0; g < NC; g++) begin : g_cfg
    localparam int unsigned N = NS[g];
    localparam int unsigned P = PS[g];
    logic [N+P-1:0] x1;
    logic [N:0]     x3, v3;
    logic [N-1:0]   s_vec, c_vec;
    logic           lsb2v2;
    v3_gen #(.N(N), .P(P)) u_dut (.x1(x1), .x3(x3), .s_vec(s_vec), .c_vec(c_vec), .lsb2v2(lsb2v2), .v3(v3));

    task automatic check(input logic [127:0] d1, input logic [127:0] sv, input logic [127:0] cv, input logic [127:0] d3);
      logic [127:0] m1, m2, m3, sc, d2, xv;
      m1 = 128'd1 << (N + P);
      m2 = (128'd1 << N) - 1;
      m3 = (128'd1 << (N + 1)) - 1;
      sc = sv + cv;
      d2 = sc % m2;
      xv = d1 + m1 * (d2 + m2 * d3);
      x1 = (N+P)'(d1); s_vec = N'(sv); c_vec = N'(cv);
      lsb2v2 = (sc >= (128'd1 << N)) || (sc == m2);
      x3 = (N+1)'(xv % m3);
      #1;
      checks++;
      if (128'(v3) != d3) begin
        failures++;
        if (failures < 10) $display("FAIL N=%0d P=%0d x1=%0d S=%0d C=%0d: v3=%0d expected %0d", N, P, d1, sv, cv, v3, d3);
      end
    endtask

    initial begin
      logic [127:0] m1, m3, mask, sv, cv;
      m1 = 128'd1 << (N + P);
      m3 = (128'd1 << (N + 1)) - 1;
      mask = (128'd1 << N) - 1;
      check(0, 0, 0, 0); check(m1 - 1, 0, mask, m3 - 1); check(m1 - 1, mask, 0, 0);
      for (int i = 0; i < 20000; i++) begin
        sv = 128'({$urandom(), $urandom()}) & mask;
        cv = (i % 4 == 0) ? (~sv & mask) : (128'({$urandom(), $urandom()}) & mask);
        if (sv == mask && cv == mask) cv = 0;
        check(128'({$urandom(), $urandom()}) % m1, sv, cv, 128'($urandom()) % m3);
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
