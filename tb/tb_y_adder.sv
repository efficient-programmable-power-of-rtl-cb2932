// tb_y_adder -- self-checking test of the modified (2N+1)-bit adder.
// For N = 4 and N = 16: random operands must give (yx + yy + 1) modulo
// 2^(2N+1); operand pairs built from digits v2, v3 as Yx = v3||v2,
// Yy = 1^N||~v3 must give Y = v2 + (2^N-1) * v3.
module tb_y_adder;

  int unsigned checks = 0, failures = 0;
  localparam int NC = 2;
  localparam int unsigned NS [NC] = '{4, 16};
  bit done [NC];

  for (genvar g = 0; g < NC; g++) begin : g_cfg
    localparam int unsigned N = NS[g];
    logic [2*N:0] yx, yy, y;
    y_adder #(.N(N)) u_dut (.yx(yx), .yy(yy), .y(y));

    initial begin
      longint unsigned a, b, mod, a2, a3;
      mod = 64'd1 << (2 * N + 1);
      for (int i = 0; i < 20000; i++) begin
        if (i % 2 == 0) begin
          a = {$urandom(), $urandom()} % mod;
          b = {$urandom(), $urandom()} % mod;
          yx = (2*N+1)'(a); yy = (2*N+1)'(b);
          #1;
          checks++;
          if (64'(y) != (a + b + 1) % mod) begin
            failures++;
            if (failures < 10) $display("FAIL N=%0d %0d + %0d + 1 = %0d", N, a, b, y);
          end
        end else begin
          a2 = 64'($urandom()) % ((64'd1 << N) - 1);
          a3 = 64'($urandom()) % ((64'd1 << (N + 1)) - 1);
          yx = {(N+1)'(a3), N'(a2)};
          yy = {{N{1'b1}}, ~((N+1)'(a3))};
          #1;
          checks++;
          if (64'(y) != a2 + ((64'd1 << N) - 1) * a3) begin
            failures++;
            if (failures < 10) $display("FAIL N=%0d v2=%0d v3=%0d Y=%0d", N, a2, a3, y);
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
