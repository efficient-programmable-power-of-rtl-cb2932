// tb_mod_adder_m1 -- self-checking test of the modulo 2^W-1 adder.
// W = 3, 4, 5 are tested exhaustively (every pair of W-bit codes, the
// all-ones code included); W = 17 with random and corner operands.
// Checks: sum = (a+b) mod (2^W-1) as a canonical residue, cout = carry of
// a+b, all_prop = (a+b == 2^W-1). Combinational; time-based watchdog.
module tb_mod_adder_m1;

  int unsigned checks = 0, failures = 0;
  localparam int NC = 4;
  localparam int unsigned WS [NC] = '{3, 4, 5, 17};
  bit done [NC];

  for (genvar g = 0; g < NC; g++) begin : g_cfg
    localparam int unsigned W = WS[g];
    logic [W-1:0] a, b, sum;
    logic cout, all_prop;
    mod_adder_m1 #(.W(W)) u_dut (.a(a), .b(b), .sum(sum), .cout(cout), .all_prop(all_prop));

    task automatic check(input longint unsigned av, input longint unsigned bv);
      longint unsigned m, t;
      m = (64'd1 << W) - 1;
      a = W'(av); b = W'(bv);
      #1;
      t = av + bv;
      checks++;
      if (64'(sum) != t % m || cout != (t >= (64'd1 << W)) || all_prop != (t == m)) begin
        failures++;
        if (failures < 10)
          $display("FAIL W=%0d a=%0d b=%0d: sum=%0d cout=%0b prop=%0b", W, av, bv, sum, cout, all_prop);
      end
    endtask

    initial begin
      if (W <= 5) begin
        for (longint unsigned i = 0; i < (64'd1 << W); i++)
          for (longint unsigned j = 0; j < (64'd1 << W); j++)
            check(i, j);
      end else begin
        check((64'd1 << W) - 1, (64'd1 << W) - 1);
        check((64'd1 << W) - 1, 0);
        check(0, 0);
        check(12345, (64'd1 << W) - 1 - 12345);
        for (int i = 0; i < 20000; i++)
          check(64'($urandom()) & ((64'd1 << W) - 1), 64'($urandom()) & ((64'd1 << W) - 1));
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
