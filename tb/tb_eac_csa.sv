// tb_eac_csa -- self-checking test of the end-around-carry CSA.
// For W = 4 (exhaustive over all operand triples) and W = 17 (random):
// (sum + carry) mod (2^W-1) must equal (a + b + c) mod (2^W-1), and sum must
// be the bitwise parity a^b^c (one full-adder row, no carry ripple).
module tb_eac_csa;

  int unsigned checks = 0, failures = 0;
  localparam int NC = 2;
  localparam int unsigned WS [NC] = '{4, 17};
  bit done [NC];

  for (genvar g = 0; g < NC; g++) begin : g_cfg
    localparam int unsigned W = WS[g];
    logic [W-1:0] a, b, c, sum, carry;
    eac_csa #(.W(W)) u_dut (.a(a), .b(b), .c(c), .sum(sum), .carry(carry));

    task automatic check(input longint unsigned av, input longint unsigned bv, input longint unsigned cv);
      longint unsigned m;
      m = (64'd1 << W) - 1;
      a = W'(av); b = W'(bv); c = W'(cv);
      #1;
      checks++;
      if ((64'(sum) + 64'(carry)) % m != (av + bv + cv) % m || sum != (a ^ b ^ c)) begin
        failures++;
        if (failures < 10) $display("FAIL W=%0d a=%0d b=%0d c=%0d: sum=%0d carry=%0d", W, av, bv, cv, sum, carry);
      end
    endtask

    initial begin
      longint unsigned mask;
      mask = (64'd1 << W) - 1;
      if (W <= 4) begin
        for (longint unsigned i = 0; i <= mask; i++)
          for (longint unsigned j = 0; j <= mask; j++)
            for (longint unsigned k = 0; k <= mask; k++)
              check(i, j, k);
      end else begin
        check(mask, mask, mask);
        for (int i = 0; i < 20000; i++)
          check(64'($urandom()) & mask, 64'($urandom()) & mask, 64'($urandom()) & mask);
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
