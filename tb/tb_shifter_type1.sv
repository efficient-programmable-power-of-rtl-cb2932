// tb_shifter_type1 -- self-checking test of the logical right shifter.
// W = 65, SW = 6 (the size of Shifter 1 for n = p = 16) and W = 13, SW = 4.
// Every shift amount is applied to random data; the expected word is built
// bit by bit: q[i] = d[i+amt] when i+amt < W, else 0.
module tb_shifter_type1;

  int unsigned checks = 0, failures = 0;
  localparam int NC = 2;
  localparam int unsigned WS [NC] = '{65, 13};
  localparam int unsigned SS [NC] = '{6, 4};
  bit done [NC];

  for (genvar g = 0; g < NC; g++) begin : g_cfg
    localparam int unsigned W = WS[g];
    localparam int unsigned SW = SS[g];
    logic [W-1:0] d, q, e;
    logic [SW-1:0] amt;
    shifter_type1 #(.W(W), .SW(SW)) u_dut (.d(d), .amt(amt), .q(q));

    initial begin
      for (int r = 0; r < 200; r++) begin
        for (int unsigned s = 0; s < (1 << SW); s++) begin
          d = W'({$urandom(), $urandom(), $urandom()});
          if (r == 0) d = '1;
          amt = SW'(s);
          #1;
          for (int unsigned i = 0; i < W; i++) e[i] = (i + s < W) ? d[i + s] : 1'b0;
          checks++;
          if (q != e) begin
            failures++;
            if (failures < 10) $display("FAIL W=%0d amt=%0d d=%h q=%h e=%h", W, s, d, q, e);
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
