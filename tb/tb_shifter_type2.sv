// tb_shifter_type2 -- self-checking test of the circular left shifter.
// W = 4, 16 and 17 with a shift-amount width of 6. Every amount 0..W is
// applied to random data; the expected word is q[(i+amt) mod W] = d[i].
module tb_shifter_type2;

  int unsigned checks = 0, failures = 0;
  localparam int NC = 3;
  localparam int unsigned WS [NC] = '{4, 16, 17};
  bit done [NC];

  for (genvar g = 0; g < NC; g++) begin : g_cfg
    localparam int unsigned W = WS[g];
    logic [W-1:0] d, q, e;
    logic [5:0] amt;
    shifter_type2 #(.W(W), .SW(6)) u_dut (.d(d), .amt(amt), .q(q));

    initial begin
      for (int r = 0; r < 300; r++) begin
        for (int unsigned s = 0; s <= W; s++) begin
          d = W'($urandom());
          amt = 6'(s);
          #1;
          for (int unsigned i = 0; i < W; i++) e[(i + s) % W] = d[i];
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
