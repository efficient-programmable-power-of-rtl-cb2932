// tb_shifter_type3 -- self-checking test of the complement-and-shift-left
// shifter (ones shifted in). Sizes (WI, W): (4, 4) and (6, 5), as in the
// s2/s3 generators for p = 0 and p = 1, and (32, 32), (32, 34), as Shifters
// 5 and 9 for n = p = 16. Every amount 0..W is applied to random data; the
// expected bit j is 1 for j < amt, ~d[j-amt] when j-amt < WI, else 1.
module tb_shifter_type3;

  int unsigned checks = 0, failures = 0;
  localparam int NC = 4;
  localparam int unsigned WIS [NC] = '{4, 6, 32, 32};
  localparam int unsigned WS  [NC] = '{4, 5, 32, 34};
  bit done [NC];

  for (genvar g = 0; g < NC; g++) begin : g_cfg
    localparam int unsigned WI = WIS[g];
    localparam int unsigned W  = WS[g];
    logic [WI-1:0] d;
    logic [W-1:0]  q, e;
    logic [5:0]    amt;
    shifter_type3 #(.WI(WI), .W(W), .SW(6)) u_dut (.d(d), .amt(amt), .q(q));

    initial begin
      for (int r = 0; r < 300; r++) begin
        for (int unsigned s = 0; s <= W; s++) begin
          d = WI'({$urandom(), $urandom()});
          amt = 6'(s);
          #1;
          for (int unsigned j = 0; j < W; j++)
            e[j] = (j < s) ? 1'b1 : ((j - s < WI) ? ~d[j - s] : 1'b1);
          checks++;
          if (q != e) begin
            failures++;
            if (failures < 10) $display("FAIL WI=%0d W=%0d amt=%0d d=%h q=%h e=%h", WI, W, s, d, q, e);
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
