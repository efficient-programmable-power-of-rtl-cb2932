// v3_gen -- v3 generation unit of the Y generator.
//
// Computes the third mixed-radix digit
//   v3 = < 2^(n-p+3) * (x1 - x3) + 2*v2 >  modulo 2^(n+1)-1
// without waiting for v2. Multiplying by 2^(n-p+3) modulo 2^(n+1)-1 is a
// fixed rotation left by K = <n-p+3>_(n+1), and -x3 is ~x3, so every term
// is wiring:
//   T1 = CLS(x1[n:0], K)          low n+1 bits of x1
//   T2 = CLS(x1[n+p-1:n+1], K)    upper bits of x1 (only when p > 1;
//                                 their weight 2^(n+1) is 1 modulo m3)
//   T3 = CLS(~x3, K)
//   T4 = S || 0,  T5 = C || 0     from the v2 unit's carry-save adder
// An end-around-carry CSA tree reduces these to two vectors A and B. Two
// candidates are formed in parallel, <A+B> and <A+B+1>, and lsb2v2 from the
// v2 unit (the bit that completes 2*v2 = S||0 + C||lsb2v2) selects one.
//
// The published text gives the multiplexer-based idea (2*v2 from S and C,
// with the carry c0 and the correction bit xi); the operand list, the CSA
// tree and the duplicated final adder are this design's own way of doing
// it. Output is canonical, in [0, 2^(n+1)-2]. Purely combinational.
module v3_gen #(
  parameter int unsigned N = 16,
  parameter int unsigned P = 16
) (
  input  logic [N+P-1:0] x1,
  input  logic [N:0]     x3,
  input  logic [N-1:0]   s_vec,
  input  logic [N-1:0]   c_vec,
  input  logic           lsb2v2,
  output logic [N:0]     v3
);

  localparam int unsigned M   = N + 1;
  localparam int unsigned K   = (N - P + 3) % (N + 1);
  localparam int unsigned XLO = (N + P < M) ? N + P : M;

  function automatic logic [M-1:0] rotl(input logic [M-1:0] v);
    return M'(({v, v} << K) >> M);
  endfunction

  logic [M-1:0] t1, t3, t4, t5;
  logic [M-1:0] sa, ca, sb, cb;
  logic [M-1:0] opa, opb;
  logic [M-1:0] sp, cp;
  logic [M-1:0] r0, r1;

  always_comb begin
    t1 = rotl(M'(x1[XLO-1:0]));
    t3 = rotl(~x3);
    t4 = {s_vec, 1'b0};
    t5 = {c_vec, 1'b0};
  end

  eac_csa #(.W(M)) u_csa_a (.a(t1), .b(t3), .c(t4), .sum(sa), .carry(ca));
  eac_csa #(.W(M)) u_csa_b (.a(sa), .b(ca), .c(t5), .sum(sb), .carry(cb));

  if (P > 1) begin : g_hi
    logic [M-1:0] t2;
    always_comb t2 = rotl(M'(x1[N+P-1:M]));
    eac_csa #(.W(M)) u_csa_c (.a(sb), .b(cb), .c(t2), .sum(opa), .carry(opb));
  end else begin : g_nohi
    always_comb begin
      opa = sb;
      opb = cb;
    end
  end

  // Candidate with the extra +1 (lsb2v2 = 1): one more CSA row adding 1.
  eac_csa #(.W(M)) u_csa_p1 (.a(opa), .b(opb), .c(M'(1)), .sum(sp), .carry(cp));

  logic unused_c0a, unused_pa, unused_c1, unused_p1;
  mod_adder_m1 #(.W(M)) u_add0 (
    .a(opa), .b(opb), .sum(r0), .cout(unused_c0a), .all_prop(unused_pa)
  );
  mod_adder_m1 #(.W(M)) u_add1 (
    .a(sp), .b(cp), .sum(r1), .cout(unused_c1), .all_prop(unused_p1)
  );

  always_comb v3 = lsb2v2 ? r1 : r0;

endmodule
