// rns_scaler_pkg -- shared helpers for the programmable power-of-two RNS
// scaler over the moduli set {2^(n+p), 2^n-1, 2^(n+1)-1}.
//
// The scaler is parameterised by N (n) and P (p, 0 <= P <= N). Every block
// derives its port widths from those two numbers; the helpers below keep the
// width rules in one place so that producer and consumer always agree.
//   bits_for(v) : number of bits needed to hold the values 0..v
//   lam_w(N,P)  : width of the scaling exponent lambda (0..N+P)
//   sh_w(N)     : width of every derived shift value lambda_1..lambda_4
//                 (the largest of them, 2N+2-lambda, is at most 2N+2)
package rns_scaler_pkg;

  function automatic int unsigned bits_for(input int unsigned v);
    return (v < 2) ? 1 : $clog2(v + 1);
  endfunction

  function automatic int unsigned lam_w(input int unsigned n, input int unsigned p);
    return bits_for(n + p);
  endfunction

  function automatic int unsigned sh_w(input int unsigned n);
    return bits_for(2 * n + 2);
  endfunction

endpackage
