// Reference arithmetic for the RLWE accelerator testbenches.
//
// Plain modular arithmetic with the % operator (no Barrett), a direct
// modular power, and a forward negacyclic NTT written from its definition
// via the iterative Cooley-Tukey recursion with twiddles psi^brv(k) computed
// by modular exponentiation. The default test modulus is the prime
// q = 2147352577 = 65532*2^15 + 1, with psi = 214822318 of order 2^15, so
// every degree up to 16384 has a primitive 2n-th root psi^(16384/n).
package he_ref_pkg;

  localparam longint unsigned TQ     = 64'd2147352577;
  localparam longint unsigned TPSI16 = 64'd214822318;   // order 32768

  function automatic longint unsigned mulmod(longint unsigned a, longint unsigned b,
                                             longint unsigned q);
    return (a * b) % q;
  endfunction

  function automatic longint unsigned powmod(longint unsigned b, longint unsigned e,
                                             longint unsigned q);
    longint unsigned r = 1;
    b = b % q;
    while (e != 0) begin
      if (e[0]) r = mulmod(r, b, q);
      b = mulmod(b, b, q);
      e = e >> 1;
    end
    return r;
  endfunction

  function automatic logic [63:0] barrett_mu(longint unsigned q);
    logic [127:0] num;
    num = 128'd1 << 62;
    return 64'(num / 128'(q));
  endfunction

  function automatic int unsigned bitrev(int unsigned i, int unsigned lg);
    int unsigned o = 0;
    for (int b = 0; b < lg; b++) if (i[b]) o |= 1 << (lg - 1 - b);
    return o;
  endfunction

  // primitive 2n-th root for n = 2^lg
  function automatic longint unsigned psi_for(int unsigned lg);
    return powmod(TPSI16, 64'd1 << (14 - lg), TQ);
  endfunction

  // in-place forward negacyclic NTT of a[0..n-1], bit-reversed output order
  function automatic void ntt(ref longint unsigned a[], input int unsigned lg,
                              input longint unsigned psi, input longint unsigned q);
    int unsigned n = 1 << lg;
    int unsigned t = n;
    for (int unsigned m = 1; m < n; m = m * 2) begin
      t = t / 2;
      for (int unsigned i = 0; i < m; i++) begin
        longint unsigned w = powmod(psi, 64'(bitrev(m + i, lg)), q);
        for (int unsigned j = 2 * i * t; j < 2 * i * t + t; j++) begin
          longint unsigned u = a[j];
          longint unsigned v = mulmod(a[j + t], w, q);
          a[j]     = (u + v) % q;
          a[j + t] = (u + q - v) % q;
        end
      end
    end
  endfunction

endpackage
