// tb_util_pkg: reference arithmetic for the testbenches, written
// independently of the RTL: modular arithmetic on 64-bit integers, search of
// NTT-friendly primes q = 1 mod 2n with 2^(QW-1) < q < 2^QW, primitive 2n-th
// roots of unity, and a direct O(n^2) negacyclic product.
package tb_util_pkg;

  function automatic longint unsigned mulm(longint unsigned a, longint unsigned b,
                                           longint unsigned q);
    return (a * b) % q;   // operands below 2^31: product fits in 64 bits
  endfunction

  function automatic longint unsigned powm(longint unsigned a, longint unsigned e,
                                           longint unsigned q);
    longint unsigned r;
    r = 1;
    a = a % q;
    while (e != 0) begin
      if (e[0]) r = mulm(r, a, q);
      a = mulm(a, a, q);
      e = e >> 1;
    end
    return r;
  endfunction

  function automatic bit is_prime(longint unsigned x);
    if (x < 2) return 0;
    for (longint unsigned d = 2; d * d <= x; d++) if (x % d == 0) return 0;
    return 1;
  endfunction

  // idx-th prime (idx = 0, 1, ...) counting down from 2^qw with q = 1 mod 2n.
  function automatic longint unsigned find_prime(int qw, int n, int idx);
    longint unsigned q;
    int found;
    found = 0;
    q = ((longint'(1) << qw) - 1) / (2 * n) * (2 * n) + 1;
    while (q > (longint'(1) << (qw - 1))) begin
      if (is_prime(q)) begin
        if (found == idx) return q;
        found++;
      end
      q -= 2 * n;
    end
    return 0;
  endfunction

  // A primitive 2n-th root of unity: g^((q-1)/2n) whose n-th power is -1.
  function automatic longint unsigned find_psi(longint unsigned q, int n);
    longint unsigned x;
    for (longint unsigned g = 2; g < q; g++) begin
      x = powm(g, (q - 1) / (2 * n), q);
      if (powm(x, n, q) == q - 1) return x;
    end
    return 0;
  endfunction

  function automatic longint unsigned barrett_v(longint unsigned q, int qw);
    // floor(2^(2qw) / q) without 128-bit arithmetic: long division
    longint unsigned r, v;
    r = 1;
    v = 0;
    for (int i = 0; i < 2 * qw; i++) begin
      r = r << 1;
      v = v << 1;
      if (r >= q) begin
        r -= q;
        v |= 1;
      end
    end
    // the leading 1 of 2^(2qw) is consumed at the first step
    return v;
  endfunction

endpackage
