// tb_gf_pkg: reference arithmetic for the WG testbenches.
//
// Written independently of the design: multiplication is done MSB first
// (Horner's rule on the second operand) rather than by a reduction matrix,
// exponentiation by right-to-left square-and-multiply, the WG permutation
// straight from its definition h(A) = A + A^r1 + A^r2 + A^r3 + A^r4, and the
// trace as a sum of repeated squares.  Also a software model of the whole
// cipher LFSR (one round at a time).
package tb_gf_pkg;

  function automatic int unsigned ref_mul(int unsigned a, int unsigned b,
                                          int unsigned m, int unsigned poly);
    int unsigned r;
    r = 0;
    for (int i = int'(m) - 1; i >= 0; i--) begin
      r = r << 1;
      if ((r >> m) & 1) r ^= poly;
      if ((b >> i) & 1) r ^= a;
    end
    return r;
  endfunction

  function automatic int unsigned ref_pow(int unsigned a, longint unsigned e,
                                          int unsigned m, int unsigned poly);
    int unsigned r, base;
    r = 1;
    base = a;
    for (int i = 0; i < 64; i++) begin
      if ((e >> i) & 1) r = ref_mul(r, base, m, poly);
      base = ref_mul(base, base, m, poly);
    end
    return r;
  endfunction

  function automatic int unsigned ref_k(int unsigned m);
    int unsigned k;
    k = 1;
    while (((3 * k) % m) != 1) k++;
    return k;
  endfunction

  function automatic int unsigned ref_h(int unsigned a, int unsigned m, int unsigned poly);
    longint unsigned p1, p2, q;
    q  = (64'd1 << m) - 1;
    p1 = 64'd1 << ref_k(m);
    p2 = p1 * p1;
    return a ^ ref_pow(a, (p1 + 1) % q, m, poly)
             ^ ref_pow(a, (p2 + p1 + 1) % q, m, poly)
             ^ ref_pow(a, (p2 - p1 + 1) % q, m, poly)
             ^ ref_pow(a, (p2 + p1 - 1) % q, m, poly);
  endfunction

  function automatic int unsigned ref_dwgp(int unsigned a, int unsigned m,
                                           int unsigned poly, int unsigned d);
    return ref_h(ref_pow(a, d, m, poly) ^ 1, m, poly) ^ 1;
  endfunction

  function automatic bit ref_trace(int unsigned a, int unsigned m, int unsigned poly);
    int unsigned s, t;
    s = 0;
    t = a;
    repeat (m) begin
      s ^= t;
      t = ref_mul(t, t, m, poly);
    end
    if (s > 1) $error("ref_trace: trace is not in GF(2)");
    return s[0];
  endfunction

  function automatic bit ref_dwgt(int unsigned a, int unsigned m,
                                  int unsigned poly, int unsigned d);
    return ref_trace(ref_dwgp(a, m, poly, d), m, poly);
  endfunction

endpackage
