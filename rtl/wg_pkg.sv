// wg_pkg: types and elaboration-time helpers shared by the Welch-Gong (WG)
// cipher modules.
//
// Field elements of GF(2^m) are packed vectors logic [M-1:0] in polynomial
// basis: bit i is the coefficient of alpha^i, where alpha is a root of the
// field defining polynomial f(x).  A field polynomial is logic [M:0] with bit i
// the coefficient of x^i.
//
// The functions below are never turned into hardware by themselves.  They are
// evaluated while the design elaborates: to plan the square-and-multiply chain
// of an exponentiation block, to derive the WG exponents, and to fill the
// constant arrays (lookup tables) of the table-based DWGP/DWGT blocks and the
// linear equation of the trace.  Field sizes up to 16 are supported,
// the largest field of the WG family members considered here (WG-5 .. WG-16).
package wg_pkg;

  // Phases of a WG cipher run: key/IV loading, initialisation (DWGP output
  // fed back into the LFSR) and running (keystream generation).
  typedef enum logic [1:0] {
    PH_LOAD = 2'd0,
    PH_INIT = 2'd1,
    PH_RUN  = 2'd2
  } wg_phase_e;

  // How the initialisation phase advances the LFSR when several keystream
  // bits are produced per cycle.
  //   INIT_NORMAL: one round per cycle in initialisation, BITS per cycle when
  //                running (one full DWGP, the other outputs from DWGT blocks).
  //   INIT_FAST:   BITS rounds per cycle in both phases (BITS chained DWGPs).
  typedef enum logic {
    INIT_NORMAL = 1'b0,
    INIT_FAST   = 1'b1
  } wg_init_e;

  // Implementation of a DWGP / DWGT block.
  typedef enum logic {
    IMPL_COMP  = 1'b0,  // discrete components (multipliers, squarers, ...)
    IMPL_CONST = 1'b1   // constant array (lookup table filled at elaboration)
  } wg_impl_e;

  // Kind of one step of an exponentiation chain (see gf_exp).
  typedef enum int {
    EXP_SQ   = 0,  // x <- x^2
    EXP_MULA = 1,  // x <- A * x^2
    EXP_KAR  = 2   // x <- x^(2^n) * x   (Itoh-Tsujii style doubling)
  } exp_step_e;

  // ---------------------------------------------------------------------
  // Field arithmetic on integers (elaboration time only).  Element bit i is
  // the coefficient of alpha^i; poly bit i is the coefficient of x^i.
  // ---------------------------------------------------------------------
  function automatic int unsigned gf_mul_f(int unsigned a, int unsigned b,
                                           int unsigned m, int unsigned poly);
    int unsigned acc, aa;
    acc = 0;
    aa  = a;
    for (int unsigned i = 0; i < m; i++) begin
      if (b[i]) acc ^= aa;
      aa = aa << 1;
      if (aa[m]) aa ^= poly;
    end
    return acc;
  endfunction

  function automatic int unsigned gf_pow_f(int unsigned a, longint unsigned e,
                                           int unsigned m, int unsigned poly);
    int unsigned r, b;
    longint unsigned ee;
    r  = 1;
    b  = a;
    ee = e;
    while (ee != 0) begin
      if (ee[0]) r = gf_mul_f(r, b, m, poly);
      b  = gf_mul_f(b, b, m, poly);
      ee = ee >> 1;
    end
    return r;
  endfunction

  // k with 3k = 1 (mod m); 0 if none exists (m divisible by 3).
  function automatic int unsigned wg_k_f(int unsigned m);
    for (int unsigned k = 1; k < m; k++)
      if ((3 * k) % m == 1) return k;
    return 0;
  endfunction

  // h(A) = A + A^r1 + A^r2 + A^r3 + A^r4 with the WG exponents.
  function automatic int unsigned wg_h_f(int unsigned a, int unsigned m,
                                         int unsigned poly);
    longint unsigned q, k1, k2, r1, r2, r3, r4;
    q  = (64'd1 << m) - 1;
    k1 = 64'd1 << wg_k_f(m);
    k2 = 64'd1 << (2 * wg_k_f(m));
    r1 = k1 + 1;
    r2 = k2 + k1 + 1;
    r3 = k2 - k1 + 1;
    r4 = k2 + k1 - 1;
    return a ^ gf_pow_f(a, r1 % q, m, poly) ^ gf_pow_f(a, r2 % q, m, poly)
             ^ gf_pow_f(a, r3 % q, m, poly) ^ gf_pow_f(a, r4 % q, m, poly);
  endfunction

  // DWGP(A) = h(A^d + 1) + 1
  function automatic int unsigned wg_dwgp_f(int unsigned a, int unsigned m,
                                            int unsigned poly, int unsigned d);
    return wg_h_f(gf_pow_f(a, 64'(d), m, poly) ^ 1, m, poly) ^ 1;
  endfunction

  // Absolute trace Tr(A) = A + A^2 + ... + A^(2^(m-1)), an element of GF(2).
  function automatic logic gf_trace_f(int unsigned a, int unsigned m,
                                      int unsigned poly);
    int unsigned s, t;
    s = 0;
    t = a;
    for (int unsigned i = 0; i < m; i++) begin
      s ^= t;
      t = gf_mul_f(t, t, m, poly);
    end
    return s[0];
  endfunction

  // ---------------------------------------------------------------------
  // Exponentiation chain planner (Algorithm 2: square-and-multiply merged
  // with the doubling rule A^(2^(2n)-1) = (A^(2^n-1))^(2^n) * A^(2^n-1)).
  // Steps are found from the exponent downwards; step 0 is the one that
  // produces the final result, step nsteps-1 is applied first to A.
  // ---------------------------------------------------------------------

  // n if t = 2^(2n)-1 with n >= 1, else 0.
  function automatic int unsigned exp_kar_n_f(longint unsigned t);
    for (int unsigned n = 1; n <= 32; n++)
      if (t == (64'd1 << (2 * n)) - 1) return n;
    return 0;
  endfunction

  // Walk the exponent; return the kind (want_n = 0) or the n (want_n = 1)
  // of step idx, or the number of steps when idx < 0.
  function automatic int exp_walk_f(longint unsigned d, int idx, bit want_n);
    longint unsigned t;
    int i;
    int unsigned n;
    t = d;
    i = 0;
    while (t > 1) begin
      n = exp_kar_n_f(t);
      if (n != 0) begin
        if (i == idx) return want_n ? int'(n) : int'(EXP_KAR);
        t = (64'd1 << n) - 1;
      end else if (t[0]) begin
        if (i == idx) return want_n ? 0 : int'(EXP_MULA);
        t = (t - 1) >> 1;
      end else begin
        if (i == idx) return want_n ? 0 : int'(EXP_SQ);
        t = t >> 1;
      end
      i++;
    end
    return (idx < 0) ? i : -1;
  endfunction

  function automatic int exp_nsteps_f(longint unsigned d);
    return exp_walk_f(d, -1, 1'b0);
  endfunction

  function automatic int exp_kind_f(longint unsigned d, int idx);
    return exp_walk_f(d, idx, 1'b0);
  endfunction

  function automatic int exp_n_f(longint unsigned d, int idx);
    return exp_walk_f(d, idx, 1'b1);
  endfunction

  // Number of multipliers the planner uses for exponent d.
  function automatic int exp_nmul_f(longint unsigned d);
    int c;
    c = 0;
    for (int i = 0; i < exp_nsteps_f(d); i++)
      if (exp_kind_f(d, i) != int'(EXP_SQ)) c++;
    return c;
  endfunction

endpackage
