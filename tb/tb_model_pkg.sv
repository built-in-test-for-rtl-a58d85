// tb_model_pkg -- reference models used by the testbenches, written
// independently of the RTL: bit-array LFSR / MISR models driven by explicit
// polynomial exponent lists, and the arithmetic of the three data paths.
package tb_model_pkg;

  typedef bit lfsr_t [1:64];          // stage 1 .. stage 64, stage 1 = MSB

  // one type-1 LFSR step over stages 1..nff, LFSR degree m, polynomial
  // x^m + sum(x^e for e in exps) + 1: stage 1 <- stage m ^ stage(m-e) ...,
  // stage k <- stage k-1 for every other stage (also those beyond m)
  function automatic lfsr_t lfsr_step(input lfsr_t s, input int nff, input int m,
                                      input int e0, input int e1, input int e2);
    lfsr_t n;
    bit fb;
    fb = s[m];
    if (e0 > 0) fb ^= s[m - e0];
    if (e1 > 0) fb ^= s[m - e1];
    if (e2 > 0) fb ^= s[m - e2];
    for (int k = 64; k >= 2; k--) n[k] = (k <= nff) ? s[k-1] : 1'b0;
    n[1] = fb;
    return n;
  endfunction

  function automatic lfsr_t lfsr_seed();
    lfsr_t s;
    for (int k = 1; k <= 64; k++) s[k] = (k == 1);
    return s;
  endfunction

  // 8-bit field i (0-based) of the string: stages 8i+1 (MSB) .. 8i+8
  function automatic byte unsigned field8(input lfsr_t s, input int i);
    byte unsigned v = 0;
    for (int k = 1; k <= 8; k++) v = (v << 1) | byte'(s[8*i + k]);
    return v;
  endfunction

  // 8-bit MISR with x^8+x^6+x^5+x+1: q[7] is stage 1, q[0] is stage 8
  function automatic byte unsigned misr8(input byte unsigned q, input byte unsigned d);
    bit st [1:8];
    bit nx [1:8];
    byte unsigned r = 0;
    for (int k = 1; k <= 8; k++) st[k] = q[8-k];
    nx[1] = st[8] ^ st[2] ^ st[3] ^ st[7] ^ d[7];
    for (int k = 2; k <= 8; k++) nx[k] = st[k-1] ^ d[8-k];
    for (int k = 1; k <= 8; k++) r[8-k] = nx[k];
    return r;
  endfunction

  function automatic byte unsigned f_c5a2m(input byte unsigned a, b, c, d, e, f, g, h);
    byte unsigned x, y;
    x = byte'(a + b) * byte'(c + d);
    y = byte'(e + f) * byte'(g + h);
    return byte'(x + y);
  endfunction

  function automatic byte unsigned f_c3a2m(input byte unsigned a, b, c, d, e, f);
    byte unsigned t;
    t = byte'(a + b) * c;
    t = byte'(t + d);
    t = t * e;
    return byte'(t + f);
  endfunction

  function automatic byte unsigned f_c4a4m_o(input byte unsigned a, b, c, e, f, g);
    return byte'(byte'(a * byte'(f + g)) + byte'(e * byte'(b + c)));
  endfunction

  function automatic byte unsigned f_c4a4m_p(input byte unsigned b, c, d, f, g, h);
    return byte'(byte'(d * byte'(b + c)) + byte'(h * byte'(f + g)));
  endfunction

endpackage
