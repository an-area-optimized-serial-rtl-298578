// icepole_ref_pkg: word-level reference model of the ICEPOLE permutation used
// by the testbenches to compute expected values independently of the RTL.
//
// The state is held as 20 words of 64 bits, word (x,y) at index 5*x+y, bit z
// of a word = slice z. mu is computed with a generic GF(2^5) multiplier
// (shift-and-add, reduction by X^5 + X^2 + 1), rho as a 64-bit rotation,
// pi from its index formula, psi with whole-word logic, kappa from a
// 64-bit formulation of the constant sequence.
package icepole_ref_pkg;

  typedef logic [63:0] word_t;
  typedef word_t       words_t [20];

  localparam int REF_R [20] = '{0, 36, 3, 41, 18,
                                1, 44, 10, 45, 2,
                                62, 6, 43, 15, 61,
                                28, 55, 25, 21, 56};

  localparam word_t REF_C0 = 64'h0091A2B3C4D5E6F7;

  function automatic logic [4:0] gf_mul(logic [4:0] a, logic [4:0] b);
    logic [8:0] p;
    p = '0;
    for (int i = 0; i < 5; i++) if (b[i]) p = p ^ (9'(a) << i);
    for (int i = 8; i >= 5; i--) if (p[i]) p = p ^ (9'h25 << (i - 5));
    return p[4:0];
  endfunction

  function automatic logic [19:0] mu_slice(logic [19:0] s);
    int m [4][4] = '{'{2, 1, 1, 1}, '{1, 1, 18, 2}, '{1, 2, 1, 18}, '{1, 18, 2, 1}};
    logic [19:0] o;
    for (int r = 0; r < 4; r++) begin
      logic [4:0] acc;
      acc = '0;
      for (int c = 0; c < 4; c++) acc ^= gf_mul(5'(m[r][c]), s[5*c +: 5]);
      o[5*r +: 5] = acc;
    end
    return o;
  endfunction

  function automatic logic [4:0] sbox(logic [4:0] m);
    logic [4:0] z;
    for (int k = 0; k < 5; k++)
      z[k] = m[k] ^ (!m[(k+1)%5] && m[(k+2)%5]) ^ (m == 5'd0) ^ (m == 5'd31);
    return z;
  endfunction

  function automatic logic [19:0] psi_slice(logic [19:0] s);
    logic [19:0] o;
    for (int x = 0; x < 4; x++) o[5*x +: 5] = sbox(s[5*x +: 5]);
    return o;
  endfunction

  function automatic logic [19:0] pi_slice(logic [19:0] s);
    logic [19:0] o;
    for (int x = 0; x < 4; x++)
      for (int y = 0; y < 5; y++) begin
        int xn, yn;
        xn = (x + y) % 4;
        yn = (xn + y + 1) % 5;
        o[5*xn + yn] = s[5*x + y];
      end
    return o;
  endfunction

  function automatic word_t next_const(word_t c);
    word_t n;
    n = c >> 1;
    n[31] = c[32] | (c[0] ^ c[1] ^ c[3] ^ c[4]);
    return n;
  endfunction

  function automatic word_t round_const(int i);
    word_t c;
    c = REF_C0;
    for (int k = 0; k < i; k++) c = next_const(c);
    return c;
  endfunction

  function automatic logic [19:0] get_slice(words_t w, int z);
    logic [19:0] s;
    for (int j = 0; j < 20; j++) s[j] = w[j][z];
    return s;
  endfunction

  function automatic words_t put_slice(words_t w, int z, logic [19:0] s);
    words_t o;
    o = w;
    for (int j = 0; j < 20; j++) o[j][z] = s[j];
    return o;
  endfunction

  // One full round R = kappa o psi o pi o rho o mu with constant index ci.
  function automatic words_t round_fn(words_t w, int ci);
    words_t t;
    word_t  c;
    t = w;
    for (int z = 0; z < 64; z++) t = put_slice(t, z, mu_slice(get_slice(t, z)));
    for (int j = 0; j < 20; j++)
      if (REF_R[j] != 0) t[j] = (t[j] >> REF_R[j]) | (t[j] << (64 - REF_R[j]));
    for (int z = 0; z < 64; z++)
      t = put_slice(t, z, psi_slice(pi_slice(get_slice(t, z))));
    c = round_const(ci);
    t[0] = t[0] ^ c;
    return t;
  endfunction

  function automatic words_t perm(words_t w, int first, int n);
    words_t t;
    t = w;
    for (int r = 0; r < n; r++) t = round_fn(t, first + r);
    return t;
  endfunction

endpackage
