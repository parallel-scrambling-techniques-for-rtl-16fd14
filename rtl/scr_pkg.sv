// scr_pkg: shared types, constants and elaboration-time GF(2) arithmetic for the
// parallel scramblers.
//
// The parallel shift register generators (PSRGs) of this design are not wired
// from hand-made tap tables. Instead every tap mask, initial state and DSS
// correction vector is computed at elaboration time from the serial scrambler
// polynomial by the functions below, so that other (M,N) choices or another
// correction delay need only a parameter change.
//
// Conventions used throughout:
//  * A serial SSRG of degree L with characteristic polynomial C(x) produces
//    t_{k+L} = t_k + sum_{i=1..L-1} c_i t_{k+L-i}. Its "shift polynomial" is the
//    reciprocal G(x) = x^L C(1/x); x^n mod G(x) expresses an advance of n
//    sequence steps as a sum of advances 0..L-1.
//  * A PSRG state is kept as a vector u[0..ML-1] where u[n] holds the 0th PSRG
//    sequence T_0 advanced by n steps (u[0] is the output end). This is the
//    article's U_n = d_{ML-1-n} of the SSRG, and equals the article's d_n of
//    the 31-stage DSS PSRG, whose transition matrix is eq. (21).
//  * Polynomials and vectors are packed with bit i = coefficient of x^i.
package scr_pkg;

  typedef logic [63:0] w64_t;
  typedef logic [31:0] w32_t;
  // 32x32 GF(2) matrix, one packed row per index: m[i][j] is row i column j.
  typedef logic [31:0][31:0] m32_t;

  // ---------------- ITU-T SDH and ATM constants ----------------
  // SDH frame synchronous scrambler: C(x) = x^7 + x^6 + 1, reset to all ones.
  localparam int unsigned SDH_L    = 7;
  localparam w64_t        SDH_C    = 64'h0000_0000_0000_00C1;
  localparam w64_t        SDH_SEED = 64'h0000_0000_0000_007F;
  // STM-1 frame, per byte-interleaved lane: 9 rows of 270 bytes, 9 SOH columns.
  localparam int unsigned STM_ROWS     = 9;
  localparam int unsigned STM_COLS     = 270;
  localparam int unsigned STM_SOH_COLS = 9;
  // Cell based ATM distributed sample scrambler: C(x) = x^31 + x^28 + 1.
  localparam int unsigned DSS_L     = 31;
  localparam w64_t        DSS_C     = 64'h0000_0000_9000_0001;
  localparam int unsigned CELL_BYTES = 53;
  localparam int unsigned HEC_BYTE   = 4;

  // ---------------- polynomial arithmetic, degree <= 63 ----------------
  function automatic w64_t reciprocal(w64_t c, int unsigned l);
    w64_t r = '0;
    for (int unsigned i = 0; i <= l; i++) r[l-i] = c[i];
    return r;
  endfunction

  // a*b mod g, where g has degree l and a, b are already reduced.
  function automatic w64_t pmulmod(w64_t a, w64_t b, w64_t g, int unsigned l);
    w64_t r = '0;
    w64_t x = a;
    for (int unsigned i = 0; i < l; i++) begin
      if (b[i]) r ^= x;
      x = x << 1;
      if (x[l]) x ^= g;
    end
    return r;
  endfunction

  // x^n mod g
  function automatic w64_t xpow_mod(longint unsigned n, w64_t g, int unsigned l);
    w64_t r = 64'd1;
    w64_t b = 64'd2;
    longint unsigned e = n;
    if (l == 1) b = g ^ 64'd2;
    while (e != 0) begin
      if (e[0]) r = pmulmod(r, b, g, l);
      b = pmulmod(b, b, g, l);
      e = e >> 1;
    end
    return r;
  endfunction

  function automatic int unsigned log2_exact(longint unsigned v);
    int unsigned e = 0;
    while ((64'd1 << e) < v) e++;
    return e;
  endfunction

  // ---------------- PSRG construction (Section II) ----------------
  // Tap mask of PSRG output i: T_i = sum_j alpha_j U_{jM}, where alpha is
  // x^{iMm} mod G with m the inverse of MN modulo the period 2^L-1 (eqs. 8a/9a).
  // MN must be a power of two; then the decimated sequences keep G(x) and
  // m = 2^f with f = (L - log2(MN)) mod L.
  function automatic w64_t psrg_tap(int unsigned l, w64_t c, int unsigned m,
                                    int unsigned n, int unsigned lane);
    w64_t g = reciprocal(c, l);
    int unsigned e = log2_exact(64'(m * n));
    int unsigned f = (l - (e % l)) % l;
    w64_t a = xpow_mod(64'(lane * m), g, l);
    w64_t mask = '0;
    for (int unsigned s = 0; s < f; s++) a = pmulmod(a, a, g, l);
    for (int unsigned j = 0; j < l; j++) if (a[j]) mask[j*m] = 1'b1;
    return mask;
  endfunction

  // Initial PSRG state: u[n] = T_0[n] = s[(n / M) * MN + n % M], where s is the
  // serial SSRG sequence started from register contents seed (bit i = d_i,
  // output taken from d_{L-1}, as in Fig. 1a).
  function automatic w64_t psrg_init(int unsigned l, w64_t c, w64_t seed,
                                     int unsigned m, int unsigned n);
    w64_t st = seed;      // serial SSRG register, bit i = d_i
    longint unsigned pos = 0;  // index of the serial bit now at the output
    w64_t u = '0;
    logic fb;
    for (int unsigned k = 0; k < l * m; k++) begin
      longint unsigned want = 64'(k / m) * 64'(m * n) + 64'(k % m);
      while (pos < want) begin
        fb = st[l-1];
        for (int unsigned i = 1; i < l; i++) if (c[i]) fb ^= st[i-1];
        st = (st << 1);
        st[0] = fb;
        st[l] = 1'b0;
        pos++;
      end
      u[k] = st[l-1];
    end
    return u;
  endfunction

  // One step of the length-ML SSRG with characteristic polynomial C(x^M):
  // u[n] <- u[n+1], u[ML-1] <- u[0] + sum_i c_i u[ML - iM].
  function automatic w64_t psrg_step(w64_t u, int unsigned l, w64_t c, int unsigned m);
    w64_t r = u >> 1;
    logic fb = u[0];
    for (int unsigned i = 1; i < l; i++) if (c[i]) fb ^= u[l*m - i*m];
    r[l*m-1] = fb;
    return r;
  endfunction

  // ---------------- PSRG in MSRG (modular) configuration ----------------
  // The same T_0 can be produced by a modular register w[0..ML-1] whose output
  // end is w[ML-1] (the article's W_i is w[ML-1-i]) and whose generating
  // polynomial is G(x^M): each step the output bit is shifted out, the register
  // moves up by one, and the output is XORed back into every stage j*M for
  // which g_j = 1 (stage 0 always). msrg_gen returns that feedback mask.
  function automatic w64_t msrg_gen(int unsigned l, w64_t c, int unsigned m);
    w64_t g = reciprocal(c, l);
    w64_t r = '0;
    for (int unsigned j = 0; j < l; j++) if (g[j]) r[j*m] = 1'b1;
    return r;
  endfunction

  // Row n of the map from modular state to SSRG state: the linear function of
  // w that gives the output n steps later (row 0 selects the output stage).
  function automatic w64_t msrg_row_next(w64_t r, int unsigned l, w64_t c, int unsigned m);
    w64_t nr = r >> 1;
    nr[l*m-1] = ^(r & msrg_gen(l, c, m));
    return nr;
  endfunction

  // Tap mask of output i over w: an SSRG tap u[n] is the output n steps ahead,
  // so T_i = sum over the SSRG taps n of (row n) . w.
  function automatic w64_t msrg_tap(int unsigned l, w64_t c, int unsigned m,
                                    int unsigned n, int unsigned lane);
    w64_t a = psrg_tap(l, c, m, n, lane);
    w64_t r = '0;
    w64_t b = '0;
    r[l*m-1] = 1'b1;
    for (int unsigned k = 0; k < l * m; k++) begin
      if (a[k]) b ^= r;
      r = msrg_row_next(r, l, c, m);
    end
    return b;
  endfunction

  // Initial modular state: the one whose first ML outputs are the first ML
  // bits of T_0. Row k has its leading one at stage ML-1-k, so the stages are
  // solved one after the other from the output end.
  function automatic w64_t msrg_init(int unsigned l, w64_t c, w64_t seed,
                                     int unsigned m, int unsigned n);
    w64_t o = psrg_init(l, c, seed, m, n);
    w64_t r = '0;
    w64_t w = '0;
    r[l*m-1] = 1'b1;
    for (int unsigned k = 0; k < l * m; k++) begin
      w[l*m-1-k] = o[k] ^ (^(r & w));
      r = msrg_row_next(r, l, c, m);
    end
    return w;
  endfunction

  // ---------------- GF(2) matrices for the DSS (Section III) ----------------
  function automatic m32_t m_ident(int unsigned l);
    m32_t r = '0;
    for (int unsigned i = 0; i < l; i++) r[i][i] = 1'b1;
    return r;
  endfunction

  function automatic m32_t m_mul(m32_t a, m32_t b, int unsigned l);
    m32_t r = '0;
    for (int unsigned i = 0; i < l; i++)
      for (int unsigned k = 0; k < l; k++)
        if (a[i][k]) r[i] ^= b[k];
    return r;
  endfunction

  function automatic m32_t m_pow(m32_t a, int unsigned e, int unsigned l);
    m32_t r = m_ident(l);
    m32_t b = a;
    int unsigned x = e;
    while (x != 0) begin
      if (x[0]) r = m_mul(r, b, l);
      b = m_mul(b, b, l);
      x = x >> 1;
    end
    return r;
  endfunction

  // Gauss-Jordan inverse; the caller guarantees that a is nonsingular.
  function automatic m32_t m_inv(m32_t a, int unsigned l);
    m32_t x = a;
    m32_t r = m_ident(l);
    w32_t t;
    for (int unsigned col = 0; col < l; col++) begin
      int unsigned p = col;
      while (p < l - 1 && !x[p][col]) p++;
      t = x[p]; x[p] = x[col]; x[col] = t;
      t = r[p]; r[p] = r[col]; r[col] = t;
      for (int unsigned row = 0; row < l; row++)
        if (row != col && x[row][col]) begin
          x[row] ^= x[col];
          r[row] ^= r[col];
        end
    end
    return r;
  endfunction

  // v' * A (row vector times matrix)
  function automatic w32_t vm(w32_t v, m32_t a, int unsigned l);
    w32_t r = '0;
    for (int unsigned k = 0; k < l; k++) if (v[k]) r ^= a[k];
    return r;
  endfunction

  // A * v (matrix times column vector)
  function automatic w32_t mv(m32_t a, w32_t v, int unsigned l);
    w32_t r = '0;
    for (int unsigned i = 0; i < l; i++) r[i] = ^(a[i] & v);
    return r;
  endfunction

  // State transition matrix T of the M=1 PSRG (eq. 21 for the DSS polynomial).
  function automatic m32_t trans_matrix(int unsigned l, w64_t c);
    m32_t t = '0;
    for (int unsigned i = 0; i + 1 < l; i++) t[i][i+1] = 1'b1;
    t[l-1][0] = 1'b1;
    for (int unsigned i = 1; i < l; i++) if (c[i]) t[l-1][l-i] = 1'b1;
    return t;
  endfunction

  // Shifted sampling vector of eq. (23): v0_hat' = v0' * T^{-shift}.
  function automatic w32_t dss_v0_hat(int unsigned l, w64_t c, w32_t v0, int unsigned shift);
    m32_t t = trans_matrix(l, c);
    return vm(v0, m_pow(m_inv(t, l), shift, l), l);
  endfunction

  // Correction vector of eq. (18) (odd L, Delta_0 nonsingular):
  //   c_s = T^{(J-1)a+b} Delta_0^{-1} e_{L-2+s}
  //         + u (v0' Delta_0^{-1} e_{L-2+s}) T^{(J-1)a+b} Delta_0^{-1} e_0
  // Delta_0 is the discrimination matrix (15) without its first row v0'.
  function automatic w32_t dss_corr_vec(int unsigned l, w64_t c, w32_t v0, w32_t v1,
                                        int unsigned alpha, int unsigned beta,
                                        bit u, int unsigned sel);
    m32_t t  = trans_matrix(l, c);
    m32_t ta = m_pow(t, alpha, l);
    m32_t tk = m_ident(l);
    m32_t d0 = '0;
    m32_t d0i, tb;
    int unsigned jj = (l + 1) / 2;
    int unsigned row = 0;
    w32_t a, a0, ev;
    for (int unsigned i = 0; i < jj; i++) begin
      if (i != 0) d0[row++] = vm(v0, tk, l);
      d0[row++] = vm(v1, tk, l);
      tk = m_mul(tk, ta, l);
    end
    d0i = m_inv(d0, l);
    tb  = m_pow(t, (jj - 1) * alpha + beta, l);
    ev = '0; ev[l-2+sel] = 1'b1;
    a  = mv(d0i, ev, l);
    ev = '0; ev[0] = 1'b1;
    a0 = mv(d0i, ev, l);
    if (u && (^(v0 & a))) a ^= a0;
    return mv(tb, a, l);
  endfunction

  // ---------------- ATM header error control ----------------
  // CRC-8 with generator x^8 + x^2 + x + 1 over one more header byte.
  function automatic logic [7:0] crc8_byte(logic [7:0] crc, logic [7:0] data);
    logic [7:0] r = crc;
    for (int i = 7; i >= 0; i--) begin
      logic fb = r[7] ^ data[i];
      r = {r[6:0], 1'b0};
      if (fb) r ^= 8'h07;
    end
    return r;
  endfunction
  localparam logic [7:0] HEC_COSET = 8'h55;

endpackage
