// polar_ref_pkg: reference models used by the testbenches. They are
// written independently of the RTL, as straightforward array code:
// CRC by a feedback shift register, encoding by in-place butterflies,
// rate matching by explicitly filling and reading the interleaver
// triangle, and a frozen set chosen by polarization weight.
package polar_ref_pkg;

  typedef bit bitvec_t [];
  typedef int intvec_t [];

  function automatic bit [24:0] ref_poly(int len);
    case (len)
      6:  return 25'b1100001;
      11: return 25'b111000100001;
      default: return 25'b1101100101011000100010111;
    endcase
  endfunction

  // CRC bits of msg, first CRC bit first (shift-register form).
  function automatic bitvec_t ref_crc(bitvec_t msg, int len);
    bit [24:0] poly;
    bit [23:0] r;
    bit fb;
    bitvec_t out;
    poly = ref_poly(len);
    r = '0;
    foreach (msg[i]) begin
      fb = r[len-1] ^ msg[i];
      r = r << 1;
      if (fb) r = r ^ poly[23:0];
    end
    out = new[len];
    for (int i = 0; i < len; i++) out[i] = r[len-1-i];
    return out;
  endfunction

  function automatic int ref_clog2(int x);
    int r;
    r = 0;
    while ((1 << r) < x) r++;
    return r;
  endfunction

  // code length exponent, TS 38.212 5.3.1
  function automatic int ref_n(int k, int e, int nmax);
    int ce, n1, n2, n;
    ce = ref_clog2(e);
    if (real'(e) <= 1.125 * real'(1 << (ce - 1)) && real'(k) / real'(e) < 0.5625) n1 = ce - 1;
    else n1 = ce;
    n2 = ref_clog2(8 * k);
    n = n1;
    if (n2 < n) n = n2;
    if (nmax < n) n = nmax;
    if (n < 5) n = 5;
    return n;
  endfunction

  function automatic int ref_sbi(int i);
    int p [32] = '{0,1,2,4,3,5,6,7,8,16,9,17,10,18,11,19,12,20,13,21,14,22,15,23,24,25,26,28,27,29,30,31};
    return p[i];
  endfunction

  // sub-block interleaver: y(n) = d(J(n))
  function automatic int ref_j(int n, int nn);
    int b;
    b = nn / 32;
    return ref_sbi(n / b) * b + (n % b);
  endfunction

  function automatic bit ref_puncture(int k, int e);
    return (16 * k) <= (7 * e);
  endfunction

  // info mask: K best channels by polarization weight, excluding the
  // channels removed by puncturing or shortening
  function automatic bitvec_t ref_mask(int nn, int k, int e);
    real w [];
    bit excl [];
    bitvec_t m;
    int chosen;
    w = new[nn];
    excl = new[nn];
    m = new[nn];
    for (int i = 0; i < nn; i++) begin
      w[i] = 0.0;
      for (int j = 0; j < 10; j++)
        if ((i >> j) & 1) w[i] += 2.0 ** (0.25 * j);
      excl[i] = 0;
      m[i] = 0;
    end
    if (e < nn) begin
      for (int n = 0; n < nn; n++) begin
        if (ref_puncture(k, e) && n < nn - e) excl[ref_j(n, nn)] = 1;
        if (!ref_puncture(k, e) && n >= e) excl[ref_j(n, nn)] = 1;
      end
    end
    for (chosen = 0; chosen < k; chosen++) begin
      int best;
      best = -1;
      for (int i = 0; i < nn; i++)
        if (!m[i] && !excl[i] && (best < 0 || w[i] > w[best])) best = i;
      m[best] = 1;
    end
    return m;
  endfunction

  // interleaver pattern for K from a 164-entry master table
  function automatic intvec_t ref_il(int pmax [164], int k, bit iil);
    intvec_t p;
    int w;
    p = new[k];
    if (!iil) begin
      for (int i = 0; i < k; i++) p[i] = i;
      return p;
    end
    w = 0;
    for (int m = 0; m < 164; m++)
      if (pmax[m] >= 164 - k) begin
        p[w] = pmax[m] - (164 - k);
        w++;
      end
    return p;
  endfunction

  // u from data bits with parity-check bits (TS 38.212 5.3.1.2): the
  // registers y0..y4 rotate every channel, a PC channel takes y0 and every
  // information or PC bit is added into y0
  function automatic bitvec_t ref_fill_pc(bitvec_t info, bitvec_t pc, bitvec_t bits);
    bitvec_t u;
    bit y [5];
    bit t;
    int k;
    u = new[info.size()];
    y = '{0, 0, 0, 0, 0};
    k = 0;
    foreach (u[n]) begin
      t = y[0]; y[0] = y[1]; y[1] = y[2]; y[2] = y[3]; y[3] = y[4]; y[4] = t;
      u[n] = 1'b0;
      if (pc[n]) u[n] = y[0];
      else if (info[n]) begin
        u[n] = bits[k];
        k++;
      end
      y[0] = y[0] ^ u[n];
    end
    return u;
  endfunction

  // c = u * G_N by butterflies
  function automatic bitvec_t ref_encode(bitvec_t u);
    bitvec_t x;
    int nn;
    nn = u.size();
    x = u;
    for (int s = 1; s < nn; s = s * 2)
      for (int i = 0; i < nn; i++)
        if ((i & s) == 0) x[i] = x[i] ^ x[i + s];
    return x;
  endfunction

  // triangular bit interleaver: returns the source index of each output
  function automatic intvec_t ref_bil_order(int e);
    int t, k;
    int v [][];
    intvec_t o;
    t = 0;
    while (t * (t + 1) / 2 < e) t++;
    v = new[t];
    k = 0;
    for (int i = 0; i < t; i++) begin
      v[i] = new[t];
      for (int j = 0; j < t - i; j++) begin
        v[i][j] = (k < e) ? k : -1;
        k++;
      end
    end
    o = new[e];
    k = 0;
    for (int j = 0; j < t; j++)
      for (int i = 0; i < t - j; i++)
        if (v[i][j] >= 0) begin
          o[k] = v[i][j];
          k++;
        end
    return o;
  endfunction

  // rate matching, transmitted bit order
  function automatic bitvec_t ref_rate_match(bitvec_t d, int k, int e, bit ibil);
    bitvec_t y, ev, f;
    intvec_t o;
    int nn;
    nn = d.size();
    y = new[nn];
    for (int n = 0; n < nn; n++) y[n] = d[ref_j(n, nn)];
    ev = new[e];
    for (int i = 0; i < e; i++) begin
      if (e >= nn) ev[i] = y[i % nn];
      else if (ref_puncture(k, e)) ev[i] = y[i + nn - e];
      else ev[i] = y[i];
    end
    if (!ibil) return ev;
    o = ref_bil_order(e);
    f = new[e];
    for (int i = 0; i < e; i++) f[i] = ev[o[i]];
    return f;
  endfunction

  // rate recovery of LLRs in transmitted order, codeword order out
  function automatic intvec_t ref_rate_recover(intvec_t f, int nn, int k, bit ibil, int big);
    intvec_t ev, y, d;
    intvec_t o;
    int e;
    e = f.size();
    ev = new[e];
    if (ibil) begin
      o = ref_bil_order(e);
      for (int i = 0; i < e; i++) ev[o[i]] = f[i];
    end else ev = f;
    y = new[nn];
    for (int n = 0; n < nn; n++) begin
      if (e >= nn) y[n] = ev[n];
      else if (ref_puncture(k, e)) y[n] = (n < nn - e) ? 0 : ev[n - (nn - e)];
      else y[n] = (n < e) ? ev[n] : big;
    end
    d = new[nn];
    for (int n = 0; n < nn; n++) d[ref_j(n, nn)] = y[n];
    return d;
  endfunction

  // (14,8) constellation of TS 38.211, rounded: returns {I, Q}
  function automatic void ref_modulate(int scheme, bit b [6], output int si, output int sq);
    real c, ri, rq;
    case (scheme)
      0: begin c = 1.0 / $sqrt(2.0); ri = c * (1 - 2 * b[0]); rq = ri; end
      1: begin c = 1.0 / $sqrt(2.0); ri = c * (1 - 2 * b[0]); rq = c * (1 - 2 * b[1]); end
      2: begin
        c = 1.0 / $sqrt(10.0);
        ri = c * (1 - 2 * b[0]) * (2 - (1 - 2 * b[2]));
        rq = c * (1 - 2 * b[1]) * (2 - (1 - 2 * b[3]));
      end
      default: begin
        c = 1.0 / $sqrt(42.0);
        ri = c * (1 - 2 * b[0]) * (4 - (1 - 2 * b[2]) * (2 - (1 - 2 * b[4])));
        rq = c * (1 - 2 * b[1]) * (4 - (1 - 2 * b[3]) * (2 - (1 - 2 * b[5])));
      end
    endcase
    // per-axis unit in the RTL is round(64*c); levels are integer multiples
    si = int'(ri / c) * int'($floor(64.0 * c + 0.5));
    sq = int'(rq / c) * int'($floor(64.0 * c + 0.5));
  endfunction

  function automatic int ref_bps(int scheme);
    case (scheme)
      0: return 1;
      1: return 2;
      2: return 4;
      default: return 6;
    endcase
  endfunction

  // Gaussian sample (Box-Muller) from $urandom
  function automatic real ref_gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1_000_000, 1)) ) / 1_000_001.0;
    u2 = (real'($urandom_range(1_000_000, 0)) ) / 1_000_001.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

endpackage
