// rs_ref_pkg: reference models for the decoder testbenches, written
// independently of the RTL: field arithmetic through log/antilog tables
// built at run time, a systematic RS(255,239) encoder (parity = x^16 m(x)
// mod g(x), g(x) = prod_{i=0..15} (x - alpha^i)), syndromes, a software
// RiBM and polynomial evaluation.
package rs_ref_pkg;

  typedef logic [7:0] sym_t;
  typedef sym_t cw_t [255];

  int unsigned exp_t [510];
  int unsigned log_t [256];
  bit          ready = 0;

  function automatic void init();
    int unsigned x = 1;
    for (int i = 0; i < 255; i++) begin
      exp_t[i] = x;
      log_t[x] = i;
      x = x << 1;
      if ((x & 32'h100) != 0) x = x ^ 32'h11D;
    end
    for (int i = 255; i < 510; i++) exp_t[i] = exp_t[i-255];
    ready = 1;
  endfunction

  function automatic sym_t mul(sym_t a, sym_t b);
    if (!ready) init();
    if (a == 0 || b == 0) return 0;
    return sym_t'(exp_t[log_t[a] + log_t[b]]);
  endfunction

  function automatic sym_t alpha(int e);
    if (!ready) init();
    e = e % 255;
    if (e < 0) e += 255;
    return sym_t'(exp_t[e]);
  endfunction

  function automatic sym_t inv(sym_t a);
    if (!ready) init();
    if (a == 0) return 0;
    return sym_t'(exp_t[255 - log_t[a]]);
  endfunction

  // p[0] + p[1] x + ... evaluated at x (n coefficients)
  function automatic sym_t peval(sym_t p [], sym_t x);
    sym_t r = 0;
    for (int i = p.size() - 1; i >= 0; i--) r = mul(r, x) ^ p[i];
    return r;
  endfunction

  function automatic cw_t encode(sym_t msg [239]);
    sym_t g [17];
    sym_t rem [255];
    cw_t  c;
    g[0] = 1;
    for (int i = 1; i < 17; i++) g[i] = 0;
    for (int i = 0; i < 16; i++) begin          // g *= (x + alpha^i)
      for (int j = 16; j > 0; j--) g[j] = g[j-1] ^ mul(g[j], alpha(i));
      g[0] = mul(g[0], alpha(i));
    end
    for (int j = 0; j < 255; j++) rem[j] = (j >= 16) ? msg[j-16] : 8'h00;
    for (int j = 254; j >= 16; j--) begin
      sym_t q = rem[j];
      if (q != 0)
        for (int k = 0; k <= 16; k++) rem[j-16+k] ^= mul(q, g[k]);
    end
    for (int j = 0; j < 255; j++) c[j] = (j >= 16) ? msg[j-16] : rem[j];
    return c;
  endfunction

  function automatic sym_t syndrome(cw_t r, int i);
    sym_t s = 0;
    for (int j = 254; j >= 0; j--) s = mul(s, alpha(i)) ^ r[j];
    return s;
  endfunction

  // software RiBM (t = 8): returns sigma[0..8], omega[0..7]
  function automatic void ribm(sym_t syn [16], output sym_t sigma [9], output sym_t omega [8]);
    sym_t d [26], th [26], nd [26];
    sym_t gam = 1, d0;
    int   k = 0;
    for (int i = 0; i < 26; i++) begin
      d[i] = (i < 16) ? syn[i] : ((i == 24) ? 8'h01 : 8'h00);
      th[i] = d[i];
    end
    d[25] = 0; th[25] = 0;
    for (int r = 0; r < 16; r++) begin
      d0 = d[0];
      for (int i = 0; i < 25; i++) nd[i] = mul(gam, d[i+1]) ^ mul(d0, th[i]);
      nd[25] = 0;
      if (d0 != 0 && k >= 0) begin
        for (int i = 0; i < 25; i++) th[i] = d[i+1];
        gam = d0;
        k = -k - 1;
      end else k = k + 1;
      d = nd;
    end
    for (int i = 0; i < 9; i++) sigma[i] = d[8+i];
    for (int i = 0; i < 8; i++) omega[i] = d[i];
  endfunction

endpackage
