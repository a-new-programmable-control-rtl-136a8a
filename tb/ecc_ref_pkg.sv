// ecc_ref_pkg: reference model of the (n, k, m) SEC-SoddEC-SBED-DED code for
// the testbenches, written straight from the code's equations (loops over
// the k x m bit array), independently of the RTL's register structure.
//   C_i  = XOR over bytes j of bit i
//   R'_x = XOR of all bits of bytes with (j mod 2^x) <  2^(x-1)
//   R_x  = XOR of all bits of bytes with (j mod 2^x) >= 2^(x-1)
// Codeword: k data bytes, the column byte, then the row vector
// {.., R_1, R'_1} sent m bits per byte, least significant first.
// The multi-bit-layer interleaved code is modelled by treating each data-I/O
// lane as a page of this code made of m_l-bit symbols; its R = m_l + 2X
// parity bits per lane go one per byte: C_0..C_{m_l-1}, R'_1, R_1, ...
package ecc_ref_pkg;

  typedef logic [7:0] byte_q_t[$];

  typedef struct {
    bit       no_err;
    bit       sec;
    bit       sbed;
    bit       ded;
    int       addr;
    bit [7:0] bits;
  } verdict_t;

  function automatic int xp_of(int k);
    int x = 0;
    while ((1 << x) < k) x++;
    return x;
  endfunction

  function automatic int nbytes(int k, int m);
    int rb = (2 * xp_of(k) + m - 1) / m;
    return k + 1 + rb;
  endfunction

  function automatic bit [7:0] mmask(int m);
    return 8'((1 << m) - 1);
  endfunction

  // column byte and row vector of k data bytes
  function automatic void parity(input byte_q_t d, input int k, input int m,
                                 output bit [7:0] c, output bit [23:0] r);
    int xp = xp_of(k);
    c = '0;
    r = '0;
    for (int j = 0; j < k; j++) begin
      for (int i = 0; i < m; i++) begin
        c[i] ^= d[j][i];
        for (int x = 1; x <= xp; x++) begin
          if ((j % (1 << x)) < (1 << (x - 1))) r[2*(x-1)]   ^= d[j][i];
          else                                 r[2*(x-1)+1] ^= d[j][i];
        end
      end
    end
  endfunction

  function automatic byte_q_t encode(byte_q_t d, int k, int m);
    byte_q_t cw;
    bit [7:0] c;
    bit [23:0] r;
    int nb = nbytes(k, m);
    parity(d, k, m, c, r);
    for (int j = 0; j < k; j++) cw.push_back(d[j] & mmask(m));
    cw.push_back(c);
    for (int b = 0; b < nb - k - 1; b++) begin
      bit [7:0] v = '0;
      for (int i = 0; i < m; i++)
        if (b * m + i < 2 * xp_of(k)) v[i] = r[b*m+i];
      cw.push_back(v);
    end
    return cw;
  endfunction

  // classify a received codeword by the code's four decoding cases
  function automatic verdict_t decode(byte_q_t cw, int k, int m);
    verdict_t v;
    bit [7:0] c, sc;
    bit [23:0] r, rold, sr;
    int xp = xp_of(k);
    int w;
    bit pairs = 1;
    byte_q_t d;
    for (int j = 0; j < k; j++) d.push_back(cw[j]);
    parity(d, k, m, c, r);
    sc = (cw[k] ^ c) & mmask(m);
    rold = '0;
    for (int t = 0; t < 2 * xp; t++) rold[t] = cw[k + 1 + t / m][t % m];
    sr = rold ^ r;
    w = $countones(sc) + $countones(sr);
    v.addr = 0;
    for (int x = 0; x < xp; x++) begin
      if (sr[2*x] == sr[2*x+1]) pairs = 0;
      if (sr[2*x+1]) v.addr |= (1 << x);
    end
    v.bits   = sc;
    v.no_err = (w <= 1);
    v.sec    = !v.no_err && ($countones(sc) % 2 == 1) && pairs;
    v.sbed   = !v.no_err && !v.sec && sc != 0 && ($countones(sc) % 2 == 0) && sr == 0;
    v.ded    = !v.no_err && !v.sec && !v.sbed;
    return v;
  endfunction

  // Multi-bit-layer interleaved code: lane i of a page as k_l symbol bytes
  // (symbol s = bit i of bytes s*m_l .. s*m_l+m_l-1)
  function automatic byte_q_t lane_syms(byte_q_t d, int i, int kl, int ml);
    byte_q_t s;
    for (int y = 0; y < kl; y++) begin
      bit [7:0] v = '0;
      for (int h = 0; h < ml; h++) v[h] = d[y*ml+h][i];
      s.push_back(v);
    end
    return s;
  endfunction

  // reference codeword: data bytes then R parity bytes
  function automatic byte_q_t mbl_encode(byte_q_t d, int m, int kl, int ml);
    byte_q_t cw = d;
    int xp = xp_of(kl);
    int r = ml + 2 * xp;
    for (int t = 0; t < r; t++) cw.push_back(8'h00);
    for (int i = 0; i < m; i++) begin
      byte_q_t lcw = encode(lane_syms(d, i, kl, ml), kl, ml);
      for (int t = 0; t < r; t++) begin
        bit b;
        if (t < ml) b = lcw[kl][t];
        else b = lcw[kl + 1 + (t - ml) / ml][(t - ml) % ml];
        cw[kl*ml + t][i] = b;
      end
    end
    return cw;
  endfunction

  // reference verdict of lane i of a received codeword
  function automatic verdict_t lane_verdict(byte_q_t rx, int i, int kl, int ml);
    int xp = xp_of(kl);
    byte_q_t lcw = lane_syms(rx, i, kl, ml);
    bit [7:0] c = '0;
    bit [23:0] r = '0;
    for (int h = 0; h < ml; h++) c[h] = rx[kl*ml + h][i];
    for (int t = 0; t < 2 * xp; t++) r[t] = rx[kl*ml + ml + t][i];
    lcw.push_back(c);
    for (int b = 0; b < (2 * xp + ml - 1) / ml; b++) begin
      bit [7:0] v = '0;
      for (int h = 0; h < ml; h++) if (b * ml + h < 2 * xp) v[h] = r[b*ml+h];
      lcw.push_back(v);
    end
    return decode(lcw, kl, ml);
  endfunction

  // Interleaving over l codes: code f takes data bytes j = f, f+l, f+2l, ...
  function automatic byte_q_t every_lth(byte_q_t d, int f, int l, int k);
    byte_q_t s;
    for (int j = f; j < k; j += l) s.push_back(d[j]);
    return s;
  endfunction

  // codeword of l interleaved codes: all data, then code 0's parity group,
  // code 1's, ...
  function automatic byte_q_t mbl_encode_l(byte_q_t d, int m, int kl, int ml, int l);
    byte_q_t cw = d;
    int k = kl * ml;
    for (int f = 0; f < l; f++) begin
      byte_q_t c = mbl_encode(every_lth(d, f, l, k * l), m, kl, ml);
      for (int t = k; t < c.size(); t++) cw.push_back(c[t]);
    end
    return cw;
  endfunction

  // received stream of code f alone: its data bytes and its parity group
  function automatic byte_q_t code_stream(byte_q_t rx, int f, int kl, int ml, int l);
    int k = kl * ml;
    int r = ml + 2 * xp_of(kl);
    byte_q_t s = every_lth(rx, f, l, k * l);
    for (int t = 0; t < r; t++) s.push_back(rx[k*l + f*r + t]);
    return s;
  endfunction

endpackage
