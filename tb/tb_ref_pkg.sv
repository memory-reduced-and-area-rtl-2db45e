// Reference models for the testbenches, written independently of the RTL:
// the LTE constituent encoder as a shift register with tap polynomials
// 13 (feedback) and 15 (feed-forward) octal, max-log-MAP recursions in plain
// integers, and the NII compression and recovery rules.
package tb_ref_pkg;

  typedef int mvec_t [8];

  // state = {d1, d2, d3}, d1 the most recent feedback bit (bit 2)
  function automatic int ref_next(input int s, input int u);
    int d1, d2, d3, a;
    d1 = (s >> 2) & 1; d2 = (s >> 1) & 1; d3 = s & 1;
    a  = (u + d2 + d3) % 2;
    return a * 4 + d1 * 2 + d2;
  endfunction

  function automatic int ref_par(input int s, input int u);
    int d1, d2, d3, a;
    d1 = (s >> 2) & 1; d2 = (s >> 1) & 1; d3 = s & 1;
    a  = (u + d2 + d3) % 2;
    return (a + d1 + d3) % 2;
  endfunction

  function automatic int sat(input int v, input int bits);
    int hi, lo;
    hi = (1 << (bits - 1)) - 1;
    lo = -(1 << (bits - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  function automatic int gam(input int u, input int p, input int ls, input int la, input int lp);
    return u * (ls + la) + p * lp;
  endfunction

  function automatic mvec_t ref_alpha(input mvec_t a, input int ls, input int la, input int lp);
    mvec_t r;
    int best [8];
    for (int s = 0; s < 8; s++) best[s] = -1000000;
    for (int sp = 0; sp < 8; sp++)
      for (int u = 0; u < 2; u++) begin
        int v;
        v = a[sp] + gam(u, ref_par(sp, u), ls, la, lp);
        if (v > best[ref_next(sp, u)]) best[ref_next(sp, u)] = v;
      end
    for (int s = 0; s < 8; s++) r[s] = sat(best[s] - best[0], 12);
    return r;
  endfunction

  function automatic mvec_t ref_beta(input mvec_t b, input int ls, input int la, input int lp);
    mvec_t r;
    int best [8];
    for (int sp = 0; sp < 8; sp++) begin
      best[sp] = -1000000;
      for (int u = 0; u < 2; u++) begin
        int v;
        v = b[ref_next(sp, u)] + gam(u, ref_par(sp, u), ls, la, lp);
        if (v > best[sp]) best[sp] = v;
      end
    end
    for (int s = 0; s < 8; s++) r[s] = sat(best[s] - best[0], 12);
    return r;
  endfunction

  function automatic int ref_ext(input mvec_t a, input mvec_t b, input int lp);
    int best [2];
    best[0] = -1000000; best[1] = -1000000;
    for (int sp = 0; sp < 8; sp++)
      for (int u = 0; u < 2; u++) begin
        int v;
        v = a[sp] + b[ref_next(sp, u)] + ref_par(sp, u) * lp;
        if (v > best[u]) best[u] = v;
      end
    return sat(best[1] - best[0], 8);
  endfunction

  // Compression. Ties: IMAX is the lowest index holding the maximum. For
  // IMIN the states are taken in pairs (0,1) (2,3) ...; within a pair a tie
  // selects the odd state, between pairs the lower pair wins.
  function automatic void ref_compress(input mvec_t m, output int delta, output int imax,
                                       output int imin, output bit clipped);
    int mx, mn, pm [4], pmi [4];
    mx = m[0]; imax = 0;
    for (int s = 1; s < 8; s++) if (m[s] > mx) begin mx = m[s]; imax = s; end
    for (int p = 0; p < 4; p++) begin
      if (m[2*p+1] > m[2*p]) begin pm[p] = m[2*p];   pmi[p] = 2*p;   end
      else                   begin pm[p] = m[2*p+1]; pmi[p] = 2*p+1; end
    end
    mn = pm[0]; imin = pmi[0];
    for (int p = 1; p < 4; p++) if (pm[p] < mn) begin mn = pm[p]; imin = pmi[p]; end
    delta   = mx - mn;
    clipped = (delta > 255);
    if (delta > 255) delta = 255;
  endfunction

  function automatic mvec_t ref_recover(input int delta, input int imax, input int imin);
    mvec_t r;
    for (int s = 0; s < 8; s++)
      r[s] = (s == imax) ? delta : (s == imin) ? 0 : delta / 2;
    return r;
  endfunction

endpackage
