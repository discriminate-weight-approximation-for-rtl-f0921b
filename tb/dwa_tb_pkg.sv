// dwa_tb_pkg: reference functions shared by the testbenches.  They model the
// offline side of discriminate weight approximation, which prepares the data
// the hardware consumes:
//  - bstar/approx_scalar/approx_snippet: intra-DSP approximation of one weight
//    snippet.  B*(w) = b^w - (trailing zeros of w).  A snippet violates when
//    sum B*(w_i) + (m-1)*b^a > D^w; then G = that excess (threshold
//    t = b^w - 1) of its scalars, the lowest-index ones with B*(w_i) > t, are
//    replaced by the value u with B*(u) <= t nearest to w_i in Bray-Curtis
//    distance between binary codes, popcount(u^w) / (popcount(u) +
//    popcount(w)), ties to the smaller u.
//  - snippet_violates: the same violation test, used to sort tile rows.
//  - benes_route: switch settings of benes_net for a permutation
//    (out[k] = in[perm[k]]), by the looping algorithm, one depth at a time.
package dwa_tb_pkg;

  localparam int MAXN = 256;
  typedef int perm_t [MAXN];

  function automatic int tz(int w, int bw);
    int n;
    if (w == 0) return bw;
    n = 0;
    while (((w >> n) & 1) == 0) n++;
    return n;
  endfunction

  function automatic int bstar(int w, int bw);
    return bw - tz(w, bw);
  endfunction

  function automatic int popcount(int v);
    int n;
    n = 0;
    for (int i = 0; i < 32; i++) n += (v >> i) & 1;
    return n;
  endfunction

  function automatic int approx_scalar(int w, int bw);
    int best, bn, bd, n, d;
    best = 0; bn = 1; bd = 1;  // distance as fraction bn/bd; start at 1
    if (w == 0) return 0;
    for (int u = 0; u < (1 << bw); u += 2) begin
      n = popcount(u ^ w);
      d = popcount(u) + popcount(w);
      if (n * bd < bn * d) begin
        best = u; bn = n; bd = d;
      end
    end
    return best;
  endfunction

  function automatic bit snippet_violates(int w [16], int m, int ba, int bw, int dw);
    int b;
    b = (m - 1) * ba;
    for (int i = 0; i < m; i++) b += bstar(w[i], bw);
    return b > dw;
  endfunction

  // Approximates w in place; returns the number of approximated scalars.
  function automatic int approx_snippet(ref int w [16], input int m, ba, bw, dw);
    int b, g, idx, cnt;
    b = (m - 1) * ba;
    for (int i = 0; i < m; i++) b += bstar(w[i], bw);
    if (b <= dw) return 0;
    g   = b - dw;       // (B^w - D^w) / (b^w - t) with t = b^w - 1
    idx = -1;
    cnt = 0;
    for (int k = 0; k < g; k++) begin
      for (int i = idx + 1; i < m; i++) begin
        if (bstar(w[i], bw) > bw - 1) begin
          idx = i;
          break;
        end
      end
      if (idx >= 0 && bstar(w[idx], bw) > bw - 1) begin
        w[idx] = approx_scalar(w[idx], bw);
        cnt++;
      end
    end
    return cnt;
  endfunction

  function automatic int benes_bits(int n);
    int l;
    l = 0;
    while ((1 << l) < n) l++;
    return n * l - n / 2;
  endfunction

  function automatic bit [4095:0] benes_route(int n, perm_t perm);
    bit [4095:0] bits;
    perm_t cur, nxt, offs, noffs, inv;
    int so [MAXN];
    int si [MAXN];
    int s, nsub, h, k, i, k2;
    bits = '0;
    cur  = perm;
    offs[0] = 0;
    s    = n;
    nsub = 1;
    while (s > 2) begin
      h = s / 2;
      for (int b = 0; b < nsub; b++) begin
        for (int x = 0; x < s; x++) begin
          so[x] = -1;
          si[x] = -1;
          inv[cur[b*s+x]] = x;
        end
        for (int j = 0; j < h; j++) begin
          if (so[2*j] == -1) begin
            k = 2 * j;
            while (1) begin
              so[k] = 0;
              i = cur[b*s+k];
              si[i] = 0;
              si[i^1] = 1;
              k2 = inv[i^1];
              so[k2] = 1;
              k = k2 ^ 1;
              if (so[k] != -1) break;
            end
          end
        end
        for (int x = 0; x < h; x++) begin
          bits[offs[b] + x]                            = (si[2*x] == 1);
          bits[offs[b] + h + 2 * benes_bits(h) + x]    = (so[2*x] == 1);
        end
        for (int x = 0; x < s; x++) begin
          if (so[x] == 0) nxt[(2*b)*h + x/2]   = cur[b*s+x] / 2;
          else            nxt[(2*b+1)*h + x/2] = cur[b*s+x] / 2;
        end
        noffs[2*b]   = offs[b] + h;
        noffs[2*b+1] = offs[b] + h + benes_bits(h);
      end
      cur  = nxt;
      offs = noffs;
      s    = h;
      nsub = nsub * 2;
    end
    for (int b = 0; b < nsub; b++) bits[offs[b]] = (cur[2*b] == 1);
    return bits;
  endfunction

  // Random permutation of 0..n-1.
  function automatic perm_t rand_perm(int n);
    perm_t p;
    int j, t;
    for (int x = 0; x < n; x++) p[x] = x;
    for (int x = n - 1; x > 0; x--) begin
      j = $urandom_range(x, 0);
      t = p[x]; p[x] = p[j]; p[j] = t;
    end
    return p;
  endfunction

endpackage
