// cpc_ref_pkg: behavioural reference model used by the testbenches.
//
// It recomputes, from the equations of the log-MAP algorithm and with plain
// integer arithmetic, what the hardware must produce bit for bit: the max*
// operator with its 8-entry table, the branch metrics, the normalised
// forward/backward recursions, LL/LLp and the decisions, and the iteration
// of the product decoder (column pass, y_r = LL - p, row pass, p = o_r - y_r).
// It also holds the (1, 5/7) encoder used to build test codewords. Nothing in
// it is synthesizable or meant to be; it shares no code with the RTL.
package cpc_ref_pkg;

  localparam int MAXN = 16;

  typedef int vec_t [];

  // trellis of the (1, 5/7) code: state = 2*s1 + s2
  function automatic int nxt(int m, int u);
    int s1, s2, a;
    s1 = (m >> 1) & 1;
    s2 = m & 1;
    a  = u ^ s1 ^ s2;
    return 2 * a + s1;
  endfunction

  function automatic int par(int m, int u);
    int s1, s2, a;
    s1 = (m >> 1) & 1;
    s2 = m & 1;
    a  = u ^ s1 ^ s2;
    return a ^ s2;
  endfunction

  function automatic int clip(int v, int lim);
    if (v > lim)  return lim;
    if (v < -lim) return -lim;
    return v;
  endfunction

  // round(10*ln(1+exp(-d/10))) for d < 8, else 0
  function automatic int corr(int d);
    int t [8] = '{7, 6, 6, 6, 5, 5, 4, 4};
    if (d < 0) d = -d;
    if (d < 8) return t[d];
    return 0;
  endfunction

  function automatic int mstar(int a, int b, int w);
    int mx, r, lim;
    mx  = (a > b) ? a : b;
    r   = mx + corr(a - b);
    lim = (1 << (w - 1)) - 1;
    return (r > lim) ? lim : r;
  endfunction

  function automatic int mstar4(int a, int b, int c, int d, int w);
    return mstar(mstar(a, b, w), mstar(c, d, w), w);
  endfunction

  // branch metric of state m, input u
  function automatic int bmet(int y, int yp, int apr, int k, int m, int u, int sat);
    int ky, kyp, s, ha;
    ky  = clip((y * k + 512) >>> 10, sat);
    kyp = clip((yp * k + 512) >>> 10, sat);
    ha  = apr >>> 1;
    s   = (u ? ky : -ky) + (par(m, u) ? kyp : -kyp) + (u ? ha : -ha);
    return clip(s, sat);
  endfunction

  // Full log-MAP decode of one block of n pairs. y has 2n entries.
  task automatic map_decode(input int n, input int w, input int sat, input bit term,
                            input int k, input int y [], input int apr [],
                            output int ll [], output int llp [],
                            output bit dd [], output bit dp []);
    int iw;
    int bm [][8];
    int al [][4];
    int be [][4];
    iw  = w + 2;
    bm  = new[n];
    al  = new[n];
    be  = new[n + 1];
    ll  = new[n];
    llp = new[n];
    dd  = new[n];
    dp  = new[n];
    for (int i = 0; i < n; i++)
      for (int m = 0; m < 4; m++)
        for (int u = 0; u < 2; u++)
          bm[i][2*m+u] = bmet(y[2*i], y[2*i+1], apr[i], k, m, u, sat);
    for (int m = 0; m < 4; m++) begin
      al[0][m] = (m == 0) ? 0 : -sat;
      be[n][m] = (m == 0 || !term) ? 0 : -sat;
    end
    // alpha_s uses BM_s (index s-1)
    for (int s = 1; s < n; s++) begin
      int raw [4];
      int c [4][2];
      int cnt [4];
      int nt;
      cnt = '{0, 0, 0, 0};
      for (int mp = 0; mp < 4; mp++)
        for (int u = 0; u < 2; u++) begin
          int t;
          t = nxt(mp, u);
          c[t][cnt[t]] = al[s-1][mp] + bm[s-1][2*mp+u];
          cnt[t]++;
        end
      for (int m = 0; m < 4; m++) raw[m] = mstar(c[m][0], c[m][1], iw);
      nt = mstar4(raw[0], raw[1], raw[2], raw[3], iw);
      for (int m = 0; m < 4; m++) al[s][m] = clip(raw[m] - nt, sat);
    end
    // beta_j from beta_{j+1} and BM_{j+1} (index j)
    for (int j = n - 1; j >= 1; j--) begin
      int raw [4];
      int nt;
      for (int mp = 0; mp < 4; mp++)
        raw[mp] = mstar(be[j+1][nxt(mp, 0)] + bm[j][2*mp],
                        be[j+1][nxt(mp, 1)] + bm[j][2*mp+1], iw);
      nt = mstar4(raw[0], raw[1], raw[2], raw[3], iw);
      for (int m = 0; m < 4; m++) be[j][m] = clip(raw[m] - nt, sat);
    end
    for (int i = 0; i < n; i++) begin
      for (int p = 0; p < 2; p++) begin
        int t0 [4];
        int t1 [4];
        int n0, n1, s0, s1;
        n0 = 0;
        n1 = 0;
        for (int mp = 0; mp < 4; mp++)
          for (int u = 0; u < 2; u++) begin
            int pm, b;
            pm = al[i][mp] + bm[i][2*mp+u] + be[i+1][nxt(mp, u)];
            b  = p ? par(mp, u) : u;
            if (b) t1[n1++] = pm; else t0[n0++] = pm;
          end
        s0 = mstar4(t0[0], t0[1], t0[2], t0[3], iw);
        s1 = mstar4(t1[0], t1[1], t1[2], t1[3], iw);
        if (p == 0) ll[i] = clip(s1 - s0, sat); else llp[i] = clip(s1 - s0, sat);
      end
      dd[i] = ll[i] > 0;
      dp[i] = llp[i] > 0;
    end
  endtask

  // (1, 5/7) encoding of n bits, interleaved output d1 p1 d2 p2 ...
  function automatic void rsc_encode(input int n, input bit d [], output bit c []);
    int st;
    st = 0;
    c  = new[2 * n];
    for (int i = 0; i < n; i++) begin
      c[2*i]   = d[i];
      c[2*i+1] = par(st, d[i]);
      st       = nxt(st, d[i]);
    end
  endfunction

  // product encoding: rows first (n x 2n), then columns (2n x 2n);
  // row 2i of the result holds the data positions of the column codes,
  // row 2i+1 their parity. code[r][c] flattened as r*2n + c.
  function automatic void product_encode(input int n, input bit d [], output bit code []);
    bit rows [];
    code = new[4 * n * n];
    rows = new[2 * n * n];
    for (int r = 0; r < n; r++) begin
      bit dr [];
      bit cr [];
      dr = new[n];
      for (int c = 0; c < n; c++) dr[c] = d[r*n + c];
      rsc_encode(n, dr, cr);
      for (int c = 0; c < 2 * n; c++) rows[r*2*n + c] = cr[c];
    end
    for (int c = 0; c < 2 * n; c++) begin
      bit dc [];
      bit cc [];
      dc = new[n];
      for (int r = 0; r < n; r++) dc[r] = rows[r*2*n + c];
      rsc_encode(n, dc, cc);
      for (int r = 0; r < 2 * n; r++) code[r*2*n + c] = cc[r];
    end
  endfunction

  // Product decoder reference. yc flattened r*2n+c (2n x 2n). Returns o_r
  // (n x 2n, flattened r*2n+c) and the decided data (n x n, r*n+c).
  task automatic product_decode(input int n, input int w, input int sat, input int k_col,
                                input int k_row, input int iters, input int yc [],
                                output int o_r [], output bit dec []);
    int p  [];
    int yr [];
    p   = new[2 * n * n];
    yr  = new[2 * n * n];
    o_r = new[2 * n * n];
    dec = new[n * n];
    foreach (p[i]) begin p[i] = 0; o_r[i] = 0; end
    for (int it = 0; it < iters; it++) begin
      for (int c = 0; c < 2 * n; c++) begin
        int yv [], av [], l [], lp [];
        bit d1 [], d2 [];
        yv = new[2 * n];
        av = new[n];
        for (int r = 0; r < 2 * n; r++) yv[r] = yc[r*2*n + c];
        for (int r = 0; r < n; r++) av[r] = p[r*2*n + c];
        map_decode(n, w, sat, 1'b0, k_col, yv, av, l, lp, d1, d2);
        for (int r = 0; r < n; r++) yr[r*2*n + c] = clip(l[r] - p[r*2*n + c], sat);
      end
      for (int r = 0; r < n; r++) begin
        int yv [], av [], l [], lp [];
        bit d1 [], d2 [];
        yv = new[2 * n];
        av = new[n];
        for (int c = 0; c < 2 * n; c++) yv[c] = yr[r*2*n + c];
        for (int c = 0; c < n; c++) av[c] = 0;
        map_decode(n, w, sat, 1'b0, k_row, yv, av, l, lp, d1, d2);
        for (int c = 0; c < n; c++) begin
          o_r[r*2*n + 2*c]     = l[c];
          o_r[r*2*n + 2*c + 1] = lp[c];
          dec[r*n + c]         = d1[c];
        end
      end
      foreach (p[i]) p[i] = clip(o_r[i] - yr[i], sat);
    end
  endtask

endpackage
