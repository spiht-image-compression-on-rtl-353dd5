// Reference model of the SPIHT engine, shared by the testbenches. The
// including module defines LOG2N and LEVELS. It holds the integer 9/7
// transform (ref_dwt: img -> X), the spatial-orientation-tree maxima found by
// direct recursion over coordinates (dmax, lmax), and the Fixed Order SPIHT
// bit rules applied block by block in coding order (ref_code: X -> q[66]).
// It is written from the algorithm, not from the RTL's structure.
  localparam int N     = 1 << LOG2N;
  localparam int R     = N >> LEVELS;
  localparam int NBLK  = N * N / 4;
  localparam int REG1  = NBLK / 2;
  localparam int REG2  = NBLK / 8;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---------------- reference model ----------------
  int img [N][N];
  int X   [N][N];
  int T   [N][N];
  int hq [5], gq [5];
  int mean_ref;

  // filter taps: the 9/7 analysis pair with sqrt(2) DC gain, times 2^14, rounded
  task automatic ref_init();
    real hr [5], gr [5];
    hr = '{0.852698679009, 0.377402855613, -0.110624404418, -0.023849465020, 0.037828455507};
    gr = '{0.788485616406, -0.418092273222, -0.040689417609, 0.064538882629, 0.0};
    for (int k = 0; k < 5; k++) begin
      hq[k] = int'(hr[k] * 16384.0);
      gq[k] = int'(gr[k] * 16384.0);
    end
  endtask

  function automatic int refl(int m, int len);
    if (m < 0) m = -m;
    if (m > len - 1) m = 2 * (len - 1) - m;
    return m;
  endfunction

  function automatic int scale(longint acc, int sh);
    longint v;
    v = (acc + (longint'(1) <<< (sh - 1))) >>> sh;
    if (v > 32767) v = 32767;
    if (v < -32768) v = -32768;
    return int'(v);
  endfunction

  // one 1-D analysis of row[0..len-1] into out[0..len-1] (even=low, odd=high)
  task automatic filt(input int row [N], input int len, input int sh, output int out [N]);
    for (int n = 0; n < len; n++) begin
      longint acc = 0;
      for (int j = -4; j <= 4; j++) begin
        int k = (j < 0) ? -j : j;
        acc += ((n % 2 != 0) ? longint'(gq[k]) : longint'(hq[k])) * longint'(row[refl(n + j, len)]);
      end
      out[n] = scale(acc, sh);
    end
  endtask

  // transform img (as pixel * 2^6), or X as it stands when from_img is 0
  task automatic ref_dwt(input bit from_img = 1);
    int row [N], out [N];
    longint sum;
    if (from_img) for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) X[r][c] = img[r][c] * 64;
    for (int l = 0; l < LEVELS; l++) begin
      int m = N >> l;
      for (int r = 0; r < m; r++) begin
        for (int c = 0; c < m; c++) row[c] = X[r][c];
        filt(row, m, 14, out);
        for (int n = 0; n < m; n++) T[(n % 2 != 0) ? m/2 + n/2 : n/2][r] = out[n];
      end
      for (int r = 0; r < m; r++) begin
        for (int c = 0; c < m; c++) row[c] = T[r][c];
        filt(row, m, 15, out);
        for (int n = 0; n < m; n++) X[(n % 2 != 0) ? m/2 + n/2 : n/2][r] = out[n];
      end
    end
    sum = 0;
    for (int r = 0; r < R; r++) for (int c = 0; c < R; c++) sum += longint'(X[r][c]);
    mean_ref = int'((sum + (longint'(R*R) / 2)) >>> (2 * $clog2(R)));
    for (int r = 0; r < R; r++) for (int c = 0; c < R; c++) begin
      int v = X[r][c] - mean_ref;
      X[r][c] = (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
    end
  endtask

  function automatic int lvl_of(int r, int c);
    int mx = (r > c) ? r : c;
    if (mx < R) return LEVELS - 1;
    for (int l = 0; l < LEVELS; l++) if (mx >= (N >> (l + 1))) return l;
    return LEVELS - 1;
  endfunction

  function automatic int cmag(int r, int c);
    int v = X[r][c];
    return ((v < 0) ? -v : v) << lvl_of(r, c);
  endfunction

  function automatic int nb(int v);
    int b = 0;
    while (v > 0) begin b++; v >>= 1; end
    return b;
  endfunction

  // top-left corner of the child block of (r,c); returns 0 if none
  function automatic bit child_blk(int r, int c, output int cr, output int cc);
    if (r < R && c < R) begin
      if (r % 2 == 0 && c % 2 == 0) return 0;
      cr = (r - r % 2) + (r % 2) * R;
      cc = (c - c % 2) + (c % 2) * R;
      return 1;
    end
    if (lvl_of(r, c) == 0) return 0;
    cr = 2 * r; cc = 2 * c;
    return 1;
  endfunction

  // largest magnitude among all descendants of (r,c)
  function automatic int dmax(int r, int c);
    int cr, cc, m = 0;
    if (!child_blk(r, c, cr, cc)) return 0;
    for (int i = 0; i < 4; i++) begin
      int a = cmag(cr + i / 2, cc + i % 2);
      int b = dmax(cr + i / 2, cc + i % 2);
      if (a > m) m = a;
      if (b > m) m = b;
    end
    return m;
  endfunction

  // largest magnitude among the grand-descendants of (r,c)
  function automatic int lmax(int r, int c);
    int cr, cc, m = 0;
    if (!child_blk(r, c, cr, cc)) return 0;
    for (int i = 0; i < 4; i++) begin
      int b = dmax(cr + i / 2, cc + i % 2);
      if (b > m) m = b;
    end
    return m;
  endfunction

  function automatic bit has_l(int r, int c);
    int cr, cc, gr, gc;
    if (!child_blk(r, c, cr, cc)) return 0;
    return child_blk(cr, cc, gr, gc) || child_blk(cr, cc + 1, gr, gc) ||
           child_blk(cr + 1, cc, gr, gc) || child_blk(cr + 1, cc + 1, gr, gc);
  endfunction

  function automatic int demort(int m, int odd);
    int v = 0;
    for (int b = 0; b < 10; b++) v |= ((m >> (2 * b + odd)) & 1) << b;
    return v;
  endfunction

  bit q [66][$];
  int n_newly = 0, n_typeb = 0, n_refine = 0;

  task automatic code_block(int r0, int c0, bit root);
    int mg [4], dm [4], lm [4];
    bit hd [4], hl [4], sg [4];
    int pm = 0, dmx = 0, cr, cc;
    for (int i = 0; i < 4; i++) begin
      int r = r0 + i / 2, c = c0 + i % 2;
      mg[i] = cmag(r, c);
      sg[i] = X[r][c] < 0;
      hd[i] = child_blk(r, c, cr, cc);
      hl[i] = hd[i] && has_l(r, c);
      dm[i] = hd[i] ? nb(dmax(r, c)) : 0;
      lm[i] = hl[i] ? nb(lmax(r, c)) : 0;
      if (nb(mg[i]) > pm) pm = nb(mg[i]);
      if (dm[i] > pm) pm = dm[i];
      if (dm[i] > dmx) dmx = dm[i];
    end
    for (int p = 0; p < 22; p++) begin
      bit act = root || pm > p;
      bit nw  = !root && pm == p + 1;
      bit live = root || dmx > p;
      for (int i = 0; i < 4; i++) begin
        bit s = nb(mg[i]) > p;
        if (!act) continue;
        if (nw) begin
          q[2*p+1].push_back(s); if (s) q[2*p+1].push_back(sg[i]);
          n_newly++;
        end else if (nb(mg[i]) <= p + 1) begin
          q[2*p].push_back(s); if (s) q[2*p].push_back(sg[i]);
        end else begin
          q[44+p].push_back(1'((mg[i] >> p) & 1));
          n_refine++;
        end
      end
      for (int i = 0; i < 4; i++) begin
        if (!(act && live && hd[i])) continue;
        if (dm[i] <= p + 1) q[2*p+1].push_back(dm[i] > p);
        if (hl[i] && dm[i] > p && lm[i] <= p + 1) begin
          q[2*p+1].push_back(lm[i] > p);
          n_typeb++;
        end
      end
    end
  endtask

  task automatic ref_code();
    for (int k = 0; k < (R/2)*(R/2); k++) code_block(2 * demort(k, 1), 2 * demort(k, 0), 1);
    for (int l = LEVELS - 1; l >= 0; l--) begin
      int s = N >> (l + 1);
      for (int d = 0; d < 3; d++)
        for (int j = 0; j < (s/2)*(s/2); j++)
          code_block(2 * demort(j, 1) + ((d != 0) ? s : 0),
                     2 * demort(j, 0) + ((d != 1) ? s : 0), 0);
    end
  endtask


  // top-left corner of the idx-th block in coding order
  task automatic blk_pos(input int idx, output int r0, output int c0, output bit root);
    int base = (R/2) * (R/2);
    root = 0;
    if (idx < base) begin
      r0 = 2 * demort(idx, 1); c0 = 2 * demort(idx, 0); root = 1;
      return;
    end
    for (int l = LEVELS - 1; l >= 0; l--) begin
      int s = N >> (l + 1);
      int nb_l = (s/2) * (s/2);
      if (idx < base + 3 * nb_l) begin
        int d = (idx - base) / nb_l, j = (idx - base) % nb_l;
        r0 = 2 * demort(j, 1) + ((d != 0) ? s : 0);
        c0 = 2 * demort(j, 0) + ((d != 1) ? s : 0);
        return;
      end
      base += 3 * nb_l;
    end
  endtask

  // the record the magnitude phase should produce for a block
  function automatic spiht_pkg::blk_rec_t ref_rec(int r0, int c0, bit root);
    spiht_pkg::blk_rec_t rc;
    int pm = 0, cr, cc;
    rc = '0;
    rc.is_root = root;
    rc.level   = 3'(lvl_of(r0, c0));
    for (int i = 0; i < 4; i++) begin
      int r = r0 + i / 2, c = c0 + i % 2;
      rc.coef[i]  = 16'(X[r][c]);
      rc.has_d[i] = child_blk(r, c, cr, cc);
      rc.has_l[i] = rc.has_d[i] && has_l(r, c);
      rc.d_nb[i]  = rc.has_d[i] ? 5'(nb(dmax(r, c))) : 5'd0;
      rc.l_nb[i]  = rc.has_l[i] ? 5'(nb(lmax(r, c))) : 5'd0;
      if (nb(cmag(r, c)) > pm) pm = nb(cmag(r, c));
      if (int'(rc.d_nb[i]) > pm) pm = int'(rc.d_nb[i]);
    end
    rc.p_nb = 5'(pm);
    return rc;
  endfunction
