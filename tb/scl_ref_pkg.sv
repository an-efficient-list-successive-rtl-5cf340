// scl_ref_pkg: bit-true software reference of list SC decoding for the
// testbenches.
//
// Works on LL pairs in plain integers and recomputes every leaf value from the
// channel values by recursion, without partial-sum registers, stage memories
// or sharing, so it is independent of the hardware's organisation. The rules
// it shares with the hardware are the arithmetic (max-log F, G) and the list
// rule: a path's four two-bit extensions are numbered 4*slot + 2*u1 + u2, the
// best L survive ordered by metric (descending) then number (ascending).
package scl_ref_pkg;

  typedef int      ivec_t[];
  typedef bit      bvec_t[];

  // Natural-order polar transform x = u * F^(kron n).
  function automatic bvec_t encode(input bvec_t u);
    bvec_t x, l, r, xl, xr;
    int m;
    if (u.size() == 1) return u;
    m = u.size() / 2;
    l = new[m];
    r = new[m];
    for (int k = 0; k < m; k++) begin
      l[k] = u[k];
      r[k] = u[k + m];
    end
    xl = encode(l);
    xr = encode(r);
    x = new[2 * m];
    for (int k = 0; k < m; k++) begin
      x[k]     = xl[k] ^ xr[k];
      x[k + m] = xr[k];
    end
    return x;
  endfunction

  function automatic int imax(input int a, input int b);
    return (a >= b) ? a : b;
  endfunction

  // LL pair of leaf i of the subtree with values (a0, a1), given the
  // subtree's decided bits u[0 .. i-1].
  function automatic void leaf(input ivec_t a0, input ivec_t a1, input bvec_t u,
                               input int i, output int r0, output int r1);
    ivec_t c0, c1;
    bvec_t ul, ur, beta;
    int m;
    if (a0.size() == 1) begin
      r0 = a0[0];
      r1 = a1[0];
      return;
    end
    m  = a0.size() / 2;
    c0 = new[m];
    c1 = new[m];
    ul = new[m];
    ur = new[m];
    for (int k = 0; k < m; k++) begin
      ul[k] = u[k];
      ur[k] = u[k + m];
    end
    if (i < m) begin
      for (int k = 0; k < m; k++) begin
        c0[k] = imax(a0[k] + a0[k + m], a1[k] + a1[k + m]);
        c1[k] = imax(a0[k] + a1[k + m], a1[k] + a0[k + m]);
      end
      leaf(c0, c1, ul, i, r0, r1);
    end else begin
      beta = encode(ul);
      for (int k = 0; k < m; k++) begin
        c0[k] = beta[k] ? a1[k] + a0[k + m] : a0[k] + a0[k + m];
        c1[k] = beta[k] ? a0[k] + a1[k + m] : a1[k] + a1[k + m];
      end
      leaf(c0, c1, ur, i - m, r0, r1);
    end
  endfunction

  // Full list decode. Returns the best path's bits and its metric.
  function automatic void scl_decode(input int n_len, input int l_size,
                                     input ivec_t y0, input ivec_t y1,
                                     input bvec_t frozen,
                                     output bvec_t uhat, output int metric);
    bvec_t paths[$];
    int    pmet[$];
    begin
      bvec_t z = new[n_len];
      paths.push_back(z);
      pmet.push_back(0);
    end
    for (int t = 0; t < n_len / 2; t++) begin
      int    cidx[$];
      int    cmet[$];
      bvec_t cu[$];
      bvec_t np[$];
      int    nm[$];
      int    order[$];
      for (int p = 0; p < paths.size(); p++) begin
        for (int c = 0; c < 4; c++) begin
          bit u1, u2;
          bvec_t tmp;
          int r0, r1;
          u1 = c[1];
          u2 = c[0];
          if (frozen[2*t] && u1) continue;
          if (frozen[2*t+1] && u2) continue;
          tmp = paths[p];
          tmp[2*t]   = u1;
          tmp[2*t+1] = u2;
          leaf(y0, y1, tmp, 2*t + 1, r0, r1);
          cidx.push_back(4 * p + c);
          cmet.push_back(u2 ? r1 : r0);
          cu.push_back(tmp);
        end
      end
      // selection: repeatedly take the best remaining
      for (int r = 0; r < l_size && r < cidx.size(); r++) begin
        int best = -1;
        for (int q = 0; q < cidx.size(); q++) begin
          bit taken = 0;
          foreach (order[o]) if (order[o] == q) taken = 1;
          if (taken) continue;
          if (best < 0 || cmet[q] > cmet[best] ||
              (cmet[q] == cmet[best] && cidx[q] < cidx[best]))
            best = q;
        end
        order.push_back(best);
        np.push_back(cu[best]);
        nm.push_back(cmet[best]);
      end
      paths = np;
      pmet  = nm;
    end
    uhat   = paths[0];
    metric = pmet[0];
  endfunction

  // Bhattacharyya-parameter code construction (erasure channel, design
  // parameter z0): returns a mask with the n_len - k_info least reliable
  // positions frozen.
  function automatic bvec_t construct(input int n_len, input int k_info, input real z0);
    real z[];
    bvec_t fr;
    z = new[1];
    z[0] = z0;
    while (z.size() < n_len) begin
      real nz[];
      int  m = z.size();
      nz = new[2 * m];
      // node k splits into children 2k (first half of its bit range, the
      // worse channel) and 2k+1 (second half, the better one)
      for (int k = 0; k < m; k++) begin
        nz[2 * k]     = 2.0 * z[k] - z[k] * z[k];
        nz[2 * k + 1] = z[k] * z[k];
      end
      z = nz;
    end
    fr = new[n_len];
    for (int f = 0; f < n_len - k_info; f++) begin
      int worst = -1;
      for (int i = 0; i < n_len; i++)
        if (!fr[i] && (worst < 0 || z[i] > z[worst])) worst = i;
      fr[worst] = 1;
    end
    return fr;
  endfunction

endpackage
