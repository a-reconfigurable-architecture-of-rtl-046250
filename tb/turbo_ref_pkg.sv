// turbo_ref_pkg: behavioural reference models used by the testbenches.
//
// Written independently of the RTL: the RSC code is modelled as a shift
// register of three integers, the interleaver as an explicit matrix, and the
// max-log-MAP decoder on full, un-normalised integer metrics. The sliding
// window schedule is reproduced exactly (dummy backward recursion over the next
// window from all-zero metrics, all-zero metrics at the end of the block,
// extrinsic values saturated to +-127), so that the RTL must match bit for bit.
package turbo_ref_pkg;

  typedef int int_q[$];

  // RSC with registers r1 (newest), r2, r3; state number r1*4 + r2*2 + r3.
  function automatic int ref_next(int st, int u);
    int r1, r2, r3, fb;
    r1 = (st >> 2) & 1; r2 = (st >> 1) & 1; r3 = st & 1;
    fb = u ^ r2 ^ r3;
    return fb * 4 + r1 * 2 + r2;
  endfunction

  function automatic int ref_par(int st, int u);
    int r1, r2, r3, fb;
    r1 = (st >> 2) & 1; r2 = (st >> 1) & 1; r3 = st & 1;
    fb = u ^ r2 ^ r3;
    return fb ^ r1 ^ r3;
  endfunction

  // Row-by-row write, column-by-column read of a rows x ceil(K/rows) matrix.
  function automatic int_q ref_interleave(int k, int rows);
    int_q pi;
    int cols;
    cols = (k + rows - 1) / rows;
    for (int c = 0; c < cols; c++)
      for (int r = 0; r < rows; r++)
        if (r * cols + c < k) pi.push_back(r * cols + c);
    return pi;
  endfunction

  // Parity sequence of one RSC encoder for the bit sequence u.
  function automatic int_q ref_rsc(int_q u);
    int_q p;
    int st;
    st = 0;
    foreach (u[i]) begin
      p.push_back(ref_par(st, u[i]));
      st = ref_next(st, u[i]);
    end
    return p;
  endfunction

  function automatic int sat_ext(int v);
    if (v > 127)  return 127;
    if (v < -127) return -127;
    return v;
  endfunction

  // One backward step: beta_k from beta_{k+1}.
  function automatic void bwd_step(ref int b[8], input int gs, input int lp);
    int nb[8];
    for (int s = 0; s < 8; s++) begin
      int c0, c1;
      c0 = b[ref_next(s, 0)] + (ref_par(s, 0) != 0 ? lp : 0);
      c1 = b[ref_next(s, 1)] + gs + (ref_par(s, 1) != 0 ? lp : 0);
      nb[s] = (c0 > c1) ? c0 : c1;
    end
    b = nb;
  endfunction

  // Windowed max-log-MAP SISO; returns the extrinsic value of each step.
  function automatic int_q ref_siso(int_q gs, int_q lp, int w);
    int k, nwin;
    int alpha[][8];
    int_q ext;
    int b[8];
    k = gs.size();
    nwin = (k + w - 1) / w;
    alpha = new[k + 1];
    for (int s = 0; s < 8; s++) alpha[0][s] = (s == 0) ? 0 : -256;
    for (int i = 0; i < k; i++) begin
      for (int s = 0; s < 8; s++) alpha[i+1][s] = -1000000;
      for (int s = 0; s < 8; s++)
        for (int u = 0; u < 2; u++) begin
          int c;
          c = alpha[i][s] + (u != 0 ? gs[i] : 0) + (ref_par(s, u) != 0 ? lp[i] : 0);
          if (c > alpha[i+1][ref_next(s, u)]) alpha[i+1][ref_next(s, u)] = c;
        end
    end
    for (int i = 0; i < k; i++) ext.push_back(0);
    for (int q = 0; q < nwin; q++) begin
      int st, en;
      st = q * w;
      en = ((q + 1) * w < k ? (q + 1) * w : k) - 1;
      for (int s = 0; s < 8; s++) b[s] = 0;
      if (q < nwin - 1) begin
        int en2;
        en2 = ((q + 2) * w < k ? (q + 2) * w : k) - 1;
        for (int i = en2; i >= (q + 1) * w; i--) bwd_step(b, gs[i], lp[i]);
      end
      for (int i = en; i >= st; i--) begin
        int m0, m1;
        m0 = -1000000; m1 = -1000000;
        for (int s = 0; s < 8; s++)
          for (int u = 0; u < 2; u++) begin
            int c;
            c = alpha[i][s] + b[ref_next(s, u)] + (ref_par(s, u) != 0 ? lp[i] : 0);
            if (u == 1 && c > m1) m1 = c;
            if (u == 0 && c > m0) m0 = c;
          end
        ext[i] = sat_ext(m1 - m0);
        bwd_step(b, gs[i], lp[i]);
      end
    end
    return ext;
  endfunction

  // Full turbo decoding; returns the a-posteriori value Ls + Le1 + Le2 per bit.
  function automatic int_q ref_turbo(int_q ls, int_q lp1, int_q lp2, int_q pi,
                                     int iters, int w);
    int k;
    int_q e1, e2, gs, x, post, lp2q;
    k = ls.size();
    for (int i = 0; i < k; i++) begin e1.push_back(0); e2.push_back(0); end
    for (int it = 0; it < iters; it++) begin
      gs.delete();
      for (int i = 0; i < k; i++) gs.push_back(ls[i] + e2[i]);
      e1 = ref_siso(gs, lp1, w);
      gs.delete();
      for (int i = 0; i < k; i++) gs.push_back(ls[pi[i]] + e1[pi[i]]);
      x = ref_siso(gs, lp2, w);
      for (int i = 0; i < k; i++) e2[pi[i]] = x[i];
    end
    for (int i = 0; i < k; i++) post.push_back(ls[i] + e1[i] + e2[i]);
    return post;
  endfunction

endpackage
