// turbo_ref_pkg: reference models for the turbo codec testbenches.
//
// Plain integer models, written independently of the RTL structure:
//   ref_next / ref_par   - UMTS constituent code trellis from its polynomials
//   ref_pi               - collision-free interleaver built from the matrix
//                          description (rows = banks, groups of P columns, each
//                          column read with a cyclic shift equal to its index)
//   ref_encode           - rate-1/3 turbo encoder
//   ref_siso             - max-log-MAP window decoder with the RTL's fixed-point
//                          rules (max normalisation, saturation widths)
//   ref_decode           - the whole parallel-window decoding schedule
package turbo_ref_pkg;

  localparam int SM_W  = 12;
  localparam int EXT_W = 8;
  localparam int NEG   = -(1 << 18);

  function automatic int sat(int v, int w);
    int hi, lo;
    hi = (1 << (w - 1)) - 1;
    lo = -(1 << (w - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  // state: bit0 = most recent register (D), bit2 = oldest (D^3)
  function automatic int ref_next(int s, int u);
    int a;
    a = u ^ ((s >> 1) & 1) ^ ((s >> 2) & 1);      // 1 + D^2 + D^3 feedback
    return ((s << 1) | a) & 7;
  endfunction

  function automatic int ref_par(int s, int u);
    int a;
    a = u ^ ((s >> 1) & 1) ^ ((s >> 2) & 1);
    return a ^ (s & 1) ^ ((s >> 2) & 1);          // 1 + D + D^3 feedforward
  endfunction

  // Interleaver: original position of interleaved position j, block P*L.
  function automatic int ref_pi(int j, int P, int L);
    int M [][];
    int seq [$];
    M = new[P];
    foreach (M[r]) begin
      M[r] = new[L];
      foreach (M[r][c]) M[r][c] = r * L + c;       // written row by row
    end
    // Window k, step t: group g = t / P of P columns; inside the group the
    // k-th column is read top to bottom after a cyclic shift by k rows.
    for (int k = 0; k < P; k++)
      for (int t = 0; t < L; t++) begin
        int g, r;
        g = t / P;
        r = t % P;
        seq.push_back(M[(r - k + P) % P][g * P + k]);
      end
    return seq[j];
  endfunction

  function automatic void ref_pi_table(input int P, input int L, output int tab[]);
    tab = new[P * L];
    foreach (tab[j]) tab[j] = ref_pi(j, P, L);
  endfunction

  function automatic void ref_encode(input bit u[], input int P, input int L,
                                     output bit s[], output bit c1[], output bit c2[]);
    int n, st1, st2, ui;
    n = P * L;
    s = new[n]; c1 = new[n]; c2 = new[n];
    st1 = 0; st2 = 0;
    for (int j = 0; j < n; j++) begin
      s[j]  = u[j];
      c1[j] = bit'(ref_par(st1, int'(u[j])));
      st1   = ref_next(st1, int'(u[j]));
      ui    = int'(u[ref_pi(j, P, L)]);
      c2[j] = bit'(ref_par(st2, ui));
      st2   = ref_next(st2, ui);
    end
  endfunction

  function automatic void ref_siso(input int L, input bit known,
                                   input int sys[], input int par[], input int apr[],
                                   output int ext[], output bit hard[]);
    int al [][8];
    int be [8], nb [8], na [8];
    int lu, g, mx, m1, m0, c, llr;
    al = new[L + 1];
    ext = new[L]; hard = new[L];
    for (int s = 0; s < 8; s++) al[0][s] = (known && s != 0) ? -(1 << (SM_W - 2)) : 0;
    for (int t = 0; t < L; t++) begin
      lu = sys[t] + apr[t];
      for (int s = 0; s < 8; s++) na[s] = NEG;
      for (int s = 0; s < 8; s++)
        for (int u = 0; u < 2; u++) begin
          g = u * lu + ref_par(s, u) * par[t];
          c = al[t][s] + g;
          if (c > na[ref_next(s, u)]) na[ref_next(s, u)] = c;
        end
      mx = na[0];
      for (int s = 1; s < 8; s++) if (na[s] > mx) mx = na[s];
      for (int s = 0; s < 8; s++) al[t + 1][s] = sat(na[s] - mx, SM_W);
    end
    for (int s = 0; s < 8; s++) be[s] = 0;
    for (int t = L - 1; t >= 0; t--) begin
      lu = sys[t] + apr[t];
      m1 = NEG; m0 = NEG;
      for (int s = 0; s < 8; s++) begin
        nb[s] = NEG;
        for (int u = 0; u < 2; u++) begin
          g = u * lu + ref_par(s, u) * par[t] + be[ref_next(s, u)];
          if (g > nb[s]) nb[s] = g;
          c = al[t][s] + g;
          if (u == 1) m1 = (c > m1) ? c : m1;
          else        m0 = (c > m0) ? c : m0;
        end
      end
      llr     = m1 - m0;
      ext[t]  = sat(llr - lu, EXT_W);
      hard[t] = (llr > 0);
      mx = nb[0];
      for (int s = 1; s < 8; s++) if (nb[s] > mx) mx = nb[s];
      for (int s = 0; s < 8; s++) be[s] = sat(nb[s] - mx, SM_W);
    end
  endfunction

  // Full decoder: ys/y1p in natural order, y2p in interleaved order.
  function automatic void ref_decode(input int P, input int L, input int iters,
                                     input int ys[], input int y1p[], input int y2p[],
                                     output bit dec[]);
    int n;
    int extm [];
    int sy [], py [], ap [], ex [];
    int pt [];
    bit hd [];
    n = P * L;
    ref_pi_table(P, L, pt);
    extm = new[n];
    dec  = new[n];
    foreach (extm[i]) extm[i] = 0;
    sy = new[L]; py = new[L]; ap = new[L];
    for (int it = 0; it < iters; it++) begin
      for (int half = 0; half < 2; half++) begin
        int upd [];
        bit hup [];
        upd = new[n]; hup = new[n];
        for (int k = 0; k < P; k++) begin
          for (int t = 0; t < L; t++) begin
            int j, o;
            j = k * L + t;
            o = (half == 0) ? j : pt[j];
            sy[t] = ys[o];
            ap[t] = extm[o];
            py[t] = (half == 0) ? y1p[j] : y2p[j];
          end
          ref_siso(L, k == 0, sy, py, ap, ex, hd);
          for (int t = 0; t < L; t++) begin
            int j, o;
            j = k * L + t;
            o = (half == 0) ? j : pt[j];
            upd[o] = ex[t];
            hup[o] = hd[t];
          end
        end
        extm = upd;
        if (half == 1) dec = hup;
      end
    end
  endfunction

endpackage
