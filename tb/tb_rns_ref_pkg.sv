// tb_rns_ref_pkg: reference arithmetic for the RNS testbenches, written
// independently of the design: brute-force primitive roots, discrete
// logarithms by exhaustive search, and plain integer modular arithmetic.
package tb_rns_ref_pkg;

  function automatic int ref_pow(int q, int w, int m);
    int r = 1;
    for (int i = 0; i < w; i++) r = (r * q) % m;
    return r;
  endfunction

  // smallest q whose powers q^1 .. q^(m-1) hit every non-zero residue
  function automatic int ref_root(int m);
    for (int q = 2; q < m; q++) begin
      bit seen [64];
      int cnt = 0;
      for (int i = 0; i < 64; i++) seen[i] = 0;
      for (int w = 0; w < m - 1; w++) begin
        int v = ref_pow(q, w, m);
        if (!seen[v]) cnt++;
        seen[v] = 1;
      end
      if (cnt == m - 1) return q;
    end
    return -1;
  endfunction

  // index of the non-zero residue r: the w in [0, m-2] with q^w = r
  function automatic int ref_log(int m, int r);
    int q = ref_root(m);
    for (int w = 0; w < m - 1; w++) if (ref_pow(q, w, m) == r) return w;
    return -1;
  endfunction

  function automatic int ceil_log2(int v);
    int k = 0;
    while ((1 << k) < v) k++;
    return k;
  endfunction

endpackage
