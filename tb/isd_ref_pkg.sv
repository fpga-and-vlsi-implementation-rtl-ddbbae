// isd_ref_pkg: reference model of the C(7,4) information-set decoder, written
// for the testbenches independently of the RTL (brute force where the RTL uses
// elimination). Codewords and rows are N-bit vectors with bit i = position i.
package isd_ref_pkg;

  localparam int N = 7;
  localparam int K = 4;

  typedef int unsigned uint_t;
  typedef int          idx_arr_t [N];
  typedef int          is_arr_t  [K];

  // Generator matrix as printed, position 0 first.
  localparam string G_TEXT [K] = '{"1000110", "0100011", "0010111", "0001101"};

  function automatic logic [N-1:0] g_row(int m);
    logic [N-1:0] v;
    for (int i = 0; i < N; i++) v[i] = (G_TEXT[m][i] == "1");
    return v;
  endfunction

  function automatic logic [N-1:0] encode(logic [K-1:0] u);
    logic [N-1:0] c = '0;
    for (int m = 0; m < K; m++) if (u[m]) c ^= g_row(m);
    return c;
  endfunction

  function automatic int reliability(int q);
    return (q >= 4) ? q - 4 : 3 - q;
  endfunction

  // Sort positions by decreasing reliability; equal levels: higher index first.
  function automatic idx_arr_t ref_sort(int q [N]);
    idx_arr_t s;
    bit used [N];
    for (int i = 0; i < N; i++) used[i] = 0;
    for (int o = 0; o < N; o++) begin
      int best = -1;
      for (int i = 0; i < N; i++) begin
        if (used[i]) continue;
        if (best < 0 || reliability(q[i]) > reliability(q[best]) ||
            (reliability(q[i]) == reliability(q[best]) && i > best)) best = i;
      end
      s[o] = best;
      used[best] = 1;
    end
    return s;
  endfunction

  // Column p of G as a K-bit vector.
  function automatic logic [K-1:0] g_col(int p);
    logic [K-1:0] c;
    for (int m = 0; m < K; m++) c[m] = g_row(m)[p];
    return c;
  endfunction

  // Greedy most reliable independent set; also reports whether the first K
  // entries of s were already independent.
  function automatic is_arr_t ref_is(idx_arr_t s, output bit first_ok);
    is_arr_t is;
    int cnt = 0;
    for (int t = 0; t < N && cnt < K; t++) begin
      bit dep = 0;
      for (int sub = 0; sub < (1 << cnt); sub++) begin
        logic [K-1:0] x = '0;
        for (int b = 0; b < cnt; b++) if (sub[b]) x ^= g_col(is[b]);
        if (x == g_col(s[t])) dep = 1;
      end
      if (!dep) begin
        is[cnt] = s[t];
        cnt++;
      end
      if (t == K - 1) first_ok = (cnt == K);
    end
    return is;
  endfunction

  // The codeword whose IS positions carry the bits of pat.
  function automatic logic [N-1:0] ref_cw_on_is(is_arr_t is, logic [K-1:0] pat);
    for (int u = 0; u < (1 << K); u++) begin
      logic [N-1:0] c = encode(K'(u));
      bit ok = 1;
      for (int j = 0; j < K; j++) if (c[is[j]] != pat[j]) ok = 0;
      if (ok) return c;
    end
    return '1;
  endfunction

  function automatic int ref_soft(logic [N-1:0] c, int q [N]);
    int d = 0;
    for (int i = 0; i < N; i++) d += c[i] ? (7 - q[i]) : q[i];
    return d;
  endfunction

endpackage
