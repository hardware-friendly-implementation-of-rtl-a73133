// Reference model of the soft information set decoder, for the testbenches.
//
// sid_ref #(N, K, Q) holds static functions that compute, word by word and
// with plain procedural code, what each pipeline stage must produce: the
// hard decisions and the reliability order (a stable selection sort on the
// distance |2x - L| of each level from mid-scale), the Gauss-Jordan reduction
// in that order with the lowest free row as pivot, the k+1 order-1 candidate
// messages read directly at the pivot columns, their re-encoding and the
// soft distance. It also has helpers to build channel words.
package sid_ref_pkg;

  class sid_ref #(int N = 48, int K = 24, int Q = 3);

    typedef bit [N-1:0] row_t;
    typedef bit [N-1:0][Q-1:0] lvl_t;

    static function int unsigned lmax();
      return (1 << Q) - 1;
    endfunction

    static function int unsigned reliab(bit [Q-1:0] x);
      int d;
      d = 2 * int'(x) - int'(lmax());
      return (d < 0) ? -d : d;
    endfunction

    // Column order, most reliable first; equal reliabilities keep index order.
    static function void order(input lvl_t x, output int perm [N]);
      bit taken [N];
      for (int i = 0; i < N; i++) taken[i] = 0;
      for (int t = 0; t < N; t++) begin
        int best;
        best = -1;
        for (int i = 0; i < N; i++)
          if (!taken[i] && (best < 0 || reliab(x[i]) > reliab(x[best]))) best = i;
        perm[t]     = best;
        taken[best] = 1;
      end
    endfunction

    // Reduction of g in the order perm. Returns the number of columns inspected.
    static function int reduce(input row_t g [K], input int perm [N],
                               output row_t gr [K], output int pivcol [K]);
      bit used [K];
      int npiv, t;
      for (int i = 0; i < K; i++) begin gr[i] = g[i]; used[i] = 0; pivcol[i] = -1; end
      npiv = 0;
      t = 0;
      while (npiv < K && t < N) begin
        int c, p;
        c = perm[t];
        p = -1;
        for (int i = 0; i < K; i++) if (p < 0 && !used[i] && gr[i][c]) p = i;
        if (p >= 0) begin
          for (int i = 0; i < K; i++) if (i != p && gr[i][c]) gr[i] ^= gr[p];
          used[p] = 1;
          pivcol[p] = c;
          npiv++;
        end
        t++;
      end
      return t;
    endfunction

    static function row_t encode(input row_t g [K], input bit [K-1:0] u);
      row_t c;
      c = '0;
      for (int i = 0; i < K; i++) if (u[i]) c ^= g[i];
      return c;
    endfunction

    static function int unsigned sdist(input row_t c, input lvl_t x);
      int unsigned d;
      d = 0;
      for (int b = 0; b < N; b++) d += c[b] ? (lmax() - x[b]) : x[b];
      return d;
    endfunction

    // Whole decoder. Returns the winning codeword.
    static function row_t decode(input row_t g [K], input lvl_t x,
                                 output int ncols, output int unsigned sd,
                                 output int cand);
      int   perm [N];
      int   pivcol [K];
      row_t gr [K];
      bit [K-1:0] u0, u;
      row_t best, c;
      order(x, perm);
      ncols = reduce(g, perm, gr, pivcol);
      for (int i = 0; i < K; i++) u0[i] = (x[pivcol[i]] > lmax() / 2);
      for (int j = 0; j <= K; j++) begin
        u = u0;
        if (j > 0) u[j-1] = !u[j-1];
        c = encode(gr, u);
        if (j == 0 || sdist(c, x) < sd) begin
          best = c;
          sd = sdist(c, x);
          cand = j;
        end
      end
      return best;
    endfunction

    // Channel: level of a code bit plus roughly Gaussian noise (a sum of four
    // uniforms, spread = noise amplitude in levels), clipped to 0..L.
    static function void channel(input row_t c, input int spread, output lvl_t x);
      for (int b = 0; b < N; b++) begin
        int v, n;
        n = 0;
        if (spread > 0)
          for (int s = 0; s < 4; s++) n += int'($urandom_range(2 * spread)) - spread;
        v = (c[b] ? int'(lmax()) : 0) + n / 2;
        if (v < 0) v = 0;
        if (v > int'(lmax())) v = int'(lmax());
        x[b] = Q'(v);
      end
    endfunction

  endclass

endpackage
