// Shared constants, types and constant functions of the soft information set
// decoder.
//
// A generator matrix is passed between modules as a gmat_t: a fixed container
// of MAXK rows by MAXN columns. Row i of the code's k x n matrix G is
// g[i][n-1:0]; column j of G is bit j of every row. Rows at or above k and
// columns at or above n are zero and ignored. The container is sized for the
// largest code the decoder is evaluated with, (78,39).
//
// qr_generator(p) builds the generator matrix of the extended binary quadratic
// residue code of prime length p+1 (p = 8m-1): (8,4,4) for p = 7, the extended
// Golay (24,12,8) code for p = 23 and the (48,24,12) code for p = 47. The
// cyclic QR code of length p is generated by g(x) = gcd(e(x), x^p + 1), where
// the idempotent e(x) is the sum of x^q over the quadratic residues q mod p;
// its dimension is p - deg g = (p+1)/2. Rows are the first k shifts of g(x), an
// overall parity column is appended at position p, and Gauss-Jordan elimination
// on columns 0..k-1 (any k consecutive positions of a cyclic code are an
// information set) brings the matrix to the systematic form [I | P].
// cyclic_generator(gpoly, n, ext) does the same for any cyclic code given its
// generator polynomial, with ext = 0 leaving the code unextended.
package sid_pkg;

  localparam int MAXN = 80;
  localparam int MAXK = 40;

  typedef logic [MAXK-1:0][MAXN-1:0] gmat_t;

  // Systematic generator matrix of the cyclic code of length n generated by
  // gpoly (bit i = coefficient of x^i), optionally extended by a parity column.
  function automatic gmat_t cyclic_generator(input logic [MAXN:0] gpoly,
                                             input int n, input bit ext);
    gmat_t g;
    int    deg, k;
    logic [MAXN-1:0] tmp;
    deg = 0;
    for (int i = 0; i <= MAXN; i++) if (gpoly[i]) deg = i;
    k = n - deg;
    g = '0;
    for (int i = 0; i < k; i++) begin
      tmp = '0;
      for (int j = 0; j <= deg; j++) tmp[i+j] = gpoly[j];
      if (ext) tmp[n] = ^tmp;
      g[i] = tmp;
    end
    // Gauss-Jordan on columns 0..k-1.
    for (int c = 0; c < k; c++) begin
      int piv;
      piv = -1;
      for (int r = c; r < k; r++) if (piv < 0 && g[r][c]) piv = r;
      if (piv >= 0) begin
        tmp = g[piv]; g[piv] = g[c]; g[c] = tmp;
        for (int r = 0; r < k; r++) if (r != c && g[r][c]) g[r] = g[r] ^ g[c];
      end
    end
    return g;
  endfunction

  // Remainder of a(x) divided by b(x) over GF(2).
  function automatic logic [MAXN:0] poly_mod(input logic [MAXN:0] a,
                                             input logic [MAXN:0] b);
    int db;
    db = 0;
    for (int i = 0; i <= MAXN; i++) if (b[i]) db = i;
    for (int d = MAXN; d >= 0; d--) begin
      if (d >= db && a[d]) a = a ^ (b << (d - db));
    end
    return a;
  endfunction

  // Generator polynomial of the binary QR code of prime length p.
  function automatic logic [MAXN:0] qr_poly(input int p);
    logic [MAXN:0] a, b, t;
    a = '0;
    for (int i = 1; i < p; i++) a[(i * i) % p] = 1'b1;
    b = '0;
    b[0] = 1'b1;
    b[p] = 1'b1;
    while (b != '0) begin
      t = poly_mod(a, b);
      a = b;
      b = t;
    end
    return a;
  endfunction

  function automatic gmat_t qr_generator(input int p);
    return cyclic_generator(qr_poly(p), p, 1'b1);
  endfunction

  // Index width for n columns.
  function automatic int idx_w(input int n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

endpackage
