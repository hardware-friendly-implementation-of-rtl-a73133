// Test harness: one sid_decoder configured for a given code, driven with
// random noisy words and with constructed worst-case words, and checked
// against the reference model.
//
// A worst-case word makes the n - w most reliable positions the zeros of a
// codeword of weight w (searched among the rows of G and sums of two and three
// rows); those positions hold no information set, so stage 2 has to inspect
// n - w + 1 columns. When w equals DMIN this is the bound n - DMIN + 1 and the
// latency is the worst case 2n - DMIN + k + 4. For every word the harness checks
// the decoded codeword, distance, winning candidate, inspected columns and the
// latency n + g + k + 3; it reports the smallest and largest latency seen and
// raises done when all words are out. Instantiated by tb_sid_codes.
module sid_code_harness #(
  parameter int N    = 7,
  parameter int K    = 4,
  parameter int DMIN = 3,
  parameter sid_pkg::gmat_t G = sid_pkg::cyclic_generator(sid_pkg::qr_poly(7), 7, 1'b0),
  parameter int NW   = 200
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   lat_min,
  output int   lat_max,
  output int   worst_g
);
  import sid_ref_pkg::*;

  localparam int Q  = 3;
  localparam int IW = sid_pkg::idx_w(N);
  localparam int DW = $clog2(N * (2**Q - 1) + 1);
  typedef sid_ref #(N, K, Q) ref_t;

  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic [Q-1:0] in_sym = '0;
  logic [N-1:0] out_cw;
  logic [K-1:0] out_msg;
  logic [DW-1:0] out_dist;
  logic [IW:0] out_ncols;
  logic [$clog2(K+1)-1:0] out_cand;

  sid_decoder #(.N(N), .K(K), .DMIN(DMIN), .QBITS(Q), .G(G)) dut (.*);

  ref_t::row_t g [K];
  typedef struct { ref_t::row_t cw; int unsigned sd; int ncols, cand; } exp_t;
  exp_t expq [$];
  ref_t::lvl_t words [$];
  longint starts [$];
  longint cyc = 0;
  int nsym = 0, nout = 0;
  ref_t::row_t low_cw;
  int low_w;

  initial begin
    done = 0; checks = 0; failures = 0;
    lat_min = 1 << 30; lat_max = 0; worst_g = 0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL (%0d,%0d) %s", N, K, what);
    end
  endtask

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      if (nsym % N == 0) starts.push_back(cyc);
      nsym++;
    end
    if (out_valid && out_ready) begin
      exp_t e;
      int lat;
      e = expq.pop_front();
      lat = int'(cyc - starts.pop_front());
      check(out_cw == e.cw && out_dist == DW'(e.sd) && int'(out_cand) == e.cand,
            $sformatf("word %0d result", nout));
      check(int'(out_ncols) == e.ncols, $sformatf("word %0d columns %0d expected %0d", nout, out_ncols, e.ncols));
      check(lat == N + e.ncols + K + 3, $sformatf("word %0d latency %0d", nout, lat));
      check(lat >= N + 2*K + 3 && lat <= 2*N - DMIN + K + 4, $sformatf("word %0d latency bounds", nout));
      if (lat < lat_min) lat_min = lat;
      if (lat > lat_max) lat_max = lat;
      if (e.ncols > worst_g) worst_g = e.ncols;
      nout++;
    end
  end

  function automatic int weight(input ref_t::row_t c);
    return $countones(c);
  endfunction

  task automatic push(input ref_t::lvl_t x);
    exp_t e;
    e.cw = ref_t::decode(g, x, e.ncols, e.sd, e.cand);
    words.push_back(x);
    expq.push_back(e);
  endtask

  initial begin
    for (int i = 0; i < K; i++) g[i] = G[i][N-1:0];
    // lowest-weight codeword among rows, pairs and triples of rows
    low_w = N + 1;
    for (int a = 0; a < K; a++)
      for (int b = a; b < K; b++)
        for (int c = b; c < K; c++) begin
          ref_t::row_t v;
          v = g[a];
          if (b != a) v ^= g[b];
          if (c != b) v ^= g[c];
          if (v != '0 && weight(v) < low_w) begin low_w = weight(v); low_cw = v; end
        end
    for (int w = 0; w < NW; w++) begin
      bit [K-1:0] u;
      ref_t::row_t tx;
      ref_t::lvl_t x;
      for (int i = 0; i < K; i++) u[i] = 1'($urandom);
      tx = ref_t::encode(g, u);
      if (w % 4 == 3) begin
        // worst case: strong levels on the zeros of low_cw, weak on its ones,
        // hard decisions those of tx
        for (int b = 0; b < N; b++)
          x[b] = low_cw[b] ? (tx[b] ? Q'(4) : Q'(3)) : (tx[b] ? Q'(7) : Q'(0));
      end else
        ref_t::channel(tx, w % 5, x);
      push(x);
    end
    @(posedge rst_n);
    @(negedge clk);
    while (words.size() > 0) begin
      ref_t::lvl_t x;
      x = words.pop_front();
      for (int b = 0; b < N; b++) begin
        in_valid = 1;
        in_sym   = Q'(x[b]);
        #1;
        while (!in_ready) begin @(negedge clk); #1; end
        @(negedge clk);
      end
    end
    in_valid = 0;
    while (nout < NW) @(negedge clk);
    check(low_w != DMIN || worst_g == N - DMIN + 1,
          $sformatf("worst case reached %0d columns, bound %0d", worst_g, N - DMIN + 1));
    check(lat_min == N + 2*K + 3, $sformatf("best latency %0d, eq. (8) gives %0d", lat_min, N + 2*K + 3));
    $display("code (%0d,%0d,%0d): lowest weight found %0d, latency %0d..%0d (eqs. (8),(9): %0d..%0d), max columns %0d (bound %0d)",
             N, K, DMIN, low_w, lat_min, lat_max, N + 2*K + 3, 2*N - DMIN + K + 4, worst_g, N - DMIN + 1);
    done = 1;
  end
endmodule
