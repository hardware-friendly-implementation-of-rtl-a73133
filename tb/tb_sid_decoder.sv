// End-to-end testbench of sid_decoder at its default parameters, the
// extended QR (48,24,12) code with 3-bit levels.
//
// Random messages are encoded with G, sent through a noisy channel of varying
// strength and fed to the decoder one symbol per cycle. Every decoded word is
// compared with the reference model (codeword, soft distance, winning
// candidate, columns inspected). Phase 1 streams words back to back with the
// output always ready and checks the exact latency n + g + k + 3 and its bounds
// n + 2k + 3 and 2n - dmin + k + 4, and that a word enters every n cycles.
// Phase 2 adds input gaps and output backpressure long enough to stall the
// whole pipeline back to the input. The testbench counts how often each
// mechanism occurred (dependent-column skips, an information set found in the
// first k columns, a flipped candidate winning, channel errors corrected,
// input stall, output stall, several words in flight) and fails a mechanism
// that never did.
module tb_sid_decoder;
  import sid_ref_pkg::*;

  localparam int N = 48, K = 24, DMIN = 12, Q = 3;
  localparam int IW = sid_pkg::idx_w(N);
  localparam int DW = $clog2(N * (2**Q - 1) + 1);
  localparam int W1 = 150, W2 = 150;
  typedef sid_ref #(N, K, Q) ref_t;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic [Q-1:0] in_sym = '0;
  logic [N-1:0] out_cw;
  logic [K-1:0] out_msg;
  logic [DW-1:0] out_dist;
  logic [IW:0] out_ncols;
  logic [$clog2(K+1)-1:0] out_cand;

  sid_decoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  ref_t::row_t g [K];
  sid_pkg::gmat_t gm = sid_pkg::qr_generator(47);

  typedef struct {
    ref_t::row_t cw, tx, hard;
    int unsigned sd;
    int ncols, cand;
  } exp_t;
  exp_t expq [$];
  ref_t::lvl_t words [$];
  longint starts [$];
  int nsym = 0, nout = 0;
  bit phase2 = 0;
  longint last_start = -1;

  // mechanism counters
  int m_skip = 0, m_first = 0, m_flip = 0, m_corr = 0, m_install = 0,
      m_outstall = 0, m_overlap = 0, max_cols = 0;

  // Called just after a negedge with the inputs driven: returns at the
  // negedge after the edge that accepted them (in_ready only depends on state).
  task automatic wait_accept();
    #1;
    while (!in_ready) begin
      @(negedge clk);
      #1;
    end
    @(negedge clk);
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // Build one word: message, codeword, levels, expected result.
  task automatic make_word(input int spread);
    bit [K-1:0] u;
    ref_t::lvl_t x;
    exp_t e;
    for (int i = 0; i < K; i++) u[i] = 1'($urandom);
    e.tx = ref_t::encode(g, u);
    ref_t::channel(e.tx, spread, x);
    for (int b = 0; b < N; b++) e.hard[b] = (x[b] > ref_t::lmax() / 2);
    e.cw = ref_t::decode(g, x, e.ncols, e.sd, e.cand);
    words.push_back(x);
    expq.push_back(e);
  endtask

  // Monitor: first-symbol times, outputs, stalls.
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      if (nsym % N == 0) begin
        // Phase 1 words follow each other without a gap: one every n cycles.
        if (!phase2 && last_start >= 0)
          check(cyc - last_start == N, $sformatf("input interval %0d", cyc - last_start));
        last_start = cyc;
        starts.push_back(cyc);
      end
      nsym++;
    end
    if (in_valid && !in_ready) m_install++;
    if (out_valid && !out_ready) m_outstall++;
    if (in_valid && in_ready && dut.u_gauss.busy) m_overlap++;
    if (out_valid && out_ready) begin
      exp_t e;
      longint st, lat;
      e  = expq.pop_front();
      st = starts.pop_front();
      lat = cyc - st;
      check(out_cw == e.cw, $sformatf("word %0d codeword %h expected %h", nout, out_cw, e.cw));
      check(out_msg == e.cw[K-1:0], $sformatf("word %0d message", nout));
      check(out_dist == DW'(e.sd), $sformatf("word %0d distance %0d expected %0d", nout, out_dist, e.sd));
      check(int'(out_cand) == e.cand, $sformatf("word %0d candidate %0d expected %0d", nout, out_cand, e.cand));
      check(int'(out_ncols) == e.ncols, $sformatf("word %0d columns %0d expected %0d", nout, out_ncols, e.ncols));
      check(e.ncols >= K && e.ncols <= N - DMIN + 1, $sformatf("word %0d columns %0d out of range", nout, e.ncols));
      if (!phase2) begin
        check(lat == longint'(N + e.ncols + K + 3),
              $sformatf("word %0d latency %0d expected %0d", nout, lat, N + e.ncols + K + 3));
        check(lat >= N + 2*K + 3 && lat <= 2*N - DMIN + K + 4, $sformatf("word %0d latency bounds", nout));
      end
      if (e.ncols > K) m_skip++; else m_first++;
      if (e.ncols > max_cols) max_cols = e.ncols;
      if (e.cand != 0) m_flip++;
      if (e.hard != e.tx && e.cw == e.tx) m_corr++;
      nout++;
    end
  end

  task automatic send_all(input bit gaps);
    while (words.size() > 0) begin
      ref_t::lvl_t x;
      x = words.pop_front();
      for (int b = 0; b < N; b++) begin
        if (gaps && $urandom_range(9) == 0) begin
          in_valid = 0;
          repeat ($urandom_range(3) + 1) @(negedge clk);
        end
        in_valid = 1;
        in_sym   = Q'(x[b]);
        wait_accept();
      end
    end
    in_valid = 0;
  endtask

  initial begin
    for (int i = 0; i < K; i++) g[i] = gm[i][N-1:0];
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // Phase 1: back to back, output always ready.
    for (int w = 0; w < W1; w++) make_word(w % 5);
    send_all(0);
    while (nout < W1) @(negedge clk);
    // Phase 2: gaps and long output stalls.
    phase2 = 1;
    for (int w = 0; w < W2; w++) make_word(1 + w % 4);
    fork
      send_all(1);
      begin
        while (nout < W1 + W2) begin
          @(negedge clk);
          if ($urandom_range(199) == 0) out_ready <= 0;
          else if (!out_ready && $urandom_range(99) == 0) out_ready <= 1;
        end
      end
    join
    out_ready = 1;
    repeat (5) @(negedge clk);
    check(nout == W1 + W2, "all words decoded");
    $display("mechanisms: skip=%0d first_k=%0d max_cols=%0d flip_won=%0d corrected=%0d in_stall=%0d out_stall=%0d overlap=%0d",
             m_skip, m_first, max_cols, m_flip, m_corr, m_install, m_outstall, m_overlap);
    check(m_skip > 0, "dependent column skipped");
    check(m_first > 0, "information set in first k columns");
    check(m_flip > 0, "flipped candidate won");
    check(m_corr > 0, "channel errors corrected");
    check(m_install > 0, "input stalled");
    check(m_outstall > 0, "output stalled");
    check(m_overlap > 0, "words in flight together");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
