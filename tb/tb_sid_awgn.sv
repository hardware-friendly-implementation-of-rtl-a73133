// Workload testbench: the default (48,24,12) decoder on a Gaussian channel.
//
// Random messages are encoded, mapped to +1 (bit 1) / -1 (bit 0), disturbed by
// white Gaussian noise at a given Eb/N0 (rate k/n), and quantized to 3 bits
// with a step of 0.5 around zero, so that level 4 and above read as 1. Words
// are streamed back to back through the default sid_decoder at two noise
// levels. Every result is checked against the reference model, together with
// the latency n + g + k + 3 and the input spacing of one word every n cycles.
// The testbench prints, per noise level, the cumulative share of words whose
// information set was found within k, k+1, ... columns, the statistic behind
// the column-count plot of the original study, and the word error rates of the
// hard decisions and of the decoder. The column-count shares at k, k+1 and 30
// columns are checked against the values of that study, with a tolerance for
// the smaller sample; the error rates are reported, not checked.
module tb_sid_awgn;
  import sid_ref_pkg::*;

  localparam int N = 48, K = 24, DMIN = 12, Q = 3;
  localparam int IW = sid_pkg::idx_w(N);
  localparam int DW = $clog2(N * (2**Q - 1) + 1);
  localparam int NPER = 4000;
  localparam int NSNR = 2;
  localparam real EBN0_DB [NSNR] = '{2.0, 4.0};
  typedef sid_ref #(N, K, Q) ref_t;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready = 1;
  logic [Q-1:0] in_sym;
  logic [N-1:0] out_cw;
  logic [K-1:0] out_msg;
  logic [DW-1:0] out_dist;
  logic [IW:0] out_ncols;
  logic [$clog2(K+1)-1:0] out_cand;

  sid_decoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  sid_pkg::gmat_t gm = sid_pkg::qr_generator(47);
  ref_t::row_t g [K];

  typedef struct { ref_t::row_t tx, hard; ref_t::lvl_t x; } word_t;
  word_t words [NSNR * NPER];
  int hist [NSNR][N+1];
  int hard_err [NSNR], dec_err [NSNR];

  // synchronous stimulus: word index and symbol index
  int wi = 0, sym = 0, oi = 0;
  bit go = 0;
  longint starts [$];
  longint last_start = -1;
  assign in_valid = go && (wi < NSNR * NPER);
  assign in_sym   = words[wi < NSNR * NPER ? wi : 0].x[sym];

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid && in_ready) begin
      if (sym == 0) begin
        starts.push_back(cyc);
        if (last_start >= 0) check(cyc - last_start == N, "input spacing");
        last_start <= cyc;
      end
      if (sym == N - 1) begin sym <= 0; wi <= wi + 1; end
      else sym <= sym + 1;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // share of words at noise level s whose information set was found within c columns
  function automatic real pct(input int s, input int c);
    int cum;
    cum = 0;
    for (int i = 0; i <= c; i++) cum += hist[s][i];
    return 100.0 * cum / NPER;
  endfunction

  function automatic real gauss01();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967296.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * 3.14159265358979 * u2);
  endfunction

  always @(posedge clk) if (out_valid && out_ready) begin
    ref_t::row_t cw;
    int unsigned sd;
    int ncols, cand, s;
    longint lat;
    s = oi / NPER;
    cw = ref_t::decode(g, words[oi].x, ncols, sd, cand);
    lat = cyc - starts.pop_front();
    check(out_cw == cw && out_dist == DW'(sd) && int'(out_cand) == cand && int'(out_ncols) == ncols,
          $sformatf("word %0d result", oi));
    check(lat == longint'(N + ncols + K + 3), $sformatf("word %0d latency %0d", oi, lat));
    check(ncols >= K && ncols <= N - DMIN + 1, $sformatf("word %0d columns %0d", oi, ncols));
    hist[s][ncols]++;
    if (words[oi].hard != words[oi].tx) hard_err[s]++;
    if (out_cw != words[oi].tx) dec_err[s]++;
    oi <= oi + 1;
  end

  initial begin
    for (int i = 0; i < K; i++) g[i] = gm[i][N-1:0];
    for (int s = 0; s < NSNR; s++) begin
      real sigma;
      sigma = $sqrt(1.0 / (2.0 * (real'(K) / real'(N)) * (10.0 ** (EBN0_DB[s] / 10.0))));
      hard_err[s] = 0; dec_err[s] = 0;
      for (int c = 0; c <= N; c++) hist[s][c] = 0;
      for (int w = 0; w < NPER; w++) begin
        bit [K-1:0] u;
        word_t wd;
        for (int i = 0; i < K; i++) u[i] = 1'($urandom);
        wd.tx = ref_t::encode(g, u);
        for (int b = 0; b < N; b++) begin
          real y;
          int lv;
          y  = (wd.tx[b] ? 1.0 : -1.0) + sigma * gauss01();
          lv = int'($floor(y * 2.0)) + 4;
          if (lv < 0) lv = 0;
          if (lv > 7) lv = 7;
          wd.x[b]    = Q'(lv);
          wd.hard[b] = (lv >= 4);
        end
        words[s * NPER + w] = wd;
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    go = 1;
    wait (oi == NSNR * NPER);
    for (int s = 0; s < NSNR; s++) begin
      int cum;
      string line;
      cum = 0;
      line = "";
      for (int c = K; c <= N - DMIN + 1; c++) begin
        cum += hist[s][c];
        line = {line, $sformatf(" %0d:%0.1f%%", c, 100.0 * cum / NPER)};
      end
      $display("Eb/N0 %0.1f dB: information set found within columns%s", EBN0_DB[s], line);
      $display("Eb/N0 %0.1f dB: word errors, hard decisions %0d, decoder %0d, of %0d",
               EBN0_DB[s], hard_err[s], dec_err[s], NPER);
      check(dec_err[s] <= hard_err[s], "decoder no worse than hard decisions");
      // The original study reports 34 % of words with an information set in
      // the first k columns, 64.5 % within k+1 and 99.54 % within 30 columns;
      // allow for the smaller sample here.
      check(pct(s, K) > 30.0 && pct(s, K) < 38.0, $sformatf("share within k columns %0.1f%%", pct(s, K)));
      check(pct(s, K + 1) > 60.5 && pct(s, K + 1) < 68.5, $sformatf("share within k+1 columns %0.1f%%", pct(s, K + 1)));
      check(pct(s, 30) > 98.5, $sformatf("share within 30 columns %0.1f%%", pct(s, 30)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * (N * NSNR * NPER + 5000));
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
