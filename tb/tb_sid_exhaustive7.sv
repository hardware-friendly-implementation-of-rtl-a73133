// Exhaustive test of the decoder for the (7,4,3) Hamming code: all 2^21
// received words of seven 3-bit levels are decoded back to back, word v
// carrying level (v >> 3b) & 7 at position b, and every result (codeword,
// distance, winning candidate, columns inspected, latency n + g + k + 3) is
// compared with the reference model. The stimulus is a synchronous counter, so
// a new word starts every 7 cycles. At the end the testbench also reports how
// often the k+1 = 5 candidates gave the maximum-likelihood codeword (the
// smallest soft distance over all 16 codewords); that figure is informative
// and not checked.
module tb_sid_exhaustive7;
  import sid_ref_pkg::*;

  localparam int N = 7, K = 4, DMIN = 3, Q = 3;
  localparam int NWORDS = 1 << (N * Q);
  localparam int IW = sid_pkg::idx_w(N);
  localparam int DW = $clog2(N * (2**Q - 1) + 1);
  localparam sid_pkg::gmat_t GM = sid_pkg::cyclic_generator(sid_pkg::qr_poly(7), 7, 1'b0);
  typedef sid_ref #(N, K, Q) ref_t;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready = 1;
  logic [Q-1:0] in_sym;
  logic [N-1:0] out_cw;
  logic [K-1:0] out_msg;
  logic [DW-1:0] out_dist;
  logic [IW:0] out_ncols;
  logic [$clog2(K+1)-1:0] out_cand;

  sid_decoder #(.N(N), .K(K), .DMIN(DMIN), .QBITS(Q), .G(GM)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, ml_agree = 0;
  int unsigned word = 0, oword = 0;
  int sym = 0;
  longint cyc = 0;
  longint starts [$];
  ref_t::row_t g [K];
  ref_t::row_t allcw [1 << K];

  assign in_valid = rst_n && (word < NWORDS);
  assign in_sym   = Q'(word >> (Q * sym));

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid && in_ready) begin
      if (sym == 0) starts.push_back(cyc);
      if (sym == N - 1) begin
        sym  <= 0;
        word <= word + 1;
      end else
        sym <= sym + 1;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (out_valid && out_ready) begin
    ref_t::lvl_t x;
    ref_t::row_t cw;
    int unsigned sd, best;
    int ncols, cand;
    longint lat;
    for (int b = 0; b < N; b++) x[b] = Q'(oword >> (Q * b));
    cw = ref_t::decode(g, x, ncols, sd, cand);
    lat = cyc - starts.pop_front();
    check(out_cw == cw && out_dist == DW'(sd) && int'(out_cand) == cand && int'(out_ncols) == ncols,
          $sformatf("word %0h result %h expected %h", oword, out_cw, cw));
    check(lat == longint'(N + ncols + K + 3), $sformatf("word %0h latency %0d", oword, lat));
    best = sd;
    for (int m = 0; m < (1 << K); m++) if (ref_t::sdist(allcw[m], x) < best) best = ref_t::sdist(allcw[m], x);
    if (best == sd) ml_agree++;
    oword <= oword + 1;
  end

  initial begin
    for (int i = 0; i < K; i++) g[i] = GM[i][N-1:0];
    for (int m = 0; m < (1 << K); m++) allcw[m] = ref_t::encode(g, K'(m));
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (oword == NWORDS);
    $display("all %0d words decoded; the result had the maximum-likelihood distance for %0d of them",
             NWORDS, ml_agree);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * (7 * NWORDS + 1000));
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
