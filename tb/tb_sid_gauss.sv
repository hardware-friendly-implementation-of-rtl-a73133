// Testbench of sid_gauss with the (48,24,12) generator matrix.
//
// Feeds random column orders, half of them built to put dependent columns
// early (the columns of a zero-weight stretch of a low-weight codeword first),
// and checks against the reference reduction: Gr, Gr0, the selected columns,
// the number of columns inspected g, and that the stage takes exactly g cycles.
// Independently of the model it also checks that every selected column of Gr
// is a unit vector and that every row of Gr is a codeword (zero syndrome under
// the parity part of the systematic G).
module tb_sid_gauss;
  import sid_ref_pkg::*;

  localparam int N = 48, K = 24, Q = 3, DMIN = 12;
  localparam int IW = sid_pkg::idx_w(N);
  localparam int NW = 400;
  typedef sid_ref #(N, K, Q) ref_t;
  localparam sid_pkg::gmat_t GM = sid_pkg::qr_generator(47);

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic [N-1:0][IW-1:0] in_perm = '0;
  logic [N-1:0][Q-1:0] in_x = '0, out_x;
  logic [N-1:0] in_r = '0, out_r, out_sel;
  logic [K-1:0][N-1:0] out_gr, out_gr0;
  logic [IW:0] out_ncols;

  sid_gauss #(.N(N), .K(K), .QBITS(Q), .G(GM)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0, nout = 0, skips = 0, maxg = 0, held = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  ref_t::row_t g [K];
  typedef struct { int perm [N]; longint t0; bit [N-1:0] r; } job_t;
  job_t jobs [$];

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
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // A codeword c is valid when its parity part equals the parity of its
  // systematic part: c[K..N-1] == sum of rows selected by c[0..K-1].
  function automatic bit is_codeword(input ref_t::row_t c);
    ref_t::row_t s;
    s = ref_t::encode(g, c[K-1:0]);
    return s == c;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      job_t j;
      for (int i = 0; i < N; i++) j.perm[i] = int'(in_perm[i]);
      j.t0 = cyc;
      j.r  = in_r;
      jobs.push_back(j);
    end
    if (out_valid && !out_ready && in_valid) held++;
    if (out_valid && out_ready) begin
      job_t j;
      ref_t::row_t gr [K];
      int pivcol [K];
      int ng;
      bit ok_gr, ok_unit, ok_cw;
      bit [N-1:0] sel;
      j  = jobs.pop_front();
      ng = ref_t::reduce(g, j.perm, gr, pivcol);
      sel = '0;
      for (int i = 0; i < K; i++) sel[pivcol[i]] = 1'b1;
      ok_gr = 1; ok_unit = 1; ok_cw = 1;
      for (int i = 0; i < K; i++) begin
        if (out_gr[i] != gr[i]) ok_gr = 0;
        if (out_gr0[i] != (gr[i] & sel)) ok_gr = 0;
        if (!is_codeword(out_gr[i])) ok_cw = 0;
      end
      for (int c = 0; c < N; c++) if (out_sel[c]) begin
        int ones;
        ones = 0;
        for (int i = 0; i < K; i++) ones += out_gr[i][c];
        if (ones != 1) ok_unit = 0;
      end
      check(ok_gr, $sformatf("job %0d Gr/Gr0", nout));
      check(out_sel == sel, $sformatf("job %0d selected columns", nout));
      check($countones(out_sel) == K, $sformatf("job %0d k columns selected", nout));
      check(ok_unit, $sformatf("job %0d unit columns", nout));
      check(ok_cw, $sformatf("job %0d rows are codewords", nout));
      check(int'(out_ncols) == ng, $sformatf("job %0d columns %0d expected %0d", nout, out_ncols, ng));
      check(ng >= K && ng <= N - DMIN + 1, $sformatf("job %0d bound", nout));
      check(out_r == j.r, $sformatf("job %0d hard decisions carried", nout));
      if (nout < NW / 2 - 2) check(cyc - j.t0 == longint'(ng), $sformatf("job %0d took %0d cycles, g=%0d", nout, cyc - j.t0, ng));
      if (ng > K) skips++;
      if (ng > maxg) maxg = ng;
      nout++;
    end
  end

  task automatic send_job(input int w);
    int p [N];
    for (int i = 0; i < N; i++) p[i] = i;
    // Fisher-Yates shuffle
    for (int i = N - 1; i > 0; i--) begin
      int jx, t;
      jx = $urandom_range(i);
      t = p[i]; p[i] = p[jx]; p[jx] = t;
    end
    if (w % 2 == 1) begin
      // Put the zero positions of a minimum-weight-ish codeword first: the
      // first columns then contain no information set.
      ref_t::row_t c;
      int t;
      c = g[$urandom_range(K - 1)] ^ g[$urandom_range(K - 1)];
      t = 0;
      for (int i = 0; i < N; i++) if (!c[i]) begin p[t] = i; t++; end
      for (int i = 0; i < N; i++) if (c[i])  begin p[t] = i; t++; end
    end
    for (int i = 0; i < N; i++) in_perm[i] <= IW'(p[i]);
    in_r     = {$urandom, $urandom};
    in_x     = {$urandom, $urandom, $urandom, $urandom, $urandom};
    in_valid = 1;
    if (w == NW / 2) bp_on = 1;
    wait_accept();
    in_valid = 0;
  endtask

  initial begin
    for (int i = 0; i < K; i++) g[i] = GM[i][N-1:0];
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int w = 0; w < NW; w++) send_job(w);
    while (nout < NW) @(negedge clk);
    $display("skips=%0d max_g=%0d", skips, maxg);
    check(skips > 0, "dependent columns skipped");
    check(maxg > K + 3, "long searches occurred");
    check(held > 0, "next word held back by output backpressure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Random output backpressure in the second half.
  bit bp_on = 0;
  always @(negedge clk) if (bp_on) out_ready <= 1'($urandom);

  initial begin
    #(10 * 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
