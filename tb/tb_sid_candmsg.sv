// Testbench of sid_candmsg at N = 48, K = 24.
//
// Drives real stage-2 style inputs: Gr0 is a reduced (48,24) generator matrix
// with its unselected columns zeroed, built by the reference reduction from a
// random order. u0 is checked against the hard decisions at the pivot columns
// and every candidate against u0 with the expected bit flipped. Also checks the
// one-cycle register timing, carried data, and that the register holds its
// contents under backpressure.
module tb_sid_candmsg;
  import sid_ref_pkg::*;

  localparam int N = 48, K = 24, Q = 3;
  localparam int NW = 300;
  typedef sid_ref #(N, K, Q) ref_t;
  localparam sid_pkg::gmat_t GM = sid_pkg::qr_generator(47);

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic [K-1:0][N-1:0] in_gr = '0, in_gr0 = '0, out_gr;
  logic [N-1:0][Q-1:0] in_x = '0, out_x;
  logic [N-1:0] in_r = '0;
  logic [K:0][K-1:0] out_u;

  sid_candmsg #(.N(N), .K(K), .QBITS(Q)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0, nout = 0, held = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  ref_t::row_t g [K];
  typedef struct { bit [K-1:0] u0; logic [K-1:0][N-1:0] gr; logic [N-1:0][Q-1:0] x; longint t; } exp_t;
  exp_t expq [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (out_valid && !out_ready) held++;
    if (out_valid && out_ready) begin
      exp_t e;
      bit ok;
      e = expq.pop_front();
      check(out_u[0] == e.u0, $sformatf("word %0d u0 %h expected %h", nout, out_u[0], e.u0));
      ok = 1;
      for (int j = 1; j <= K; j++)
        if ((out_u[j] ^ e.u0) != (K'(1) << (j - 1))) ok = 0;
      check(ok, $sformatf("word %0d flipped candidates", nout));
      check(out_gr == e.gr && out_x == e.x, $sformatf("word %0d carried data", nout));
      if (nout < NW / 2 - 2) check(cyc - e.t == 1, $sformatf("word %0d latency", nout));
      nout++;
    end
  end

  bit bp_on = 0;
  always @(negedge clk) if (bp_on) out_ready <= 1'($urandom);

  initial begin
    for (int i = 0; i < K; i++) g[i] = GM[i][N-1:0];
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int w = 0; w < NW; w++) begin
      int perm [N];
      int pivcol [K];
      ref_t::row_t gr [K];
      ref_t::lvl_t x;
      bit [N-1:0] sel;
      exp_t e;
      if (w == NW / 2) bp_on = 1;
      for (int b = 0; b < N; b++) x[b] = Q'($urandom);
      ref_t::order(x, perm);
      void'(ref_t::reduce(g, perm, gr, pivcol));
      sel = '0;
      for (int i = 0; i < K; i++) sel[pivcol[i]] = 1'b1;
      for (int i = 0; i < K; i++) begin
        in_gr[i]  = gr[i];
        in_gr0[i] = gr[i] & sel;
        e.u0[i]   = x[pivcol[i]][Q-1];
      end
      for (int b = 0; b < N; b++) in_r[b] = x[b][Q-1];
      in_x = x;
      e.gr = in_gr;
      e.x  = x;
      in_valid = 1;
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      e.t = cyc;
      expq.push_back(e);
      @(negedge clk);
      in_valid = (w % 3 == 0) ? 1'b0 : 1'b1;
      if (!in_valid) @(negedge clk);
    end
    in_valid = 0;
    while (nout < NW) @(negedge clk);
    check(held > 0, "backpressure occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
