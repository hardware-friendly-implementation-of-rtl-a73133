// Testbench of sid_select at N = 48, K = 24, 3-bit levels.
//
// Random candidate lists are scored against random levels. Some lists repeat
// one codeword so that equal distances occur, and some make the last
// candidate the best. The winner, its distance and its index are compared with
// a direct evaluation (distance L - x to a 1, x to a 0, first minimum kept).
// Checks that each list occupies the stage for exactly k+1 cycles and that the
// result waits under output backpressure.
module tb_sid_select;
  localparam int N = 48, K = 24, Q = 3;
  localparam int NW = 200;
  localparam int DW = $clog2(N * (2**Q - 1) + 1);
  localparam int JW = $clog2(K + 1);

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic [K:0][N-1:0] in_c = '0;
  logic [N-1:0][Q-1:0] in_x = '0;
  logic [N-1:0] out_cw;
  logic [DW-1:0] out_dist;
  logic [JW-1:0] out_idx;

  sid_select #(.N(N), .K(K), .QBITS(Q)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0, nout = 0, held = 0, ties = 0, lastwin = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { logic [N-1:0] cw; int d, j; longint t; } exp_t;
  exp_t expq [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (out_valid && !out_ready) held++;
    if (out_valid && out_ready) begin
      exp_t e;
      e = expq.pop_front();
      check(out_cw == e.cw, $sformatf("list %0d winner", nout));
      check(int'(out_dist) == e.d, $sformatf("list %0d distance %0d expected %0d", nout, out_dist, e.d));
      check(int'(out_idx) == e.j, $sformatf("list %0d index %0d expected %0d", nout, out_idx, e.j));
      if (nout < NW / 2 - 2) check(cyc - e.t == K + 1, $sformatf("list %0d took %0d cycles", nout, cyc - e.t));
      nout++;
    end
  end

  bit bp_on = 0;
  always @(negedge clk) if (bp_on) out_ready <= ($urandom_range(3) != 0);

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int w = 0; w < NW; w++) begin
      exp_t e;
      int d [K+1];
      if (w == NW / 2) bp_on = 1;
      for (int b = 0; b < N; b++) in_x[b] = Q'($urandom);
      for (int j = 0; j <= K; j++) in_c[j] = {$urandom, $urandom};
      if (w % 4 == 1) for (int j = 1; j <= K; j++) in_c[j] = in_c[0];
      if (w % 4 == 2) for (int b = 0; b < N; b++) in_c[K][b] = in_x[b][Q-1];
      e.j = 0;
      for (int j = 0; j <= K; j++) begin
        d[j] = 0;
        for (int b = 0; b < N; b++) d[j] += in_c[j][b] ? (7 - int'(in_x[b])) : int'(in_x[b]);
        if (d[j] < d[e.j]) e.j = j;
      end
      for (int j = 0; j <= K; j++) if (j != e.j && d[j] == d[e.j]) begin ties++; break; end
      if (e.j == K) lastwin++;
      e.cw = in_c[e.j];
      e.d  = d[e.j];
      in_valid = 1;
      #1;
      e.t = cyc;
      while (!in_ready) begin @(negedge clk); #1; end
      expq.push_back(e);
      @(negedge clk);
      in_valid = (w % 5 == 0) ? 1'b0 : 1'b1;
      if (!in_valid) @(negedge clk);
    end
    in_valid = 0;
    while (nout < NW) @(negedge clk);
    check(ties > 0, "equal distances occurred");
    check(lastwin > 0, "last candidate won");
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
