// Testbench of sid_sorter at N = 48, 3-bit levels.
//
// Sends random words, some with many equal reliabilities, one symbol per
// cycle and mostly back to back, and compares the column order, the levels
// and the hard decisions with the reference model's stable sort. Checks that a
// word is presented n cycles after its first symbol, and that output
// backpressure stalls the input only on a word's last symbol.
module tb_sid_sorter;
  import sid_ref_pkg::*;

  localparam int N = 48, Q = 3;
  localparam int IW = sid_pkg::idx_w(N);
  localparam int NW = 300;
  typedef sid_ref #(N, 4, Q) ref_t;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic [Q-1:0] in_sym = '0;
  logic [N-1:0][IW-1:0] out_perm;
  logic [N-1:0][Q-1:0] out_x;
  logic [N-1:0] out_r;

  sid_sorter #(.N(N), .QBITS(Q)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0, nout = 0, nsym = 0, stalls = 0, bp = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  ref_t::lvl_t expq [$];
  longint starts [$];

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

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      if (nsym % N == 0) starts.push_back(cyc);
      nsym++;
    end
    if (in_valid && !in_ready) begin
      stalls++;
      check(nsym % N == N - 1, "stall only on the last symbol");
    end
    if (out_valid && !out_ready) bp++;
    if (out_valid && out_ready) begin
      ref_t::lvl_t x;
      int perm [N];
      longint st;
      bit ok;
      x  = expq.pop_front();
      st = starts.pop_front();
      ref_t::order(x, perm);
      ok = 1;
      for (int i = 0; i < N; i++) begin
        if (int'(out_perm[i]) != perm[i]) ok = 0;
        if (int'(out_x[i]) != int'(x[i])) ok = 0;
        if (out_r[i] != (x[i] > 3)) ok = 0;
      end
      check(ok, $sformatf("word %0d order/levels", nout));
      if (nout < 100) check(cyc - st == N, $sformatf("word %0d latency %0d", nout, cyc - st));
      nout++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int w = 0; w < NW; w++) begin
      ref_t::lvl_t x;
      for (int b = 0; b < N; b++) x[b] = (w % 3 == 0) ? $urandom_range(4, 3) : $urandom_range(7);
      expq.push_back(x);
      if (w == 100) fork
        begin
          forever begin
            @(negedge clk);
            out_ready = 0;
            repeat ($urandom_range(80)) @(negedge clk);
            out_ready = 1;
            repeat ($urandom_range(80)) @(negedge clk);
          end
        end
      join_none
      for (int b = 0; b < N; b++) begin
        in_valid = 1;
        in_sym   = Q'(x[b]);
        wait_accept();
      end
    end
    in_valid = 0;
    while (nout < NW) @(negedge clk);
    check(stalls > 0, "input stall occurred");
    check(bp > 0, "output backpressure occurred");
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
