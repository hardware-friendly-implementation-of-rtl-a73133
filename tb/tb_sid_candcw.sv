// Testbench of sid_candcw at N = 48, K = 24.
//
// Random candidate lists and random matrices are re-encoded; each of the k+1
// outputs is compared with the XOR of the matrix rows its message selects,
// computed bit by bit as a GF(2) matrix product. Checks the one-cycle register
// timing, that the levels are carried, and that backpressure holds the output.
module tb_sid_candcw;
  localparam int N = 48, K = 24, Q = 3;
  localparam int NW = 300;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic [K:0][K-1:0] in_u = '0;
  logic [K-1:0][N-1:0] in_gr = '0;
  logic [N-1:0][Q-1:0] in_x = '0, out_x;
  logic [K:0][N-1:0] out_c;

  sid_candcw #(.N(N), .K(K), .QBITS(Q)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0, nout = 0, held = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { logic [K:0][N-1:0] c; logic [N-1:0][Q-1:0] x; longint t; } exp_t;
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
      for (int j = 0; j <= K; j++)
        check(out_c[j] == e.c[j], $sformatf("word %0d candidate %0d", nout, j));
      check(out_x == e.x, $sformatf("word %0d levels", nout));
      if (nout < NW / 2 - 2) check(cyc - e.t == 1, $sformatf("word %0d latency", nout));
      nout++;
    end
  end

  bit bp_on = 0;
  always @(negedge clk) if (bp_on) out_ready <= 1'($urandom);

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int w = 0; w < NW; w++) begin
      exp_t e;
      if (w == NW / 2) bp_on = 1;
      for (int j = 0; j <= K; j++) in_u[j] = K'($urandom);
      for (int i = 0; i < K; i++) in_gr[i] = {$urandom, $urandom};
      for (int b = 0; b < N; b++) in_x[b] = Q'($urandom);
      for (int j = 0; j <= K; j++)
        for (int b = 0; b < N; b++) begin
          bit s;
          s = 0;
          for (int i = 0; i < K; i++) s = s ^ (in_u[j][i] & in_gr[i][b]);
          e.c[j][b] = s;
        end
      e.x = in_x;
      in_valid = 1;
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      e.t = cyc;
      expq.push_back(e);
      @(negedge clk);
      in_valid = (w % 4 == 0) ? 1'b0 : 1'b1;
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
