// Soft information set decoder for a binary (n, k) block code.
//
// The decoder takes the n quantized channel levels of a received word, one per
// cycle, and returns a codeword chosen among k+1 candidates. Five stages are
// chained with valid/ready handshakes and work on different words at once:
//   1. sid_sorter   hard decisions r and the column order by reliability;
//   2. sid_gauss    Gauss-Jordan reduction of G on the k most reliable
//                   linearly independent columns (the information set);
//   3. sid_candmsg  the information word u0 read at those columns, and the k
//                   words at Hamming distance 1 from it;
//   4. sid_candcw   re-encoding of the k+1 candidate messages with Gr;
//   5. sid_select   soft distance of every candidate, smallest wins.
// The generator matrix is a compile-time parameter; the default is the
// extended quadratic residue (48,24,12) code in systematic form, so out_msg,
// the codeword's first k bits, are the information bits. The stage structure
// and the cycle counts follow the original article; the handshakes, reset and
// the construction of the default G are this design's.
//
// Timing: with the first symbol of a word accepted in cycle 0 and one symbol
// per cycle, the decoded word is valid in cycle n + g + k + 3, where g (between
// k and n - DMIN + 1, reported on out_ncols) is the number of columns stage 2
// inspected: n + 2k + 3 cycles at best and 2n - DMIN + k + 4 at worst. Words
// may follow each other without gaps. The sorter takes n cycles per word and
// every other stage at most n - DMIN + 1, so the decoder sustains one word per
// n cycles. The original article quotes n - DMIN + 1 cycles per word, which one
// symbol per cycle into the sorter cannot reach; this design keeps the sorter
// as described. out_cand tells which candidate won (0 = u0, j = u0 with bit j-1
// flipped). DMIN is used only by the assertions.
//
// Lint tools report rst_n as used both asynchronously (the flip-flops) and
// synchronously (the assertions' disable iff); that is intended.
module sid_decoder #(
  parameter int N     = 48,
  parameter int K     = 24,
  parameter int DMIN  = 12,
  parameter int QBITS = 3,
  parameter sid_pkg::gmat_t G = sid_pkg::qr_generator(47),
  localparam int IW   = sid_pkg::idx_w(N),
  localparam int DW   = $clog2(N * (2**QBITS - 1) + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [QBITS-1:0] in_sym,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [N-1:0]     out_cw,
  output logic [K-1:0]     out_msg,
  output logic [DW-1:0]    out_dist,
  output logic [IW:0]      out_ncols,
  output logic [$clog2(K+1)-1:0] out_cand
);

  // stage 1 -> 2
  logic                    s1_valid, s1_ready;
  logic [N-1:0][IW-1:0]    s1_perm;
  logic [N-1:0][QBITS-1:0] s1_x;
  logic [N-1:0]            s1_r;
  // stage 2 -> 3
  logic                    s2_valid, s2_ready;
  logic [K-1:0][N-1:0]     s2_gr, s2_gr0;
  logic [N-1:0][QBITS-1:0] s2_x;
  logic [N-1:0]            s2_r;
  logic [IW:0]             s2_ncols;
  logic [N-1:0]            s2_sel;
  // stage 3 -> 4
  logic                    s3_valid, s3_ready;
  logic [K:0][K-1:0]       s3_u;
  logic [K-1:0][N-1:0]     s3_gr;
  logic [N-1:0][QBITS-1:0] s3_x;
  // stage 4 -> 5
  logic                    s4_valid, s4_ready;
  logic [K:0][N-1:0]       s4_c;
  logic [N-1:0][QBITS-1:0] s4_x;

  sid_sorter #(.N(N), .QBITS(QBITS)) u_sorter (
    .clk, .rst_n, .in_valid, .in_ready, .in_sym,
    .out_valid(s1_valid), .out_ready(s1_ready),
    .out_perm(s1_perm), .out_x(s1_x), .out_r(s1_r));

  sid_gauss #(.N(N), .K(K), .QBITS(QBITS), .G(G)) u_gauss (
    .clk, .rst_n,
    .in_valid(s1_valid), .in_ready(s1_ready),
    .in_perm(s1_perm), .in_x(s1_x), .in_r(s1_r),
    .out_valid(s2_valid), .out_ready(s2_ready),
    .out_gr(s2_gr), .out_gr0(s2_gr0), .out_sel(s2_sel),
    .out_x(s2_x), .out_r(s2_r), .out_ncols(s2_ncols));

  sid_candmsg #(.N(N), .K(K), .QBITS(QBITS)) u_candmsg (
    .clk, .rst_n,
    .in_valid(s2_valid), .in_ready(s2_ready),
    .in_gr(s2_gr), .in_gr0(s2_gr0), .in_x(s2_x), .in_r(s2_r),
    .out_valid(s3_valid), .out_ready(s3_ready),
    .out_u(s3_u), .out_gr(s3_gr), .out_x(s3_x));

  sid_candcw #(.N(N), .K(K), .QBITS(QBITS)) u_candcw (
    .clk, .rst_n,
    .in_valid(s3_valid), .in_ready(s3_ready),
    .in_u(s3_u), .in_gr(s3_gr), .in_x(s3_x),
    .out_valid(s4_valid), .out_ready(s4_ready),
    .out_c(s4_c), .out_x(s4_x));

  sid_select #(.N(N), .K(K), .QBITS(QBITS)) u_select (
    .clk, .rst_n,
    .in_valid(s4_valid), .in_ready(s4_ready),
    .in_c(s4_c), .in_x(s4_x),
    .out_valid, .out_ready, .out_cw, .out_dist, .out_idx(out_cand));

  // The column count travels with its word through stages 3 to 5, which hold
  // one word each.
  logic [IW:0] ncols3, ncols4, ncols5;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ncols3 <= '0;
      ncols4 <= '0;
      ncols5 <= '0;
    end else begin
      if (s2_valid && s2_ready) ncols3 <= s2_ncols;
      if (s3_valid && s3_ready) ncols4 <= ncols3;
      if (s4_valid && s4_ready) ncols5 <= ncols4;
    end
  end

  assign out_ncols = ncols5;
  assign out_msg   = out_cw[K-1:0];

  // Number of inspected columns lies between k and n - dmin + 1.
  assert property (@(posedge clk) disable iff (!rst_n)
                   s2_valid |-> s2_ncols >= (IW+1)'(K) && s2_ncols <= (IW+1)'(N - DMIN + 1))
    else $error("sid_decoder: %0d columns inspected, outside [k, n-dmin+1]", s2_ncols);

  // The information set has exactly k columns.
  assert property (@(posedge clk) disable iff (!rst_n) s2_valid |-> $countones(s2_sel) == K)
    else $error("sid_decoder: information set of %0d columns", $countones(s2_sel));

endmodule
