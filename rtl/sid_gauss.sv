// Stage 2: modified Gauss-Jordan elimination of the generator matrix.
//
// Reduces G to a matrix Gr whose columns at an information set (k linearly
// independent columns) are unit vectors, visiting columns in the reliability
// order computed by stage 1 rather than left to right. One column is inspected
// per cycle: if some row that has not yet served as a pivot has a 1 in that
// column, the lowest such row becomes the pivot and is added to every other row
// with a 1 there; otherwise the column depends on the columns already chosen,
// so it is skipped and the next most reliable column takes its place.
// Elimination stops when k pivots are found, which happens after between k and
// n - dmin + 1 inspected columns. The order, the skip rule and the outputs Gr
// and Gr0 (Gr with unselected columns zeroed) follow the original article; the
// choice of the lowest free row as pivot is this design's.
//
// Interface: in_valid/in_ready hand over a sorted word (order, levels, hard
// decisions); out_valid/out_ready hand over Gr, Gr0, the selected-column mask,
// the word's levels and hard decisions and the number of columns inspected.
// Timing: the first column is eliminated straight from the constant G in the
// cycle the word is accepted, so with the word accepted in cycle t0 the result
// is valid in cycle t0 + g, g being the number of columns inspected. A new word
// is accepted in the cycle the previous result leaves.
module sid_gauss #(
  parameter int N     = 48,
  parameter int K     = 24,
  parameter int QBITS = 3,
  parameter sid_pkg::gmat_t G = sid_pkg::qr_generator(47),
  localparam int IW   = sid_pkg::idx_w(N)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [N-1:0][IW-1:0]    in_perm,
  input  logic [N-1:0][QBITS-1:0] in_x,
  input  logic [N-1:0]            in_r,
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic [K-1:0][N-1:0]     out_gr,
  output logic [K-1:0][N-1:0]     out_gr0,
  output logic [N-1:0]            out_sel,
  output logic [N-1:0][QBITS-1:0] out_x,
  output logic [N-1:0]            out_r,
  output logic [IW:0]             out_ncols
);

  localparam int KW = $clog2(K + 1);

  logic                 busy, start;
  logic [K-1:0][N-1:0]  m, src, m_n;
  logic [K-1:0]         used, used_src, used_n, cand;
  logic [N-1:0]         sel, sel_src, sel_n;
  logic [KW-1:0]        npiv, npiv_src, npiv_n;
  logic [IW:0]          step, step_src;
  logic [N-1:0][IW-1:0] perm_q;
  logic [IW-1:0]        col;
  logic [$clog2(K)-1:0] piv;
  logic                 found, finish;

  assign in_ready = !busy && (!out_valid || out_ready);
  assign start    = in_valid && in_ready;

  always_comb begin
    for (int i = 0; i < K; i++) src[i] = start ? G[i][N-1:0] : m[i];
    used_src = start ? '0 : used;
    sel_src  = start ? '0 : sel;
    npiv_src = start ? '0 : npiv;
    step_src = start ? '0 : step;
    col      = start ? in_perm[0] : perm_q[step[IW-1:0]];
    for (int i = 0; i < K; i++) cand[i] = !used_src[i] && src[i][col];
    found = 1'b0;
    piv   = '0;
    for (int i = K - 1; i >= 0; i--)
      if (cand[i]) begin
        found = 1'b1;
        piv   = i[$clog2(K)-1:0];
      end
    m_n    = src;
    used_n = used_src;
    sel_n  = sel_src;
    npiv_n = npiv_src;
    if (found) begin
      for (int i = 0; i < K; i++)
        if (i != int'(piv) && src[i][col]) m_n[i] = src[i] ^ src[piv];
      used_n[piv] = 1'b1;
      sel_n[col]  = 1'b1;
      npiv_n      = npiv_src + 1'b1;
    end
    finish = (busy || start) && (npiv_n == KW'(K));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      out_valid <= 1'b0;
      m         <= '0;
      used      <= '0;
      sel       <= '0;
      npiv      <= '0;
      step      <= '0;
      perm_q    <= '0;
      out_x     <= '0;
      out_r     <= '0;
      out_ncols <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (start) begin
        perm_q <= in_perm;
        out_x  <= in_x;
        out_r  <= in_r;
      end
      if (start || busy) begin
        m    <= m_n;
        used <= used_n;
        sel  <= sel_n;
        npiv <= npiv_n;
        step <= step_src + 1'b1;
        busy <= !finish;
        if (finish) begin
          out_valid <= 1'b1;
          out_ncols <= step_src + 1'b1;
        end
      end
    end
  end

  always_comb
    for (int i = 0; i < K; i++) out_gr0[i] = m[i] & sel;
  assign out_gr  = m;
  assign out_sel = sel;

  // G has rank k, so an information set is found before the columns run out.
  assert property (@(posedge clk) disable iff (!rst_n) busy |-> step < (IW+1)'(N))
    else $error("sid_gauss: no information set found, G is not of full rank");

endmodule
