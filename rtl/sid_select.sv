// Stage 5: best candidate selection.
//
// Scores the k+1 candidate codewords against the received quantized levels and
// keeps the closest. The soft distance of a bit is L - x towards a code bit 1
// and x towards a code bit 0, with L = 2^QBITS - 1 the strongest level (7 for
// the original 3-bit quantization); a codeword's distance is the sum over its n
// bits. As in the original article one candidate is scored per cycle, so a word
// occupies the stage for k+1 cycles. On equal distances the earlier candidate
// is kept, which is this design's choice.
//
// Interface: in_valid/in_ready take the candidate list, which the stage reads
// in place and releases (in_ready high) in the cycle it scores the last
// candidate; out_valid/out_ready give the winning codeword, its distance and
// its candidate index. Timing: with the list valid from cycle t0, the result is
// valid in cycle t0 + k + 1.
module sid_select #(
  parameter int N     = 48,
  parameter int K     = 24,
  parameter int QBITS = 3,
  localparam int DW   = $clog2(N * (2**QBITS - 1) + 1),
  localparam int JW   = $clog2(K + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [K:0][N-1:0]       in_c,
  input  logic [N-1:0][QBITS-1:0] in_x,
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic [N-1:0]            out_cw,
  output logic [DW-1:0]           out_dist,
  output logic [JW-1:0]           out_idx
);

  localparam logic [QBITS-1:0] LMAX = '1;

  logic [JW-1:0]  j;
  logic [N-1:0]   cur, best_cw;
  logic [DW-1:0]  cdist, best_dist;
  logic [JW-1:0]  best_idx;
  logic           lastc, better;

  always_comb begin
    cur  = in_c[j];
    cdist = '0;
    for (int b = 0; b < N; b++)
      cdist = cdist + DW'(cur[b] ? QBITS'(LMAX - in_x[b]) : in_x[b]);
  end

  assign lastc    = (j == JW'(K));
  assign better   = (j == '0) || (cdist < best_dist);
  assign in_ready = lastc && (!out_valid || out_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      j         <= '0;
      best_cw   <= '0;
      best_dist <= '0;
      best_idx  <= '0;
      out_valid <= 1'b0;
      out_cw    <= '0;
      out_dist  <= '0;
      out_idx   <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && !lastc) begin
        j <= j + 1'b1;
        if (better) begin
          best_cw   <= cur;
          best_dist <= cdist;
          best_idx  <= j;
        end
      end else if (in_valid && in_ready) begin
        j         <= '0;
        out_valid <= 1'b1;
        out_cw    <= better ? cur  : best_cw;
        out_dist  <= better ? cdist : best_dist;
        out_idx   <= better ? j    : best_idx;
      end
    end
  end

  // The candidate list must stay put while it is being scored.
  assert property (@(posedge clk) disable iff (!rst_n)
                   in_valid && !in_ready |=> in_valid && $stable(in_c) && $stable(in_x))
    else $error("sid_select: candidate list changed while being scored");

endmodule
