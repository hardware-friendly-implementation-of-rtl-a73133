// Stage 1: input sorting and hard-decision demodulation.
//
// Receives the n quantized symbols of one word, one per accepted cycle, and
// produces the hard decisions r (the MSB of each level), the levels x
// themselves, and the order s in which stage 2 visits the columns of G: the
// column indices sorted by decreasing reliability. The order is built by a
// linear insertion sorter while the word shifts in: every cell holds a
// (reliability, index) pair and, on each new symbol, either keeps its entry,
// takes the new one, or takes its upper neighbour's, so the list is sorted
// after the last symbol. Sorting by insertion of a shifting input and the MSB
// hard decision follow the original article; the reliability measure and the
// tie rule are this design's choices: reliability is the distance of the level
// from mid-scale (the low QBITS-1 bits, inverted when the MSB is 0), and a
// symbol is placed behind earlier symbols of equal reliability.
//
// Interface: in_valid/in_ready per symbol, out_valid/out_ready per word.
// Timing: with the first symbol accepted in cycle 0 and one symbol per cycle,
// the word is presented on the outputs from cycle n. The cells are cleared as
// the last symbol is stored into the output register, so the next word can
// follow without a gap; in_ready drops only on a word's last symbol while the
// previous word is still waiting on the output.
module sid_sorter #(
  parameter int N     = 48,
  parameter int QBITS = 3,
  localparam int IW   = sid_pkg::idx_w(N),
  localparam int RW   = QBITS - 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic [QBITS-1:0]      in_sym,
  output logic                  out_valid,
  input  logic                  out_ready,
  output logic [N-1:0][IW-1:0]  out_perm,
  output logic [N-1:0][QBITS-1:0] out_x,
  output logic [N-1:0]          out_r
);

  typedef struct packed {
    logic          vld;
    logic [RW-1:0] key;
    logic [IW-1:0] idx;
  } cell_t;

  cell_t                   cells   [N];
  cell_t                   cells_n [N];
  cell_t                   newc;
  logic [N-1:0]            ahead;       // new entry goes ahead of cell i
  logic [N-1:0][QBITS-1:0] xbuf;
  logic [IW-1:0]           cnt;
  logic                    last, take;

  assign last     = (cnt == IW'(N - 1));
  assign in_ready = !(last && out_valid && !out_ready);
  assign take     = in_valid && in_ready;

  always_comb begin
    newc.vld = 1'b1;
    newc.key = in_sym[QBITS-1] ? in_sym[RW-1:0] : ~in_sym[RW-1:0];
    newc.idx = cnt;
    for (int i = 0; i < N; i++)
      ahead[i] = !cells[i].vld || (newc.key > cells[i].key);
    for (int i = 0; i < N; i++) begin
      if (!ahead[i])                   cells_n[i] = cells[i];
      else if (i == 0 || !ahead[i-1])  cells_n[i] = newc;
      else                              cells_n[i] = cells[i-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      out_valid <= 1'b0;
      xbuf      <= '0;
      out_perm  <= '0;
      out_x     <= '0;
      out_r     <= '0;
      for (int i = 0; i < N; i++) cells[i] <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (take) begin
        xbuf[cnt] <= in_sym;
        if (last) begin
          cnt       <= '0;
          out_valid <= 1'b1;
          for (int i = 0; i < N; i++) begin
            out_perm[i] <= cells_n[i].idx;
            cells[i]    <= '0;
            out_x[i]    <= (i == N - 1) ? in_sym : xbuf[i];
            out_r[i]    <= (i == N - 1) ? in_sym[QBITS-1] : xbuf[i][QBITS-1];
          end
        end else begin
          cnt <= cnt + 1'b1;
          for (int i = 0; i < N; i++) cells[i] <= cells_n[i];
        end
      end
    end
  end

  // The input is only stalled on a word's last symbol.
  assert property (@(posedge clk) disable iff (!rst_n) !in_ready |-> last)
    else $error("sid_sorter: stall away from the last symbol");

endmodule
