// Stage 3: candidate message generation.
//
// Extracts the most reliable information word u0 = r x Gr0^T: since row i of
// Gr0 has a single 1, at the pivot column of row i, bit i of u0 is the hard
// decision at that column. The other k candidates are u0 with one bit flipped,
// candidate j (1..k) flipping bit j-1, so the list holds the k+1 messages of an
// order-1 search around u0. As in the original article the computation is
// combinational and the list is registered in one cycle; the flip order is this
// design's choice.
//
// Interface: valid/ready on both sides; Gr and the levels x are carried along
// for the next stages. Timing: a pipeline register, result valid the cycle
// after the input is accepted, full throughput.
module sid_candmsg #(
  parameter int N     = 48,
  parameter int K     = 24,
  parameter int QBITS = 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [K-1:0][N-1:0]     in_gr,
  input  logic [K-1:0][N-1:0]     in_gr0,
  input  logic [N-1:0][QBITS-1:0] in_x,
  input  logic [N-1:0]            in_r,
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic [K:0][K-1:0]       out_u,
  output logic [K-1:0][N-1:0]     out_gr,
  output logic [N-1:0][QBITS-1:0] out_x
);

  logic [K-1:0]       u0;
  logic [K:0][K-1:0]  u;

  always_comb begin
    for (int i = 0; i < K; i++) u0[i] = ^(in_gr0[i] & in_r);
    u[0] = u0;
    for (int j = 1; j <= K; j++) u[j] = u0 ^ (K'(1) << (j - 1));
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_u     <= '0;
      out_gr    <= '0;
      out_x     <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_u  <= u;
        out_gr <= in_gr;
        out_x  <= in_x;
      end
    end
  end

endmodule
