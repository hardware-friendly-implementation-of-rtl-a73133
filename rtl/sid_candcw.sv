// Stage 4: candidate codeword generation.
//
// Re-encodes the k+1 candidate messages with the reduced generator matrix, c_j
// = u_j x Gr: codeword j is the XOR of the rows of Gr selected by the 1s of
// message j. As in the original article all k+1 products are formed
// combinationally and registered in one cycle.
//
// Interface: valid/ready on both sides; the levels x are carried along for the
// selection stage. Timing: a pipeline register, result valid the cycle after
// the input is accepted, full throughput.
module sid_candcw #(
  parameter int N     = 48,
  parameter int K     = 24,
  parameter int QBITS = 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [K:0][K-1:0]       in_u,
  input  logic [K-1:0][N-1:0]     in_gr,
  input  logic [N-1:0][QBITS-1:0] in_x,
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic [K:0][N-1:0]       out_c,
  output logic [N-1:0][QBITS-1:0] out_x
);

  logic [K:0][N-1:0] c;

  always_comb
    for (int j = 0; j <= K; j++) begin
      c[j] = '0;
      for (int i = 0; i < K; i++)
        if (in_u[j][i]) c[j] = c[j] ^ in_gr[i];
    end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_c     <= '0;
      out_x     <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_c <= c;
        out_x <= in_x;
      end
    end
  end

endmodule
