// coef_mem: the coefficient store (user memory) of the polyphase decimator.
//
// Holds the N coefficients h(n) of the low-pass prototype filter as N
// registers. A coefficient is written through a simple synchronous write port
// (wr_en, wr_addr = n, wr_data = h(n)); the new value is visible on the
// outputs the cycle after the write. All coefficients are read in parallel
// and re-arranged into the polyphase form P_m(k) = h(m + kM), m = 0..M-1,
// k = 0..K-1, K = N/M, so that every phase filter sees its own K taps.
// The polyphase re-arrangement follows the decimator's definition; the write
// port, the register implementation and the reset to all-zero coefficients
// are this design's own choices. Because the coefficients are ordinary
// writable registers, a single-bit upset of a coefficient (a soft error in
// user memory) can be reproduced by rewriting one word.
module coef_mem
  import ppf_pkg::*;
#(
  parameter int unsigned M   = M_DEF,
  parameter int unsigned N   = N_DEF,
  parameter int unsigned H_W = H_W_DEF
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        wr_en,
  input  logic [$clog2(N)-1:0]        wr_addr,
  input  logic signed [H_W-1:0]       wr_data,
  output logic signed [H_W-1:0]       p [M][N/M]
);

  localparam int unsigned K = N / M;

  logic signed [H_W-1:0] h [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < N; n++) h[n] <= '0;
    end else if (wr_en) begin
      h[wr_addr] <= wr_data;
    end
  end

  always_comb begin
    for (int m = 0; m < M; m++)
      for (int k = 0; k < K; k++)
        p[m][k] = h[m + k * M];
  end

  initial assert (N % M == 0) else $error("coef_mem: N must be a multiple of M");

endmodule
