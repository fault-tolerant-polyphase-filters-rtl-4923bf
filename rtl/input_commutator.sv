// input_commutator: the input switch of a polyphase decimator.
//
// Samples x(n) arrive one per clock when in_valid is high (gaps are allowed).
// Sample n of a block goes to phase m = n mod M, so after M accepted samples
// the block j holds x(jM+m) for m = 0..M-1, which is the j-th sample of every
// phase stream x_m(j) = x(jM+m). The complete block is presented on blk_x
// with a one-cycle blk_valid pulse in the clock cycle after its last sample
// was accepted, and stays stable until the next block completes.
// The phase order and the splitting follow the polyphase structure of the
// decimator; the one-sample-per-clock interface and the block-wide handover
// are this design's own choices.
module input_commutator
  import ppf_pkg::*;
#(
  parameter int unsigned M   = M_DEF,
  parameter int unsigned X_W = X_W_DEF
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [X_W-1:0] in_x,
  output logic                  blk_valid,
  output logic signed [X_W-1:0] blk_x [M]
);

  localparam int unsigned PW = (M > 1) ? $clog2(M) : 1;

  logic [PW-1:0]          phase;
  logic signed [X_W-1:0]  shadow [M-1];  // phases 0..M-2 of the block being filled

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= '0;
      blk_valid <= 1'b0;
      for (int m = 0; m < M; m++) blk_x[m] <= '0;
      for (int m = 0; m < M - 1; m++) shadow[m] <= '0;
    end else begin
      blk_valid <= 1'b0;
      if (in_valid) begin
        if (phase == PW'(M - 1)) begin
          for (int m = 0; m < M - 1; m++) blk_x[m] <= shadow[m];
          blk_x[M-1] <= in_x;
          blk_valid  <= 1'b1;
          phase      <= '0;
        end else begin
          shadow[phase] <= in_x;
          phase         <= phase + 1'b1;
        end
      end
    end
  end

endmodule
