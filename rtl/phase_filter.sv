// phase_filter: one branch of the polyphase decimator.
//
// Computes y_m(r) = sum_{k=0}^{K-1} P_m(k) * x_m(r+k) on the phase stream
// x_m(j) = x(jM+m). Each in_valid pulse shifts one new phase sample into a
// K-deep delay line; the newest sample x_m(r+K-1) is multiplied by P_m(K-1)
// and the oldest x_m(r) by P_m(0). All K products are formed in parallel and
// summed in the same cycle; the result is registered, so y is valid (y_valid
// pulse) the cycle after in_valid. The first K-1 pulses after reset only fill
// the delay line and produce no output, so the first y corresponds to r = 0.
// With 8-bit samples and coefficients the K = 4 products sum exactly into the
// 18-bit output. The filter equation follows the decimator definition; the
// fully parallel multipliers, the register timing and the suppression of the
// warm-up outputs are this design's own choices.
module phase_filter
  import ppf_pkg::*;
#(
  parameter int unsigned K   = N_DEF / M_DEF,
  parameter int unsigned X_W = X_W_DEF,
  parameter int unsigned H_W = H_W_DEF,
  parameter int unsigned Y_W = Y_W_DEF
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [X_W-1:0] in_x,
  input  logic signed [H_W-1:0] coef [K],
  output logic                  y_valid,
  output logic signed [Y_W-1:0] y
);

  localparam int unsigned CW = $clog2(K + 1);

  logic signed [X_W-1:0] dline [K];   // dline[k] holds x_m(r+k) after a shift
  logic signed [X_W-1:0] dnext [K];
  logic signed [Y_W-1:0] acc;
  logic [CW-1:0]         fill;

  // Delay-line contents after shifting in the new sample.
  always_comb begin
    for (int k = 0; k < K - 1; k++) dnext[k] = dline[k+1];
    dnext[K-1] = in_x;
  end

  always_comb begin
    acc = '0;
    for (int k = 0; k < K; k++)
      acc = acc + Y_W'(coef[k] * dnext[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < K; k++) dline[k] <= '0;
      fill    <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= 1'b0;
      if (in_valid) begin
        dline <= dnext;
        y     <= acc;
        if (fill == CW'(K - 1)) y_valid <= 1'b1;
        else                    fill    <= fill + 1'b1;
      end
    end
  end

endmodule
