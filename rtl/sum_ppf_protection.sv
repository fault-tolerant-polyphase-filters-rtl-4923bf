// sum_ppf_protection: the "Sum & PPFs Protection" unit of the decimator.
//
// Two pipeline stages, both advanced by the y_valid pulse of the phase
// filters:
//   stage 1  sums the M phase outputs into z' and registers z' ("delay of the
//            sum") together with a registered copy of the phase outputs;
//   stage 2  forms the mean threshold y_th = z'/M, compares every delayed
//            phase output with it (c_m = 1 when y_m > y_th), lets
//            fault_filter_detect find a single deviating phase and its
//            correction dz, and registers z = z' + dz, z' and C.
// The outputs (z, z', C and the detection flags) are valid two cycles after
// y_valid (out_valid pulse). M must be a power of two: the division by M is
// an arithmetic shift, and y_m > floor(z'/M) is then exactly y_m > z'/M.
// z keeps the 22-bit width of z'; a correction that would leave that range
// wraps. The dataflow follows the decimator's fault-tolerance scheme; the
// exact register placement, the shift-based mean and the wrap are this
// design's own choices.
module sum_ppf_protection
  import ppf_pkg::*;
#(
  parameter int unsigned M   = M_DEF,
  parameter int unsigned Y_W = Y_W_DEF,
  parameter int unsigned Z_W = Z_W_DEF
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        y_valid,
  input  logic signed [Y_W-1:0]       y [M],
  output logic                        out_valid,
  output logic signed [Z_W-1:0]       z,
  output logic signed [Z_W-1:0]       z_pre,
  output logic [$clog2(M+1)-1:0]      c_count,
  output logic                        detect,
  output logic [$clog2(M)-1:0]        fault_idx
);

  localparam int unsigned CW = $clog2(M + 1);
  localparam int unsigned IW = $clog2(M);
  localparam int unsigned SH = $clog2(M);

  // Stage 1: sum and delay.
  logic signed [Z_W-1:0] zsum;
  logic signed [Z_W-1:0] zp_d;
  logic signed [Y_W-1:0] y_d [M];
  logic                  v1;

  always_comb begin
    zsum = '0;
    for (int m = 0; m < M; m++) zsum = zsum + Z_W'(y[m]);
  end

  // Stage 2: mean threshold, comparisons, detection and correction.
  logic signed [Z_W-1:0] y_th;
  logic                  c [M];
  logic [CW-1:0]         c_cnt_w;
  logic                  det_w;
  logic [IW-1:0]         idx_w;
  logic signed [Y_W+1:0] dz_w;

  assign y_th = zp_d >>> SH;

  always_comb begin
    for (int m = 0; m < M; m++) c[m] = (Z_W'(y_d[m]) > y_th);
  end

  fault_filter_detect #(.M(M), .Y_W(Y_W)) u_detect (
    .c         (c),
    .y         (y_d),
    .c_count   (c_cnt_w),
    .detect    (det_w),
    .fault_idx (idx_w),
    .dz        (dz_w)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      zp_d      <= '0;
      for (int m = 0; m < M; m++) y_d[m] <= '0;
      out_valid <= 1'b0;
      z         <= '0;
      z_pre     <= '0;
      c_count   <= '0;
      detect    <= 1'b0;
      fault_idx <= '0;
    end else begin
      v1        <= y_valid;
      out_valid <= v1;
      if (y_valid) begin
        zp_d <= zsum;
        y_d  <= y;
      end
      if (v1) begin
        z         <= zp_d + Z_W'(dz_w);
        z_pre     <= zp_d;
        c_count   <= c_cnt_w;
        detect    <= det_w;
        fault_idx <= idx_w;
      end
    end
  end

  initial assert ((1 << SH) == M) else $error("sum_ppf_protection: M must be a power of two");

endmodule
