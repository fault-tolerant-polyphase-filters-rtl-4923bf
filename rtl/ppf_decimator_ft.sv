// ppf_decimator_ft: soft-error tolerant 1/M polyphase decimator.
//
// The decimator computes z(r) = sum_{n=0}^{N-1} h(n) x(rM+n), i.e. a length-N
// low-pass FIR evaluated only at every M-th sample, in polyphase form:
// the input commutator splits x(n) into M phase streams, M phase filters of
// K = N/M taps each produce y_m(r), and the Sum & Fault Tolerance unit adds
// them. That unit also detects a single phase filter whose output stands
// alone above or below the mean of all phase outputs and replaces its
// contribution by the average of its neighbours; the detection and
// correction logic is itself duplicated and arbitrated by Compare & Select.
//
// Interface: one input sample per clock at most (in_valid/in_x). The N
// coefficients h(n) are loaded through coef_wr_en/coef_wr_addr/coef_wr_data
// before use (they reset to zero). One decimated sample z_out is produced per
// M input samples with a one-cycle out_valid pulse. Latency: the last input
// sample x(rM+N-1) needed for z(r) is accepted in cycle t; z(r) appears in
// cycle t+5 (commutator 1, phase filter 1, Sum & PPFs Protection 2,
// Compare & Select 1). The first output is z(0), after N input samples.
// Status outputs report the Compare & Select rule used, the chosen copy and
// whether (and where) a faulty phase filter was corrected.
// The architecture follows the decimator's fault-tolerance scheme; the
// handshake, coefficient port, latencies and status outputs are this design's
// own choices.
module ppf_decimator_ft
  import ppf_pkg::*;
#(
  parameter int unsigned M   = M_DEF,
  parameter int unsigned N   = N_DEF,
  parameter int unsigned X_W = X_W_DEF,
  parameter int unsigned H_W = H_W_DEF,
  parameter int unsigned Y_W = Y_W_DEF,
  parameter int unsigned Z_W = Z_W_DEF
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // coefficient (user memory) write port
  input  logic                   coef_wr_en,
  input  logic [$clog2(N)-1:0]   coef_wr_addr,
  input  logic signed [H_W-1:0]  coef_wr_data,
  // input sample stream
  input  logic                   in_valid,
  input  logic signed [X_W-1:0]  in_x,
  // decimated output
  output logic                   out_valid,
  output logic signed [Z_W-1:0]  z_out,
  // status
  output sel_rule_e              sel_rule,
  output logic                   sel_copy2,
  output logic                   phase_fault,
  output logic [$clog2(M)-1:0]   phase_fault_idx
);

  localparam int unsigned K = N / M;

  logic                  blk_valid;
  logic signed [X_W-1:0] blk_x [M];
  logic signed [H_W-1:0] p [M][K];
  logic                  y_valid_m [M];
  logic signed [Y_W-1:0] y [M];

  input_commutator #(.M(M), .X_W(X_W)) u_comm (
    .clk, .rst_n, .in_valid, .in_x, .blk_valid, .blk_x
  );

  coef_mem #(.M(M), .N(N), .H_W(H_W)) u_coef (
    .clk, .rst_n,
    .wr_en (coef_wr_en), .wr_addr (coef_wr_addr), .wr_data (coef_wr_data),
    .p
  );

  for (genvar m = 0; m < M; m++) begin : g_phase
    phase_filter #(.K(K), .X_W(X_W), .H_W(H_W), .Y_W(Y_W)) u_pf (
      .clk, .rst_n,
      .in_valid (blk_valid),
      .in_x     (blk_x[m]),
      .coef     (p[m]),
      .y_valid  (y_valid_m[m]),
      .y        (y[m])
    );
  end

  // All phase filters advance together; phase 0 provides the common strobe.
  sum_fault_tolerance #(.M(M), .Y_W(Y_W), .Z_W(Z_W)) u_sft (
    .clk, .rst_n,
    .y_valid (y_valid_m[0]),
    .y,
    .out_valid, .z_out,
    .rule (sel_rule), .sel_copy2, .phase_fault, .phase_fault_idx
  );

endmodule
