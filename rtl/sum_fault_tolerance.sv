// sum_fault_tolerance: the "Sum & Fault Tolerance" unit of the decimator.
//
// Duplicate with comparison of the fault-tolerance logic: the M phase-filter
// outputs feed two identical Sum & PPFs Protection copies, each of which sums
// them, detects and corrects a single faulty phase filter, and reports z, z'
// and C. Compare & Select then chooses between the two copies, so a single
// upset inside either copy does not reach the output.
// Timing: y_valid in cycle t gives out_valid and z_out in cycle t+3 (two
// stages in each copy, one in Compare & Select). The structure follows the
// decimator's scheme; the register timing is this design's own choice.
// The two copies are logically identical and have the same inputs, so a
// synthesis tool that shares resources would merge them into one and the
// protection would vanish. The instances therefore carry hierarchy-keeping
// attributes; the synthesis flow must honour them (or have resource sharing
// and duplicate merging disabled). A flow that flattens and merges anyway
// reports Compare & Select's rule and copy outputs as constants.
module sum_fault_tolerance
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
  output logic signed [Z_W-1:0]       z_out,
  output sel_rule_e                   rule,
  output logic                        sel_copy2,
  output logic                        phase_fault,
  output logic [$clog2(M)-1:0]        phase_fault_idx
);

  localparam int unsigned CW = $clog2(M + 1);
  localparam int unsigned IW = $clog2(M);

  logic                  v1, v2;
  logic signed [Z_W-1:0] z1, z1_pre, z2, z2_pre;
  logic [CW-1:0]         c1, c2;
  logic                  det1, det2;
  logic [IW-1:0]         idx1, idx2;

  (* keep_hierarchy = "yes", dont_touch = "true" *)
  sum_ppf_protection #(.M(M), .Y_W(Y_W), .Z_W(Z_W)) u_prot1 (
    .clk, .rst_n, .y_valid, .y,
    .out_valid (v1), .z (z1), .z_pre (z1_pre), .c_count (c1),
    .detect (det1), .fault_idx (idx1)
  );

  (* keep_hierarchy = "yes", dont_touch = "true" *)
  sum_ppf_protection #(.M(M), .Y_W(Y_W), .Z_W(Z_W)) u_prot2 (
    .clk, .rst_n, .y_valid, .y,
    .out_valid (v2), .z (z2), .z_pre (z2_pre), .c_count (c2),
    .detect (det2), .fault_idx (idx2)
  );

  compare_select #(.M(M), .Z_W(Z_W)) u_sel (
    .clk, .rst_n,
    .in_valid (v1 | v2),
    .z1, .z1_pre, .c1, .det1, .idx1,
    .z2, .z2_pre, .c2, .det2, .idx2,
    .out_valid, .z_out, .rule, .sel_copy2, .phase_fault, .phase_fault_idx
  );

endmodule
