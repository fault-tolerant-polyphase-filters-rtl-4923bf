// compare_select: the "Compare & Select" unit closing the duplicate-with-
// comparison protection of the fault-tolerance logic.
//
// It receives, from two identical Sum & PPFs Protection copies, the corrected
// output z, the uncorrected sum z' and the comparison count C, and picks the
// final output:
//   (a) z1 == z2: both copies work, copy 1 is passed on;
//   (b) z1 != z2 and the copies differ in how far C lies from M/2: the copy
//       whose C is closer to M/2 is taken as correct;
//   (c) otherwise (C1 == C2, or both equally far from M/2): the copy with
//       z == z' (no correction applied) is taken as correct;
//   if no rule decides, copy 1 is passed on.
// Inputs are sampled when in_valid is high and the choice is registered, so
// z_out is valid one cycle after in_valid (out_valid pulse). The rule used
// and the chosen copy are reported, with the selected copy's detection flags.
// Rules (a) to (c) follow the decimator's scheme; treating equal distances as
// case (c), the copy-1 fall-back and the status outputs are this design's own
// choices.
module compare_select
  import ppf_pkg::*;
#(
  parameter int unsigned M   = M_DEF,
  parameter int unsigned Z_W = Z_W_DEF
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  logic signed [Z_W-1:0]       z1,
  input  logic signed [Z_W-1:0]       z1_pre,
  input  logic [$clog2(M+1)-1:0]      c1,
  input  logic                        det1,
  input  logic [$clog2(M)-1:0]        idx1,
  input  logic signed [Z_W-1:0]       z2,
  input  logic signed [Z_W-1:0]       z2_pre,
  input  logic [$clog2(M+1)-1:0]      c2,
  input  logic                        det2,
  input  logic [$clog2(M)-1:0]        idx2,
  output logic                        out_valid,
  output logic signed [Z_W-1:0]       z_out,
  output sel_rule_e                   rule,
  output logic                        sel_copy2,
  output logic                        phase_fault,
  output logic [$clog2(M)-1:0]        phase_fault_idx
);

  localparam int unsigned CW = $clog2(M + 1);

  logic [CW-1:0] dist1, dist2;
  logic          pick2;
  sel_rule_e     rule_w;

  always_comb begin
    dist1 = (c1 >= CW'(M / 2)) ? c1 - CW'(M / 2) : CW'(M / 2) - c1;
    dist2 = (c2 >= CW'(M / 2)) ? c2 - CW'(M / 2) : CW'(M / 2) - c2;
    pick2  = 1'b0;
    rule_w = SEL_AGREE;
    if (z1 != z2) begin
      if (dist1 != dist2) begin
        rule_w = SEL_BY_C;
        pick2  = (dist2 < dist1);
      end else if ((z1 == z1_pre) != (z2 == z2_pre)) begin
        rule_w = SEL_BY_ZEQ;
        pick2  = (z2 == z2_pre);
      end else begin
        rule_w = SEL_DEFAULT;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid       <= 1'b0;
      z_out           <= '0;
      rule            <= SEL_AGREE;
      sel_copy2       <= 1'b0;
      phase_fault     <= 1'b0;
      phase_fault_idx <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        z_out           <= pick2 ? z2 : z1;
        rule            <= rule_w;
        sel_copy2       <= pick2;
        phase_fault     <= pick2 ? det2 : det1;
        phase_fault_idx <= pick2 ? idx2 : idx1;
      end
    end
  end

endmodule
