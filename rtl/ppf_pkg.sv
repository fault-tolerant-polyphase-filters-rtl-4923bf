// ppf_pkg: shared sizes and types of the fault-tolerant polyphase decimator.
//
// The defaults describe the case study of the design: a 1/16 decimator
// (M = 16 phases) built from a 64-tap low-pass prototype filter (N = 64, so
// K = N/M = 4 taps per phase), 8-bit input samples and coefficients, 18-bit
// phase-filter outputs and a 22-bit decimated output. 18 bits hold the sum of
// four 8x8 products exactly, and 22 bits hold the sum of sixteen such outputs.
// The status struct and the selection enum are this design's own choices.
package ppf_pkg;

  parameter int unsigned M_DEF   = 16;  // decimation factor / number of phases
  parameter int unsigned N_DEF   = 64;  // length of the prototype filter h(n)
  parameter int unsigned X_W_DEF = 8;   // input sample width
  parameter int unsigned H_W_DEF = 8;   // coefficient width
  parameter int unsigned Y_W_DEF = 18;  // phase-filter output width
  parameter int unsigned Z_W_DEF = 22;  // decimated output width

  // Which rule of Compare & Select produced the output.
  typedef enum logic [1:0] {
    SEL_AGREE   = 2'd0,  // z1 == z2: both copies agree, copy 1 is passed on
    SEL_BY_C    = 2'd1,  // z1 != z2: copy whose C is nearer M/2 is chosen
    SEL_BY_ZEQ  = 2'd2,  // z1 != z2, C gives no decision: copy with z == z'
    SEL_DEFAULT = 2'd3   // z1 != z2 and no rule decides: copy 1
  } sel_rule_e;

endpackage
