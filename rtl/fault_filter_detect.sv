// fault_filter_detect: locates a single faulty phase filter and computes the
// correction of the decimated output (purely combinational).
//
// Input c[m] is 1 when phase output y[m] lies above the mean threshold z'/M.
// The unit counts the ones, C = sum c[m]. In a fault-free decimator about half
// the phase outputs lie on either side of the mean. If exactly one bit
// differs from all others (C = 1: the single 1; C = M-1: the single 0), that
// phase m is taken to be faulty and its output is replaced by a substitute
// built from its neighbours:
//   y^S_0 = y_1,  y^S_m = (y_{m-1} + y_{m+1}) / 2 for 0 < m < M-1,
//   y^S_{M-1} = y_{M-2},
// and the correction dz = y^S_m - y_m is returned, to be added to z'.
// In every other case dz = 0 and detect = 0. The halving is an arithmetic
// shift right (rounding towards minus infinity), which is this design's own
// choice; the counting, the detection rule and the substitution follow the
// decimator's fault-tolerance scheme.
module fault_filter_detect
  import ppf_pkg::*;
#(
  parameter int unsigned M   = M_DEF,
  parameter int unsigned Y_W = Y_W_DEF
) (
  input  logic                        c [M],
  input  logic signed [Y_W-1:0]       y [M],
  output logic [$clog2(M+1)-1:0]      c_count,
  output logic                        detect,
  output logic [$clog2(M)-1:0]        fault_idx,
  output logic signed [Y_W+1:0]       dz
);

  localparam int unsigned CW = $clog2(M + 1);
  localparam int unsigned IW = $clog2(M);

  logic                   lone_val;      // value of the lone bit: 1 when C = 1
  logic signed [Y_W:0]    ysub;
  logic signed [Y_W:0]    pair;

  always_comb begin
    c_count = '0;
    for (int m = 0; m < M; m++) c_count = c_count + CW'(c[m]);
  end

  always_comb begin
    detect    = (c_count == CW'(1)) || (c_count == CW'(M - 1));
    lone_val  = (c_count == CW'(1));
    fault_idx = '0;
    for (int m = M - 1; m >= 0; m--)
      if (c[m] == lone_val) fault_idx = IW'(m);

    pair = '0;
    if (fault_idx == '0)
      ysub = (Y_W+1)'(y[1]);
    else if (fault_idx == IW'(M - 1))
      ysub = (Y_W+1)'(y[M-2]);
    else begin
      pair = (Y_W+1)'(y[fault_idx - 1'b1]) + (Y_W+1)'(y[fault_idx + 1'b1]);
      ysub = pair >>> 1;
    end

    dz = detect ? ((Y_W+2)'(ysub) - (Y_W+2)'(y[fault_idx])) : '0;
  end

endmodule
