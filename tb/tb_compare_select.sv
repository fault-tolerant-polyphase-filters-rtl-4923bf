// tb_compare_select: drives pairs of (z, z', C) from the two protection
// copies, covering agreement, disagreement decided by C, disagreement with
// equal C decided by z == z', and the undecided case, and checks the chosen
// output, the rule and the copy one cycle after in_valid.
module tb_compare_select;
  import ppf_ref_pkg::*;
  import ppf_pkg::*;
  localparam int M = 16, Z_W = 22;
  logic clk = 0, rst_n = 1;
  logic in_valid = 0;
  logic signed [Z_W-1:0] z1 = '0, z1_pre = '0, z2 = '0, z2_pre = '0;
  logic [$clog2(M+1)-1:0] c1 = '0, c2 = '0;
  logic det1 = 0, det2 = 0;
  logic [$clog2(M)-1:0] idx1 = '0, idx2 = '0;
  logic out_valid;
  logic signed [Z_W-1:0] z_out;
  sel_rule_e rule;
  logic sel_copy2, phase_fault;
  logic [$clog2(M)-1:0] phase_fault_idx;
  int checks = 0, failures = 0;
  int rule_seen [4];
  longint exp_z; int exp_rule; bit exp_pick2, exp_det, pend = 0;
  int exp_idx;

  compare_select #(.M(M), .Z_W(Z_W)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    chk(out_valid == pend, "out_valid timing");
    if (out_valid) begin
      chk(longint'(z_out) == exp_z, $sformatf("z_out %0d vs %0d", z_out, exp_z));
      chk(int'(rule) == exp_rule, $sformatf("rule %0d vs %0d", rule, exp_rule));
      chk(sel_copy2 == exp_pick2, "copy");
      chk(phase_fault == exp_det && (!exp_det || int'(phase_fault_idx) == exp_idx), "status pass-through");
      rule_seen[exp_rule]++;
    end
    pend <= in_valid;
    if (in_valid) begin
      bit p2; int r;
      sel_ref(longint'(z1), longint'(z1_pre), int'(c1), longint'(z2), longint'(z2_pre), int'(c2), M, p2, r);
      exp_pick2 <= p2; exp_rule <= r;
      exp_z   <= p2 ? longint'(z2) : longint'(z1);
      exp_det <= p2 ? det2 : det1;
      exp_idx <= p2 ? int'(idx2) : int'(idx1);
    end
  end

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 3000; t++) begin
      int kind;
      longint v;
      kind = $urandom_range(0, 4);
      v = longint'($urandom_range(0, 200000)) - 100000;
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      det1 = $urandom_range(0, 1) != 0; det2 = $urandom_range(0, 1) != 0;
      idx1 = $urandom; idx2 = $urandom;
      c1 = $urandom_range(0, M); c2 = $urandom_range(0, M);
      z1 = Z_W'(v); z1_pre = Z_W'(v); z2 = Z_W'(v); z2_pre = Z_W'(v);
      case (kind)
        0: begin z1_pre = Z_W'(v + 7); z2_pre = z1_pre; c2 = c1; end        // agree
        1: begin z2 = Z_W'(v + 1000); z2_pre = z2; end                       // differ, C decides
        2: begin c2 = c1; z2 = Z_W'(v - 33); end                             // equal C, z==z' in copy 1
        3: begin c2 = c1; z1 = Z_W'(v + 99); z2_pre = Z_W'(v + 5); z2 = z2_pre; end // copy 2 uncorrected
        default: begin c2 = c1; z1 = Z_W'(v + 1); z2 = Z_W'(v + 2); end      // undecided
      endcase
    end
    @(negedge clk) in_valid = 0;
    repeat (3) @(posedge clk);
    for (int r = 0; r < 4; r++) chk(rule_seen[r] > 0, $sformatf("rule %0d exercised", r));
    $display("rules seen: agree=%0d by_C=%0d by_zeq=%0d default=%0d",
             rule_seen[0], rule_seen[1], rule_seen[2], rule_seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
