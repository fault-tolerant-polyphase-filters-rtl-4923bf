// tb_sum_fault_tolerance: drives sets of phase outputs (correlated, with one
// strongly deviating phase, or random) into the duplicated protection logic
// and checks the selected output, the rule and the copy against the
// reference model, three cycles after each y_valid. Upsets are emulated in
// windows: the registered sum z' of copy 1 and the registered output z of
// copy 2 are forced to wrong values. Each Compare & Select rule and the
// single-phase correction must occur at least once.
module tb_sum_fault_tolerance;
  import ppf_pkg::*;
  import ppf_ref_pkg::*;
  localparam int M = 16, Y_W = 18, Z_W = 22;
  logic clk = 0, rst_n = 1;
  logic y_valid = 0;
  logic signed [Y_W-1:0] y [M];
  logic out_valid;
  logic signed [Z_W-1:0] z_out;
  sel_rule_e rule;
  logic sel_copy2, phase_fault;
  logic [$clog2(M)-1:0] phase_fault_idx;
  int checks = 0, failures = 0;
  int rule_cnt [4];
  int n_fix = 0;
  int mode = 0;            // 0 none, 1 z' of copy 1 upset, 2 z of copy 2 upset
  localparam longint ZP_BAD = 1000000, Z_BAD = -4321;
  typedef struct { longint z; int rule; bit p2; bit det; int idx; int due; } exp_t;
  exp_t q [$];
  int cyc = 0;

  sum_fault_tolerance #(.M(M), .Y_W(Y_W), .Z_W(Z_W)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (out_valid) begin
      exp_t e;
      chk(q.size() > 0, "unexpected output");
      if (q.size() > 0) begin
        e = q.pop_front();
        chk(cyc == e.due, "latency");
        chk(longint'(z_out) == e.z, $sformatf("z_out %0d vs %0d (mode %0d)", z_out, e.z, mode));
        chk(int'(rule) == e.rule, $sformatf("rule %0d vs %0d", rule, e.rule));
        chk(sel_copy2 == e.p2, "copy");
        chk(phase_fault == e.det && (!e.det || int'(phase_fault_idx) == e.idx), "detect status");
        rule_cnt[e.rule]++;
        if (e.det && mode == 0) n_fix++;
      end
    end
    if (y_valid) begin
      longint yy[];
      longint z1, zp1, z2, zp2;
      int c1, c2, i1, i2, r;
      bit d1, d2, p2;
      exp_t e;
      yy = new[M];
      foreach (y[m]) yy[m] = longint'(y[m]);
      prot_ref(yy, Z_W, z1, zp1, c1, d1, i1, mode == 1, ZP_BAD, 1'b0, 0);
      prot_ref(yy, Z_W, z2, zp2, c2, d2, i2, 1'b0, 0, mode == 2, Z_BAD);
      sel_ref(z1, zp1, c1, z2, zp2, c2, M, p2, r);
      e.z = p2 ? z2 : z1; e.rule = r; e.p2 = p2;
      e.det = p2 ? d2 : d1; e.idx = p2 ? i2 : i1;
      e.due = cyc + 3;
      q.push_back(e);
    end
  end

  task automatic send_sets(int n);
    for (int t = 0; t < n; t++) begin
      int base, bad;
      @(negedge clk);
      y_valid = 1;
      base = $urandom_range(0, 40000) - 20000;
      foreach (y[m]) y[m] = Y_W'(base + $urandom_range(0, 4000) - 2000);
      if ($urandom_range(0, 1) != 0) begin
        bad = $urandom_range(0, M - 1);
        y[bad] = Y_W'(($urandom_range(0, 1) != 0) ? 120000 : -120000);
      end
      @(negedge clk) y_valid = 0;
      repeat (4) @(negedge clk);   // let the pipeline drain before a mode change
    end
  endtask

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    send_sets(200);
    mode = 1; force dut.u_prot1.zp_d = 22'(ZP_BAD);
    send_sets(50);
    release dut.u_prot1.zp_d; mode = 0;
    send_sets(20);
    mode = 2; force dut.u_prot2.z = 22'(Z_BAD);
    send_sets(50);
    release dut.u_prot2.z; mode = 0;
    send_sets(20);
    repeat (5) @(posedge clk);
    chk(q.size() == 0, "outputs missing");
    chk(rule_cnt[SEL_AGREE] > 0, "rule (a)");
    chk(rule_cnt[SEL_BY_C] > 0, "rule (b)");
    chk(rule_cnt[SEL_BY_ZEQ] > 0, "rule (c)");
    chk(n_fix > 0, "phase corrections");
    $display("rules: agree=%0d by_C=%0d by_zeq=%0d default=%0d corrections=%0d",
             rule_cnt[0], rule_cnt[1], rule_cnt[2], rule_cnt[3], n_fix);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
