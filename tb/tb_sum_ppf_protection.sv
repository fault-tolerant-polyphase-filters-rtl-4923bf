// tb_sum_ppf_protection: feeds sets of phase outputs (correlated sets, sets
// with one strongly deviating phase at a random position, and fully random
// sets) and compares z, z', C, the detection flag and the faulty index with
// the reference model, two cycles after each y_valid pulse.
module tb_sum_ppf_protection;
  import ppf_ref_pkg::*;
  localparam int M = 16, Y_W = 18, Z_W = 22;
  logic clk = 0, rst_n = 1;
  logic y_valid = 0;
  logic signed [Y_W-1:0] y [M];
  logic out_valid;
  logic signed [Z_W-1:0] z, z_pre;
  logic [$clog2(M+1)-1:0] c_count;
  logic detect;
  logic [$clog2(M)-1:0] fault_idx;
  int checks = 0, failures = 0, n_det = 0, n_out = 0;
  typedef struct { longint z, zp; int c; bit det; int idx; int due; } exp_t;
  exp_t q [$];
  int cyc = 0;

  sum_ppf_protection #(.M(M), .Y_W(Y_W), .Z_W(Z_W)) dut (.*);
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
        chk(cyc == e.due, $sformatf("latency: output at %0d, due %0d", cyc, e.due));
        chk(longint'(z) == e.z, $sformatf("z %0d vs %0d", z, e.z));
        chk(longint'(z_pre) == e.zp, $sformatf("z' %0d vs %0d", z_pre, e.zp));
        chk(int'(c_count) == e.c, $sformatf("C %0d vs %0d", c_count, e.c));
        chk(detect == e.det, "detect");
        if (e.det) chk(int'(fault_idx) == e.idx, $sformatf("index %0d vs %0d", fault_idx, e.idx));
        n_out++;
      end
    end
    if (y_valid) begin
      longint yy[];
      exp_t e;
      yy = new[M];
      foreach (y[m]) yy[m] = longint'(y[m]);
      prot_ref(yy, Z_W, e.z, e.zp, e.c, e.det, e.idx);
      e.due = cyc + 2;
      n_det += int'(e.det);
      q.push_back(e);
    end
  end

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 1500; t++) begin
      @(negedge clk);
      y_valid = ($urandom_range(0, 3) != 0);
      case ($urandom_range(0, 2))
        0: begin  // correlated set
          int base;
          base = $urandom_range(0, 40000) - 20000;
          foreach (y[m]) y[m] = Y_W'(base + $urandom_range(0, 4000) - 2000);
        end
        1: begin  // one strongly deviating phase
          int base, bad;
          base = $urandom_range(0, 40000) - 20000;
          bad = $urandom_range(0, M - 1);
          foreach (y[m]) y[m] = Y_W'(base + $urandom_range(0, 4000) - 2000);
          y[bad] = Y_W'(($urandom_range(0, 1) != 0) ? 120000 : -120000);
        end
        default: foreach (y[m]) y[m] = Y_W'($urandom);
      endcase
    end
    @(negedge clk) y_valid = 0;
    repeat (4) @(posedge clk);
    chk(q.size() == 0, "outputs missing");
    chk(n_det > 100, "fault detections exercised");
    $display("outputs=%0d detections=%0d", n_out, n_det);
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
