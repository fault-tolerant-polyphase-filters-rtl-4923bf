// tb_fault_filter_detect: applies random and directed comparison patterns
// (C = 1 and C = M-1 with the lone bit at every position, including both
// ends) together with random phase outputs, and checks C, the detection
// flag, the faulty index and the correction dz = y^S_m - y_m.
module tb_fault_filter_detect;
  localparam int M = 16, Y_W = 18;
  logic c [M];
  logic signed [Y_W-1:0] y [M];
  logic [$clog2(M+1)-1:0] c_count;
  logic detect;
  logic [$clog2(M)-1:0] fault_idx;
  logic signed [Y_W+1:0] dz;
  int checks = 0, failures = 0;
  int n_det = 0;

  fault_filter_detect #(.M(M), .Y_W(Y_W)) dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic check_now(string tag);
    int ones = 0, idx = -1;
    longint ys, dz_ref = 0;
    bit det;
    foreach (c[m]) ones += int'(c[m]);
    det = (ones == 1) || (ones == M - 1);
    if (det) begin
      foreach (c[m]) if (c[m] == (ones == 1)) idx = m;
      if (idx == 0) ys = y[1];
      else if (idx == M - 1) ys = y[M-2];
      else ys = ppf_ref_pkg::floor_half(longint'(y[idx-1]) + longint'(y[idx+1]));
      dz_ref = ys - longint'(y[idx]);
      n_det++;
    end
    #1;
    chk(int'(c_count) == ones, {tag, " C"});
    chk(detect == det, {tag, " detect"});
    if (det) begin
      chk(int'(fault_idx) == idx, $sformatf("%s index %0d vs %0d", tag, fault_idx, idx));
      chk(longint'(dz) == dz_ref, $sformatf("%s dz %0d vs %0d", tag, dz, dz_ref));
    end else
      chk(dz == '0, {tag, " dz zero"});
  endtask

  initial begin
    for (int t = 0; t < 2 * M; t++) begin
      foreach (y[m]) y[m] = Y_W'($urandom);
      foreach (c[m]) c[m] = (t >= M);
      c[t % M] = (t < M);
      #1 check_now($sformatf("lone bit %0d", t));
    end
    for (int t = 0; t < 2000; t++) begin
      foreach (y[m]) y[m] = Y_W'($urandom);
      foreach (c[m]) c[m] = ($urandom_range(0, 1) == 1);
      #1 check_now($sformatf("random %0d", t));
    end
    chk(n_det >= 2 * M, "detections exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
