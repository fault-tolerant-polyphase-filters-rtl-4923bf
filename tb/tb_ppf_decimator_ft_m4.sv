// tb_ppf_decimator_ft_m4: the end-to-end test of tb_ppf_decimator_ft run on
// a 1/4 decimator (M = 4 phases of K = 16 taps, N = 64, 20-bit phase outputs),
// the smallest decimation rate for which the neighbour substitution is
// expected to stay useful (lower correlation between adjacent phases). The
// stimulus, the reference model, the emulated upsets (phases 0, 2 and 3 stuck,
// a coefficient upset, upsets of z' in copy 1 and of z in copy 2) and the
// mechanism counts are the same; the printed SNR_s shows the smaller gain of
// the substitution at this rate.
module tb_ppf_decimator_ft_m4;
  import ppf_pkg::*;
  import ppf_ref_pkg::*;
  localparam int M = 4, N = N_DEF, K = N / M;
  localparam int X_W = X_W_DEF, H_W = H_W_DEF, Y_W = 20, Z_W = Z_W_DEF;
  localparam int N_OUT = 260;

  logic clk = 0, rst_n = 1;
  logic coef_wr_en = 0;
  logic [$clog2(N)-1:0] coef_wr_addr = '0;
  logic signed [H_W-1:0] coef_wr_data = '0;
  logic in_valid = 0;
  logic signed [X_W-1:0] in_x = '0;
  logic out_valid;
  logic signed [Z_W-1:0] z_out;
  sel_rule_e sel_rule;
  logic sel_copy2, phase_fault;
  logic [$clog2(M)-1:0] phase_fault_idx;

  ppf_decimator_ft #(.M(M), .N(N), .X_W(X_W), .H_W(H_W), .Y_W(Y_W), .Z_W(Z_W)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint h [N];
  longint xs [$];
  int     acc_cyc [$];     // cycle in which each input sample was accepted
  int     cyc = 0;
  int     n_out = 0;
  int     gaps = 0;

  // fault modes, changed only between outputs
  typedef enum int { F_NONE, F_PHASE, F_COEF, F_ZP1, F_Z2 } fmode_e;
  fmode_e fmode = F_NONE;
  int     f_phase = 0;
  longint f_val = 0;

  // mechanism counters
  int n_detect_ok = 0, n_improved = 0, n_coef_detect = 0, n_coef_out = 0;
  int rule_cnt [4];
  longint err_fixed = 0, err_raw = 0, sig_pow = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic longint direct_z(int r);
    longint s = 0;
    for (int n = 0; n < N; n++) s += h[n] * xs[r * M + n];
    return s;
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (rst_n && in_valid) begin
      xs.push_back(longint'(in_x));
      acc_cyc.push_back(cyc);
    end
    if (rst_n && out_valid) begin
      longint y[];
      longint z1, zp1, z2, zp2, zf, zff;
      int c1, c2, i1, i2, rule_r;
      bit d1, d2, p2;
      int r;
      r = n_out;
      y = new[M];
      for (int m = 0; m < M; m++) begin
        y[m] = 0;
        for (int k = 0; k < K; k++) y[m] += h[m + k * M] * xs[(r + k) * M + m];
      end
      zff = 0;
      foreach (y[m]) zff += y[m];
      chk(zff == direct_z(r), $sformatf("polyphase reference vs direct form at r=%0d", r));
      if (fmode == F_PHASE) y[f_phase] = f_val;
      prot_ref(y, Z_W, z1, zp1, c1, d1, i1, fmode == F_ZP1, f_val, 1'b0, 0);
      prot_ref(y, Z_W, z2, zp2, c2, d2, i2, 1'b0, 0, fmode == F_Z2, f_val);
      sel_ref(z1, zp1, c1, z2, zp2, c2, M, p2, rule_r);
      chk(longint'(z_out) == (p2 ? z2 : z1),
          $sformatf("r=%0d mode=%s z_out=%0d expected %0d", r, fmode.name(), z_out, p2 ? z2 : z1));
      chk(int'(sel_rule) == rule_r, $sformatf("r=%0d rule %0d expected %0d", r, sel_rule, rule_r));
      chk(sel_copy2 == p2, $sformatf("r=%0d selected copy", r));
      chk(acc_cyc[r * M + N - 1] + 5 == cyc, $sformatf("r=%0d latency %0d", r, cyc - acc_cyc[r * M + N - 1]));
      rule_cnt[int'(sel_rule)]++;
      if (fmode == F_PHASE) begin
        zf = zp1;  // sum including the faulty phase, uncorrected
        if (phase_fault && int'(phase_fault_idx) == f_phase) n_detect_ok++;
        if ((longint'(z_out) - zff) ** 2 < (zf - zff) ** 2) n_improved++;
        err_fixed += (longint'(z_out) - zff) ** 2;
        err_raw   += (zf - zff) ** 2;
        sig_pow   += zff ** 2;
      end
      if (fmode == F_COEF) n_coef_out++;
      if (fmode == F_COEF && phase_fault) n_coef_detect++;
      n_out++;
    end
  end

  // ---- stimulus helpers ----
  task automatic write_coef(int n, longint v);
    @(negedge clk);
    coef_wr_en = 1; coef_wr_addr = n[$clog2(N)-1:0]; coef_wr_data = H_W'(v);
    @(negedge clk);
    coef_wr_en = 0;
  endtask

  task automatic wait_outputs(int upto);
    while (n_out < upto) @(posedge clk);
  endtask

  // Input driver: runs freely until stopped.
  bit stop_in = 0;
  bit hold_in = 0;     // pauses the input so the pipeline drains before a fault-mode change
  initial begin : drive
    int sym, nxt, t;
    real v;
    sym = 1; nxt = -1; t = 0;
    wait (rst_n == 1 && coef_wr_en == 0 && cyc > 80);
    while (!stop_in) begin
      @(negedge clk);
      if (hold_in) begin
        in_valid = 0;
      end else if ($urandom_range(0, 9) == 0) begin
        in_valid = 0; gaps++;
      end else begin
        v = 80.0 * (real'(sym) + real'(nxt - sym) * real'(t) / 64.0)
            + real'(int'($urandom_range(0, 30)) - 15);
        if (v > 127.0) v = 127.0;
        if (v < -128.0) v = -128.0;
        in_x = X_W'($rtoi(v));
        in_valid = 1;
        t++;
        if (t == 64) begin t = 0; sym = nxt; nxt = ($urandom_range(0, 1) != 0) ? 1 : -1; end
      end
    end
    @(negedge clk) in_valid = 0;
  end

  initial begin
    real hr [N];
    real snr_f, snr_s;
    real hmax, wc, d;
    int  big;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // prototype low-pass filter
    wc = 3.14159265358979 / real'(M);
    hmax = 0.0;
    for (int n = 0; n < N; n++) begin
      d = real'(n) - real'(N - 1) / 2.0;
      hr[n] = $sin(wc * d) / (3.14159265358979 * d)
              * (0.54 - 0.46 * $cos(2.0 * 3.14159265358979 * real'(n) / real'(N - 1)));
      if ((hr[n] > 0 ? hr[n] : -hr[n]) > hmax) hmax = (hr[n] > 0 ? hr[n] : -hr[n]);
    end
    for (int n = 0; n < N; n++) begin
      h[n] = longint'($rtoi(127.0 * hr[n] / hmax + (hr[n] >= 0 ? 0.5 : -0.5)));
      write_coef(n, h[n]);
    end
    big = N / 2;  // central tap, P_0(K/2)

    wait_outputs(40);
    // phase filter 5 stuck at a large positive value
    @(posedge clk iff out_valid); hold_in = 1; repeat (8) @(negedge clk);
    fmode = F_PHASE; f_phase = 2; f_val = 100000;
    force dut.y[2] = 20'sd100000;
    hold_in = 0;
    wait_outputs(70);
    @(posedge clk iff out_valid); hold_in = 1; repeat (8) @(negedge clk);
    release dut.y[2];
    // first phase (edge of the substitution rule)
    fmode = F_PHASE; f_phase = 0; f_val = -100000;
    force dut.y[0] = -20'sd100000;
    hold_in = 0;
    wait_outputs(90);
    @(posedge clk iff out_valid); hold_in = 1; repeat (8) @(negedge clk);
    release dut.y[0];
    // last phase
    fmode = F_PHASE; f_phase = M - 1; f_val = 100000;
    force dut.y[3] = 20'sd100000;
    hold_in = 0;
    wait_outputs(110);
    @(posedge clk iff out_valid); hold_in = 1; repeat (8) @(negedge clk);
    release dut.y[3];
    fmode = F_NONE;
    hold_in = 0;
    wait_outputs(115);
    // user-memory upset: sign bit of the central coefficient
    @(posedge clk iff out_valid); hold_in = 1; repeat (8) @(negedge clk);
    fmode = F_COEF;
    h[big] = longint'(signed'(H_W'(h[big] ^ 128)));
    write_coef(big, h[big]);
    hold_in = 0;
    wait_outputs(160);
    @(posedge clk iff out_valid); hold_in = 1; repeat (8) @(negedge clk);
    h[big] = longint'(signed'(H_W'(h[big] ^ 128)));
    write_coef(big, h[big]);
    fmode = F_NONE;
    hold_in = 0;
    wait_outputs(170);
    // upset of the registered sum z' in protection copy 1
    @(posedge clk iff out_valid); hold_in = 1; repeat (8) @(negedge clk);
    fmode = F_ZP1; f_val = 1500000;
    force dut.u_sft.u_prot1.zp_d = 22'sd1500000;
    hold_in = 0;
    wait_outputs(190);
    @(posedge clk iff out_valid); hold_in = 1; repeat (8) @(negedge clk);
    release dut.u_sft.u_prot1.zp_d;
    // upset of the corrected output register z in protection copy 2
    fmode = F_Z2; f_val = 12345;
    force dut.u_sft.u_prot2.z = 22'sd12345;
    hold_in = 0;
    wait_outputs(210);
    @(posedge clk iff out_valid); hold_in = 1; repeat (8) @(negedge clk);
    release dut.u_sft.u_prot2.z;
    fmode = F_NONE;
    hold_in = 0;
    wait_outputs(N_OUT);
    stop_in = 1;
    repeat (40) @(posedge clk);

    chk(n_detect_ok > 0, "phase fault detected at the right index");
    chk(n_improved > 0, "correction reduced the output error");
    chk(n_coef_out > 0, "outputs under a coefficient upset");
    chk(rule_cnt[SEL_AGREE] > 0, "rule (a) copies agree");
    chk(rule_cnt[SEL_BY_C] > 0, "rule (b) selection by C");
    chk(rule_cnt[SEL_BY_ZEQ] > 0, "rule (c) selection by z == z'");
    chk(gaps > 0, "input gaps");
    $display("outputs=%0d gaps=%0d phase-fault detections=%0d improved=%0d coef-upset outputs=%0d (flagged %0d)",
             n_out, gaps, n_detect_ok, n_improved, n_coef_out, n_coef_detect);
    $display("rules: agree=%0d by_C=%0d by_zeq=%0d default=%0d",
             rule_cnt[0], rule_cnt[1], rule_cnt[2], rule_cnt[3]);
    // SNR of the output while one phase is stuck: without correction (SNR_f)
    // and with the neighbour substitution (SNR_s).
    if (err_fixed > 0) begin
      snr_f = 10.0 * $log10(real'(sig_pow) / real'(err_raw));
      snr_s = 10.0 * $log10(real'(sig_pow) / real'(err_fixed));
      $display("stuck-phase windows: SNR_f = %0.1f dB uncorrected, SNR_s = %0.1f dB corrected", snr_f, snr_s);
      chk(snr_s > snr_f + 10.0, "correction gains more than 10 dB");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
