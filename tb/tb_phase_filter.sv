// tb_phase_filter: drives a random phase stream x_m(j) with random gaps and
// random coefficients, and compares every output with
// y(r) = sum_k P(k) x_m(r+k) computed from the stored input history. Also
// checks that no output appears during the K-1 warm-up samples and that each
// output follows its input strobe by exactly one cycle.
module tb_phase_filter;
  localparam int K = 4, X_W = 8, H_W = 8, Y_W = 18;
  logic clk = 0, rst_n = 1;
  logic in_valid = 0;
  logic signed [X_W-1:0] in_x = '0;
  logic signed [H_W-1:0] coef [K];
  logic y_valid;
  logic signed [Y_W-1:0] y;
  int checks = 0, failures = 0;
  longint xs [$];
  int outs = 0;
  logic was_valid = 0;

  phase_filter #(.K(K), .X_W(X_W), .H_W(H_W), .Y_W(Y_W)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    chk(y_valid == (was_valid && xs.size() >= K), $sformatf("y_valid timing after %0d inputs", xs.size()));
    if (y_valid) begin
      longint ref_y;
      int r;
      ref_y = 0;
      r = outs;
      for (int k = 0; k < K; k++) ref_y += longint'(coef[k]) * xs[r + k];
      chk(longint'(y) == ref_y, $sformatf("y(%0d) = %0d, expected %0d", r, y, ref_y));
      outs++;
    end
    was_valid <= in_valid;
    if (in_valid) xs.push_back(longint'(in_x));
  end

  initial begin
    foreach (coef[k]) coef[k] = H_W'($urandom);
    coef[0] = -128;   // extreme values
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 2) != 0);
      in_x = (i < 20) ? X_W'(-128) : X_W'($urandom);
    end
    @(negedge clk) in_valid = 0;
    repeat (3) @(posedge clk);
    chk(outs == xs.size() - K + 1, "output count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
