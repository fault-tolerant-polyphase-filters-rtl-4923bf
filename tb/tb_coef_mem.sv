// tb_coef_mem: loads random prototype coefficients h(n) and checks the
// polyphase view P_m(k) = h(m + kM), the reset value and single-word rewrites.
module tb_coef_mem;
  localparam int M = 16, N = 64, H_W = 8, K = N / M;
  logic clk = 0, rst_n = 1;
  logic wr_en = 0;
  logic [$clog2(N)-1:0] wr_addr = '0;
  logic signed [H_W-1:0] wr_data = '0;
  logic signed [H_W-1:0] p [M][K];
  logic signed [H_W-1:0] h [N];
  int checks = 0, failures = 0;

  coef_mem #(.M(M), .N(N), .H_W(H_W)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic check_all(string tag);
    for (int m = 0; m < M; m++)
      for (int k = 0; k < K; k++)
        chk(p[m][k] == h[k * M + m], $sformatf("%s P_%0d(%0d)", tag, m, k));
  endtask

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    foreach (h[n]) h[n] = '0;
    @(negedge clk) check_all("reset");
    for (int n = 0; n < N; n++) begin
      h[n] = H_W'($urandom);
      wr_en = 1; wr_addr = n[$clog2(N)-1:0]; wr_data = h[n];
      @(negedge clk);
    end
    wr_en = 0;
    @(negedge clk) check_all("load");
    for (int t = 0; t < 50; t++) begin
      int n = $urandom_range(0, N - 1);
      h[n] = h[n] ^ H_W'(1 << $urandom_range(0, H_W - 1));
      wr_en = 1; wr_addr = n[$clog2(N)-1:0]; wr_data = h[n];
      @(negedge clk);
      wr_en = 0;
      check_all("upset");
    end
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
