// tb_input_commutator: checks that the commutator hands over every block of M
// samples with sample jM+m on phase m, one cycle after the block's last
// sample, under random gaps in the input stream.
module tb_input_commutator;
  localparam int M = 16;
  localparam int X_W = 8;
  logic clk = 0, rst_n = 1;
  logic in_valid = 0;
  logic signed [X_W-1:0] in_x = '0;
  logic blk_valid;
  logic signed [X_W-1:0] blk_x [M];
  int checks = 0, failures = 0;
  int sent = 0, blocks = 0;
  logic signed [X_W-1:0] hist [$];
  logic expect_blk = 0;

  input_commutator #(.M(M), .X_W(X_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    // blk_valid must follow exactly the cycle after the M-th sample
    chk(blk_valid == expect_blk, $sformatf("blk_valid timing at sample %0d dut=%0d phase=%0d", sent, blk_valid, dut.phase));
    if (blk_valid) begin
      for (int m = 0; m < M; m++)
        chk(blk_x[m] == hist[blocks*M + m], $sformatf("block %0d phase %0d", blocks, m));
      blocks++;
    end
    expect_blk <= in_valid && ((sent + 1) % M == 0);
    if (in_valid) begin hist.push_back(in_x); sent++; end
  end

  initial begin
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 40 * M; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_x = X_W'($urandom);
    end
    @(negedge clk) in_valid = 0;
    repeat (4) @(posedge clk);
    chk(blocks == sent / M, "number of blocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
