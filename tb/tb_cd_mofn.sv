// tb_cd_mofn: self-checking testbench of the digit completion detector.
// Instances: 2-of-5 (the link code), 1-of-4 (the data code), 2-of-3 and
// dual rail (1-of-2), the last two exhaustively over all rail sets. Each is
// driven through four-phase sequences in which rails rise one at a time to a
// random set and then fall one at a time. Reference: while rising, valid is
// 1 once at least M rails are high; while falling, valid stays 1 until all
// rails are low if the word had reached M rails, and stays 0 otherwise
// (a single rail on a 2-of-5 digit never completes).
module tb_cd_mofn;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [4:0] d5 = '0;
  logic [3:0] d4 = '0;
  logic v5, v4;
  int checks = 0, failures = 0;
  int n_single = 0;

  cd_mofn #(.N(5), .M(2)) dut5 (.clk(clk), .rst_n(rst_n), .d(d5), .valid(v5));
  cd_mofn #(.N(4), .M(1)) dut4 (.clk(clk), .rst_n(rst_n), .d(d4), .valid(v4));
  logic [2:0] d3 = '0;
  logic [1:0] d2 = '0;
  logic v3, v2;
  cd_mofn #(.N(3), .M(2)) dut3 (.clk(clk), .rst_n(rst_n), .d(d3), .valid(v3));
  cd_mofn #(.N(2), .M(1)) dut2 (.clk(clk), .rst_n(rst_n), .d(d2), .valid(v2));

  // Rising then falling sequence on the 2-of-3 and dual-rail detectors.
  task automatic word_small(input logic [2:0] set3, input logic [1:0] set2);
    int pk3 = 0, pc3 = 0, pc2 = 0;
    for (int i = 0; i < 3; i++) begin
      if (set3[i]) begin d3[i] = 1'b1; pc3++; pk3 = pc3; end
      if (i < 2 && set2[i]) begin d2[i] = 1'b1; pc2++; end
      repeat (2) @(negedge clk);
      expect_v(v3, pc3 >= 2, "2of3 rise");
      expect_v(v2, pc2 >= 1, "dual rail rise");
    end
    for (int i = 0; i < 3; i++) begin
      if (set3[i]) begin d3[i] = 1'b0; pc3--; end
      if (i < 2 && set2[i]) begin d2[i] = 1'b0; pc2--; end
      repeat (2) @(negedge clk);
      expect_v(v3, (pk3 >= 2) && (pc3 > 0), "2of3 fall");
      expect_v(v2, pc2 > 0, "dual rail fall");
    end
  endtask

  always #5 clk = ~clk;

  task automatic expect_v(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: valid=%0b expected %0b", what, got, exp);
    end
  endtask

  // One four-phase word on the 2-of-5 detector with rail set `set`.
  task automatic word5(input logic [4:0] set);
    int peak = 0;
    int pc = 0;
    for (int i = 0; i < 5; i++) if (set[i]) begin
      d5[i] = 1'b1; pc++; peak = pc;
      repeat (3) @(negedge clk);
      expect_v(v5, pc >= 2, "2of5 rise");
    end
    if (peak == 1) n_single++;
    for (int i = 0; i < 5; i++) if (set[i]) begin
      d5[i] = 1'b0; pc--;
      repeat (3) @(negedge clk);
      expect_v(v5, (peak >= 2) && (pc > 0), "2of5 fall");
    end
  endtask

  task automatic word4(input logic [3:0] set);
    int peak = 0;
    int pc = 0;
    for (int i = 0; i < 4; i++) if (set[i]) begin
      d4[i] = 1'b1; pc++; peak = pc;
      #1 expect_v(v4, 1'b1, "1of4 rise");
    end
    for (int i = 0; i < 4; i++) if (set[i]) begin
      d4[i] = 1'b0; pc--;
      #1 expect_v(v4, pc > 0, "1of4 fall");
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    expect_v(v5, 1'b0, "2of5 spacer");
    expect_v(v4, 1'b0, "1of4 spacer");
    // every 2-of-5 word, plus single rails and three-hot words
    for (int s = 1; s < 32; s++) word5(5'(s));
    for (int s = 1; s < 16; s++) word4(4'(s));
    for (int i = 0; i < 200; i++) word5(5'($urandom));
    for (int s3 = 0; s3 < 8; s3++) word_small(3'(s3), 2'(s3));
    expect_v(n_single > 0, 1'b1, "single-rail words exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
