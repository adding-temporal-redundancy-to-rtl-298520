// tb_c_tree: self-checking testbench of the C-element tree, at N = 16 (the
// word width) and N = 5 (an odd size). Inputs rise in random order, then
// fall in random order. Reference: the output is 0 until every input is
// high, then 1 until every input is low. After the last input change the
// output must settle within ceil(log2(N)) steps.
module tb_c_tree;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:0] in16 = '0;
  logic [4:0]  in5 = '0;
  logic o16, o5;
  int checks = 0, failures = 0;

  c_tree #(.N(16)) dut16 (.clk(clk), .rst_n(rst_n), .in(in16), .out(o16));
  c_tree #(.N(5))  dut5  (.clk(clk), .rst_n(rst_n), .in(in5),  .out(o5));

  always #5 clk = ~clk;

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: out=%0b expected %0b", what, got, exp);
    end
  endtask

  task automatic phase16(input logic val);
    int order[16];
    int lat;
    for (int i = 0; i < 16; i++) order[i] = i;
    order.shuffle();
    for (int i = 0; i < 16; i++) begin
      in16[order[i]] = val;
      if (i < 15) begin
        repeat (5) @(negedge clk);
        chk(o16, ~val, "16 partial holds");
      end
    end
    lat = 0;
    while (o16 !== val && lat < 20) begin @(negedge clk); lat++; end
    chk(o16, val, "16 settles");
    checks++;
    if (lat != 4) begin
      failures++;
      $display("FAIL 16-input tree latency %0d, expected 4", lat);
    end
  endtask

  task automatic phase5(input logic val);
    int order[5];
    for (int i = 0; i < 5; i++) order[i] = i;
    order.shuffle();
    for (int i = 0; i < 5; i++) begin
      in5[order[i]] = val;
      repeat (4) @(negedge clk);
      chk(o5, (i == 4) ? val : ~val, "5 input");
    end
  endtask

  initial begin
    #500000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk(o16, 1'b0, "reset 16");
    for (int r = 0; r < 20; r++) begin
      phase16(1'b1);
      phase16(1'b0);
      phase5(1'b1);
      phase5(1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
