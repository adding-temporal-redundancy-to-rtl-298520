// tb_c_element: self-checking testbench of the C-element with SEE pin.
// A behavioural reference (output takes the common input value when the
// inputs agree, otherwise keeps its value; a strike inverts the result) is
// compared with the DUT every step under random stimulus. Directed cases
// check that a strike in a driven state (000, 111) is a one-step transient
// and a strike in a holding state (010, 100, 011, 101) is a lasting upset.
module tb_c_element;
  logic clk = 1'b0, rst_n = 1'b0;
  logic a = 1'b0, b = 1'b0, see = 1'b0;
  logic q;
  logic q_ref;
  int checks = 0, failures = 0;

  c_element dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .see(see), .q(q));

  always #5 clk = ~clk;

  task automatic check(input logic exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%0b expected %0b", what, q, exp);
    end
  endtask

  task automatic step(input logic na, input logic nb, input logic ns);
    a = na; b = nb; see = ns;
    @(posedge clk);
    if (na == nb) q_ref = na ^ ns;
    else          q_ref = q_ref ^ ns;
    #1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    q_ref = 1'b0;
    #12 check(1'b0, "reset");
    rst_n = 1'b1;
    @(negedge clk);
    // random stimulus
    for (int i = 0; i < 2000; i++) begin
      step(1'($urandom), 1'($urandom), ($urandom % 8) == 0);
      check(q_ref, "random");
      @(negedge clk);
    end
    // SET in state 000: visible for one step only
    step(0, 0, 0); @(negedge clk);
    step(0, 0, 1); check(1'b1, "SET 000 pulse"); @(negedge clk);
    step(0, 0, 0); check(1'b0, "SET 000 recovers"); @(negedge clk);
    // SET in state 111
    step(1, 1, 0); @(negedge clk);
    step(1, 1, 1); check(1'b0, "SET 111 pulse"); @(negedge clk);
    step(1, 1, 0); check(1'b1, "SET 111 recovers"); @(negedge clk);
    // SEU in holding state 100 (a=1, b=0, q=0): flip persists
    step(0, 0, 0); @(negedge clk);
    step(1, 0, 0); check(1'b0, "hold 100"); @(negedge clk);
    step(1, 0, 1); check(1'b1, "SEU 100 flips"); @(negedge clk);
    step(1, 0, 0); check(1'b1, "SEU 100 persists"); @(negedge clk);
    step(1, 0, 0); check(1'b1, "SEU 100 persists 2"); @(negedge clk);
    // SEU in holding state 011 (a=0, b=1, q=1)
    step(1, 1, 0); @(negedge clk);
    step(0, 1, 0); check(1'b1, "hold 011"); @(negedge clk);
    step(0, 1, 1); check(1'b0, "SEU 011 flips"); @(negedge clk);
    step(0, 1, 0); check(1'b0, "SEU 011 persists"); @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
