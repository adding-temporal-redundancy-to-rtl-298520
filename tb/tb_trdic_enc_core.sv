// tb_trdic_enc_core: self-checking testbench of the 1-of-4 to 2-of-5 TRDIC
// conversion (2 digits).
// For all 16 (prev, cur) pairs of each digit the code is compared with the
// conversion table; the tokens arrive in random order (prev first or cur
// first), so the test also checks that no code rail rises before both
// tokens are present and that the code returns to spacer only after both
// have left.
module tb_trdic_enc_core;
  import tb_trdic_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] cur = '0, prev = '0;
  logic [9:0] code;
  int checks = 0, failures = 0;
  int n_repeat = 0;

  trdic_enc_core #(.DIGITS(2)) dut (
    .clk(clk), .rst_n(rst_n), .cur(cur), .prev(prev), .code(code));

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] p0, c0, p1, c1;
    logic [9:0] exp;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 400; n++) begin
      p0 = 4'b0001 << (n % 4);        p1 = rand_token();
      c0 = 4'b0001 << ((n / 4) % 4);  c1 = rand_token();
      exp = {ref_code(p1, c1), ref_code(p0, c0)};
      if (p0 == c0) n_repeat++;
      if ($urandom % 2) begin
        prev = {p1, p0}; repeat (2) @(negedge clk);
        chk(code == '0, "no rail before cur arrives");
        cur = {c1, c0};
      end else begin
        cur = {c1, c0}; repeat (2) @(negedge clk);
        chk(code == '0, "no rail before prev arrives");
        prev = {p1, p0};
      end
      repeat (2) @(negedge clk);
      chk(code == exp, $sformatf("prev %b%b cur %b%b: code %b expected %b",
                                 p1, p0, c1, c0, code, exp));
      // one token leaves: the code must stay complete
      if ($urandom % 2) cur = '0; else prev = '0;
      repeat (2) @(negedge clk);
      chk(code == exp, "code holds until both tokens leave");
      cur = '0; prev = '0;
      repeat (2) @(negedge clk);
      chk(code == '0, "spacer");
    end
    chk(n_repeat > 0, "repeated tokens exercised");
    // the conversion uses every 2-of-5 word
    begin
      bit seen[32];
      for (int a = 0; a < 4; a++) for (int b = 0; b < 4; b++)
        seen[ref_code(4'b1 << a, 4'b1 << b)] = 1'b1;
      for (int v = 0; v < 32; v++)
        if (popcount5(5'(v)) == 2) chk(seen[v], $sformatf("word %b used", 5'(v)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
