// tb_trdic_dec_core: self-checking testbench of the TRDIC double check
// (2 digits).
// For every (expected, new) token pair the code word ref_code(expected,
// new) must decode to `expected` and give `new` as the next expected token.
// Worked example of the reference: code 00011 with expected 0001 decodes
// 0001 and expects 0010; code 00110 with expected 0010 decodes 0010 and
// expects 0100. Invalid three-hot codes (a correct word plus one upset
// rail other than the expected one) must still decode to `expected`. An
// expected value made two-hot by such a fault must return to one-hot after
// the next correct word.
module tb_trdic_dec_core;
  import tb_trdic_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [9:0] code = '0;
  logic [7:0] expected = '0;
  logic [7:0] decoded, next_exp;
  int checks = 0, failures = 0;
  int n_icd = 0;

  trdic_dec_core #(.DIGITS(2)) dut (
    .clk(clk), .rst_n(rst_n), .code(code), .expected(expected),
    .decoded(decoded), .next_expected(next_exp));

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic apply(input logic [9:0] c, input logic [7:0] e);
    if ($urandom % 2) begin code = c; @(negedge clk); expected = e; end
    else begin expected = e; @(negedge clk); code = c; end
    repeat (3) @(negedge clk);
  endtask

  task automatic release_all();
    code = '0; expected = '0;
    repeat (3) @(negedge clk);
    chk(decoded == '0 && next_exp == '0, "spacer");
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] e0, n0, e1, n1, n2;
    logic [4:0] extra;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // worked example
    apply({5'b00000, 5'b00011}, {4'b0000, 4'b0001});
    // second digit idle: only digit 0 is checked here
    chk(decoded[3:0] == 4'b0001 && next_exp[3:0] == 4'b0010, "example step 1");
    release_all();
    apply({5'b00000, 5'b00110}, {4'b0000, 4'b0010});
    chk(decoded[3:0] == 4'b0010 && next_exp[3:0] == 4'b0100, "example step 2");
    release_all();
    apply({5'b00000, 5'b01110}, {4'b0000, 4'b0010});
    chk(decoded[3:0] == 4'b0010, "three-hot 01110 filtered");
    release_all();
    // all pairs, both digits
    for (int n = 0; n < 300; n++) begin
      e0 = 4'b0001 << (n % 4); n0 = 4'b0001 << ((n / 4) % 4);
      e1 = rand_token();       n1 = rand_token();
      apply({ref_code(e1, n1), ref_code(e0, n0)}, {e1, e0});
      chk(decoded == {e1, e0}, $sformatf("decode %b%b", e1, e0));
      chk(next_exp == {n1, n0}, $sformatf("next %b%b got %b", n1, n0, next_exp));
      release_all();
    end
    // three-hot codes followed by a clean word
    for (int n = 0; n < 300; n++) begin
      e0 = rand_token(); n0 = rand_token(); n2 = rand_token();
      do extra = 5'b00001 << ($urandom % 5);
      while ((extra & ref_code(e0, n0)) != 0 || extra[3:0] == e0);
      // the stray candidate left in the next expected value (the upset
      // rail, or the checked token when the upset is the extra rail) must
      // not be a rail the next word also uses
      if (((extra[4] ? e0 : extra[3:0]) & (n0 | n2)) != 0) continue;
      n_icd++;
      apply({5'b0, ref_code(e0, n0) | extra}, {4'b0, e0});
      chk(decoded[3:0] == e0, $sformatf("three-hot: decode %b", e0));
      chk((next_exp[3:0] & n0) == n0, "three-hot: next includes the new token");
      e1 = next_exp[3:0];
      release_all();
      apply({5'b0, ref_code(n0, n2)}, {4'b0, e1});
      chk(decoded[3:0] == n0, $sformatf("after fault: decode %b got %b", n0, decoded[3:0]));
      chk(next_exp[3:0] == n2, "after fault: next expected one-hot again");
      release_all();
    end
    chk(n_icd > 20, "three-hot cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
