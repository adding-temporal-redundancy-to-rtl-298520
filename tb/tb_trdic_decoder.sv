// tb_trdic_decoder: self-checking testbench of the TRDIC decoder (2 digits).
// The testbench encodes a random word stream itself (ref_code with the
// reset value 0001 as the word before the first) and feeds the code words
// over the four-phase input channel. The decoder must deliver the reset
// value first and then every word in order. Every tenth code word gets one
// extra upset rail (an invalid three-hot digit) chosen so that the double
// check can remove it; the output must still be exact.
module tb_trdic_decoder;
  import tb_trdic_ref_pkg::*;
  localparam int D = 2;
  localparam int NW = 300;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [D*5-1:0] in_data = '0;
  logic in_ack;
  logic [D*4-1:0] out_data;
  logic out_ack = 1'b1;
  int checks = 0, failures = 0;
  logic [D*4-1:0] words[NW+2];
  int n_out = 0, n_icd = 0;

  trdic_decoder #(.DIGITS(D)) dut (
    .clk(clk), .rst_n(rst_n), .in_data(in_data), .in_ack(in_ack),
    .out_data(out_data), .out_ack(out_ack));

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic complete(input logic [D*4-1:0] v);
    for (int k = 0; k < D; k++) if (v[k*4 +: 4] == '0) return 1'b0;
    return 1'b1;
  endfunction

  // receiver: words[0] is the reset value, then the sent words
  always begin
    @(negedge clk);
    if (complete(out_data)) begin
      repeat ($urandom % 4) @(negedge clk);
      chk(out_data == words[n_out], $sformatf("word %0d: %b expected %b",
                                              n_out, out_data, words[n_out]));
      n_out++;
      out_ack = 1'b0;
      while (out_data !== '0) @(negedge clk);
      out_ack = 1'b1;
    end
  end

  initial begin
    #5000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [D*5-1:0] c;
    logic [3:0] p, w, nx, bad;
    logic [4:0] extra;
    words[0] = {D{4'b0001}};
    for (int n = 1; n < NW + 2; n++)
      for (int k = 0; k < D; k++)
        words[n][k*4 +: 4] = ($urandom % 3 == 0) ? words[n-1][k*4 +: 4] : rand_token();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // code word n carries (words[n], words[n+1]); NW+1 words confirm NW+1
    for (int n = 0; n < NW + 1; n++) begin
      for (int k = 0; k < D; k++)
        c[k*5 +: 5] = ref_code(words[n][k*4 +: 4], words[n+1][k*4 +: 4]);
      if (n % 10 == 5 && n + 2 < NW + 2) begin
        p = words[n][3:0]; w = words[n+1][3:0]; nx = words[n+2][3:0];
        extra = 5'b00001 << ($urandom % 5);
        bad = extra[4] ? p : extra[3:0];
        if ((extra & c[4:0]) == 0 && extra[3:0] != p && (bad & (w | nx)) == 0) begin
          c[4:0] = c[4:0] | extra;
          n_icd++;
        end
      end
      while (in_ack !== 1'b1) @(negedge clk);
      in_data = c;
      while (in_ack !== 1'b0) @(negedge clk);
      in_data = '0;
    end
    repeat (200) @(negedge clk);
    chk(n_out == NW + 1, $sformatf("%0d words delivered, expected %0d", n_out, NW + 1));
    chk(n_icd > 0, "three-hot code words exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
