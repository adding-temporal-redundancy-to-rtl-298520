// tb_trdic_encoder: self-checking testbench of the TRDIC encoder (2 digits).
// The testbench sends 300 random 1-of-4 words (with frequent repeats) over
// the four-phase input channel and takes the 2-of-5 words from the output
// channel with random delays. Word n must be ref_code(word n-1, word n),
// with word -1 being the reset value 0001 of every digit, and the encoder
// must emit exactly one code word per input word.
module tb_trdic_encoder;
  import tb_trdic_ref_pkg::*;
  localparam int D = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [D*4-1:0] in_data = '0;
  logic in_ack;
  logic [D*5-1:0] out_data;
  logic out_ack = 1'b1;
  int checks = 0, failures = 0;
  logic [D*5-1:0] exp_q[$];
  int n_out = 0, n_repeat = 0;
  bit done = 1'b0;

  trdic_encoder #(.DIGITS(D)) dut (
    .clk(clk), .rst_n(rst_n), .in_data(in_data), .in_ack(in_ack),
    .out_data(out_data), .out_ack(out_ack));

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic complete(input logic [D*5-1:0] v);
    for (int k = 0; k < D; k++) if (popcount5(v[k*5 +: 5]) < 2) return 1'b0;
    return 1'b1;
  endfunction

  always begin
    @(negedge clk);
    if (complete(out_data)) begin
      logic [D*5-1:0] e;
      repeat ($urandom % 4) @(negedge clk);
      e = (exp_q.size() > 0) ? exp_q.pop_front() : '0;
      chk(out_data == e, $sformatf("code %0d: %b expected %b", n_out, out_data, e));
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
    logic [D*4-1:0] prev, w;
    logic [D*5-1:0] c;
    prev = {D{4'b0001}};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      for (int k = 0; k < D; k++) begin
        w[k*4 +: 4] = ($urandom % 3 == 0) ? prev[k*4 +: 4] : rand_token();
        c[k*5 +: 5] = ref_code(prev[k*4 +: 4], w[k*4 +: 4]);
        if (w[k*4 +: 4] == prev[k*4 +: 4]) n_repeat++;
      end
      exp_q.push_back(c);
      while (in_ack !== 1'b1) @(negedge clk);
      in_data = w;
      while (in_ack !== 1'b0) @(negedge clk);
      in_data = '0;
      prev = w;
    end
    while (exp_q.size() > 0) @(negedge clk);
    repeat (100) @(negedge clk);
    chk(n_out == 300, $sformatf("%0d code words for 300 input words", n_out));
    chk(n_repeat > 0, "repeated tokens exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
