// tb_trdic_env: sender, receiver, SEE injector and checker for trdic_top,
// shared by the reduced-size and the full-size end-to-end testbenches.
//
// It resets the design, sends NWORDS random 32-bit words (DIGITS 1-of-4
// digits each; a third of the digits repeat the previous value) followed by
// one dummy word, and checks that the receiver sees the reset value first
// and then every word in order. The receiver sometimes stalls for a long
// time, so back-pressure reaches the sender. Every STRIKE_EVERY words the
// sender waits for the link to drain and a single upset is injected on a
// waiting rail in the middle of the link, on a rail that the next two words
// do not use: it must neither create a word nor corrupt one (the three-hot
// digit it produces is removed by the double check).
//
// Mechanisms counted and required to occur: repeated-token code words,
// distinct-token code words, the discarded initial word, the dummy tail
// word, sender stalls by back-pressure, and corrected upsets.
module tb_trdic_env #(
  parameter int DEPTH = 4,
  parameter int DIGITS = 4,
  parameter int NWORDS = 100,
  parameter int STRIKE_EVERY = 10
) (
  output logic                      clk,
  output logic                      rst_n,
  output logic [DIGITS*4-1:0]       tx_data,
  input  logic                      tx_ack,
  input  logic [DIGITS*4-1:0]       rx_data,
  output logic                      rx_ack,
  output logic [DEPTH*DIGITS*5-1:0] see
);
  import tb_trdic_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [DIGITS*4-1:0] words[NWORDS+2];
  int n_out = 0;
  int n_repeat = 0, n_distinct = 0, n_stall = 0, n_strike = 0;
  longint cycles = 0;
  bit rx_stall_mode = 1'b0;

  initial clk = 1'b0;
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic complete(input logic [DIGITS*4-1:0] v);
    for (int k = 0; k < DIGITS; k++) if (v[k*4 +: 4] == '0) return 1'b0;
    return 1'b1;
  endfunction

  task automatic finish();
    $display("mechanisms: repeat=%0d distinct=%0d stall=%0d corrected_upsets=%0d words_out=%0d cycles=%0d",
             n_repeat, n_distinct, n_stall, n_strike, n_out, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  // receiver
  initial begin
    rx_ack = 1'b1;
    forever begin
      @(negedge clk);
      if (complete(rx_data)) begin
        if (n_out % 7 == 3) repeat (40 + DEPTH * 10) @(negedge clk);
        else repeat ($urandom % 3) @(negedge clk);
        if (n_out < NWORDS + 2)
          chk(rx_data == words[n_out], $sformatf("word %0d: %h expected %h",
                                                 n_out, rx_data, words[n_out]));
        else chk(1'b0, "extra word");
        n_out++;
        rx_ack = 1'b0;
        while (rx_data !== '0) @(negedge clk);
        rx_ack = 1'b1;
      end
    end
  end

  initial begin
    #(64'd10 * (64'd20000 + 64'd2000 * NWORDS * DEPTH));
    failures++;
    $display("FAIL watchdog");
    finish();
  end

  initial begin
    int wait_cycles;
    int digit, rail, stage;
    logic [3:0] busy;
    rst_n = 1'b0;
    tx_data = '0;
    see = '0;
    words[0] = {DIGITS{4'b0001}};      // reset value shared by both ends
    for (int n = 1; n < NWORDS + 2; n++)
      for (int k = 0; k < DIGITS; k++) begin
        words[n][k*4 +: 4] = ($urandom % 3 == 0) ? words[n-1][k*4 +: 4] : rand_token();
        if (words[n][k*4 +: 4] == words[n-1][k*4 +: 4]) n_repeat++;
        else n_distinct++;
      end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // words[1..NWORDS] are data, words[NWORDS+1] is the dummy tail word
    for (int n = 1; n < NWORDS + 2; n++) begin
      if (n % STRIKE_EVERY == 0 && n + 1 < NWORDS + 2) begin
        // let the link drain, then strike a waiting rail mid-link
        repeat (DEPTH * 12 + 40) @(negedge clk);
        digit = $urandom % DIGITS;
        busy = words[n-1][digit*4 +: 4] | words[n][digit*4 +: 4] |
               words[n+1][digit*4 +: 4];
        rail = -1;
        for (int r = 0; r < 4; r++) if (!busy[r]) rail = r;
        if (rail >= 0) begin
          stage = DEPTH / 2;
          see[stage*DIGITS*5 + digit*5 + rail] = 1'b1;
          @(negedge clk);
          see = '0;
          n_strike++;
          repeat (DEPTH * 4) @(negedge clk);
        end
      end
      wait_cycles = 0;
      while (tx_ack !== 1'b1) begin @(negedge clk); wait_cycles++; end
      tx_data = words[n];
      while (tx_ack !== 1'b0) begin @(negedge clk); wait_cycles++; end
      if (wait_cycles > 30) n_stall++;
      tx_data = '0;
    end
    // the dummy word's own confirmation never comes: NWORDS+1 words out
    while (n_out < NWORDS + 1) @(negedge clk);
    repeat (DEPTH * 20 + 100) @(negedge clk);
    chk(n_out == NWORDS + 1, $sformatf("%0d words delivered, expected %0d", n_out, NWORDS + 1));
    chk(n_repeat > 0, "repeated-token code words occurred");
    chk(n_distinct > 0, "distinct-token code words occurred");
    chk(n_stall > 0, "back-pressure stalls occurred");
    chk(n_strike > 0, "upsets injected and corrected");
    finish();
  end
endmodule
