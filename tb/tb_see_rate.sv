// tb_see_rate: single-event failure-rate comparison of a 1-of-4 link, a
// 2-of-5 link and the TRDIC channel, all 16 stages deep and 32 bits wide.
//
// Time scale: the channels are run at one word per 6 ns (32 bits at
// 5.33 Gbit/s); the number of model steps per word is measured first with
// no strikes. Strikes then hit a random register rail of each link (the
// same rail index and instant for all three) at mean intervals of 100, 200,
// 400 and 1000 ns, with a charge above every cell's critical charge, so
// each strike flips the cell it hits. Failures (wrong word, or no word for a long time) are
// counted per channel and converted to failures per second of the
// 6 ns-per-word time base.
//
// Checks: no failure without strikes; summed over all intervals the 2-of-5
// link fails less often than the 1-of-4 link and the TRDIC channel less
// often than the 2-of-5 link. The per-interval rates are printed; with a
// few hundred failures in total, single intervals are too noisy to check.
module tb_see_rate;
  localparam int WORDS_PER_POINT = 15000;
  localparam real NS_PER_WORD = 6.0;

  logic clk = 1'b0;
  logic strike = 1'b0;
  int unsigned strike_idx = 0;
  bit run = 1'b0;
  int f0, f1, f2, w0, w1, w2, d0, d1, d2, h0, h1, h2;
  real charge = 1.0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  tb_see_channel #(.KIND(0)) ch0 (.clk(clk), .strike(strike), .strike_idx(strike_idx),
                                  .charge(charge), .run(run), .n_fail(f0),
                                  .n_words(w0), .n_timeout(d0), .n_hits(h0));
  tb_see_channel #(.KIND(1)) ch1 (.clk(clk), .strike(strike), .strike_idx(strike_idx),
                                  .charge(charge), .run(run), .n_fail(f1),
                                  .n_words(w1), .n_timeout(d1), .n_hits(h1));
  tb_see_channel #(.KIND(2)) ch2 (.clk(clk), .strike(strike), .strike_idx(strike_idx),
                                  .charge(charge), .run(run), .n_fail(f2),
                                  .n_words(w2), .n_timeout(d2), .n_hits(h2));

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #2100000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int intervals_ns[4] = '{100, 200, 400, 1000};
    int steps_per_word, period, b0, b1, b2, s0, s1, s2, t0, t1, t2;
    longint start;
    real sec;
    run = 1'b1;
    // calibration without strikes
    start = 0;
    repeat (20000) @(negedge clk);
    chk(f0 == 0 && f1 == 0 && f2 == 0,
        $sformatf("failures without strikes: %0d %0d %0d", f0, f1, f2));
    steps_per_word = 20000 / ((w2 > 0) ? w2 : 1);
    $display("steps per word (TRDIC channel): %0d; words 1-of-4/2-of-5/TRDIC: %0d/%0d/%0d",
             steps_per_word, w0, w1, w2);
    t0 = 0; t1 = 0; t2 = 0;
    $display("interval_ns  fail/s 1-of-4  fail/s 2-of-5  fail/s TRDIC");
    foreach (intervals_ns[p]) begin
      period = intervals_ns[p] * steps_per_word / int'(NS_PER_WORD);
      b0 = f0; b1 = f1; b2 = f2;
      for (int n = 0; n < WORDS_PER_POINT * steps_per_word; n++) begin
        @(negedge clk);
        if ($urandom % period == 0) begin
          strike_idx = $urandom;
          strike = 1'b1;
        end else strike = 1'b0;
      end
      strike = 1'b0;
      s0 = f0 - b0; s1 = f1 - b1; s2 = f2 - b2;
      t0 += s0; t1 += s1; t2 += s2;
      sec = WORDS_PER_POINT * NS_PER_WORD * 1.0e-9;
      $display("%11d  %13.3g  %13.3g  %12.3g", intervals_ns[p],
               s0 / sec, s1 / sec, s2 / sec);
    end
    $display("total failures 1-of-4/2-of-5/TRDIC: %0d/%0d/%0d (of which stalls: %0d/%0d/%0d)",
             t0, t1, t2, d0, d1, d2);
    chk(t1 < t0, $sformatf("2-of-5 (%0d) fails less often than 1-of-4 (%0d)", t1, t0));
    chk(t2 < t1, $sformatf("TRDIC (%0d) fails less often than 2-of-5 (%0d)", t2, t1));
    chk(t2 > 0, "strikes did cause failures (the test has power)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
