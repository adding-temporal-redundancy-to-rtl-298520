// tb_see_charge: single-event failure rate of a 1-of-4 link, a 2-of-5 link
// and the TRDIC channel (16 stages, 32 bits each) as the injected charge
// grows, at a fixed strike rate of 5e6 strikes per second (one every
// 200 ns on average).
//
// Time scale as in tb_see_rate: one word per 6 ns, steps per word measured
// first without strikes. Each strike hits a random register rail of each
// link with the charge of the current point; tb_see_channel flips the cell
// only if that charge reaches the critical charge of the cell's present
// state. The charge axis uses the units of that per-state table (1 = the
// critical charge of a C-element driving a 1). The document plots its own
// sweep against a different normalization (the largest charge it tried), so
// only the shape is comparable: no failures below the smallest critical
// charge, a rise while more cell states become sensitive, a plateau once
// every holding state flips, and a second rise when the charge reaches the
// driven states (0.72 and 1), which this table sets far above the holding
// states. Strikes are one step long at any charge;
// a wider transient for a larger charge is not modelled.
//
// Checks: no failure without strikes; no flip and no failure below the
// smallest critical charge; summed over the points, the TRDIC channel
// fails less often than either plain link.
module tb_see_charge;
  localparam int WORDS_PER_POINT = 8000;
  localparam real NS_PER_WORD = 6.0;
  localparam int INTERVAL_NS = 200;
  localparam real CHARGES[6] = '{0.05, 0.09, 0.11, 0.3, 0.8, 1.0};

  logic clk = 1'b0;
  logic strike = 1'b0;
  int unsigned strike_idx = 0;
  real charge = 0.0;
  bit run = 1'b0;
  int f0, f1, f2, w0, w1, w2, d0, d1, d2, h0, h1, h2;
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
    int steps_per_word, period, b0, b1, b2, bh0, bh1, bh2, s0, s1, s2;
    int t0, t1, t2;
    real sec;
    run = 1'b1;
    repeat (20000) @(negedge clk);
    chk(f0 == 0 && f1 == 0 && f2 == 0,
        $sformatf("failures without strikes: %0d %0d %0d", f0, f1, f2));
    steps_per_word = 20000 / ((w2 > 0) ? w2 : 1);
    period = INTERVAL_NS * steps_per_word / int'(NS_PER_WORD);
    $display("steps per word (TRDIC channel): %0d; strike every %0d steps on average",
             steps_per_word, period);
    t0 = 0; t1 = 0; t2 = 0;
    $display("charge  flips 1-of-4/2-of-5/TRDIC  fail/s 1-of-4  fail/s 2-of-5  fail/s TRDIC");
    foreach (CHARGES[p]) begin
      charge = CHARGES[p];
      b0 = f0; b1 = f1; b2 = f2;
      bh0 = h0; bh1 = h1; bh2 = h2;
      for (int n = 0; n < WORDS_PER_POINT * steps_per_word; n++) begin
        @(negedge clk);
        if ($urandom % period == 0) begin
          strike_idx = $urandom;
          strike = 1'b1;
        end else strike = 1'b0;
      end
      strike = 1'b0;
      s0 = f0 - b0; s1 = f1 - b1; s2 = f2 - b2;
      sec = WORDS_PER_POINT * NS_PER_WORD * 1.0e-9;
      $display("%6.2f  %5d/%5d/%5d          %13.3g  %13.3g  %12.3g", charge,
               h0 - bh0, h1 - bh1, h2 - bh2, s0 / sec, s1 / sec, s2 / sec);
      if (p == 0)
        chk(s0 == 0 && s1 == 0 && s2 == 0 && h0 == bh0 && h1 == bh1 && h2 == bh2,
            "no flips or failures below the smallest critical charge");
      t0 += s0; t1 += s1; t2 += s2;
    end
    $display("total failures 1-of-4/2-of-5/TRDIC: %0d/%0d/%0d", t0, t1, t2);
    chk(t2 < t0, $sformatf("TRDIC (%0d) fails less often than 1-of-4 (%0d)", t2, t0));
    chk(t2 < t1, $sformatf("TRDIC (%0d) fails less often than 2-of-5 (%0d)", t2, t1));
    chk(t0 > 0, "strikes did cause failures (the test has power)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
