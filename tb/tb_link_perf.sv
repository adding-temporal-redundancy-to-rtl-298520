// tb_link_perf: throughput and latency of the 16-stage, 32-bit link in
// 1-of-4 and in 2-of-5, both with tree completion detection in every stage.
//
// Both links are driven by tb_link_meter with a sender and receiver that
// never hold the link back. Throughput is measured as model steps per word
// over a stream of random words, latency as the steps for one word to cross
// the empty link. The document's measurements of the same two links in a
// 32 nm library show 1-of-4 faster in both (40.8 against 32.5 Gbit/s,
// 1.21 against 1.37 ns); this model has no gate delays, only one step per
// C-element, so it shows the effect of the deeper 2-of-5 completion
// detection on the handshake cycle and nothing of cell speed.
//
// Checks: every word arrives intact on both links; the 2-of-5 cycle is
// longer than the 1-of-4 cycle; the 2-of-5 latency is no shorter.
module tb_link_perf;
  import trdic_pkg::*;
  logic clk = 1'b0;
  bit done4, done5;
  int lat4, lat5, spw4, spw5, err4, err5;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  tb_link_meter #(.DEPTH(LINK_DEPTH), .DIGITS(WORD_DIGITS), .N(RAILS_IN), .M(1)) m4 (
    .clk(clk), .done(done4), .latency(lat4), .steps_per_word_x100(spw4), .n_err(err4));
  tb_link_meter #(.DEPTH(LINK_DEPTH), .DIGITS(WORD_DIGITS), .N(RAILS_CODE), .M(2)) m5 (
    .clk(clk), .done(done5), .latency(lat5), .steps_per_word_x100(spw5), .n_err(err5));

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (done4 && done5);
    $display("1-of-4 link: %0d.%02d steps/word, latency %0d steps", spw4 / 100, spw4 % 100, lat4);
    $display("2-of-5 link: %0d.%02d steps/word, latency %0d steps", spw5 / 100, spw5 % 100, lat5);
    $display("throughput ratio 1-of-4 / 2-of-5: %0.3f (document: 40.8 / 32.5 = 1.255)",
             real'(spw5) / real'(spw4));
    $display("latency ratio 2-of-5 / 1-of-4: %0.3f (document: 1.37 / 1.21 = 1.132)",
             real'(lat5) / real'(lat4));
    chk(err4 == 0, $sformatf("1-of-4 words intact (%0d errors)", err4));
    chk(err5 == 0, $sformatf("2-of-5 words intact (%0d errors)", err5));
    chk(spw5 > spw4, "2-of-5 handshake cycle is longer than 1-of-4");
    chk(lat5 >= lat4, "2-of-5 latency is no shorter than 1-of-4");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
