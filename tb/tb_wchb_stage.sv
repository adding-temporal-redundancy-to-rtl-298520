// tb_wchb_stage: self-checking testbench of one WCHB register stage,
// 2 digits of 2-of-5 (and a 1-of-4 stage reset to a token).
// The testbench plays sender and receiver of the four-phase protocol and
// checks: data passes when ack_in is high; data is held while the input
// returns to spacer until ack_in falls; ack_out falls 3 steps after a
// complete word arrives (rail, pair C-element, tree) and rises again after
// the spacer; a single-event upset on a waiting rail is held but does not
// complete the word; a stage reset with a token reports it with ack_out low.
module tb_wchb_stage;
  import tb_trdic_ref_pkg::*;
  localparam int D = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [D*5-1:0] d = '0, q, see = '0;
  logic ack_in = 1'b1, ack_out;
  logic [7:0] d4 = '0, q4;
  logic ack4_out, ack4_in = 1'b0;
  int checks = 0, failures = 0;

  wchb_stage #(.DIGITS(D), .N(5), .M(2)) dut (
    .clk(clk), .rst_n(rst_n), .d(d), .ack_out(ack_out), .q(q),
    .ack_in(ack_in), .see(see));

  wchb_stage #(.DIGITS(2), .N(4), .M(1), .INIT(8'b0010_0001)) dut_tok (
    .clk(clk), .rst_n(rst_n), .d(d4), .ack_out(ack4_out), .q(q4),
    .ack_in(ack4_in), .see('0));

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [4:0] rand_2of5();
    logic [4:0] v;
    do v = 5'($urandom); while (popcount5(v) != 2);
    return v;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [D*5-1:0] w;
    int lat;
    repeat (2) @(negedge clk);
    chk(ack4_out == 1'b0 && q4 == 8'b0010_0001, "token held at reset");
    rst_n = 1'b1;
    @(negedge clk);
    chk(ack_out == 1'b1 && q == '0, "empty after reset");
    for (int n = 0; n < 100; n++) begin
      for (int k = 0; k < D; k++) w[k*5 +: 5] = rand_2of5();
      d = w;
      lat = 0;
      while (ack_out !== 1'b0 && lat < 20) begin @(negedge clk); lat++; end
      chk(q == w, "data stored");
      chk(lat == 3, $sformatf("ack_out latency %0d", lat));
      d = '0;                         // sender returns to spacer
      repeat (6) @(negedge clk);
      chk(q == w && ack_out == 1'b0, "data held until ack_in falls");
      ack_in = 1'b0;                  // receiver takes the word
      lat = 0;
      while (ack_out !== 1'b1 && lat < 20) begin @(negedge clk); lat++; end
      chk(q == '0, "spacer stored");
      chk(lat == 3, $sformatf("spacer latency %0d", lat));
      ack_in = 1'b1;
      @(negedge clk);
    end
    // SEU on a waiting rail: kept, but one rail does not complete the word
    see[3] = 1'b1; @(negedge clk); see[3] = 1'b0;
    repeat (8) @(negedge clk);
    chk(q == 10'b00000_01000, "upset rail held in waiting state");
    chk(ack_out == 1'b1, "single rail does not complete");
    // the real word then arrives on other rails: invalid three-hot word
    d = 10'b00011_00011;
    repeat (8) @(negedge clk);
    chk(q == 10'b00011_01011 && ack_out == 1'b0, $sformatf("three-hot word completes q=%b ack=%b", q, ack_out));
    d = '0; ack_in = 1'b0;
    repeat (8) @(negedge clk);
    chk(q == '0 && ack_out == 1'b1, "stage clears the upset with the spacer");
    // SET in a driven state (rail at 0, inputs 0/0): transient only
    see[7] = 1'b1; @(negedge clk); see[7] = 1'b0;
    chk(q[7] == 1'b1, "SET visible one step");
    @(negedge clk);
    chk(q[7] == 1'b0, "SET gone");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
