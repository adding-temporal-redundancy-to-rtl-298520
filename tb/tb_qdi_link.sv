// tb_qdi_link: self-checking testbench of the QDI link (4 stages, 2 digits
// of 2-of-5, plus a 1-of-4 link for comparison).
// Checks: 300 random words arrive complete and in order under random
// receiver delays; with the receiver stalled the link absorbs exactly
// DEPTH/2 words (each WCHB stage pair holds one token); a single upset in
// an idle 2-of-5 link creates no word, and rides on the next real word as
// an invalid three-hot digit; the same upset in an idle 1-of-4 link
// creates a spurious valid word.
module tb_qdi_link;
  import tb_trdic_ref_pkg::*;
  localparam int DEPTH = 4;
  localparam int D = 2;
  localparam int W = D * 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] in_data = '0, out_data;
  logic in_ack, out_ack = 1'b1;
  logic [DEPTH*W-1:0] see = '0;
  // 1-of-4 comparison link, one digit
  logic [3:0] in4 = '0, out4;
  logic in4_ack, out4_ack = 1'b1;
  logic [DEPTH*4-1:0] see4 = '0;
  int checks = 0, failures = 0;
  logic [W-1:0] sent[$];
  int n_recv = 0;
  bit rx_enable = 1'b0;

  qdi_link #(.DEPTH(DEPTH), .DIGITS(D), .N(5), .M(2)) dut (
    .clk(clk), .rst_n(rst_n), .in_data(in_data), .in_ack(in_ack),
    .out_data(out_data), .out_ack(out_ack), .see(see));

  qdi_link #(.DEPTH(DEPTH), .DIGITS(1), .N(4), .M(1)) dut4 (
    .clk(clk), .rst_n(rst_n), .in_data(in4), .in_ack(in4_ack),
    .out_data(out4), .out_ack(out4_ack), .see(see4));

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic complete(input logic [W-1:0] v);
    for (int k = 0; k < D; k++) if (popcount5(v[k*5 +: 5]) < 2) return 1'b0;
    return 1'b1;
  endfunction

  function automatic logic [4:0] rand_2of5();
    logic [4:0] v;
    do v = 5'($urandom); while (popcount5(v) != 2);
    return v;
  endfunction

  task automatic send(input logic [W-1:0] w);
    while (in_ack !== 1'b1) @(negedge clk);
    in_data = w;
    while (in_ack !== 1'b0) @(negedge clk);
    in_data = '0;
  endtask

  // receiver: checks each complete word against the queue
  always begin
    @(negedge clk);
    if (rx_enable && complete(out_data)) begin
      logic [W-1:0] exp;
      repeat ($urandom % 4) @(negedge clk);
      exp = (sent.size() > 0) ? sent.pop_front() : '0;
      chk(out_data == exp, $sformatf("word %0d: got %h expected %h", n_recv, out_data, exp));
      n_recv++;
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
    logic [W-1:0] w;
    int accepted;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    rx_enable = 1'b1;
    for (int n = 0; n < 300; n++) begin
      for (int k = 0; k < D; k++) w[k*5 +: 5] = rand_2of5();
      sent.push_back(w);
      send(w);
    end
    while (sent.size() > 0) @(negedge clk);
    repeat (50) @(negedge clk);
    chk(n_recv == 300, $sformatf("received %0d of 300", n_recv));

    // capacity with a stalled receiver
    rx_enable = 1'b0;
    @(negedge clk);
    accepted = 0;
    fork
      begin
        for (int n = 0; n < DEPTH; n++) begin
          for (int k = 0; k < D; k++) w[k*5 +: 5] = rand_2of5();
          sent.push_back(w);
          send(w);
          accepted++;
        end
      end
      begin repeat (200) @(negedge clk); end
    join_any
    disable fork;
    chk(accepted == DEPTH / 2, $sformatf("stalled link took %0d words, expected %0d", accepted, DEPTH / 2));
    in_data = '0;
    // drain: the pending word is dropped from the sender side
    sent.delete(accepted);
    rx_enable = 1'b1;
    while (sent.size() > 0) @(negedge clk);
    repeat (50) @(negedge clk);
    chk(n_recv == 300 + DEPTH / 2, "stalled words delivered");

    // single upset in the idle 2-of-5 link: no spurious word
    see[1*W + 4] = 1'b1; @(negedge clk); see[1*W + 4] = 1'b0;
    repeat (60) @(negedge clk);
    chk(n_recv == 300 + DEPTH / 2, "upset in idle 2-of-5 link makes no word");
    chk(out_data == 10'b00000_10000, "upset rail reaches the link output");
    // the next word carries it as a three-hot digit
    w = 10'b00011_00011;
    sent.push_back(w | 10'b00000_10000);
    send(w);
    while (sent.size() > 0) @(negedge clk);
    repeat (20) @(negedge clk);
    chk(n_recv == 301 + DEPTH / 2, "three-hot word delivered");

    // same upset in an idle 1-of-4 link: a spurious valid word appears
    see4[1*4 + 2] = 1'b1; @(negedge clk); see4[1*4 + 2] = 1'b0;
    repeat (60) @(negedge clk);
    chk(out4 == 4'b0100, "upset in idle 1-of-4 link makes a valid word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
