// tb_link_meter: throughput and latency meter for one QDI link of DEPTH
// WCHB stages and DIGITS m-of-n digits, used by tb_link_perf.
//
// The sender and receiver answer every handshake edge at the next half
// step, so the link itself sets the pace. A latency run first sends one word
// into the empty link and counts the steps until it is complete at the far
// end. A throughput run then streams WORDS random words (two-hot or one-hot
// per digit, as the code requires) and measures the mean steps per word.
// Each received word is compared with the word sent; n_err counts
// mismatches.
// Outputs, valid once done is high: latency (steps), steps_per_word (x100,
// an integer), n_err.
module tb_link_meter #(
  parameter int DEPTH = 16,
  parameter int DIGITS = 16,
  parameter int N = 4,
  parameter int M = 1,
  parameter int WORDS = 400
) (
  input  logic clk,
  output bit   done,
  output int   latency,
  output int   steps_per_word_x100,
  output int   n_err
);
  localparam int W = DIGITS * N;
  logic rst_n = 1'b0;
  logic [W-1:0] in_data = '0, out_data;
  logic in_ack, out_ack = 1'b1;
  logic [W-1:0] sent[$];

  qdi_link #(.DEPTH(DEPTH), .DIGITS(DIGITS), .N(N), .M(M)) dut (
    .clk(clk), .rst_n(rst_n), .in_data(in_data), .in_ack(in_ack),
    .out_data(out_data), .out_ack(out_ack), .see('0));

  function automatic logic [W-1:0] rand_word();
    logic [W-1:0] w = '0;
    for (int k = 0; k < DIGITS; k++) begin
      int a = $urandom % N;
      int b = (a + 1 + $urandom % (N - 1)) % N;
      w[k*N + a] = 1'b1;
      if (M == 2) w[k*N + b] = 1'b1;
    end
    return w;
  endfunction

  function automatic logic complete(input logic [W-1:0] v);
    for (int k = 0; k < DIGITS; k++)
      if ($countones(v[k*N +: N]) < M) return 1'b0;
    return 1'b1;
  endfunction

  // receiver: acknowledges complete words and spacers half a step later
  int n_recv = 0;
  always @(negedge clk) begin
    if (rst_n && out_ack && complete(out_data)) begin
      if (sent.size() == 0 || out_data != sent[0]) n_err++;
      if (sent.size() != 0) void'(sent.pop_front());
      n_recv++;
      out_ack <= 1'b0;
    end else if (!out_ack && out_data == '0) out_ack <= 1'b1;
  end

  initial begin
    int t;
    done = 1'b0;
    n_err = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    // latency: one word into the empty link
    in_data = rand_word();
    sent.push_back(in_data);
    t = 0;
    while (n_recv == 0) begin @(negedge clk); t++; end
    latency = t;
    while (in_ack !== 1'b0) @(negedge clk);
    in_data = '0;
    while (out_ack !== 1'b1 || in_ack !== 1'b1) @(negedge clk);
    // throughput: stream with a sender that answers at once
    t = 0;
    for (int n = 0; n < WORDS; n++) begin
      while (in_ack !== 1'b1) begin @(negedge clk); t++; end
      in_data = rand_word();
      sent.push_back(in_data);
      while (in_ack !== 1'b0) begin @(negedge clk); t++; end
      in_data = '0;
    end
    steps_per_word_x100 = t * 100 / WORDS;
    while (sent.size() != 0 && t < WORDS * 100) begin @(negedge clk); t++; end
    if (sent.size() != 0) n_err++;
    done = 1'b1;
  end
endmodule
