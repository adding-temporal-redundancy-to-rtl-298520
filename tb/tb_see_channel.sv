// tb_see_channel: one 16-stage, 32-bit channel under random single-event
// strikes, with its own sender, receiver and failure counter. Used by
// tb_see_rate to compare three channels under the same strikes:
//   KIND 0: plain 1-of-4 QDI link
//   KIND 1: plain 2-of-5 QDI link (each 2-bit value sent as a fixed
//           2-of-5 word)
//   KIND 2: TRDIC channel (encoder, 2-of-5 link, double-check decoder)
// The sender streams random words. A failure is a received word that
// differs from the one expected, or no word for TIMEOUT steps. After each
// failure the channel is reset and the stream restarts, so failures count
// error events, as a failures-per-second figure does. n_timeout counts the
// failures that were stalls rather than wrong words.
// strike / strike_idx / charge: when strike is high, register rail
// (strike_idx mod number of rails) of the link is hit with the given
// normalized charge. The rail is inverted for one step only if the charge
// reaches the critical charge of the struck C-element's present state
// {input, ack, output}; the thresholds are the per-state values of the
// document's C-element characterisation (000: 0.72, 010: 0.088, 011: 0.12,
// 100: 0.097, 101: 0.1, 111: 1). The two states it does not list, 001 and
// 110, are the moments the output is about to follow its inputs; this
// testbench gives them the threshold of the driven state they are heading
// for (0.72 and 1). A charge of 1 or more flips every cell it hits.
// n_hits counts the strikes that flipped a cell.
module tb_see_channel #(
  parameter int KIND = 2,
  parameter int TIMEOUT = 3000
) (
  input  logic        clk,
  input  logic        strike,
  input  int unsigned strike_idx,
  input  real         charge,
  input  bit          run,
  output int          n_fail,
  output int          n_words,
  output int          n_timeout,
  output int          n_hits
);
  import trdic_pkg::*;
  import tb_trdic_ref_pkg::*;

  localparam int DG = WORD_DIGITS;
  localparam int DP = LINK_DEPTH;
  localparam int RN = (KIND == 0) ? 4 : 5;          // rails on the link
  localparam int NSEE = DP * DG * RN;
  localparam int RX = (KIND == 1) ? 5 : 4;          // rails at the receiver

  logic rst_n = 1'b0;
  logic [DG*RN-1:0] tx_link;
  logic [DG*4-1:0]  tx_word;
  logic [DG*RX-1:0] rx_data;
  logic tx_ack, rx_ack;
  logic [NSEE-1:0] see;
  logic [DG*RX-1:0] exp_q[$];

  localparam int W = DG * RN;                       // rails per stage
  logic [DP:0][W-1:0] lk_rails;                      // the link's rails
  logic [DP:0]        lk_ack;                        // and acks

  function automatic real q_crit(input logic [2:0] st);
    case (st)
      3'b000:  return 0.72;
      3'b001:  return 0.72;
      3'b010:  return 0.088;
      3'b011:  return 0.12;
      3'b100:  return 0.097;
      3'b101:  return 0.1;
      default: return 1.0;                           // 110, 111
    endcase
  endfunction

  always_comb begin
    int unsigned idx, stg, bit_i;
    see = '0;
    idx = strike_idx % NSEE;
    stg = idx / W;
    bit_i = idx % W;
    if (strike && charge >= q_crit({lk_rails[stg][bit_i], lk_ack[stg+1],
                                    lk_rails[stg+1][bit_i]}))
      see[idx] = 1'b1;
  end

  always @(posedge clk) if (rst_n && see != '0) n_hits++;

  function automatic logic [4:0] code5(input logic [3:0] t);
    case (t)
      4'b0001: return 5'b00011;
      4'b0010: return 5'b00101;
      4'b0100: return 5'b01001;
      4'b1000: return 5'b10001;
      default: return 5'b00000;      // spacer
    endcase
  endfunction

  function automatic logic [DG*RX-1:0] to_rx(input logic [DG*4-1:0] w);
    logic [DG*RX-1:0] r;
    for (int k = 0; k < DG; k++)
      if (KIND == 1) r[k*RX +: RX] = RX'(code5(w[k*4 +: 4]));
      else           r[k*RX +: RX] = RX'(w[k*4 +: 4]);
    return r;
  endfunction

  function automatic logic complete(input logic [DG*RX-1:0] v);
    for (int k = 0; k < DG; k++) begin
      int pc = 0;
      for (int i = 0; i < RX; i++) pc += int'(v[k*RX + i]);
      if (pc < ((KIND == 1) ? 2 : 1)) return 1'b0;
    end
    return 1'b1;
  endfunction

  if (KIND == 2) begin : g_trdic
    trdic_top dut (
      .clk(clk), .rst_n(rst_n), .tx_data(tx_word), .tx_ack(tx_ack),
      .rx_data(rx_data), .rx_ack(rx_ack), .see(see));
    assign lk_rails = dut.u_link.rails;
    assign lk_ack   = dut.u_link.ack;
  end else begin : g_link
    for (genvar k = 0; k < DG; k++) begin : g_map
      assign tx_link[k*RN +: RN] = (KIND == 1) ? RN'(code5(tx_word[k*4 +: 4]))
                                               : RN'(tx_word[k*4 +: 4]);
    end
    qdi_link #(.DEPTH(DP), .DIGITS(DG), .N(RN), .M((KIND == 1) ? 2 : 1)) dut (
      .clk(clk), .rst_n(rst_n), .in_data(tx_link), .in_ack(tx_ack),
      .out_data(rx_data), .out_ack(rx_ack), .see(see));
    assign lk_rails = dut.rails;
    assign lk_ack   = dut.ack;
  end

  task automatic sender();
    logic [DG*4-1:0] w;
    forever begin
      for (int k = 0; k < DG; k++) w[k*4 +: 4] = rand_token();
      while (tx_ack !== 1'b1) @(negedge clk);
      exp_q.push_back(to_rx(w));
      tx_word = w;
      while (tx_ack !== 1'b0) @(negedge clk);
      tx_word = '0;
    end
  endtask

  // returns on the first failure
  task automatic receiver();
    int idle = 0;
    forever begin
      @(negedge clk);
      idle++;
      if (idle > TIMEOUT) begin n_timeout++; return; end
      if (complete(rx_data)) begin
        @(negedge clk);                     // let late rails settle
        if (exp_q.size() == 0 || rx_data != exp_q[0]) return;
        void'(exp_q.pop_front());
        n_words++;
        idle = 0;
        rx_ack = 1'b0;
        while (rx_data !== '0) begin
          @(negedge clk);
          idle++;
          if (idle > TIMEOUT) begin n_timeout++; return; end
        end
        rx_ack = 1'b1;
      end
    end
  endtask

  initial begin
    n_fail = 0;
    n_words = 0;
    n_timeout = 0;
    n_hits = 0;
    tx_word = '0;
    rx_ack = 1'b1;
    wait (run);
    forever begin
      rst_n = 1'b0;
      tx_word = '0;
      rx_ack = 1'b1;
      exp_q.delete();
      if (KIND == 2) exp_q.push_back((DG*RX)'(init_tokens()));
      repeat (3) @(negedge clk);
      rst_n = 1'b1;
      fork
        sender();
        receiver();
      join_any
      disable fork;
      n_fail++;
    end
  end
endmodule
