// tb_trdic_top_full: end-to-end test of the TRDIC channel at its default
// size (16 link stages, 16 digits = 32 data bits): 60 words with
// back-pressure and single-upset injection; see tb_trdic_env.
module tb_trdic_top_full;
  import trdic_pkg::*;
  logic clk, rst_n, tx_ack, rx_ack;
  logic [WORD_DIGITS*4-1:0] tx_data, rx_data;
  logic [LINK_DEPTH*WORD_DIGITS*5-1:0] see;

  trdic_top dut (
    .clk(clk), .rst_n(rst_n), .tx_data(tx_data), .tx_ack(tx_ack),
    .rx_data(rx_data), .rx_ack(rx_ack), .see(see));

  tb_trdic_env #(.DEPTH(LINK_DEPTH), .DIGITS(WORD_DIGITS), .NWORDS(60)) env (
    .clk(clk), .rst_n(rst_n), .tx_data(tx_data), .tx_ack(tx_ack),
    .rx_data(rx_data), .rx_ack(rx_ack), .see(see));
endmodule
