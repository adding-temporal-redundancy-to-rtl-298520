// tb_trdic_top: end-to-end test of the TRDIC channel at reduced size
// (4 link stages, 4 digits = 8 data bits), 200 words with back-pressure
// and single-upset injection; see tb_trdic_env for what is checked.
module tb_trdic_top;
  localparam int DEPTH = 4;
  localparam int DIGITS = 4;
  logic clk, rst_n, tx_ack, rx_ack;
  logic [DIGITS*4-1:0] tx_data, rx_data;
  logic [DEPTH*DIGITS*5-1:0] see;

  trdic_top #(.DEPTH(DEPTH), .DIGITS(DIGITS)) dut (
    .clk(clk), .rst_n(rst_n), .tx_data(tx_data), .tx_ack(tx_ack),
    .rx_data(rx_data), .rx_ack(rx_ack), .see(see));

  tb_trdic_env #(.DEPTH(DEPTH), .DIGITS(DIGITS), .NWORDS(200)) env (
    .clk(clk), .rst_n(rst_n), .tx_data(tx_data), .tx_ack(tx_ack),
    .rx_data(rx_data), .rx_ack(rx_ack), .see(see));
endmodule
