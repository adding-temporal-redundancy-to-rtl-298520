// trdic_top: point-to-point QDI communication channel protected by the
// temporally redundant delay insensitive code (TRDIC).
//
//   sender --1-of-4--> trdic_encoder --2-of-5--> qdi_link --2-of-5-->
//            trdic_decoder --1-of-4--> receiver
//
// The sender offers words of DIGITS 1-of-4 digits (32 data bits by
// default) with a four-phase return-to-zero handshake. The encoder sends
// each word combined with the word before it as a 2-of-5 code; the link is
// DEPTH WCHB stages; the decoder double-checks every code word against the
// token it expects and hands the confirmed word to the receiver. The word
// stream seen by the receiver is the initial value INIT followed by the
// sender's words, each delivered once the next word has been sent: the
// receiver drops the first word, and the sender follows its last real word
// with one dummy word.
//
// see is the link's SEE bus, one strike input per register rail
// (stage k, rail i at bit k*DIGITS*5 + i). Tie it to zero for normal use.
//
// Ports: tx_data / tx_ack (sender side), rx_data / rx_ack (receiver side),
// see, clk (time base of the unit-delay model), rst_n. Ack polarity on both
// sides: 1 = ready for data, 0 = data taken.
module trdic_top
  import trdic_pkg::*;
#(
  parameter int unsigned DEPTH  = LINK_DEPTH,
  parameter int unsigned DIGITS = WORD_DIGITS
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic [DIGITS*RAILS_IN-1:0]         tx_data,
  output logic                               tx_ack,
  output logic [DIGITS*RAILS_IN-1:0]         rx_data,
  input  logic                               rx_ack,
  input  logic [DEPTH*DIGITS*RAILS_CODE-1:0] see
);

  logic [DIGITS*RAILS_CODE-1:0] enc_data, dec_data;
  logic                         enc_ack, dec_ack;

  trdic_encoder #(.DIGITS(DIGITS)) u_enc (
    .clk(clk), .rst_n(rst_n),
    .in_data(tx_data), .in_ack(tx_ack),
    .out_data(enc_data), .out_ack(enc_ack));

  qdi_link #(.DEPTH(DEPTH), .DIGITS(DIGITS), .N(RAILS_CODE), .M(2)) u_link (
    .clk(clk), .rst_n(rst_n),
    .in_data(enc_data), .in_ack(enc_ack),
    .out_data(dec_data), .out_ack(dec_ack),
    .see(see));

  trdic_decoder #(.DIGITS(DIGITS)) u_dec (
    .clk(clk), .rst_n(rst_n),
    .in_data(dec_data), .in_ack(dec_ack),
    .out_data(rx_data), .out_ack(rx_ack));

endmodule
