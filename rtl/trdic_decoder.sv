// trdic_decoder: TRDIC decoder with its expected-token feedback loop.
//
// Each 2-of-5 code word from the link is joined with the expected token
// (the previous word's new token) from a ring of three 1-of-4 WCHB
// registers and double-checked by trdic_dec_core. The checked token goes to
// a 1-of-4 WCHB output register towards the receiver; the next expected
// token enters the ring.
//
// Join and fork: the link and the last loop register are acknowledged by one
// C-element of the output register's and the first loop register's ack_out.
//
// Reset: the last loop register holds INIT, which must equal the encoder's
// INIT; the other two hold spacers. Because each code word confirms the
// word sent before it, the output stream lags the input stream by one word:
// the first token delivered after reset is INIT itself and carries no data;
// the receiver drops it.
//
// Ports: in_data / in_ack (2-of-5 from the link), out_data / out_ack
// (1-of-4 to the receiver), clk, rst_n. Ack polarity: 1 = ready, 0 = taken.
module trdic_decoder
  import trdic_pkg::*;
#(
  parameter int unsigned DIGITS = WORD_DIGITS,
  parameter logic [DIGITS*RAILS_IN-1:0] INIT = {DIGITS{INIT_TOKEN}}
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [DIGITS*RAILS_CODE-1:0] in_data,
  output logic                         in_ack,
  output logic [DIGITS*RAILS_IN-1:0]   out_data,
  input  logic                         out_ack
);

  localparam int unsigned WI = DIGITS * RAILS_IN;

  logic [WI-1:0] decoded, next_exp, loop1, loop2, expected;
  logic          ack_dec, ack_l1, ack_l2, ack_l3, join_ack;

  trdic_dec_core #(.DIGITS(DIGITS)) u_core (
    .clk(clk), .rst_n(rst_n), .code(in_data), .expected(expected),
    .decoded(decoded), .next_expected(next_exp));

  wchb_stage #(.DIGITS(DIGITS), .N(RAILS_IN), .M(1)) u_out (
    .clk(clk), .rst_n(rst_n), .d(decoded), .ack_out(ack_dec),
    .q(out_data), .ack_in(out_ack), .see('0));

  wchb_stage #(.DIGITS(DIGITS), .N(RAILS_IN), .M(1)) u_loop1 (
    .clk(clk), .rst_n(rst_n), .d(next_exp), .ack_out(ack_l1),
    .q(loop1), .ack_in(ack_l2), .see('0));

  wchb_stage #(.DIGITS(DIGITS), .N(RAILS_IN), .M(1)) u_loop2 (
    .clk(clk), .rst_n(rst_n), .d(loop1), .ack_out(ack_l2),
    .q(loop2), .ack_in(ack_l3), .see('0));

  wchb_stage #(.DIGITS(DIGITS), .N(RAILS_IN), .M(1), .INIT(INIT)) u_loop3 (
    .clk(clk), .rst_n(rst_n), .d(loop2), .ack_out(ack_l3),
    .q(expected), .ack_in(join_ack), .see('0));

  c_element #(.RESET_VAL(1'b1)) u_join (
    .clk(clk), .rst_n(rst_n), .a(ack_dec), .b(ack_l1), .see(1'b0),
    .q(join_ack));

  assign in_ack = join_ack;

endmodule
