// trdic_encoder: TRDIC encoder with its previous-token feedback loop.
//
// Each incoming 1-of-4 word Data[n] is joined with the word sent before it,
// Data[n-1], converted to the 2-of-5 temporally redundant code
// (trdic_enc_core) and stored in a 2-of-5 WCHB output register that drives
// the link. Data[n] is forked into a ring of three 1-of-4 WCHB registers;
// after travelling through it, it is the Data[n-1] of the next word.
//
// Join and fork: the sender and the last loop register are acknowledged by
// one C-element of the output register's and the first loop register's
// ack_out, so a word is taken only when both the code word and the loop copy
// are stored, and released only when both have returned to spacer.
//
// Reset: the last loop register holds INIT (it must equal the decoder's
// INIT), the other two hold spacers, so the ring carries one token and two
// bubbles and can always advance. The first code word sent is therefore
// code(Data[0], INIT). To deliver the last real word the sender must follow
// it with one more (dummy) word, which carries its second occurrence.
//
// Ports: in_data / in_ack (1-of-4 from the sender), out_data / out_ack
// (2-of-5 to the link), clk, rst_n. Ack polarity: 1 = ready, 0 = taken.
module trdic_encoder
  import trdic_pkg::*;
#(
  parameter int unsigned DIGITS = WORD_DIGITS,
  parameter logic [DIGITS*RAILS_IN-1:0] INIT = {DIGITS{INIT_TOKEN}}
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [DIGITS*RAILS_IN-1:0]   in_data,
  output logic                         in_ack,
  output logic [DIGITS*RAILS_CODE-1:0] out_data,
  input  logic                         out_ack
);

  localparam int unsigned WI = DIGITS * RAILS_IN;
  localparam int unsigned WC = DIGITS * RAILS_CODE;

  logic [WC-1:0] code;
  logic [WI-1:0] loop1, loop2, prev;
  logic          ack_code, ack_l1, ack_l2, ack_l3, join_ack;

  trdic_enc_core #(.DIGITS(DIGITS)) u_core (
    .clk(clk), .rst_n(rst_n), .cur(in_data), .prev(prev), .code(code));

  wchb_stage #(.DIGITS(DIGITS), .N(RAILS_CODE), .M(2)) u_out (
    .clk(clk), .rst_n(rst_n), .d(code), .ack_out(ack_code),
    .q(out_data), .ack_in(out_ack), .see('0));

  wchb_stage #(.DIGITS(DIGITS), .N(RAILS_IN), .M(1)) u_loop1 (
    .clk(clk), .rst_n(rst_n), .d(in_data), .ack_out(ack_l1),
    .q(loop1), .ack_in(ack_l2), .see('0));

  wchb_stage #(.DIGITS(DIGITS), .N(RAILS_IN), .M(1)) u_loop2 (
    .clk(clk), .rst_n(rst_n), .d(loop1), .ack_out(ack_l2),
    .q(loop2), .ack_in(ack_l3), .see('0));

  wchb_stage #(.DIGITS(DIGITS), .N(RAILS_IN), .M(1), .INIT(INIT)) u_loop3 (
    .clk(clk), .rst_n(rst_n), .d(loop2), .ack_out(ack_l3),
    .q(prev), .ack_in(join_ack), .see('0));

  c_element #(.RESET_VAL(1'b1)) u_join (
    .clk(clk), .rst_n(rst_n), .a(ack_code), .b(ack_l1), .see(1'b0),
    .q(join_ack));

  assign in_ack = join_ack;

endmodule
