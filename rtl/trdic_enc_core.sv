// trdic_enc_core: converts a pair of successive 1-of-4 tokens of each digit
// into the 2-of-5 temporally redundant code.
//
// Code for one digit, rails written code[4:0]:
//   code[3:0] = cur | prev           (bitwise OR of the two tokens)
//   code[4]   = 1 when cur == prev
// If the tokens differ the OR has two rails high and code[4] stays low; if
// they are equal the OR has one rail and code[4] adds the second. All ten
// 2-of-5 words are used: six for the pairs of distinct tokens and four for
// repeated tokens. Examples: prev 0001, cur 0010 gives 00011; prev 0001,
// cur 0001 gives 10001.
//
// Implementation: delay-insensitive minterms (DIMS). There is one C-element
// per (cur rail a, prev rail b) pair, sixteen per digit. Rail j < 4 is the
// OR of the minterms with a == j or b == j; rail 4 is the OR of the
// minterms with a == b. This makes the function the OR of the two tokens,
// and also the join of the two input channels. No output rail rises before
// both tokens are present, so the link never carries the previous token's
// rail on its own. Every rail stays high until both tokens have returned to
// spacer. A plain OR gate would let the previous token's rail run ahead
// into the link, where one more rail raised by a single event would then
// complete a false code word.
//
// Ports: clk, rst_n (state of the C-elements), cur (Data[i]), prev
// (Data[i-1]), code. Timing: code is one step after the later token.
module trdic_enc_core
  import trdic_pkg::*;
#(
  parameter int unsigned DIGITS = WORD_DIGITS
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [DIGITS*RAILS_IN-1:0]   cur,
  input  logic [DIGITS*RAILS_IN-1:0]   prev,
  output logic [DIGITS*RAILS_CODE-1:0] code
);

  for (genvar k = 0; k < DIGITS; k++) begin : g_digit
    // mt[a][b] = C(cur[a], prev[b])
    logic [RAILS_IN-1:0][RAILS_IN-1:0] mt;
    for (genvar a = 0; a < RAILS_IN; a++) begin : g_a
      for (genvar b = 0; b < RAILS_IN; b++) begin : g_b
        c_element u_mt (
          .clk(clk), .rst_n(rst_n),
          .a(cur[k*RAILS_IN + a]), .b(prev[k*RAILS_IN + b]),
          .see(1'b0), .q(mt[a][b]));
      end
    end
    for (genvar j = 0; j < RAILS_IN; j++) begin : g_rail
      logic [RAILS_IN-1:0] as_cur, as_prev;
      for (genvar m = 0; m < RAILS_IN; m++) begin : g_m
        assign as_cur[m]  = mt[j][m];
        assign as_prev[m] = mt[m][j];
      end
      assign code[k*RAILS_CODE + j] = |as_cur | |as_prev;
    end
    logic [RAILS_IN-1:0] same;
    for (genvar a = 0; a < RAILS_IN; a++) begin : g_same
      assign same[a] = mt[a][a];
    end
    assign code[k*RAILS_CODE + RAILS_IN] = |same;
  end

endmodule
