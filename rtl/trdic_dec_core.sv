// trdic_dec_core: double check of a received 2-of-5 TRDIC code against the
// token expected from the previous decoding step.
//
// Per digit:
//   decoded[j]       = C(code[j], expected[j])                 j = 0..3
//   next_expected[j] = OR over k != j of C(code[j], decoded[k])
//                      OR C(code[4], decoded[j])
// Every code word carries the previous token a second time, so the rail it
// shares with the expected token is the double-checked datum: a spurious
// extra rail (a three-hot invalid code caused by a single event) does not
// reach the decoded output. It does enter next_expected, which is then
// two-hot for one word. The other data rail of the code is the new token,
// which becomes the next expected value; if code[4] is set the token repeats
// and the checked rail is expected again.
// Deriving the next value from the checked token (not the raw expected
// token) lets an expected value made two-hot by a fault shrink back to one
// rail at the next word. code[4] is not passed on after decoding.
//
// The decoded token is the datum sent one word earlier: after reset the
// first decoded token is the shared initial value, not data.
//
// Ports: clk, rst_n, code, expected, decoded, next_expected. Timing: decoded
// one step after both inputs, next_expected one step after that. All outputs
// return to spacer only after both code and expected have.
module trdic_dec_core
  import trdic_pkg::*;
#(
  parameter int unsigned DIGITS = WORD_DIGITS
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [DIGITS*RAILS_CODE-1:0] code,
  input  logic [DIGITS*RAILS_IN-1:0]   expected,
  output logic [DIGITS*RAILS_IN-1:0]   decoded,
  output logic [DIGITS*RAILS_IN-1:0]   next_expected
);

  for (genvar k = 0; k < DIGITS; k++) begin : g_digit
    logic [RAILS_CODE-1:0] c;
    logic [RAILS_IN-1:0]   dec;
    logic [RAILS_IN-1:0]   rep;
    logic [RAILS_IN-1:0][RAILS_IN-1:0] newtok;

    assign c = code[k*RAILS_CODE +: RAILS_CODE];

    for (genvar j = 0; j < RAILS_IN; j++) begin : g_rail
      // Double check (one C-element per data rail).
      c_element u_check (
        .clk(clk), .rst_n(rst_n), .a(c[j]), .b(expected[k*RAILS_IN + j]),
        .see(1'b0), .q(dec[j]));
      // Repeated token: extra rail set and rail j checked.
      c_element u_rep (
        .clk(clk), .rst_n(rst_n), .a(c[RAILS_IN]), .b(dec[j]),
        .see(1'b0), .q(rep[j]));
      // New token on rail j: rail j in the code, another rail k checked.
      for (genvar m = 0; m < RAILS_IN; m++) begin : g_other
        if (m != j) begin : g_c
          c_element u_new (
            .clk(clk), .rst_n(rst_n), .a(c[j]), .b(dec[m]),
            .see(1'b0), .q(newtok[j][m]));
        end else begin : g_none
          assign newtok[j][m] = 1'b0;
        end
      end
      assign next_expected[k*RAILS_IN + j] = rep[j] | (|newtok[j]);
    end

    assign decoded[k*RAILS_IN +: RAILS_IN] = dec;
  end

endmodule
