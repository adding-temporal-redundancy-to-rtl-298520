// trdic_pkg: constants shared by the TRDIC (temporally redundant delay
// insensitive code) modules.
//
// A data digit travels as a 1-of-4 code (four rails, exactly one high for a
// data token, all low for the spacer). On the protected link each digit is
// re-coded as 2-of-5: the four data rails plus one extra rail that marks two
// equal tokens in a row. A 32-bit word is 16 such digits.
//
// init_tokens() gives the reset value that the encoder's and decoder's
// feedback loops must share (one 1-of-4 token per digit). The value 0001 is
// this design's choice; any valid 1-of-4 value works if both ends agree.
package trdic_pkg;

  localparam int unsigned RAILS_IN   = 4;   // 1-of-4 data digit
  localparam int unsigned RAILS_CODE = 5;   // 2-of-5 TRDIC digit
  localparam int unsigned WORD_DIGITS = 16; // 32 data bits = 16 1-of-4 digits
  localparam int unsigned LINK_DEPTH  = 16; // WCHB stages in the link

  localparam logic [RAILS_IN-1:0] INIT_TOKEN = 4'b0001;

  // Reset token of the previous-data / expected-data loop registers.
  function automatic logic [WORD_DIGITS*RAILS_IN-1:0] init_tokens();
    return {WORD_DIGITS{INIT_TOKEN}};
  endfunction

endpackage
