// uart_pkg: types and constants shared by the button-to-UART string sender.
//
// The design sends one of five fixed ASCII strings over a UART line, the
// string chosen by which of five push buttons is pressed. This package holds
// the character type, the number of buttons/strings and the string table
// itself.
//
// Each string is stored as a packed vector written with a SystemVerilog
// string literal, so the first character sits in the most significant byte
// of the literal's own width. A literal shorter than MAX_LEN characters is
// right-justified (zero-padded on the left) when it is widened to
// MAX_LEN*8 bits, so character i of string w is the byte at bit offset
// 8*(WORD_LEN[w]-1-i). Control characters use octal escapes:
// \012 is line feed (0x0A) and \015 is carriage return (0x0D).
//
// String 0 is the BASYS3 demo banner, "\n\rBASYS3 GPIO/UART DEMO!\n\n\r",
// 27 characters, taken from the reference design. Strings 1 to 4 are free
// choices of this implementation; replace them (and WORD_LEN) as needed,
// keeping every length between 1 and MAX_LEN.
package uart_pkg;

  typedef logic [7:0] char_t;

  localparam int unsigned NUM_BTN   = 5;   // push buttons = strings
  localparam int unsigned NUM_WORDS = NUM_BTN;
  localparam int unsigned MAX_LEN   = 27;  // longest string, in characters
  localparam int unsigned IDX_W     = $clog2(MAX_LEN);
  localparam int unsigned SEL_W     = $clog2(NUM_WORDS);

  typedef logic [IDX_W-1:0] char_idx_t;
  typedef logic [SEL_W-1:0] word_sel_t;
  typedef logic [MAX_LEN*8-1:0] word_text_t;

  localparam word_text_t WORD_TEXT [NUM_WORDS] = '{
    "\012\015BASYS3 GPIO/UART DEMO!\012\012\015",
    "\012\015HELLO, WORLD!\012\015",
    "\012\015FPGA SAYS HI\012\015",
    "\012\0150123456789\012\015",
    "\012\015The quick brown fox\012\015"
  };

  localparam int unsigned WORD_LEN [NUM_WORDS] = '{27, 17, 16, 14, 23};

endpackage
