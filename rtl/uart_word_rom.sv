// uart_word_rom: read-only table of the five strings the design can send.
//
// A purely combinational lookup: word_sel picks one of the NUM_WORDS strings
// of uart_pkg, char_idx picks a character of it (0 is the first character
// sent), and the module returns that character together with the length of
// the selected string. It plays the role of the array-of-words constant of
// the reference design (an array indexed by word, each an array of 8-bit
// ASCII codes); the string contents other than word 0 are this
// implementation's choice and live in uart_pkg.
//
// Out-of-range inputs are defined: a word_sel of NUM_WORDS or more returns
// word 0, and a char_idx at or beyond the string length returns 8'h00.
//
// Interface: word_sel, char_idx in; char_o, word_len out. No clock; the
// outputs follow the inputs within the same cycle.
module uart_word_rom
  import uart_pkg::*;
(
  input  word_sel_t          word_sel,
  input  char_idx_t          char_idx,
  output char_t              char_o,
  output logic [IDX_W:0]     word_len
);

  word_sel_t w;

  always_comb begin
    w        = (int'(word_sel) < NUM_WORDS) ? word_sel : '0;
    word_len = (IDX_W+1)'(WORD_LEN[w]);
    if (int'(char_idx) < WORD_LEN[w])
      char_o = WORD_TEXT[w][8*(WORD_LEN[w]-1-int'(char_idx)) +: 8];
    else
      char_o = 8'h00;
  end

endmodule
