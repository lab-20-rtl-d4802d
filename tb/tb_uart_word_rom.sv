// tb_uart_word_rom: self-checking testbench for uart_word_rom.
//
// The five expected strings are written out here as plain strings and
// compared character by character with the table, for every index of every
// string; the reported lengths are checked, and so are the defined
// out-of-range results (0x00 past the end of a string, string 0 for a
// selector of 5 or more).
module tb_uart_word_rom;
  import uart_pkg::*;

  word_sel_t      sel;
  char_idx_t      idx;
  char_t          ch;
  logic [IDX_W:0] len;

  int checks   = 0;
  int failures = 0;

  uart_word_rom dut (.word_sel(sel), .char_idx(idx), .char_o(ch), .word_len(len));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s", what);
    end
  endtask

  string expected [5];

  initial begin
    expected[0] = {"\n", "\015", "BASYS3 GPIO/UART DEMO!", "\n", "\n", "\015"};
    expected[1] = {"\n", "\015", "HELLO, WORLD!", "\n", "\015"};
    expected[2] = {"\n", "\015", "FPGA SAYS HI", "\n", "\015"};
    expected[3] = {"\n", "\015", "0123456789", "\n", "\015"};
    expected[4] = {"\n", "\015", "The quick brown fox", "\n", "\015"};

    check(expected[0].len() == 27, "banner string is 27 characters");
    for (int w = 0; w < 8; w++) begin
      int ew;
      ew  = (w < 5) ? w : 0;
      sel = word_sel_t'(w);
      for (int i = 0; i < 32; i++) begin
        idx = char_idx_t'(i);
        #1;
        check(int'(len) == expected[ew].len(),
              $sformatf("word %0d: length %0d, expected %0d", w, len, expected[ew].len()));
        if (i < expected[ew].len())
          check(ch == expected[ew][i],
                $sformatf("word %0d char %0d: %02h, expected %02h", w, i, ch, expected[ew][i]));
        else
          check(ch == 8'h00, $sformatf("word %0d char %0d past end: %02h", w, i, ch));
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
