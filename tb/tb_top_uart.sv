// tb_top_uart: end-to-end testbench for top_uart.
//
// Runs the whole design at 8 clocks per bit (CLKRATE 1000, BAUDRATE 125)
// and a 16-cycle debounce, decodes UART_TXD with a behavioural receiver, and
// compares what arrives with the strings written out independently here.
// Scenarios, each a mechanism of the design that is counted and must occur:
//   - each of the five buttons alone sends its own string;
//   - two buttons pressed together fall to the default case (string 0);
//   - a button held far longer than a string sends it only once;
//   - a glitch shorter than the debounce time sends nothing;
//   - a press arriving while a string is being sent is ignored;
//   - the sequencer holds DV low while the transmitter is busy, seen on the
//     line as clean hand-overs from one character to the next.
// Within a string, successive start bits must be exactly 10*CPB+2 cycles
// apart, and no frame may have a framing error.
module tb_top_uart;

  localparam int unsigned CLKRATE  = 1000;
  localparam int unsigned BAUDRATE = 125;
  localparam int unsigned CPB      = CLKRATE / BAUDRATE;  // 8
  localparam int unsigned DEB      = 16;
  localparam int unsigned PERIOD   = 10*CPB + 2;          // clocks per character

  logic       clk = 1'b0;
  logic [4:0] btn = '0;
  logic       txd;

  int checks   = 0;
  int failures = 0;

  top_uart #(.BAUDRATE(BAUDRATE), .CLKRATE(CLKRATE), .DEB_CYCLES(DEB)) dut (
    .CLK(clk), .BTN(btn), .UART_TXD(txd)
  );

  always #5 clk = ~clk;

  // ------------------------------------------------------------ receiver
  logic       rx_valid, rx_err, rx_start;
  logic [7:0] rx_data;

  uart_rx_model #(.CLKS_PER_BIT(CPB)) u_rx (
    .CLK(clk), .RX(txd), .VALID(rx_valid), .DATA(rx_data),
    .FRAME_ERR(rx_err), .START_SEEN(rx_start)
  );

  longint cycle = 0;
  always @(posedge clk) cycle++;

  byte    rxq[$];
  longint startq[$];
  int     frame_errors = 0;
  always @(posedge rx_valid) begin
    rxq.push_back(rx_data);
    if (rx_err) frame_errors++;
  end
  always @(posedge rx_start) startq.push_back(cycle);

  // Character hand-overs seen on the line. Had the sequencer left DV high
  // while the transmitter was busy, the transmitter would take the stale
  // character again the moment it returned to IDLE: the character would
  // repeat and the start bits would come 10*CPB+1 cycles apart. A correct
  // hand-over (next character, 10*CPB+2 cycles) shows DV was held low.
  int busy_holds = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures <= 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  string expected [5];
  int    words_sent [5];
  int    others_case = 0, held_once = 0, glitch_rejected = 0, press_ignored = 0;

  // Wait for string s to arrive in full, then check it and its timing, and
  // check that nothing more follows. Returns 1 if it arrived intact.
  task automatic expect_string(input string s, input string what, output bit ok);
    int waited = 0;
    ok = 1'b1;
    while (rxq.size() < s.len() && waited < (s.len() + 2) * PERIOD + 4*DEB) begin
      @(posedge clk);
      waited++;
    end
    repeat (3 * PERIOD) @(posedge clk);   // anything extra would show up now
    check(rxq.size() == s.len(),
          $sformatf("%s: received %0d characters, expected %0d", what, rxq.size(), s.len()));
    if (rxq.size() != s.len()) ok = 1'b0;
    for (int i = 0; i < s.len() && i < rxq.size(); i++) begin
      check(rxq[i] == s[i], $sformatf("%s char %0d: got %02h, expected %02h", what, i, rxq[i], s[i]));
      if (rxq[i] != s[i]) ok = 1'b0;
    end
    for (int i = 1; i < startq.size(); i++) begin
      check(startq[i] - startq[i-1] == longint'(PERIOD),
            $sformatf("%s: start bits %0d and %0d are %0d cycles apart, expected %0d",
                      what, i-1, i, startq[i] - startq[i-1], PERIOD));
      if (startq[i] - startq[i-1] == longint'(PERIOD) && i < rxq.size() && i < s.len()
          && rxq[i] == s[i])
        busy_holds++;
    end
    check(frame_errors == 0, $sformatf("%s: %0d framing errors", what, frame_errors));
    rxq.delete();
    startq.delete();
    frame_errors = 0;
  endtask

  task automatic press(input logic [4:0] b, input int cycles);
    @(negedge clk);
    btn = b;
    repeat (cycles) @(negedge clk);
    btn = '0;
  endtask

  initial begin
    bit ok;
    expected[0] = {"\n", "\015", "BASYS3 GPIO/UART DEMO!", "\n", "\n", "\015"};
    expected[1] = {"\n", "\015", "HELLO, WORLD!", "\n", "\015"};
    expected[2] = {"\n", "\015", "FPGA SAYS HI", "\n", "\015"};
    expected[3] = {"\n", "\015", "0123456789", "\n", "\015"};
    expected[4] = {"\n", "\015", "The quick brown fox", "\n", "\015"};
    foreach (words_sent[i]) words_sent[i] = 0;

    // Before the power-on reset has run, the line holds whatever the flip-flop
    // powered up with; let the receiver finish any frame that started then.
    repeat (30) @(posedge clk);
    check(txd == 1'b1, "line idles high after power-up");
    repeat (2 * PERIOD) @(posedge clk);
    rxq.delete();
    startq.delete();
    frame_errors = 0;

    // each button alone
    for (int i = 0; i < 5; i++) begin
      press(5'(1 << i), DEB + 6);
      expect_string(expected[i], $sformatf("button %0d", i), ok);
      if (ok) words_sent[i]++;
    end

    // two buttons together: default case, string 0
    press(5'b00110, DEB + 6);
    expect_string(expected[0], "buttons 1+2", ok);
    if (ok) others_case++;

    // held for three string-lengths: sent once
    press(5'b01000, 3 * expected[3].len() * PERIOD);
    expect_string(expected[3], "held button 3", ok);
    if (ok) held_once++;

    // glitch shorter than the debounce time
    press(5'b00010, DEB - 4);
    repeat (4 * PERIOD) @(posedge clk);
    check(rxq.size() == 0 && startq.size() == 0, "glitch produced output");
    if (rxq.size() == 0 && startq.size() == 0) glitch_rejected++;

    // second press while a string is on its way
    press(5'b00100, DEB + 6);
    repeat (DEB + 3 * PERIOD) @(posedge clk);
    press(5'b10000, DEB + 6);
    expect_string(expected[2], "press during a string", ok);
    if (ok) press_ignored++;

    for (int i = 0; i < 5; i++)
      check(words_sent[i] > 0, $sformatf("mechanism: string %0d never sent", i));
    check(others_case > 0,     "mechanism: default (several buttons) case never taken");
    check(held_once > 0,       "mechanism: held button not sent exactly once");
    check(glitch_rejected > 0, "mechanism: glitch never rejected");
    check(press_ignored > 0,   "mechanism: press during a string never ignored");
    check(busy_holds > 0,      "mechanism: no clean character hand-over (DV held low while busy)");
    $display("mechanisms: strings %0d %0d %0d %0d %0d, default case %0d, held-once %0d, glitch rejected %0d, press ignored %0d, clean hand-overs %0d",
             words_sent[0], words_sent[1], words_sent[2], words_sent[3], words_sent[4],
             others_case, held_once, glitch_rejected, press_ignored, busy_holds);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
