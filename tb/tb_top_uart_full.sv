// tb_top_uart_full: top_uart at its default parameters, one complete press.
//
// 100 MHz clock, 96000 baud (1041 clocks per bit, so 10412 clocks per
// character including the two hand-over cycles) and a 1,000,000-cycle
// debounce. Button 0 is pressed with some bounce, held for 1.1 million
// cycles and released; the test decodes UART_TXD and checks that the
// 27-character banner arrives exactly once, intact, with successive start
// bits 10412 cycles apart, and that the first start bit follows the first
// bounce-free moment of the press by the debounce delay.
module tb_top_uart_full;

  localparam int unsigned CPB    = 100000000 / 96000;   // 1041
  localparam int unsigned PERIOD = 10*CPB + 2;
  localparam int unsigned DEB    = 1000000;

  logic       clk = 1'b0;
  logic [4:0] btn = '0;
  logic       txd;

  int checks   = 0;
  int failures = 0;

  top_uart dut (.CLK(clk), .BTN(btn), .UART_TXD(txd));

  always #5 clk = ~clk;      // 10 ns period, 100 MHz

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

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures <= 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    string  s;
    longint stable_at;
    s = {"\n", "\015", "BASYS3 GPIO/UART DEMO!", "\n", "\n", "\015"};

    repeat (30) @(posedge clk);
    check(txd == 1'b1, "line idles high after power-up");
    repeat (2 * PERIOD) @(posedge clk);
    rxq.delete();
    startq.delete();
    frame_errors = 0;

    // bouncing press of button 0
    for (int i = 0; i < 10; i++) begin
      @(negedge clk);
      btn[0] = ~btn[0];
      repeat (1000 + $urandom_range(5000)) @(negedge clk);
    end
    btn[0] = 1'b1;
    stable_at = cycle;
    repeat (1100000) @(negedge clk);
    btn[0] = 1'b0;

    while (rxq.size() < s.len() && cycle < stable_at + DEB + (s.len() + 2) * PERIOD)
      @(posedge clk);
    repeat (DEB + 3 * PERIOD) @(posedge clk);   // release debounced, line quiet

    check(rxq.size() == s.len(), $sformatf("received %0d characters, expected %0d", rxq.size(), s.len()));
    for (int i = 0; i < s.len() && i < rxq.size(); i++)
      check(rxq[i] == s[i], $sformatf("char %0d: got %02h, expected %02h", i, rxq[i], s[i]));
    check(frame_errors == 0, $sformatf("%0d framing errors", frame_errors));
    if (startq.size() > 0) begin
      // input stable -> 2 sync + DEB count -> edge detect -> FSM -> DV -> start bit
      check(startq[0] - stable_at >= longint'(DEB) && startq[0] - stable_at <= longint'(DEB) + 10,
            $sformatf("first start bit %0d cycles after the press settled", startq[0] - stable_at));
    end
    for (int i = 1; i < startq.size(); i++)
      check(startq[i] - startq[i-1] == longint'(PERIOD),
            $sformatf("start bits %0d and %0d are %0d cycles apart, expected %0d",
                      i-1, i, startq[i] - startq[i-1], PERIOD));
    $display("received %0d characters in %0d cycles", rxq.size(),
             (startq.size() > 0) ? startq[startq.size()-1] - startq[0] + PERIOD : 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
