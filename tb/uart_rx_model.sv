// uart_rx_model: behavioural UART receiver used by the testbenches in place
// of the serial terminal at the far end of the line.
//
// Watches RX for a falling edge, checks the start bit at its middle, samples
// the eight data bits (LSB first) and the stop bit at the middle of each bit
// period of CLKS_PER_BIT clocks, then pulses VALID for one cycle with the
// byte on DATA. FRAME_ERR is set with VALID when the start bit was not low
// at its middle or the stop bit was not high. START_SEEN pulses on the
// clock after the falling edge that begins a frame, so a testbench can time
// the distance between frames.
module uart_rx_model #(
  parameter int unsigned CLKS_PER_BIT = 8
) (
  input  logic       CLK,
  input  logic       RX,
  output logic       VALID,
  output logic [7:0] DATA,
  output logic       FRAME_ERR,
  output logic       START_SEEN
);

  initial begin
    VALID      = 1'b0;
    DATA       = '0;
    FRAME_ERR  = 1'b0;
    START_SEEN = 1'b0;
  end

  always begin
    logic       prev;
    logic       err;
    logic [7:0] b;
    prev = 1'b1;
    // wait for a falling edge on the line
    forever begin
      @(posedge CLK);
      if (prev && !RX) break;
      prev = RX;
    end
    START_SEEN = 1'b1;
    @(posedge CLK);
    START_SEEN = 1'b0;
    // the edge was seen one cycle late: the start bit began a cycle ago
    repeat (CLKS_PER_BIT/2 - 2) @(posedge CLK);
    err = RX;
    for (int i = 0; i < 8; i++) begin
      repeat (CLKS_PER_BIT) @(posedge CLK);
      b[i] = RX;
    end
    repeat (CLKS_PER_BIT) @(posedge CLK);
    if (!RX) err = 1'b1;
    DATA      = b;
    FRAME_ERR = err;
    VALID     = 1'b1;
    @(posedge CLK);
    VALID     = 1'b0;
    FRAME_ERR = 1'b0;
  end

endmodule
