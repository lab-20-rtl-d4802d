// debouncer: clean up one mechanical push button.
//
// The raw button is first brought into the clock domain by a two-flip-flop
// synchronizer. A counter then measures how long the synchronized level has
// differed from the current output: the output takes the new level only
// after it has been stable for DEB_CYCLES consecutive clock cycles, and any
// bounce back to the old level restarts the count. Presses and releases
// are therefore both delayed by DEB_CYCLES + 2 cycles, and pulses shorter
// than DEB_CYCLES cycles never reach the output.
//
// The reference design names a per-button debouncer but does not say how it
// works; this counter scheme and its default of 1,000,000 cycles (10 ms at
// 100 MHz) are this implementation's choice.
//
// Interface: CLK; RST (synchronous, active high, output low); BTN_IN, the raw
// asynchronous button; BTN_OUT, the debounced level, registered.
module debouncer #(
  parameter int unsigned DEB_CYCLES = 1000000
) (
  input  logic CLK,
  input  logic RST,
  input  logic BTN_IN,
  output logic BTN_OUT
);

  localparam int unsigned CNT_W = (DEB_CYCLES > 1) ? $clog2(DEB_CYCLES) : 1;
  localparam logic [CNT_W-1:0] LAST = CNT_W'(DEB_CYCLES - 1);

  logic [1:0]       sync_q;     // sync_q[1] is the synchronized button
  logic [CNT_W-1:0] cnt_q;
  logic             out_q;

  always_ff @(posedge CLK) begin
    if (RST) begin
      sync_q <= '0;
      cnt_q  <= '0;
      out_q  <= 1'b0;
    end else begin
      sync_q <= {sync_q[0], BTN_IN};
      if (sync_q[1] == out_q) begin
        cnt_q <= '0;
      end else if (cnt_q == LAST) begin
        cnt_q <= '0;
        out_q <= sync_q[1];
      end else begin
        cnt_q <= cnt_q + 1'b1;
      end
    end
  end

  assign BTN_OUT = out_q;

endmodule
