// mult_debouncer: one debouncer per push button.
//
// Debounces a bus of N independent push buttons by instantiating the
// single-button debouncer N times; bit i of BTNS_OUT is the debounced
// version of bit i of BTNS_IN, delayed by DEB_CYCLES + 2 cycles (see
// debouncer). N defaults to the five buttons of the reference board.
//
// Interface: CLK; RST (synchronous, active high); BTNS_IN, raw buttons;
// BTNS_OUT, debounced buttons, registered.
module mult_debouncer #(
  parameter int unsigned N          = 5,
  parameter int unsigned DEB_CYCLES = 1000000
) (
  input  logic         CLK,
  input  logic         RST,
  input  logic [N-1:0] BTNS_IN,
  output logic [N-1:0] BTNS_OUT
);

  for (genvar i = 0; i < N; i++) begin : g_deb
    debouncer #(.DEB_CYCLES(DEB_CYCLES)) u_deb (
      .CLK     (CLK),
      .RST     (RST),
      .BTN_IN  (BTNS_IN[i]),
      .BTN_OUT (BTNS_OUT[i])
    );
  end

endmodule
