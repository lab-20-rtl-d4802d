// uart_tx: UART transmitter for one 8-bit word per frame (8N1).
//
// A frame is a start bit (low), the eight data bits least significant first,
// and a stop bit (high); every bit lasts CLKS_PER_BIT = CLKRATE / BAUDRATE
// clock cycles (integer division, so 1041 cycles at the defaults of
// 100 MHz and 96000 baud). A four-state machine IDLE -> START -> SEND_DATA ->
// STOP -> IDLE runs the frame, with one counter for the clock cycles of the
// current bit and a second one for the index of the data bit, as in the
// reference description.
//
// Interface and timing:
//   - In IDLE the line is high and BUSY and DONE are low. When DV is high at
//     a rising clock edge in IDLE, DATA is copied into an internal register
//     and the START state begins at that edge; DV is ignored in every other
//     state, so DATA need only be valid in the cycle DV is high.
//   - TX_OUT comes straight from a flip-flop (no decode glitches on the pin)
//     and changes on the same edge as the state, so the start bit begins
//     on the edge that accepted DV.
//   - BUSY is high in START, SEND_DATA and STOP: 10*CLKS_PER_BIT cycles.
//   - DONE is high for exactly one cycle, the last cycle of the stop bit,
//     after which the machine is back in IDLE. A new word offered with DV
//     held high is accepted in the first IDLE cycle, so back-to-back frames
//     are 10*CLKS_PER_BIT+1 cycles apart.
//   - RST is a synchronous, active-high reset to IDLE with the line high.
// The reset, the registered line output and the exact cycle on which DONE is
// high are choices of this implementation; the reference gives the states,
// the bit timing and the roles of the ports.
module uart_tx #(
  parameter int unsigned BAUDRATE = 96000,
  parameter int unsigned CLKRATE  = 100000000
) (
  input  logic       CLK,
  input  logic       RST,
  input  logic [7:0] DATA,
  input  logic       DV,
  output logic       BUSY,
  output logic       TX_OUT,
  output logic       DONE
);

  localparam int unsigned CLKS_PER_BIT = CLKRATE / BAUDRATE;
  localparam int unsigned CNT_W = (CLKS_PER_BIT > 1) ? $clog2(CLKS_PER_BIT) : 1;
  localparam logic [CNT_W-1:0] LAST_CLK = CNT_W'(CLKS_PER_BIT - 1);

  typedef enum logic [1:0] {IDLE, START, SEND_DATA, STOP} state_t;

  state_t           state_q, state_d;
  logic [CNT_W-1:0] clk_cnt_q, clk_cnt_d;   // cycles within the current bit
  logic [2:0]       bit_idx_q, bit_idx_d;   // data bit being sent
  logic [7:0]       copy_data_q, copy_data_d;
  logic             tx_q, tx_d;
  logic             bit_end;

  assign bit_end = (clk_cnt_q == LAST_CLK);

  always_comb begin
    state_d     = state_q;
    clk_cnt_d   = bit_end ? '0 : clk_cnt_q + 1'b1;
    bit_idx_d   = bit_idx_q;
    copy_data_d = copy_data_q;
    unique case (state_q)
      IDLE: begin
        clk_cnt_d = '0;
        bit_idx_d = '0;
        if (DV) begin
          copy_data_d = DATA;
          state_d     = START;
        end
      end
      START:
        if (bit_end) state_d = SEND_DATA;
      SEND_DATA:
        if (bit_end) begin
          bit_idx_d = bit_idx_q + 1'b1;        // wraps to 0 after bit 7
          if (bit_idx_q == 3'd7) state_d = STOP;
        end
      STOP:
        if (bit_end) state_d = IDLE;
      default: state_d = IDLE;
    endcase

    // Line level for the state about to be entered.
    unique case (state_d)
      START:     tx_d = 1'b0;
      SEND_DATA: tx_d = copy_data_d[bit_idx_d];
      default:   tx_d = 1'b1;                  // IDLE and STOP
    endcase
  end

  always_ff @(posedge CLK) begin
    if (RST) begin
      state_q     <= IDLE;
      clk_cnt_q   <= '0;
      bit_idx_q   <= '0;
      copy_data_q <= '0;
      tx_q        <= 1'b1;
    end else begin
      state_q     <= state_d;
      clk_cnt_q   <= clk_cnt_d;
      bit_idx_q   <= bit_idx_d;
      copy_data_q <= copy_data_d;
      tx_q        <= tx_d;
    end
  end

  assign TX_OUT = tx_q;
  assign BUSY   = (state_q != IDLE);
  assign DONE   = (state_q == STOP) && bit_end;

  // The line may only be low while a frame is in progress.
  a_low_only_when_busy: assert property (@(posedge CLK) disable iff (RST) !TX_OUT |-> BUSY);
  // DONE marks the end of a frame, so it can only come while BUSY.
  a_done_while_busy: assert property (@(posedge CLK) disable iff (RST) DONE |-> BUSY);

endmodule
