// top_uart: push a button, get a line of text on the serial port.
//
// Five push buttons are debounced (mult_debouncer). When one of the
// debounced buttons goes from low to high while the sender is idle, the
// whole button vector is captured as the command and the string chosen by it
// (uart_word_rom) is sent character by character through uart_tx on UART_TXD.
// Button bit i alone selects string i; any other pattern (several buttons at
// once) selects string 0.
//
// Sequencing FSM (IDLE / SEND_DATA), as in the reference design:
//   - IDLE: wait for a button to go high; copy the debounced buttons into
//     `command`, clear the character index, go to SEND_DATA.
//   - SEND_DATA: while the transmitter is BUSY, hold its DV low; otherwise
//     present the current character on its DATA input with DV high. Each
//     DONE pulse from the transmitter advances the character index; the DONE
//     of the last character clears the index and DV and returns to IDLE.
// Characters follow each other every 10*CLKS_PER_BIT + 2 clock cycles
// (CLKS_PER_BIT = CLKRATE/BAUDRATE): the frame itself plus one cycle for
// this FSM to see BUSY fall and one for the transmitter to take DV.
//
// Choices of this implementation where the reference is not specific:
// "goes high" is read as a rising edge of a debounced button, so holding a
// button sends its string once, and presses that arrive while a string is
// being sent are ignored. The board has no reset button to spare (all five
// are used), so a 4-bit power-on counter, given its initial value by the
// FPGA configuration, holds everything in reset for the first 15 cycles (lint tools flag the
// mix of an initial value and a clocked update on this counter; that mix
// is the intent).
//
// Ports: CLK (100 MHz), BTN[4:0] (raw buttons, active high), UART_TXD
// (serial line, 8N1, idles high).
module top_uart
  import uart_pkg::*;
#(
  parameter int unsigned BAUDRATE   = 96000,
  parameter int unsigned CLKRATE    = 100000000,
  parameter int unsigned DEB_CYCLES = 1000000
) (
  input  logic               CLK,
  input  logic [NUM_BTN-1:0] BTN,
  output logic               UART_TXD
);

  // ---------------------------------------------------------------- reset
  logic [3:0] por_cnt = 4'd0;
  logic       rst;

  always_ff @(posedge CLK)
    if (por_cnt != 4'hF) por_cnt <= por_cnt + 4'd1;

  assign rst = (por_cnt != 4'hF);

  // ----------------------------------------------------------- debouncing
  logic [NUM_BTN-1:0] debounced_btns, btns_prev_q, btn_rise;

  mult_debouncer #(.N(NUM_BTN), .DEB_CYCLES(DEB_CYCLES)) u_debounce (
    .CLK      (CLK),
    .RST      (rst),
    .BTNS_IN  (BTN),
    .BTNS_OUT (debounced_btns)
  );

  always_ff @(posedge CLK)
    if (rst) btns_prev_q <= '0;
    else     btns_prev_q <= debounced_btns;

  assign btn_rise = debounced_btns & ~btns_prev_q;

  // -------------------------------------------------------- string table
  typedef enum logic {IDLE, SEND_DATA} state_t;

  state_t             state_q;
  logic [NUM_BTN-1:0] command_q;
  char_idx_t          string_index_q;
  word_sel_t          word_sel;
  char_t              rom_char;
  logic [IDX_W:0]     word_len;

  always_comb begin
    unique case (command_q)
      5'b00001: word_sel = SEL_W'(0);
      5'b00010: word_sel = SEL_W'(1);
      5'b00100: word_sel = SEL_W'(2);
      5'b01000: word_sel = SEL_W'(3);
      5'b10000: word_sel = SEL_W'(4);
      default:  word_sel = SEL_W'(0);
    endcase
  end

  uart_word_rom u_rom (
    .word_sel (word_sel),
    .char_idx (string_index_q),
    .char_o   (rom_char),
    .word_len (word_len)
  );

  // ------------------------------------------------------ UART transmitter
  logic  uart_dv_q, uart_busy, uart_done;
  char_t uart_data_q;

  uart_tx #(.BAUDRATE(BAUDRATE), .CLKRATE(CLKRATE)) u_uart_tx (
    .CLK    (CLK),
    .RST    (rst),
    .DATA   (uart_data_q),
    .DV     (uart_dv_q),
    .BUSY   (uart_busy),
    .TX_OUT (UART_TXD),
    .DONE   (uart_done)
  );

  // -------------------------------------------------------- sequencing FSM
  always_ff @(posedge CLK) begin
    if (rst) begin
      state_q        <= IDLE;
      command_q      <= '0;
      string_index_q <= '0;
      uart_dv_q      <= 1'b0;
      uart_data_q    <= '0;
    end else begin
      unique case (state_q)
        IDLE: begin
          uart_dv_q <= 1'b0;
          if (|btn_rise) begin
            command_q      <= debounced_btns;
            string_index_q <= '0;
            state_q        <= SEND_DATA;
          end
        end
        SEND_DATA: begin
          if (uart_busy) begin
            uart_dv_q <= 1'b0;
          end else begin
            uart_data_q <= rom_char;
            uart_dv_q   <= 1'b1;
          end
          if (uart_done) begin
            if ((IDX_W+1)'(string_index_q) < word_len - 1'b1) begin
              string_index_q <= string_index_q + 1'b1;
            end else begin
              string_index_q <= '0;
              uart_dv_q      <= 1'b0;
              state_q        <= IDLE;
            end
          end
        end
        default: state_q <= IDLE;
      endcase
    end
  end

endmodule
