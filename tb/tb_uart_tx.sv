// tb_uart_tx: self-checking testbench for uart_tx.
//
// Runs the transmitter at 10 clocks per bit and checks, cycle by cycle,
// every frame against the 8N1 waveform worked out here from the byte sent:
// start bit low, data bits LSB first, stop bit high, each exactly
// CLKS_PER_BIT cycles; BUSY high for the whole 10*CLKS_PER_BIT-cycle frame;
// DONE high only in its last cycle; the line idle and BUSY low afterwards.
// It also checks that DV and DATA are ignored while a frame is in progress,
// and that with DV held high two frames follow each other
// 10*CLKS_PER_BIT+1 cycles apart. Inputs change on the falling clock edge;
// outputs are checked there too.
module tb_uart_tx;

  localparam int unsigned CLKRATE  = 1000;
  localparam int unsigned BAUDRATE = 100;
  localparam int unsigned CPB      = CLKRATE / BAUDRATE;  // 10

  logic       clk = 1'b0;
  logic       rst;
  logic [7:0] data;
  logic       dv;
  logic       busy, tx, done;

  int checks   = 0;
  int failures = 0;

  uart_tx #(.BAUDRATE(BAUDRATE), .CLKRATE(CLKRATE)) dut (
    .CLK(clk), .RST(rst), .DATA(data), .DV(dv),
    .BUSY(busy), .TX_OUT(tx), .DONE(done)
  );

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures <= 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // Expected line level in cycle k (0-based) of the frame carrying b.
  function automatic logic frame_bit(input logic [7:0] b, input int k);
    int bitno = k / CPB;
    if (bitno == 0) return 1'b0;
    if (bitno <= 8) return b[bitno-1];
    return 1'b1;
  endfunction

  // Called right after the falling edge that follows the accepting edge.
  // garbage: drive other data with DV high during the frame (must be ignored).
  task automatic check_frame(input logic [7:0] b, input bit garbage);
    for (int k = 0; k < 10*CPB; k++) begin
      check(tx == frame_bit(b, k), $sformatf("byte %02h cycle %0d: tx=%0b", b, k, tx));
      check(busy, $sformatf("byte %02h cycle %0d: busy low", b, k));
      check(done == (k == 10*CPB-1), $sformatf("byte %02h cycle %0d: done=%0b", b, k, done));
      if (garbage) begin
        dv   = (k < 10*CPB-1);         // drop DV before the machine returns to IDLE
        data = ~b;
      end
      @(negedge clk);
    end
  endtask

  initial begin
    logic [7:0] b, b2;
    rst = 1'b1; dv = 1'b0; data = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (5) begin
      check(tx && !busy && !done, "idle: line high, busy and done low");
      @(negedge clk);
    end

    // single frames, fixed corner values then random bytes
    for (int n = 0; n < 24; n++) begin
      b = (n == 0) ? 8'h00 : (n == 1) ? 8'hFF : (n == 2) ? 8'h55 : 8'($urandom);
      data = b; dv = 1'b1;
      @(negedge clk);                  // accepted on the edge just passed
      dv = 1'b0; data = 8'($urandom);
      check_frame(b, n % 2 == 1);
      dv = 1'b0;
      repeat (1 + n % 3) begin
        check(tx && !busy && !done, $sformatf("after byte %02h: idle", b));
        @(negedge clk);
      end
    end

    // back-to-back frames with DV held high
    b = 8'hA5; b2 = 8'h3C;
    data = b; dv = 1'b1;
    @(negedge clk);
    data = b2;                         // DV stays high through frame 1
    check_frame(b, 1'b0);
    check(tx && !busy, "one idle cycle between back-to-back frames");
    @(negedge clk);                    // frame 2 accepted on the edge just passed
    dv = 1'b0;
    check_frame(b2, 1'b0);
    check(tx && !busy && !done, "idle after back-to-back frames");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
