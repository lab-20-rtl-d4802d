// tb_mult_debouncer: self-checking testbench for mult_debouncer.
//
// Five buttons, DEB_CYCLES = 8. Each button is pressed on its own at a
// different time; the test checks that only the matching output rises, and
// exactly DEB_CYCLES+2 cycles after its input, that a short glitch on one
// button disturbs no output, and that simultaneous presses and releases
// come through together.
module tb_mult_debouncer;

  localparam int unsigned N   = 5;
  localparam int unsigned DEB = 8;

  logic         clk = 1'b0;
  logic         rst;
  logic [N-1:0] btn_in, btn_out;

  int checks   = 0;
  int failures = 0;

  mult_debouncer #(.N(N), .DEB_CYCLES(DEB)) dut (
    .CLK(clk), .RST(rst), .BTNS_IN(btn_in), .BTNS_OUT(btn_out)
  );

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures <= 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    logic [N-1:0] expect_q;
    rst = 1'b1; btn_in = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    check(btn_out == '0, "all low after reset");

    expect_q = '0;
    for (int i = 0; i < N; i++) begin
      btn_in[i] = 1'b1;
      for (int k = 1; k <= DEB + 1; k++) begin
        @(negedge clk);
        check(btn_out == expect_q, $sformatf("button %0d: outputs %b early, cycle %0d", i, btn_out, k));
      end
      @(negedge clk);
      expect_q[i] = 1'b1;
      check(btn_out == expect_q, $sformatf("button %0d: outputs %b, expected %b", i, btn_out, expect_q));
    end

    // glitch on button 2 while released, others held
    btn_in[2] = 1'b0;
    repeat (DEB + 3) @(negedge clk);
    expect_q[2] = 1'b0;
    check(btn_out == expect_q, "button 2 release");
    btn_in[2] = 1'b1;
    repeat (3) @(negedge clk);
    btn_in[2] = 1'b0;
    repeat (DEB + 4) begin
      @(negedge clk);
      check(btn_out == expect_q, "glitch on button 2 disturbed the outputs");
    end

    // all released together, then two pressed together
    btn_in = '0;
    repeat (DEB + 2) @(negedge clk);
    check(btn_out == '0, "simultaneous release");
    btn_in = 5'b10010;
    repeat (DEB + 1) @(negedge clk);
    check(btn_out == '0, "simultaneous press came early");
    @(negedge clk);
    check(btn_out == 5'b10010, "simultaneous press");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
