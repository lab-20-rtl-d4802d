// tb_debouncer: self-checking testbench for debouncer.
//
// With DEB_CYCLES = 8 it checks that: the output is low after reset; a
// clean press reaches the output exactly DEB_CYCLES+2 cycles after the
// input changes (two synchronizer stages plus the stability count); a
// pulse of DEB_CYCLES-1 cycles is filtered out while one of DEB_CYCLES
// cycles gets through; a bouncing press or release produces a single clean
// output edge; and the release is delayed like the press. Inputs change on
// the falling clock edge and outputs are checked there.
module tb_debouncer;

  localparam int unsigned DEB = 8;

  logic clk = 1'b0;
  logic rst, btn_in, btn_out;

  int checks   = 0;
  int failures = 0;

  debouncer #(.DEB_CYCLES(DEB)) dut (.CLK(clk), .RST(rst), .BTN_IN(btn_in), .BTN_OUT(btn_out));

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures <= 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // Output edges counted over the whole run.
  int rises = 0, falls = 0;
  logic out_prev = 1'b0;
  always @(negedge clk) begin
    if (!rst) begin
      if (btn_out && !out_prev) rises++;
      if (!btn_out && out_prev) falls++;
    end
    out_prev = btn_out;
  end

  // Drive the input to `level`, then check the output keeps `old` for
  // DEB+1 cycles and shows `level` from cycle DEB+2 on.
  task automatic clean_edge(input logic level);
    btn_in = level;
    for (int k = 1; k <= DEB + 1; k++) begin
      @(negedge clk);
      check(btn_out == !level, $sformatf("output changed early, cycle %0d", k));
    end
    @(negedge clk);
    check(btn_out == level, "output did not follow after DEB_CYCLES+2 cycles");
  endtask

  task automatic pulse(input int len);
    btn_in = 1'b1;
    repeat (len) @(negedge clk);
    btn_in = 1'b0;
  endtask

  task automatic settle(input logic level);
    repeat (DEB + 4) begin
      @(negedge clk);
      check(btn_out == level, "output moved while input was settled");
    end
  endtask

  initial begin
    int r0, f0;
    rst = 1'b1; btn_in = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    check(btn_out == 1'b0, "low after reset");

    clean_edge(1'b1);
    settle(1'b1);
    clean_edge(1'b0);
    settle(1'b0);

    // too short a pulse is filtered
    r0 = rises;
    pulse(DEB - 1);
    settle(1'b0);
    check(rises == r0, "a pulse of DEB_CYCLES-1 cycles reached the output");

    // a pulse of exactly DEB_CYCLES cycles passes
    pulse(DEB);
    repeat (DEB + 4) @(negedge clk);
    check(rises == r0 + 1, "a pulse of DEB_CYCLES cycles was lost");
    repeat (2*DEB) @(negedge clk);
    check(btn_out == 1'b0, "output did not return low after the pulse");

    // bouncing press then bouncing release: one edge each
    r0 = rises; f0 = falls;
    for (int i = 0; i < 12; i++) begin
      btn_in = ~btn_in;
      repeat (1 + $urandom_range(DEB - 2)) @(negedge clk);
    end
    btn_in = 1'b1;
    repeat (3*DEB) @(negedge clk);
    check(btn_out == 1'b1, "bouncy press not registered");
    for (int i = 0; i < 12; i++) begin
      btn_in = ~btn_in;
      repeat (1 + $urandom_range(DEB - 2)) @(negedge clk);
    end
    btn_in = 1'b0;
    repeat (3*DEB) @(negedge clk);
    check(btn_out == 1'b0, "bouncy release not registered");
    check(rises == r0 + 1, $sformatf("bouncy press gave %0d rising edges", rises - r0));
    check(falls == f0 + 1, $sformatf("bouncy release gave %0d falling edges", falls - f0));

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
