// des_controller_tb: checks the rolling core's round controller. After an
// accepted start it must pass through rounds 0..15 on consecutive cycles,
// with first only in round 0 and last only in round 15, return to idle, and
// ignore start while busy; a block therefore occupies 17 cycles.
module des_controller_tb;
  int unsigned checks = 0, failures = 0;
  logic       clk = 0, rst, start;
  logic       load, first, active, last, busy;
  logic [3:0] round_idx;

  des_controller #(.ROUNDS(16)) dut (
    .clk, .rst, .start, .load, .round_idx, .first, .active, .last, .busy
  );

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    int ignored = 0, t_load, period;
    rst   = 1;
    start = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 0;
    check(!busy && !load, "idle after reset");
    for (int blk = 0; blk < 6; blk++) begin
      repeat (blk % 3) @(negedge clk);      // idle gap of 0..2 cycles
      start = 1;
      #1;
      check(load && !busy, "start accepted when idle");
      @(negedge clk);
      for (int r = 0; r < 16; r++) begin
        start = (r % 5) == 2;               // starts while busy are ignored
        #1;
        if (start) ignored++;
        check(busy && active && !load, "busy during rounds");
        check(round_idx == 4'(r), "round number");
        check(first == (r == 0), "first only in round 1");
        check(last == (r == 15), "last only in round 16");
        @(negedge clk);
      end
      start = 0;
      #1;
      check(!busy, "idle after 16 rounds (17-cycle block)");
    end
    check(ignored > 0, "start while busy exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
