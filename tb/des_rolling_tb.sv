// des_rolling_tb: runs the full rolling core over all known-answer vectors.
//
// Each vector is enciphered and its ciphertext deciphered. done must pulse
// 17 cycles after the start cycle (start sampled at edge t, done and data_out
// valid right after edge t+17), data_out must hold its value afterwards, and
// a start pulsed while the core is busy must be ignored. Starts are also
// given back to back (start held high) to check the 17-cycle block period.
module des_rolling_tb;
  import des_tv_pkg::*;

  int unsigned checks = 0, failures = 0;
  logic        clk = 0, rst, start, cipher, done, busy;
  logic [63:0] data_in, key, data_out;

  des_rolling dut (.clk, .rst, .start, .cipher, .data_in, .key, .data_out, .done, .busy);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
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

  int ignored = 0;

  // One block: start for one cycle, then wait for done, counting cycles.
  task automatic run(input int i, input bit enc, input bit poke_busy);
    logic [63:0] exp_blk;
    int n;
    exp_blk = enc ? KAT_CT[i] : KAT_PT[i];
    start   = 1;
    cipher  = enc;
    data_in = enc ? KAT_PT[i] : KAT_CT[i];
    key     = KAT_KEY[i];
    @(negedge clk);
    start = 0;
    n = 1;
    while (!done && n < 40) begin
      if (poke_busy && n == 7) begin
        // a different block offered while busy must not disturb this one
        start   = 1;
        data_in = ~data_in;
        cipher  = ~enc;
        ignored++;
      end else begin
        start = 0;
      end
      @(negedge clk);
      n++;
    end
    start = 0;
    check(n == 17, $sformatf("done after %0d cycles, expected 17", n));
    check(data_out == exp_blk, $sformatf("vector %0d enc %0d: %h, expected %h", i, enc,
                                         data_out, exp_blk));
    @(negedge clk);
    check(!done && data_out == exp_blk, "result held after done");
  endtask

  initial begin
    int starts, dones;
    rst = 1; start = 0; cipher = 1; data_in = '0; key = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < N_KAT; i++) begin
      run(i, 1, i % 4 == 1);
      run(i, 0, i % 4 == 3);
    end
    check(ignored > 0, "start while busy exercised");
    // start held high: a block every 17 cycles
    start = 1; cipher = 1; data_in = KAT_PT[0]; key = KAT_KEY[0];
    dones = 0;
    for (int c = 0; c < 17 * 4; c++) begin
      @(negedge clk);
      if (done) begin
        dones++;
        check(data_out == KAT_CT[0], "streamed result");
      end
    end
    start = 0;
    check(dones == 4, $sformatf("%0d blocks in 68 cycles, expected 4", dones));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
