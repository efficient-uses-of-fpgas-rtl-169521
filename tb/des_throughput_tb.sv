// des_throughput_tb: sustained block rates of the three DES datapaths.
//
// Runs the evaluated workloads, ECB enciphering of a long stream of blocks,
// and measures cycles per block once the datapath is busy:
//   * des_pipeline at one block per clock: 16 blocks in flight, a result
//     every cycle (64 bits/cycle; 4231 Mbit/s at 66.11 MHz);
//   * des_pipeline_top behind its 16-bit pins: a result every 4 cycles;
//   * des_rolling with start held high: a result every 17 cycles.
// Every result is also compared with the known-answer ciphertext, and the
// measured rates are printed in Mbit/s at the clock rates reported for the
// original FPGA implementations (66.11 MHz pipeline, 96.451 MHz rolling).
module des_throughput_tb;
  import des_tv_pkg::*;

  localparam int unsigned NBLK = 5 * N_KAT;

  int unsigned checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
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

  // ---------------- pipeline core ----------------
  logic        a_in_valid, a_out_valid;
  logic [63:0] a_in_block, a_in_key, a_out_block;
  int          a_outs = 0;
  longint      a_first = 0, a_last = 0;
  bit          a_done = 0;

  des_pipeline u_a (.clk, .rst, .in_valid(a_in_valid), .in_cipher(1'b1),
                    .in_block(a_in_block), .in_key(a_in_key),
                    .out_valid(a_out_valid), .out_block(a_out_block));

  always @(negedge clk) if (!rst && a_out_valid) begin
    check(a_out_block == KAT_CT[a_outs % N_KAT], "pipeline core result");
    if (a_outs == 0) a_first = cyc;
    a_last = cyc;
    a_outs++;
  end

  initial begin
    a_in_valid = 0; a_in_block = '0; a_in_key = '0;
    wait (!rst);
    @(negedge clk);
    for (int i = 0; i < NBLK; i++) begin
      a_in_valid = 1;
      a_in_block = KAT_PT[i % N_KAT];
      a_in_key   = KAT_KEY[i % N_KAT];
      @(negedge clk);
    end
    a_in_valid = 0;
    repeat (20) @(negedge clk);
    a_done = 1;
  end

  // ---------------- pipelined chip ----------------
  logic        b_start, b_out_valid;
  logic [15:0] b_data_in, b_key_in;
  logic [63:0] b_data_out;
  int          b_outs = 0;
  longint      b_first = 0, b_last = 0;
  bit          b_done = 0;

  des_pipeline_top u_b (.clk, .rst, .start(b_start), .cipher(1'b1),
                        .data_in(b_data_in), .key_in(b_key_in),
                        .data_out(b_data_out), .out_valid(b_out_valid));

  always @(negedge clk) if (!rst && b_out_valid) begin
    check(b_data_out == KAT_CT[b_outs % N_KAT], "pipelined chip result");
    if (b_outs == 0) b_first = cyc;
    b_last = cyc;
    b_outs++;
  end

  initial begin
    b_start = 0; b_data_in = '0; b_key_in = '0;
    wait (!rst);
    @(negedge clk);
    for (int i = 0; i < N_KAT; i++) begin
      for (int w = 0; w < 4; w++) begin
        b_start   = 1;
        b_data_in = KAT_PT[i][63 - 16*w -: 16];
        b_key_in  = KAT_KEY[i][63 - 16*w -: 16];
        @(negedge clk);
      end
    end
    b_start = 0;
    repeat (25) @(negedge clk);
    b_done = 1;
  end

  // ---------------- rolling core ----------------
  logic        c_start, c_done, c_busy;
  logic [63:0] c_data_in, c_key, c_data_out;
  int          c_outs = 0;
  longint      c_first = 0, c_last = 0;
  bit          c_fin = 0;

  des_rolling u_c (.clk, .rst, .start(c_start), .cipher(1'b1), .data_in(c_data_in),
                   .key(c_key), .data_out(c_data_out), .done(c_done), .busy(c_busy));

  initial begin
    c_start = 0; c_data_in = '0; c_key = '0;
    wait (!rst);
    @(negedge clk);
    c_start   = 1;
    c_data_in = KAT_PT[0];
    c_key     = KAT_KEY[0];
    while (c_outs < N_KAT) begin
      @(negedge clk);
      if (c_done) begin
        check(c_data_out == KAT_CT[c_outs], "rolling result");
        if (c_outs == 0) c_first = cyc;
        c_last = cyc;
        c_outs++;
        c_data_in = KAT_PT[c_outs % N_KAT];
        c_key     = KAT_KEY[c_outs % N_KAT];
      end
    end
    c_start = 0;
    c_fin = 1;
  end

  initial begin
    real a_cpb, b_cpb, c_cpb;
    repeat (3) @(negedge clk);
    rst = 0;
    wait (a_done && b_done && c_fin);
    check(a_outs == NBLK && b_outs == N_KAT && c_outs == N_KAT, "all blocks done");
    a_cpb = real'(a_last - a_first) / (a_outs - 1);
    b_cpb = real'(b_last - b_first) / (b_outs - 1);
    c_cpb = real'(c_last - c_first) / (c_outs - 1);
    check(a_last - a_first == a_outs - 1, "pipeline core: one block per cycle");
    check(b_last - b_first == 4 * (b_outs - 1), "pipelined chip: one block per 4 cycles");
    check(c_last - c_first == 17 * (c_outs - 1), "rolling core: one block per 17 cycles");
    $display("pipeline core : %0.2f cycles/block, %0.1f Mbit/s at 66.11 MHz", a_cpb, 64.0 * 66.11 / a_cpb);
    $display("pipelined chip: %0.2f cycles/block, %0.1f Mbit/s at 66.11 MHz", b_cpb, 64.0 * 66.11 / b_cpb);
    $display("rolling core  : %0.2f cycles/block, %0.1f Mbit/s at 96.451 MHz", c_cpb, 64.0 * 96.451 / c_cpb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
