// des_top_tb: end-to-end test of both DES architectures at their default
// sizes, running at the same time.
//
// Pipelined chip: every known-answer vector is enciphered and every
// ciphertext deciphered, fed as 16-bit words. Blocks are streamed back to
// back and with gaps, and one block is cut off by dropping start. Each result
// must be correct, in order and 20 cycles after its first word.
// Rolling chip: the same vectors in both directions through its word
// interface at the 17-cycle block period, plus blocks sent too early, whose
// upload meets a busy core and must be dropped; each result must be correct
// and arrive 21 cycles after its first word.
// The test counts how often each mechanism happened (streamed uploads,
// several blocks in the pipeline at once, deciphering on each side, an aborted
// partial block, a dropped upload) and counts a failure for any that never
// happened.
module des_top_tb;
  import des_tv_pkg::*;

  int unsigned checks = 0, failures = 0;
  logic        clk = 0, rst = 1;
  logic        p_start, p_cipher, p_out_valid;
  logic [15:0] p_data_in, p_key_in;
  logic [63:0] p_data_out;
  logic        r_start, r_cipher, r_done, r_busy;
  logic [15:0] r_data_in, r_key_in;
  logic [63:0] r_data_out;

  des_top dut (.*);

  always #5 clk = ~clk;

  longint cyc = 0;
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

  // ---------------- pipelined chip ----------------
  typedef struct { logic [63:0] expect_blk; longint t_first; } exp_t;
  exp_t q[$];
  int p_outs = 0, p_dec = 0, p_streamed = 0, p_aborted = 0, p_max_flight = 0;
  bit p_done = 0;

  always @(negedge clk) begin
    if (!rst && p_out_valid) begin
      exp_t e;
      if (q.size() == 0) begin
        check(0, "pipeline: unexpected output");
      end else begin
        e = q.pop_front();
        check(p_data_out == e.expect_blk,
              $sformatf("pipeline: %h, expected %h", p_data_out, e.expect_blk));
        check(cyc - e.t_first == 20,
              $sformatf("pipeline latency %0d, expected 20", cyc - e.t_first));
      end
      p_outs++;
    end
    if (q.size() > p_max_flight) p_max_flight = q.size();
  end

  task automatic p_send(input int i, input bit enc, input int words);
    logic [63:0] blk;
    blk = enc ? KAT_PT[i] : KAT_CT[i];
    if (words == 4) q.push_back('{expect_blk: enc ? KAT_CT[i] : KAT_PT[i], t_first: cyc});
    for (int w = 0; w < words; w++) begin
      p_start   = 1;
      p_cipher  = enc;
      p_data_in = blk[63 - 16*w -: 16];
      p_key_in  = KAT_KEY[i][63 - 16*w -: 16];
      @(negedge clk);
    end
    if (!enc && words == 4) p_dec++;
  endtask

  initial begin : pipe_driver
    p_start = 0; p_cipher = 1; p_data_in = '0; p_key_in = '0;
    wait (!rst);
    @(negedge clk);
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < N_KAT; i++) begin
        p_send(i, pass == 0, 4);
        if (i % 8 == 7) begin
          p_start = 0;
          repeat (1 + $urandom % 3) @(negedge clk);
        end else begin
          p_streamed++;
        end
      end
      // a block cut off after three words produces nothing
      p_send(5, 1, 3);
      p_aborted++;
      p_start = 0;
      @(negedge clk);
    end
    p_start = 0;
    repeat (25) @(negedge clk);
    p_done = 1;
  end

  // ---------------- full rolling chip ----------------
  typedef struct { logic [63:0] expect_blk; longint t_first; } rexp_t;
  rexp_t rq[$];
  int r_blocks = 0, r_dec = 0, r_dropped = 0;
  bit r_finished = 0;

  always @(negedge clk) begin
    if (!rst && r_done) begin
      rexp_t e;
      if (rq.size() == 0) begin
        check(0, "rolling: unexpected result");
      end else begin
        e = rq.pop_front();
        check(r_data_out == e.expect_blk,
              $sformatf("rolling: %h, expected %h", r_data_out, e.expect_blk));
        check(cyc - e.t_first == 21,
              $sformatf("rolling latency %0d, expected 21", cyc - e.t_first));
      end
      r_blocks++;
    end
  end

  task automatic r_send(input int i, input bit enc, input bit keep);
    logic [63:0] blk;
    blk = enc ? KAT_PT[i] : KAT_CT[i];
    if (keep) rq.push_back('{expect_blk: enc ? KAT_CT[i] : KAT_PT[i], t_first: cyc});
    for (int w = 0; w < 4; w++) begin
      r_start   = 1;
      r_cipher  = enc;
      r_data_in = blk[63 - 16*w -: 16];
      r_key_in  = KAT_KEY[i][63 - 16*w -: 16];
      @(negedge clk);
    end
    r_start = 0;
    if (!enc && keep) r_dec++;
  endtask

  initial begin : roll_driver
    r_start = 0; r_cipher = 1; r_data_in = '0; r_key_in = '0;
    wait (!rst);
    @(negedge clk);
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < N_KAT; i++) begin
        r_send(i, pass == 0, 1'b1);
        if (i % 9 == 4) begin
          // a block right behind: its upload meets a busy core and is dropped
          r_send((i + 1) % N_KAT, 1'b1, 1'b0);
          r_dropped++;
          repeat (9) @(negedge clk);
        end else begin
          repeat (13 + (i % 2)) @(negedge clk);
        end
      end
    end
    repeat (25) @(negedge clk);
    r_finished = 1;
  end

  initial begin
    rst = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    wait (p_done && r_finished);
    check(q.size() == 0 && p_outs == 2 * N_KAT,
          $sformatf("pipeline: %0d results, %0d missing", p_outs, q.size()));
    check(p_streamed > 0,   "mechanism: back-to-back blocks through the converters");
    check(p_max_flight >= 4, "mechanism: several blocks in the pipeline at once");
    check(p_dec > 0,        "mechanism: pipelined deciphering");
    check(p_aborted > 0,    "mechanism: partial block discarded");
    check(rq.size() == 0 && r_blocks == 2 * N_KAT,
          $sformatf("rolling: %0d results, %0d missing", r_blocks, rq.size()));
    check(r_dec > 0,        "mechanism: rolling deciphering");
    check(r_dropped > 0,    "mechanism: upload dropped while the rolling core is busy");
    $display("pipeline: results=%0d streamed=%0d max_in_flight=%0d deciphered=%0d aborted=%0d",
             p_outs, p_streamed, p_max_flight, p_dec, p_aborted);
    $display("rolling: results=%0d deciphered=%0d dropped=%0d", r_blocks, r_dec, r_dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
