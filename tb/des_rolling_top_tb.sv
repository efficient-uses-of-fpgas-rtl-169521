// des_rolling_top_tb: drives the pin-limited full rolling chip word by word.
//
// Each block goes in as four 16-bit words with start high. The result must
// come out with done 21 cycles after the first word (4 converter cycles, the
// start cycle and 16 rounds). Blocks are sent at the fastest period the core
// allows, 17 cycles, with the next block's words overlapping the current
// rounds, and in both directions. One block is sent right behind another, so
// its upload meets a busy core: it must be dropped without disturbing the
// block in progress.
module des_rolling_top_tb;
  import des_tv_pkg::*;

  int unsigned checks = 0, failures = 0;
  logic        clk = 0, rst = 1, start, cipher, done, busy;
  logic [15:0] data_in, key_in;
  logic [63:0] data_out;

  des_rolling_top #(.WORD_W(16)) dut (.clk, .rst, .start, .cipher, .data_in, .key_in,
                                      .data_out, .done, .busy);

  always #5 clk = ~clk;

  typedef struct { logic [63:0] expect_blk; longint t_first; } exp_t;
  exp_t   q[$];
  longint cyc = 0;
  int     outs = 0, dropped = 0, decs = 0;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (!rst && done) begin
      exp_t e;
      checks += 2;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected result %h", data_out);
      end else begin
        e = q.pop_front();
        if (data_out != e.expect_blk) begin
          failures++;
          $display("FAIL result %h, expected %h", data_out, e.expect_blk);
        end
        if (cyc - e.t_first != 21) begin
          failures++;
          $display("FAIL latency %0d cycles, expected 21", cyc - e.t_first);
        end
      end
      outs++;
    end
  end

  // Four words of block i; if keep is 0 the block is expected to be dropped.
  task automatic send(input int i, input bit enc, input bit keep);
    logic [63:0] blk;
    blk = enc ? KAT_PT[i] : KAT_CT[i];
    if (keep) q.push_back('{expect_blk: enc ? KAT_CT[i] : KAT_PT[i], t_first: cyc});
    for (int w = 0; w < 4; w++) begin
      start   = 1;
      cipher  = enc;
      data_in = blk[63 - 16*w -: 16];
      key_in  = KAT_KEY[i][63 - 16*w -: 16];
      @(negedge clk);
    end
    start = 0;
    if (!enc && keep) decs++;
  endtask

  initial begin
    start = 0; cipher = 1; data_in = '0; key_in = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < N_KAT; i++) begin
      send(i, i % 3 != 1, 1'b1);
      if (i == 10) begin
        send(i + 1, 1'b1, 1'b0);     // upload while busy: dropped
        dropped++;
        repeat (9) @(negedge clk);
      end else begin
        repeat (13) @(negedge clk);  // 17-cycle block period
      end
    end
    repeat (25) @(negedge clk);
    checks++;
    if (q.size() != 0 || outs != N_KAT || decs == 0 || dropped == 0) begin
      failures++;
      $display("FAIL %0d results, %0d missing", outs, q.size());
    end
    $display("results=%0d deciphered=%0d dropped=%0d", outs, decs, dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
