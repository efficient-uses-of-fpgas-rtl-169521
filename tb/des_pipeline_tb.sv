// des_pipeline_tb: streams blocks through the 16-stage pipeline.
//
// Phase 1 feeds all known-answer vectors on consecutive clocks, alternating
// enciphering and deciphering (a ciphertext deciphers to its plaintext), so
// the pipeline is full with mixed keys and directions. Phase 2 feeds them
// again with random gaps. Every result must come out in order, 16 cycles
// after its block went in; the test also checks that one block per clock
// leaves a full pipeline and that sixteen blocks were in flight at once.
module des_pipeline_tb;
  import des_tv_pkg::*;

  int unsigned checks = 0, failures = 0;
  logic        clk = 0, rst;
  logic        in_valid, in_cipher, out_valid;
  logic [63:0] in_block, in_key, out_block;

  des_pipeline dut (.clk, .rst, .in_valid, .in_cipher, .in_block, .in_key,
                    .out_valid, .out_block);

  always #5 clk = ~clk;

  typedef struct { logic [63:0] expect_blk; longint t_in; } exp_t;
  exp_t    q[$];
  longint  cyc = 0;
  int      in_flight = 0, max_in_flight = 0, outs = 0, back_to_back = 0;
  bit      prev_out = 0;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output checker, sampled just before each rising edge.
  always @(negedge clk) begin
    if (!rst && out_valid) begin
      exp_t e;
      checks += 2;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output %h", out_block);
      end else begin
        e = q.pop_front();
        if (out_block != e.expect_blk) begin
          failures++;
          $display("FAIL out %h, expected %h", out_block, e.expect_blk);
        end
        if (cyc - e.t_in != 16) begin
          failures++;
          $display("FAIL latency %0d cycles, expected 16", cyc - e.t_in);
        end
      end
      outs++;
      if (prev_out) back_to_back++;
    end
    prev_out = out_valid;
  end

  task automatic feed(input int i, input bit enc);
    in_valid  = 1;
    in_cipher = enc;
    in_key    = KAT_KEY[i];
    in_block  = enc ? KAT_PT[i] : KAT_CT[i];
    q.push_back('{expect_blk: enc ? KAT_CT[i] : KAT_PT[i], t_in: cyc});
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    rst = 1; in_valid = 0; in_cipher = 1; in_block = '0; in_key = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < N_KAT; i++) feed(i, i[0] == 0);
    for (int i = 0; i < N_KAT; i++) begin
      repeat ($urandom % 3) @(negedge clk);
      feed(i, i[0] == 1);
    end
    repeat (20) @(negedge clk);
    checks++;
    if (q.size() != 0 || outs != 2 * N_KAT) begin
      failures++;
      $display("FAIL %0d outputs, %0d still expected", outs, q.size());
    end
    checks++;
    if (back_to_back < 16) begin
      failures++;
      $display("FAIL full rate: only %0d back-to-back outputs", back_to_back);
    end
    $display("outputs=%0d back_to_back=%0d", outs, back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
