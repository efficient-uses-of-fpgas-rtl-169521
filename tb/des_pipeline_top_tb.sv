// des_pipeline_top_tb: drives the pin-limited pipelined chip word by word.
//
// Each block and key go in as four 16-bit words, most significant first,
// with start high. The result must appear on data_out with out_valid 20
// cycles after the first word (first word at edge t, result right after edge
// t+19). Blocks are streamed back to back (one every four cycles), mixed
// with deciphering, with idle gaps, and with a block cut off by dropping
// start after two words, which must produce no output.
module des_pipeline_top_tb;
  import des_tv_pkg::*;

  int unsigned checks = 0, failures = 0;
  logic        clk = 0, rst, start, cipher, out_valid;
  logic [15:0] data_in, key_in;
  logic [63:0] data_out;

  des_pipeline_top #(.WORD_W(16)) dut (.clk, .rst, .start, .cipher, .data_in, .key_in,
                                       .data_out, .out_valid);

  always #5 clk = ~clk;

  typedef struct { logic [63:0] expect_blk; longint t_first; } exp_t;
  exp_t   q[$];
  longint cyc = 0;
  int     outs = 0, decs = 0, aborts = 0, streamed = 0;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (!rst && out_valid) begin
      exp_t e;
      checks += 2;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output %h", data_out);
      end else begin
        e = q.pop_front();
        if (data_out != e.expect_blk) begin
          failures++;
          $display("FAIL out %h, expected %h", data_out, e.expect_blk);
        end
        // edges t .. t+19 have passed: 20 cycles
        if (cyc - e.t_first != 20) begin
          failures++;
          $display("FAIL latency %0d cycles, expected 20", cyc - e.t_first);
        end
      end
      outs++;
    end
  end

  // Sends one block; cipher is held for all four words.
  task automatic send(input int i, input bit enc, input int words = 4);
    logic [63:0] blk;
    blk = enc ? KAT_PT[i] : KAT_CT[i];
    if (words == 4) q.push_back('{expect_blk: enc ? KAT_CT[i] : KAT_PT[i], t_first: cyc});
    for (int w = 0; w < words; w++) begin
      start   = 1;
      cipher  = enc;
      data_in = blk[63 - 16*w -: 16];
      key_in  = KAT_KEY[i][63 - 16*w -: 16];
      @(negedge clk);
    end
    if (!enc) decs++;
  endtask

  initial begin
    rst = 1; start = 0; cipher = 1; data_in = '0; key_in = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    // back-to-back stream
    for (int i = 0; i < 12; i++) begin
      send(i, i % 3 != 2);
      if (i > 0) streamed++;
    end
    start = 0;
    @(negedge clk);
    // aborted block, then gaps
    send(20, 1, 2);
    aborts++;
    start = 0;
    @(negedge clk);
    for (int i = 12; i < N_KAT; i++) begin
      send(i, i[0]);
      start = 0;
      repeat ($urandom % 3) @(negedge clk);
    end
    start = 0;
    repeat (25) @(negedge clk);
    checks++;
    if (q.size() != 0 || outs != N_KAT || decs == 0 || aborts == 0 || streamed == 0) begin
      failures++;
      $display("FAIL %0d outputs, %0d missing, %0d deciphered", outs, q.size(), decs);
    end
    $display("outputs=%0d deciphered=%0d", outs, decs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
