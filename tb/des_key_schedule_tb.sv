// des_key_schedule_tb: loads the example key into the rolling core's key
// schedule unit and steps it through sixteen rounds in both directions; the
// round keys must be the software model's K1..K16 (enciphering) and K16..K1
// (deciphering). A pause in advance must hold the state.
module des_key_schedule_tb;
  import des_tv_pkg::*;

  int unsigned checks = 0, failures = 0;
  logic        clk = 0, load, advance, decrypt;
  logic [3:0]  round_idx;
  logic [63:0] key;
  logic [47:0] subkey;

  des_key_schedule dut (.clk, .load, .advance, .decrypt, .round_idx, .key, .subkey);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; advance = 0; decrypt = 0; round_idx = 0; key = KAT_KEY[0];
    for (int dir = 0; dir < 2; dir++) begin
      @(negedge clk);
      decrypt = dir[0];
      load    = 1;
      @(negedge clk);
      load = 0;
      for (int r = 0; r < 16; r++) begin
        round_idx = 4'(r);
        advance   = 1'b0;              // one idle cycle: state must hold
        if (r == 5) @(negedge clk);
        advance = 1'b1;
        #1;
        checks++;
        if (subkey != V0_K[decrypt ? 15 - r : r]) begin
          failures++;
          $display("FAIL dir %0d round %0d: %h, expected %h", dir, r + 1, subkey,
                   V0_K[decrypt ? 15 - r : r]);
        end
        @(negedge clk);
      end
      advance = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
