// des_key_step_tb: chains sixteen key-schedule steps from PC-1 of the example
// key. Enciphering must give K1..K16 of the software model and return C,D to
// its start after sixteen steps; deciphering must give K16..K1.
module des_key_step_tb;
  import des_tv_pkg::*;

  int unsigned checks = 0, failures = 0;
  logic [3:0]  round_idx;
  logic        decrypt;
  logic [55:0] cd_in, cd_out;
  logic [47:0] subkey;

  des_key_step dut (.round_idx, .decrypt, .cd_in, .cd_out, .subkey);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int dir = 0; dir < 2; dir++) begin
      decrypt = dir[0];
      cd_in   = V0_CD0;
      for (int i = 0; i < 16; i++) begin
        round_idx = 4'(i);
        #1;
        checks++;
        if (subkey != V0_K[decrypt ? 15 - i : i]) begin
          failures++;
          $display("FAIL dir %0d round %0d: K = %h, expected %h", dir, i + 1, subkey,
                   V0_K[decrypt ? 15 - i : i]);
        end
        cd_in = cd_out;
      end
      // Enciphering rotates 28 places in all, back to the start.
      checks++;
      if (!decrypt && cd_in != V0_CD0) begin
        failures++;
        $display("FAIL dir %0d: C,D did not return to PC-1(key)", dir);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
