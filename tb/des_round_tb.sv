// des_round_tb: drives one Feistel round with the L, R and round key of each
// of the sixteen rounds of the example vector and compares the new L and R
// with the software model's values.
module des_round_tb;
  import des_tv_pkg::*;

  int unsigned checks = 0, failures = 0;
  logic [31:0] l_in, r_in, l_out, r_out;
  logic [47:0] subkey;

  des_round dut (.l_in, .r_in, .subkey, .l_out, .r_out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      l_in   = V0_L[i];
      r_in   = V0_R[i];
      subkey = V0_K[i];
      #1;
      checks += 2;
      if (l_out != V0_L[i+1]) begin
        failures++;
        $display("FAIL round %0d: L = %h, expected %h", i + 1, l_out, V0_L[i+1]);
      end
      if (r_out != V0_R[i+1]) begin
        failures++;
        $display("FAIL round %0d: R = %h, expected %h", i + 1, r_out, V0_R[i+1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
