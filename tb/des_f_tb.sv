// des_f_tb: checks the f-function against the sixteen f(R, K) values of the
// published example key/plaintext pair, computed by a software model.
module des_f_tb;
  import des_tv_pkg::*;

  int unsigned checks = 0, failures = 0;
  logic [31:0] r, f;
  logic [47:0] k;

  des_f dut (.r, .k, .f);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      r = V0_R[i];
      k = V0_K[i];
      #1;
      checks++;
      if (f != V0_F[i]) begin
        failures++;
        $display("FAIL round %0d: f = %h, expected %h", i + 1, f, V0_F[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
