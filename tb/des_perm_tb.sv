// des_perm_tb: checks the initial and final permutations. IP of the example
// plaintext must match the software model, FP must undo IP and IP must undo
// FP for random blocks, and each output bit must depend on exactly one input
// bit (walking-one test: a permutation maps a one-hot word to a one-hot word).
module des_perm_tb;
  import des_tv_pkg::*;

  int unsigned checks = 0, failures = 0;
  logic [63:0] x, ip_x, fp_x, fp_ip_x, ip_fp_x;

  des_ip u_ip  (.din(x),    .dout(ip_x));
  des_fp u_fp  (.din(ip_x), .dout(fp_ip_x));
  des_fp u_fp2 (.din(x),    .dout(fp_x));
  des_ip u_ip2 (.din(fp_x), .dout(ip_fp_x));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (x = %h)", what, x);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = KAT_PT[0];
    #1;
    check(ip_x == V0_IP, "IP of example plaintext");
    check(fp_x != x, "FP is not the identity");
    for (int i = 0; i < 64; i++) begin
      x = 64'd1 << i;
      #1;
      check($onehot(ip_x) && $onehot(fp_x), "one-hot in, one-hot out");
    end
    for (int i = 0; i < 50; i++) begin
      x = {$urandom, $urandom};
      #1;
      check(fp_ip_x == x, "FP(IP(x)) == x");
      check(ip_fp_x == x, "IP(FP(x)) == x");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
