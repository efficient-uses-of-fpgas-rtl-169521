// des_mux_tb: random operands through both select values of the 32-bit
// 2:1 multiplexer.
module des_mux_tb;
  int unsigned checks = 0, failures = 0;
  logic        sel_a;
  logic [31:0] a, b, y;

  des_mux #(.W(32)) dut (.sel_a, .a, .b, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      a = $urandom;
      b = $urandom;
      sel_a = i[0];
      #1;
      checks++;
      if (y != (i[0] ? a : b)) begin
        failures++;
        $display("FAIL sel_a=%0d a=%h b=%h y=%h", sel_a, a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
