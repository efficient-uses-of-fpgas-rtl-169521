// des_sbox_tb: checks all eight S-box instances.
//
// Two independent checks: every row of every S-box must be a permutation of
// 0..15 (a defining property of the DES S-boxes), and a set of spot values
// from a software model must match. Combinational; a watchdog ends the run
// if it hangs.
module des_sbox_tb;
  import des_tv_pkg::*;

  int unsigned checks = 0, failures = 0;
  logic [5:0] six;
  logic [3:0] four [8];

  for (genvar b = 0; b < 8; b++) begin : g_dut
    des_sbox #(.BOX(b + 1)) dut (.six(six), .four(four[b]));
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] seen [8];
    for (int row = 0; row < 4; row++) begin
      for (int b = 0; b < 8; b++) seen[b] = '0;
      for (int col = 0; col < 16; col++) begin
        six = {row[1], col[3:0], row[0]};
        #1;
        for (int b = 0; b < 8; b++) seen[b][four[b]] = 1'b1;
      end
      for (int b = 0; b < 8; b++) begin
        checks++;
        if (seen[b] != 16'hffff) begin
          failures++;
          $display("FAIL S%0d row %0d is not a permutation (%h)", b + 1, row, seen[b]);
        end
      end
    end
    for (int i = 0; i < N_SPOT; i++) begin
      six = SPOT_IN[i];
      #1;
      checks++;
      if (four[SPOT_BOX[i]] != SPOT_OUT[i]) begin
        failures++;
        $display("FAIL S%0d(%0d) = %0d, expected %0d", SPOT_BOX[i] + 1, SPOT_IN[i],
                 four[SPOT_BOX[i]], SPOT_OUT[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
