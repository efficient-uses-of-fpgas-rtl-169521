// des_permute: a fixed bit permutation, selection or expansion, as wiring.
//
// Output bit j (numbered from 1 at the most significant end) is input bit
// TAB[j-1] (also numbered from 1 at the most significant end), the way the
// DES standard prints its tables. The table is a parameter, so every
// connection is fixed at elaboration and the block costs routing only, no
// logic. Used for IP, FP, E, P, PC-1 and PC-2.
module des_permute #(
  parameter int unsigned IN_W  = 64,
  parameter int unsigned OUT_W = 64,
  parameter byte unsigned TAB [OUT_W] = '{default: 8'd1}
) (
  input  logic [IN_W-1:0]  din,
  output logic [OUT_W-1:0] dout
);

  for (genvar j = 0; j < OUT_W; j++) begin : g_bit
    assign dout[OUT_W - 1 - j] = din[IN_W - int'(TAB[j])];
  end

endmodule
