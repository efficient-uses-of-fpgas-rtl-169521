// des_fp: the DES final permutation, the inverse of the initial permutation.
//
// Pure wiring: output bit j (1 = most significant) is input bit FP_TAB[j].
// Costs routing only, no logic. Combinational.
module des_fp
  import des_pkg::*;
(
  input  logic [63:0] din,
  output logic [63:0] dout
);
  des_permute #(.IN_W(64), .OUT_W(64), .TAB(FP_TAB)) u_perm (.din, .dout);
endmodule
