// des_ip: the DES initial permutation of a 64-bit block.
//
// Pure wiring: output bit j (1 = most significant) is input bit IP_TAB[j].
// Costs routing only, no logic. Combinational.
module des_ip
  import des_pkg::*;
(
  input  logic [63:0] din,
  output logic [63:0] dout
);
  des_permute #(.IN_W(64), .OUT_W(64), .TAB(IP_TAB)) u_perm (.din, .dout);
endmodule
