// des_key_step: one step of the DES key schedule.
//
// Takes the 56-bit key state C,D (the two 28-bit halves after PC-1), rotates
// both halves by the amount the round calls for and selects the 48-bit round
// key with PC-2. Enciphering rotates left by 1,1,2,2,2,2,2,2,1,2,2,2,2,2,2,1.
// Deciphering uses the same hardware with a different number and direction of
// rotations: none before round 1, then right by 1,2,2,2,2,2,2,1,2,2,2,2,2,2,1,
// which produces K16 down to K1. Combinational; round_idx is 0-based.
module des_key_step
  import des_pkg::*;
(
  input  logic [3:0]  round_idx,
  input  logic        decrypt,
  input  logic [55:0] cd_in,
  output logic [55:0] cd_out,
  output logic [47:0] subkey
);

  logic [1:0] n;

  assign n      = shift_amount(round_idx, decrypt);
  assign cd_out = {rot28(cd_in[55:28], n, decrypt), rot28(cd_in[27:0], n, decrypt)};
  des_permute #(.IN_W(56), .OUT_W(48), .TAB(PC2_TAB)) u_pc2 (.din(cd_out), .dout(subkey));

endmodule
