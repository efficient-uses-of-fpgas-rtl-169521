// des_key_schedule: registered key schedule unit of the full rolling core.
//
// On load it stores PC-1 of the 64-bit key (the parity bits are dropped) as
// the 56-bit state C,D. In every round the state is rotated by that round's
// amount in front of the register (des_key_step), the round key is PC-2 of the
// rotated state, and with advance the register keeps the rotated value for the
// next round. Deciphering changes only the number and direction of the
// rotations. round_idx and decrypt must be steady during a round; subkey is
// valid combinationally from them and the register.
module des_key_schedule
  import des_pkg::*;
(
  input  logic        clk,
  input  logic        load,
  input  logic        advance,
  input  logic        decrypt,
  input  logic [3:0]  round_idx,
  input  logic [63:0] key,
  output logic [47:0] subkey
);

  logic [55:0] cd_q, cd_next, cd_key;

  des_permute #(.IN_W(64), .OUT_W(56), .TAB(PC1_TAB)) u_pc1 (.din(key), .dout(cd_key));

  des_key_step u_step (
    .round_idx, .decrypt, .cd_in(cd_q), .cd_out(cd_next), .subkey
  );

  always_ff @(posedge clk) begin
    if (load)         cd_q <= cd_key;
    else if (advance) cd_q <= cd_next;
  end

endmodule
