// des_round: one Feistel round of DES, the "XOR | F_Function" box of both
// architectures.
//
// l_out = r_in and r_out = l_in xor f(r_in, subkey). Combinational; the
// register pair that follows it belongs to the surrounding architecture (one
// pair per round in the pipeline, one shared pair in the rolling core). The
// swap after the last round is undone by the caller, which feeds {R16, L16} to
// the final permutation as the standard requires.
module des_round (
  input  logic [31:0] l_in,
  input  logic [31:0] r_in,
  input  logic [47:0] subkey,
  output logic [31:0] l_out,
  output logic [31:0] r_out
);

  logic [31:0] f;

  des_f u_f (.r(r_in), .k(subkey), .f(f));

  assign l_out = r_in;
  assign r_out = l_in ^ f;

endmodule
