// des_f: the DES f-function, f(R, K) = P(S(E(R) xor K)).
//
// The 32-bit half block R is expanded to 48 bits (E), mixed with the 48-bit
// round key K, split into eight 6-bit groups that each go through their own
// S-box, and the 32 S-box output bits are permuted by P. E and P are pure
// wiring. Purely combinational. Follows the DES standard; the document only
// names the block "f_function".
module des_f
  import des_pkg::*;
(
  input  logic [31:0] r,
  input  logic [47:0] k,
  output logic [31:0] f
);

  logic [47:0] e, x;
  logic [31:0] s;

  des_permute #(.IN_W(32), .OUT_W(48), .TAB(E_TAB)) u_e (.din(r), .dout(e));

  assign x = e ^ k;

  for (genvar i = 0; i < 8; i++) begin : g_sbox
    des_sbox #(.BOX(i + 1)) u_sbox (
      .six  (x[47 - 6*i -: 6]),
      .four (s[31 - 4*i -: 4])
    );
  end

  des_permute #(.IN_W(32), .OUT_W(32), .TAB(P_TAB)) u_p (.din(s), .dout(f));

endmodule
