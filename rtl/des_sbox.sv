// des_sbox: one DES substitution box as a 64-entry, 4-bit read-only table.
//
// The 6-bit input b1..b6 (b1 = most significant) selects row {b1,b6} and
// column b2..b5 of box S<BOX> of the DES standard. The table is read
// combinationally, so a synthesis tool maps it to LUT-based ROM; the design
// treats the S-boxes as table lookups rather than as logic equations, the
// approach that gives the fastest of the compared implementations. The table
// contents are the standard's; the combinational read is this design's choice.
// Interface: six -> four, no clock, no state.
module des_sbox
  import des_pkg::*;
#(
  parameter int unsigned BOX = 1   // 1..8 selects S1..S8
) (
  input  logic [5:0] six,
  output logic [3:0] four
);

  logic [5:0] addr;

  initial begin
    assert (BOX >= 1 && BOX <= 8) else $error("des_sbox: BOX must be 1..8");
  end

  assign addr = {six[5], six[0], six[4:1]};   // row, column
  assign four = 4'(SBOX_TAB[BOX - 1][addr]);

endmodule
