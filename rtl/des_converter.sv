// des_converter: serial-to-parallel accumulator of the pipelined chip.
//
// A shift register that takes one WORD_W-bit word per enabled clock and
// shifts it in at the least significant end, so after BLOCK_W/WORD_W words
// the first word sits in the most significant bits. Two instances are used,
// one for the plaintext and one for the key, both stepped by the same
// des_converter_ctrl. The word order (first word = bits 63:48) is this
// design's choice. No reset: the block is only used when upload says it is
// complete.
module des_converter #(
  parameter int unsigned WORD_W  = 16,
  parameter int unsigned BLOCK_W = 64
) (
  input  logic               clk,
  input  logic               shift_en,
  input  logic [WORD_W-1:0]  din,
  output logic [BLOCK_W-1:0] block
);

  initial begin
    assert (BLOCK_W % WORD_W == 0 && BLOCK_W > WORD_W)
      else $error("des_converter: BLOCK_W must be a multiple of WORD_W");
  end

  always_ff @(posedge clk) begin
    if (shift_en) block <= {block[BLOCK_W-WORD_W-1:0], din};
  end

endmodule
