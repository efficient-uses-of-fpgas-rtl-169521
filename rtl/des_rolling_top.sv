// des_rolling_top: the pin-limited full rolling DES chip.
//
// The same front end as the pipelined chip: plaintext and key arrive as four
// 16-bit words each (most significant first) while start is high, two
// des_converter accumulators gather them under one des_converter_ctrl, and
// the upload cycle starts the des_rolling core, which then needs 17 cycles.
// With the first word sampled at edge t, the core latches the block at edge
// t+4 and the result is on data_out with done high right after edge t+20.
// cipher (1 = encipher, 0 = decipher) is registered with each word; the
// value given with the fourth word applies. The core takes a block only when
// idle: an upload that arrives while busy is high is dropped, so the next
// block's fourth word may be given no earlier than the cycle in which done is
// expected (blocks every 17 cycles if their words overlap the rounds). Pins:
// 16 + 16 + 64 + clk, rst, start, cipher + done, busy. The converter front end
// on this core is this design's reading of the full rolling design's I/O
// count; the document describes the converter for the pipelined chip.
module des_rolling_top #(
  parameter int unsigned WORD_W = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic              cipher,
  input  logic [WORD_W-1:0] data_in,
  input  logic [WORD_W-1:0] key_in,
  output logic [63:0]       data_out,
  output logic              done,
  output logic              busy
);

  logic        shift_en, upload;
  logic [63:0] block, key;
  logic        cipher_q;

  des_converter_ctrl #(.WORDS(64 / WORD_W)) u_ctrl (
    .clk, .rst, .start, .shift_en, .upload
  );

  des_converter #(.WORD_W(WORD_W), .BLOCK_W(64)) u_conv_data (
    .clk, .shift_en, .din(data_in), .block(block)
  );

  des_converter #(.WORD_W(WORD_W), .BLOCK_W(64)) u_conv_key (
    .clk, .shift_en, .din(key_in), .block(key)
  );

  always_ff @(posedge clk) begin
    if (shift_en) cipher_q <= cipher;
  end

  des_rolling u_core (
    .clk, .rst,
    .start    (upload),
    .cipher   (cipher_q),
    .data_in  (block),
    .key      (key),
    .data_out (data_out),
    .done     (done),
    .busy     (busy)
  );

endmodule
