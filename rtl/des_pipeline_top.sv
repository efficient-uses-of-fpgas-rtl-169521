// des_pipeline_top: the pin-limited pipelined DES chip.
//
// A 64-bit plaintext, a 64-bit key, a 64-bit result and four control pins
// would need 196 pins. Here plaintext and key arrive as 16-bit words: two
// des_converter accumulators, stepped by one des_converter_ctrl, gather four
// words each, and when the control state raises upload the complete block,
// key and cipher bit enter des_pipeline. That cuts the pins to 16 + 16 + 64
// + clk, rst, start, cipher = 100, plus the out_valid flag added here.
//
// Timing: hold start high and present word k of the block on data_in and
// key_in (most significant word first) in consecutive cycles. With the first
// word sampled at edge t, the result is on data_out right after edge t+19:
// four cycles in the converter and sixteen in the pipeline. Holding start high
// streams a block every four cycles. cipher (1 = encipher, 0 = decipher) is
// registered with every word; the value given with the fourth word (edge
// t+3) applies to the block, so back-to-back blocks may differ in direction. data_out changes only when
// out_valid is high with a new block; in between it shows pipeline contents.
module des_pipeline_top #(
  parameter int unsigned WORD_W = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic              cipher,
  input  logic [WORD_W-1:0] data_in,
  input  logic [WORD_W-1:0] key_in,
  output logic [63:0]       data_out,
  output logic              out_valid
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

  des_pipeline u_pipe (
    .clk, .rst,
    .in_valid  (upload),
    .in_cipher (cipher_q),
    .in_block  (block),
    .in_key    (key),
    .out_valid (out_valid),
    .out_block (data_out)
  );

endmodule
