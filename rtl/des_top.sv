// des_top: both DES architectures side by side.
//
// p_*: the pin-limited pipelined chip (des_pipeline_top): 16-bit plaintext and
// key words in, one 64-bit result per block out, 20 cycles of latency, a new
// block every four cycles through the converters while the pipeline itself
// could take one per cycle. r_*: the pin-limited full rolling chip
// (des_rolling_top): the same word interface in front of the iterative core,
// one block per 17 cycles, 21 cycles from first word to result, a fraction of
// the area. The two share only clock and reset. Synchronous active-high reset.
module des_top (
  input  logic        clk,
  input  logic        rst,
  // pipelined chip
  input  logic        p_start,
  input  logic        p_cipher,
  input  logic [15:0] p_data_in,
  input  logic [15:0] p_key_in,
  output logic [63:0] p_data_out,
  output logic        p_out_valid,
  // full rolling core
  input  logic        r_start,
  input  logic        r_cipher,
  input  logic [15:0] r_data_in,
  input  logic [15:0] r_key_in,
  output logic [63:0] r_data_out,
  output logic        r_done,
  output logic        r_busy
);

  des_pipeline_top #(.WORD_W(16)) u_pipe (
    .clk, .rst,
    .start     (p_start),
    .cipher    (p_cipher),
    .data_in   (p_data_in),
    .key_in    (p_key_in),
    .data_out  (p_data_out),
    .out_valid (p_out_valid)
  );

  des_rolling_top #(.WORD_W(16)) u_roll (
    .clk, .rst,
    .start    (r_start),
    .cipher   (r_cipher),
    .data_in  (r_data_in),
    .key_in   (r_key_in),
    .data_out (r_data_out),
    .done     (r_done),
    .busy     (r_busy)
  );

endmodule
