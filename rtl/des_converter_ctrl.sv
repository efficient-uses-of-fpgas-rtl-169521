// des_converter_ctrl: control state of the 16-to-64-bit input converter.
//
// The pipelined chip takes its 64-bit plaintext and key as four 16-bit words
// to fit its pin budget. While start is high one word is taken per clock
// (shift_en = start). After the fourth word has been clocked in, the FSM is in
// FULL for one cycle and raises upload: both accumulators then hold a
// complete block, and the pipeline takes it at the next edge. Words sampled at
// edges t..t+3 give upload in the cycle after edge t+3. If start stays high,
// the next block's first word is taken in that same upload cycle, so blocks
// stream one every four cycles. Dropping start before the fourth word returns
// the FSM to IDLE and discards the partial block. The four-word count and the
// upload signal follow the document; the state encoding and the streaming
// and abort behaviour are this design's choices. Synchronous active-high reset.
module des_converter_ctrl #(
  parameter int unsigned WORDS = 4
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  output logic shift_en,
  output logic upload
);

  typedef enum logic [1:0] {S_IDLE, S_FILL, S_FULL} state_t;

  state_t                     state_q;
  logic [$clog2(WORDS+1)-1:0] cnt_q;     // words held so far

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= S_IDLE;
      cnt_q   <= '0;
    end else if (!start) begin
      state_q <= S_IDLE;
      cnt_q   <= '0;
    end else if (state_q == S_FILL && cnt_q == $bits(cnt_q)'(WORDS - 1)) begin
      state_q <= S_FULL;
      cnt_q   <= $bits(cnt_q)'(WORDS);
    end else begin
      // IDLE or FULL: this word is the first of a new block.
      state_q <= S_FILL;
      cnt_q   <= (state_q == S_FILL) ? cnt_q + 1'b1 : $bits(cnt_q)'(1);
    end
  end

  assign shift_en = start;
  assign upload   = (state_q == S_FULL);

endmodule
