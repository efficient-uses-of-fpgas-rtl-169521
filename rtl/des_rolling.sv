// des_rolling: full rolling (iterative) DES core, one round circuit used 16
// times.
//
// The start cycle latches the input block, the key (into the key schedule
// unit) and the direction. In round 1 the two 32-bit multiplexers pass the
// initial permutation of the latched block to the round circuit; in rounds
// 2..16 they pass the two round registers, which hold each round's result.
// After round 16 the final permutation of {R16, L16} is loaded into the
// output register and done pulses for one cycle. A block therefore takes 17
// cycles from the start cycle, and data_out holds the result until the next
// block finishes. start is ignored while busy. cipher = 1 enciphers, 0
// deciphers (reversed key order through the rotations of the key schedule).
// The structure (IP, two muxes, XOR/f, two registers, FP, controller, key
// schedule) follows the document; the input and output registers and the
// done/busy flags are this design's choices. Synchronous active-high reset.
module des_rolling (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        cipher,
  input  logic [63:0] data_in,
  input  logic [63:0] key,
  output logic [63:0] data_out,
  output logic        done,
  output logic        busy
);

  logic        load, first, active, last;
  logic [3:0]  round_idx;
  logic [63:0] blk_q, ip_out, fp_out;
  logic        decrypt_q;
  logic [31:0] l_q, r_q, l_mux, r_mux, l_next, r_next;
  logic [47:0] subkey;

  des_controller #(.ROUNDS(16)) u_ctrl (
    .clk, .rst, .start, .load, .round_idx, .first, .active, .last, .busy
  );

  always_ff @(posedge clk) begin
    if (load) begin
      blk_q     <= data_in;
      decrypt_q <= ~cipher;
    end
  end

  des_ip u_ip (.din(blk_q), .dout(ip_out));

  des_mux #(.W(32)) u_mux_l (.sel_a(first), .a(ip_out[63:32]), .b(l_q), .y(l_mux));
  des_mux #(.W(32)) u_mux_r (.sel_a(first), .a(ip_out[31:0]),  .b(r_q), .y(r_mux));

  des_key_schedule u_keys (
    .clk, .load, .advance(active), .decrypt(decrypt_q), .round_idx, .key, .subkey
  );

  des_round u_round (
    .l_in(l_mux), .r_in(r_mux), .subkey, .l_out(l_next), .r_out(r_next)
  );

  always_ff @(posedge clk) begin
    if (active) begin
      l_q <= l_next;
      r_q <= r_next;
    end
  end

  des_fp u_fp (.din({r_next, l_next}), .dout(fp_out));

  always_ff @(posedge clk) begin
    if (rst) done <= 1'b0;
    else     done <= last;
    if (last) data_out <= fp_out;
  end

endmodule
