// des_pipeline: fully pipelined DES in electronic-code-book mode.
//
// Sixteen copies of the round are chained: the block goes through the initial
// permutation, round 1, a pair of 32-bit registers, round 2, the next pair,
// and so on, until the sixteenth register pair feeds the final permutation.
// A new block may enter on every clock, so sixteen blocks are in flight at
// once and blocks leave in the order they entered, 16 cycles after they came
// in (in_* sampled at edge t, out_* valid right after edge t+15).
//
// Each stage also registers the 56-bit key state C,D and the cipher bit of its
// block and performs its own key-schedule step, so every block carries its own
// key and direction; deciphering differs only in the key rotations. These
// key registers and the valid bit are this design's choices; the document
// draws only a sub-key arrow into each stage. Only the valid bits are reset.
//
// Interface: in_valid/in_cipher/in_block/in_key -> out_valid/out_block.
// in_cipher = 1 enciphers, 0 deciphers. No back-pressure.
module des_pipeline
  import des_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  logic        in_cipher,
  input  logic [63:0] in_block,
  input  logic [63:0] in_key,
  output logic        out_valid,
  output logic [63:0] out_block
);

  // One register pair plus the travelling key state per stage.
  typedef struct packed {
    logic [31:0] l;
    logic [31:0] r;
    logic [55:0] cd;
    logic        decrypt;
  } stage_t;

  stage_t             stage_in  [ROUNDS];
  stage_t             stage_q   [ROUNDS];
  logic [ROUNDS-1:0]  valid_q;
  logic [63:0]        ip_out;
  logic [55:0]        cd_key;

  des_permute #(.IN_W(64), .OUT_W(56), .TAB(PC1_TAB)) u_pc1 (.din(in_key), .dout(cd_key));

  des_ip u_ip (.din(in_block), .dout(ip_out));

  assign stage_in[0] = '{l: ip_out[63:32], r: ip_out[31:0], cd: cd_key,
                         decrypt: ~in_cipher};
  for (genvar i = 1; i < ROUNDS; i++) begin : g_link
    assign stage_in[i] = stage_q[i-1];
  end

  for (genvar i = 0; i < ROUNDS; i++) begin : g_stage
    logic [55:0] cd_next;
    logic [47:0] subkey;
    logic [31:0] l_next, r_next;

    des_key_step u_key (
      .round_idx (4'(i)),
      .decrypt   (stage_in[i].decrypt),
      .cd_in     (stage_in[i].cd),
      .cd_out    (cd_next),
      .subkey    (subkey)
    );

    des_round u_round (
      .l_in   (stage_in[i].l),
      .r_in   (stage_in[i].r),
      .subkey (subkey),
      .l_out  (l_next),
      .r_out  (r_next)
    );

    always_ff @(posedge clk) begin
      stage_q[i] <= '{l: l_next, r: r_next, cd: cd_next, decrypt: stage_in[i].decrypt};
    end
  end

  always_ff @(posedge clk) begin
    if (rst) valid_q <= '0;
    else     valid_q <= {valid_q[ROUNDS-2:0], in_valid};
  end

  // Undo the last swap: the final permutation takes {R16, L16}.
  des_fp u_fp (.din({stage_q[ROUNDS-1].r, stage_q[ROUNDS-1].l}), .dout(out_block));
  assign out_valid = valid_q[ROUNDS-1];

endmodule
