// des_controller: round controller of the full rolling DES core.
//
// A counter with an idle state and sixteen round states. A start seen while
// idle is accepted (load = 1: the core latches block and key) and the counter
// moves to round 1; it then steps once per clock through round 16 and back to
// idle. In each round state it gives the 0-based round number to the key
// schedule, tells the two multiplexers to take the initial-permutation path in
// round 1 (first) and marks round 16 (last), at whose end the core loads its
// result. A block thus takes 17 cycles: the start cycle and 16 rounds. A start
// while busy is ignored. The 16 round states follow the document; the idle
// state and the ignore-while-busy rule are this design's choices.
// Synchronous active-high reset.
module des_controller #(
  parameter int unsigned ROUNDS = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  output logic       load,
  output logic [3:0] round_idx,
  output logic       first,
  output logic       active,
  output logic       last,
  output logic       busy
);

  logic [4:0] cnt_q;   // 0 = idle, 1..ROUNDS = round number

  always_ff @(posedge clk) begin
    if (rst)                                 cnt_q <= '0;
    else if (cnt_q == 5'd0)                  cnt_q <= start ? 5'd1 : 5'd0;
    else if (cnt_q == 5'(ROUNDS))            cnt_q <= '0;
    else                                     cnt_q <= cnt_q + 5'd1;
  end

  assign busy      = (cnt_q != 5'd0);
  assign active    = busy;
  assign load      = !busy && start;
  assign round_idx = 4'(cnt_q - 5'd1);
  assign first     = (cnt_q == 5'd1);
  assign last      = (cnt_q == 5'(ROUNDS));

endmodule
