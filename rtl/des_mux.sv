// des_mux: 2:1 multiplexer of one Feistel half in the rolling core.
//
// In round 1 (sel_a = 1) it passes the half coming from the initial
// permutation; in rounds 2..16 it passes the half fed back from the round
// register. Two instances, one per half. Combinational; its select comes
// from the clocked round controller. Width W defaults to 32 bits.
module des_mux #(
  parameter int unsigned W = 32
) (
  input  logic         sel_a,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  assign y = sel_a ? a : b;
endmodule
