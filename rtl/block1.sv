// block1 -- Block 1 of the state look-ahead counter: the free-running
// 2-bit synchronous binary counter that produces the two lowest count bits.
//
// Two Block 2 flip-flops hold the state q[1:0] (q[0] least significant).
// The low bit toggles on every rising clock edge; the high bit takes
// q[1] XOR q[0], built from three NAND gates as in the block's schematic.
// After reset the state walks 00 -> 01 -> 10 -> 11 -> 00, one step per edge.
//
// The block's AND gate gives la = q[1] & ~q[0], which is 1 in state 10,
// one clock before the block reaches 11. The first pipeline flip-flop of
// the counting path registers it, so it arrives at Block 31 as that block's
// enable exactly in the cycle in which Block 1 is in 11. Which state the AND
// gate decodes is this design's reading; the schematic only shows that the
// gate is fed from the two flip-flops.
//
// Interface: clk, res (active-high asynchronous, to 00), q[1:0] and la,
// both straight from the flip-flops and the AND gate (no extra latency).
module block1 (
  input  logic       clk,
  input  logic       res,
  output logic [1:0] q,
  output logic       la
);

  logic [1:0] qbar;
  logic d0, d1;
  logic n_a, n_b;

  // high bit: q1 ^ q0 from three NANDs
  assign n_a = ~(q[1] & qbar[0]);
  assign n_b = ~(qbar[1] & q[0]);
  assign d1  = ~(n_a & n_b);
  // low bit: toggles every edge
  assign d0  = qbar[0];

  tspc_dff u_ff0 (.clk(clk), .res(res), .d(d0), .q(q[0]), .qbar(qbar[0]));
  tspc_dff u_ff1 (.clk(clk), .res(res), .d(d1), .q(q[1]), .qbar(qbar[1]));

  assign la = q[1] & qbar[0];

endmodule
