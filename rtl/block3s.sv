// block3s -- Block 3s of the state look-ahead counter: a 2-bit synchronous
// binary counter with the enable INS, one instance per higher bit pair.
//
// Two Block 2 flip-flops hold q[1:0] (q[0] least significant). On a rising
// edge with ins = 1 the state advances 00 -> 01 -> 10 -> 11 -> 00; with
// ins = 0 it holds. The next-state logic is the NAND network of the
// block's schematic: one inverter on INS, the low bit from two NANDs into
// a NAND (q0 XOR ins), the high bit from three NANDs (two 2-input, one
// 3-input) into a 3-input NAND (q1 XOR (q0 AND ins)).
//
// The block's 3-input AND gives cout = q[1] & q[0] & pre. In this design
// pre is 1 exactly when all bits below this block are one short of all
// ones, so cout is 1 in the cycle before the count from bit 0 up to this
// block's high bit becomes all ones. The pipeline flip-flop that follows
// in the counting path turns it into the next block's INS. That meaning of
// the third AND input is this design's own reading of the schematic.
//
// Interface: clk, res (active-high asynchronous, to 00), ins, pre,
// q[1:0], cout. All combinational, no extra latency besides the flip-flops.
module block3s (
  input  logic       clk,
  input  logic       res,
  input  logic       ins,
  input  logic       pre,
  output logic [1:0] q,
  output logic       cout
);

  logic [1:0] qbar;
  logic       ins_n;
  logic       d0, d1;
  logic       n0a, n0b;
  logic       n1a, n1b, n1c;

  assign ins_n = ~ins;

  // low bit: q0 ^ ins
  assign n0a = ~(q[0] & ins_n);
  assign n0b = ~(qbar[0] & ins);
  assign d0  = ~(n0a & n0b);

  // high bit: q1 ^ (q0 & ins)
  assign n1a = ~(q[1] & ins_n);
  assign n1b = ~(q[1] & qbar[0]);
  assign n1c = ~(qbar[1] & q[0] & ins);
  assign d1  = ~(n1a & n1b & n1c);

  tspc_dff u_ff0 (.clk(clk), .res(res), .d(d0), .q(q[0]), .qbar(qbar[0]));
  tspc_dff u_ff1 (.clk(clk), .res(res), .d(d1), .q(q[1]), .qbar(qbar[1]));

  assign cout = q[1] & q[0] & pre;

endmodule
