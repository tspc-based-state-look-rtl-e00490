// sla_path -- the state look-ahead path of the counter: it decodes the
// state of the low bits one or two clocks early and registers the result,
// so that the Block 3s get their qualifying signals from flip-flops rather
// than from a long AND chain, and every block switches on the same edge.
//
// Its gates are those drawn in the path: an inverter, an AND and a Block 2
// flip-flop for the first signal; two inverters, an AND, a Block 2, a
// second AND fed from Block 31 and another Block 2 for the second. The
// logic equations are this design's own, worked out so that the counter
// counts in plain binary:
//   p1 = reg( ~c[1] &  c[0] )               -> 1 when c[1:0] == 2'b10
//   h2 = reg( ~c[1] & ~c[0] )               -> 1 when c[1:0] == 2'b01
//   p2 = reg( h2 & c[3] & c[2] )            -> 1 when c[3:0] == 4'b1110
// where c[1:0] is Block 1 and c[3:2] is Block 31. The high bits c[3:2] do
// not change between the two cycles p2 looks across, since they only move
// after a cycle in which c[1:0] == 2'b11.
//
// Interface: clk, res (active-high asynchronous; all flip-flops to 0, which
// matches count 0), c_lo = Block 1 state, c_b31 = Block 31 state,
// p1 (pre input of Block 31), p2 (pre input of Block 32). Both outputs are
// registered: they reflect the count of the current cycle.
module sla_path (
  input  logic       clk,
  input  logic       res,
  input  logic [1:0] c_lo,
  input  logic [1:0] c_b31,
  output logic       p1,
  output logic       p2
);

  logic c1_n, c0_n;
  logic g1, g2, h2, m2;

  assign c1_n = ~c_lo[1];
  assign c0_n = ~c_lo[0];

  assign g1 = c1_n & c_lo[0];
  tspc_dff u_ff_p1 (.clk(clk), .res(res), .d(g1), .q(p1), .qbar());

  assign g2 = c1_n & c0_n;
  tspc_dff u_ff_h2 (.clk(clk), .res(res), .d(g2), .q(h2), .qbar());

  assign m2 = h2 & c_b31[1] & c_b31[0];
  tspc_dff u_ff_p2 (.clk(clk), .res(res), .d(m2), .q(p2), .qbar());

endmodule
