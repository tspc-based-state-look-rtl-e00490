// counting_path -- the counting path of the state look-ahead counter:
// Block 1, then for each higher bit pair a Block 2 pipeline flip-flop
// followed by a Block 3s, repeated N3 times (N3 = 3 gives 8 bits).
//
// Block 1 counts bits 1:0 freely. Block 3 number s (s = 1..N3) counts bits
// 2s+1:2s and advances when its INS is 1. INS of block s is the registered
// output of the stage below it: Block 1's look-ahead gate for s = 1, the
// AND output cout of block s-1 otherwise. Because those outputs announce
// "all lower bits are all ones in the next cycle", the register delay is
// exactly absorbed and every INS is 1 in the cycle in which all lower bits
// are ones, as a plain binary counter needs.
//
// The third AND input (pre) of each Block 3s comes from the state
// look-ahead path for the first two blocks (pre1, pre2). For blocks 3 and
// up this design uses cout of the block below, which is 1 in the same
// cycles; for the original 8-bit size that affects only the top block's
// cout, which drives nothing inside the counter. The pre wiring is this
// design's own derivation.
//
// Interface: clk, res (active-high asynchronous, count to 0), pre1/pre2
// from the look-ahead path, q (count, q[0] least significant), cout (cout
// of the top block: 1 in the cycle before q becomes all ones). No latency:
// q advances by one on each rising edge after reset.
module counting_path #(
  parameter int unsigned N3 = 3
) (
  input  logic              clk,
  input  logic              res,
  input  logic              pre1,
  input  logic              pre2,
  output logic [2*N3+1:0]   q,
  output logic              cout
);

  if (N3 < 2) begin : g_bad_n3
    $error("counting_path: N3 must be at least 2");
  end

  logic          b1_la;
  logic [N3:1]   ins;
  logic [N3:1]   pre;
  logic [N3:1]   cy;

  block1 u_block1 (.clk(clk), .res(res), .q(q[1:0]), .la(b1_la));

  // pipeline flip-flop between Block 1 and Block 31
  tspc_dff u_pipe1 (.clk(clk), .res(res), .d(b1_la), .q(ins[1]), .qbar());

  assign pre[1] = pre1;
  assign pre[2] = pre2;

  for (genvar s = 1; s <= N3; s++) begin : g_stage
    if (s >= 3) begin : g_pre
      assign pre[s] = cy[s-1];
    end
    if (s >= 2) begin : g_pipe
      tspc_dff u_pipe (.clk(clk), .res(res), .d(cy[s-1]), .q(ins[s]), .qbar());
    end
    block3s u_block3 (
      .clk (clk),
      .res (res),
      .ins (ins[s]),
      .pre (pre[s]),
      .q   (q[2*s+1:2*s]),
      .cout(cy[s])
    );
  end

  assign cout = cy[N3];

endmodule
