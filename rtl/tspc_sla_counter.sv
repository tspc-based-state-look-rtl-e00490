// tspc_sla_counter -- top of the TSPC based state look-ahead counter, an
// 8-bit synchronous binary up counter by default.
//
// The counter is split into a counting path (Block 1, Block 2 pipeline
// flip-flops, Block 3s) and a state look-ahead path that decodes the low
// bits one or two cycles early. Every flip-flop, in both paths, is the same
// single-phase Block 2 register clocked by the same rising edge, so all
// blocks change state together and no enable has to ripple through more
// than a couple of gates within a cycle.
//
// Interface: clk, res (active-high asynchronous reset, count to 0),
// q[2*N3+1:0] with q[0] the least significant bit (q0..q7 for N3 = 3), and
// cout, 1 in the cycle before q becomes all ones (a look-ahead carry that a
// further Block 2 + Block 3s pair could use). Timing: after reset is
// released q advances by exactly one on every rising edge and wraps from
// all ones to zero. N3 = 3 (three Block 3s) is the original 8-bit size;
// the look-ahead equations and the cout output are this design's own.
module tspc_sla_counter #(
  parameter int unsigned N3 = 3
) (
  input  logic            clk,
  input  logic            res,
  output logic [2*N3+1:0] q,
  output logic            cout
);

  localparam int unsigned W = 2 * N3 + 2;

  logic pre1, pre2;

  counting_path #(.N3(N3)) u_counting (
    .clk (clk),
    .res (res),
    .pre1(pre1),
    .pre2(pre2),
    .q   (q),
    .cout(cout)
  );

  sla_path u_sla (
    .clk  (clk),
    .res  (res),
    .c_lo (q[1:0]),
    .c_b31(q[3:2]),
    .p1   (pre1),
    .p2   (pre2)
  );

  // The count advances by exactly one per clock. After a reset pulse that
  // falls between two edges the clock samples the cleared count, so a step
  // to 0 is also accepted.
  // (Verilator notes that res is used both as an asynchronous reset and in
  // this clocked check; that is intended.)
  a_step: assert property (@(posedge clk) disable iff (res)
                           !$past(res) |-> (q == $past(q) + W'(1)) || (q == '0))
    else $error("count did not advance by one");

endmodule
