// tspc_dff -- Block 2 of the state look-ahead counter: a positive-edge D
// flip-flop standing in for the true single phase clock (TSPC) flip-flop.
//
// The transistor cell uses only the clock, never an inverted clock; at RTL
// level that is simply one rising-edge register. It is used everywhere in
// the counter: inside Block 1 and Block 3s, as the pipeline flip-flop
// between blocks of the counting path, and in the state look-ahead path.
//
// Interface: d is sampled on the rising edge of clk; q and its complement
// qbar (both outputs of the cell) follow. res is an active-high
// asynchronous reset to q = 0. The TSPC cell itself has no reset device;
// the reset is this design's own addition so that the counter starts at 0
// as the counter-level description requires.
module tspc_dff (
  input  logic clk,
  input  logic res,
  input  logic d,
  output logic q,
  output logic qbar
);

  always_ff @(posedge clk or posedge res) begin
    if (res) q <= 1'b0;
    else     q <= d;
  end

  assign qbar = ~q;

endmodule
