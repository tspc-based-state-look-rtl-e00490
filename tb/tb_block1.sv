// tb_block1 -- self-checking test of Block 1: after reset the 2-bit state
// must step 00, 01, 10, 11, 00 ... on successive rising edges, and la must
// be 1 exactly in state 10. Reset is applied again part way through.
module tb_block1;
  logic clk = 1'b0, res = 1'b1;
  logic [1:0] q;
  logic la;
  int checks = 0, failures = 0;
  logic [1:0] ref_q;

  block1 dut (.clk(clk), .res(res), .q(q), .la(la));

  always #5 clk = ~clk;

  task automatic check(input logic [1:0] got, input logic [1:0] want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %b want %b at %0t", what, got, want, $time);
    end
  endtask

  initial begin
    #3000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 res = 1'b0;
    ref_q = 2'd0;
    for (int i = 0; i < 60; i++) begin
      check(q, ref_q, "state");
      check({1'b0, la}, {1'b0, ref_q == 2'b10}, "la decodes state 10");
      @(posedge clk); #1;
      ref_q = ref_q + 2'd1;
      if (i == 37) begin
        res = 1'b1; #1;
        check(q, 2'd0, "async reset");
        @(negedge clk) res = 1'b0;
        ref_q = 2'd0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
