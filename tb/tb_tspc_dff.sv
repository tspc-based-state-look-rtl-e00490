// tb_tspc_dff -- self-checking test of the Block 2 flip-flop: random data
// on d, checks that q takes d on each rising edge, that qbar is always its
// complement, and that an asynchronous reset between edges clears q at once.
module tb_tspc_dff;
  logic clk = 1'b0, res = 1'b1, d = 1'b0;
  logic q, qbar;
  int checks = 0, failures = 0;
  logic expect_q;

  tspc_dff dut (.clk(clk), .res(res), .d(d), .q(q), .qbar(qbar));

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %b want %b at %0t", what, got, want, $time);
    end
  endtask

  initial begin
    #2000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 res = 1'b0;
    check(q, 1'b0, "q after reset");
    check(qbar, 1'b1, "qbar after reset");
    expect_q = 1'b0;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      d = 1'($urandom);
      @(posedge clk); #1;
      check(q, d, "q follows d");
      check(qbar, ~d, "qbar complement");
      if (i == 50) begin
        // asynchronous reset in the middle of a cycle
        d = 1'b1;
        @(posedge clk); #2;
        res = 1'b1; #1;
        check(q, 1'b0, "async reset clears q");
        @(negedge clk) res = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
