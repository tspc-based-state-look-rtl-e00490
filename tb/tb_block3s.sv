// tb_block3s -- self-checking test of Block 3s: random ins and pre; the
// state must advance by one (mod 4) on each rising edge with ins = 1 and
// hold with ins = 0, and cout must equal (state == 11) & pre.
module tb_block3s;
  logic clk = 1'b0, res = 1'b1, ins = 1'b0, pre = 1'b0;
  logic [1:0] q;
  logic cout;
  int checks = 0, failures = 0;
  int holds = 0, steps = 0;
  logic [1:0] ref_q;

  block3s dut (.clk(clk), .res(res), .ins(ins), .pre(pre), .q(q), .cout(cout));

  always #5 clk = ~clk;

  task automatic check(input logic [1:0] got, input logic [1:0] want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %b want %b at %0t", what, got, want, $time);
    end
  endtask

  initial begin
    #5000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 res = 1'b0;
    ref_q = 2'd0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      ins = 1'($urandom);
      pre = 1'($urandom);
      #1;
      check({1'b0, cout}, {1'b0, (ref_q == 2'b11) && pre}, "cout");
      @(posedge clk); #1;
      if (ins) begin ref_q = ref_q + 2'd1; steps++; end
      else holds++;
      check(q, ref_q, "state");
    end
    checks++;
    if (holds == 0 || steps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
