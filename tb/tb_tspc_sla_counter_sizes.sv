// tb_tspc_sla_counter_sizes -- checks that the counter stays a correct
// binary counter when the number of Block 3s is changed: a 6-bit (N3 = 2)
// and a 12-bit (N3 = 5) instance run side by side from the same clock and
// are compared with reference counts in every cycle, through a full wrap of
// the 12-bit count (4096 edges), with cout checked at all-ones minus one.
module tb_tspc_sla_counter_sizes;
  logic clk = 1'b0, res = 1'b1;
  logic [5:0]  q6;
  logic [11:0] q12;
  logic cout6, cout12;
  logic [5:0]  r6;
  logic [11:0] r12;
  int checks = 0, failures = 0;
  int wraps12 = 0;

  tspc_sla_counter #(.N3(2)) dut6  (.clk(clk), .res(res), .q(q6),  .cout(cout6));
  tspc_sla_counter #(.N3(5)) dut12 (.clk(clk), .res(res), .q(q12), .cout(cout12));

  always #5 clk = ~clk;

  always_ff @(posedge clk or posedge res)
    if (res) begin r6 <= '0; r12 <= '0; end
    else     begin r6 <= r6 + 1'b1; r12 <= r12 + 1'b1; end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: q6 %0d/%0d q12 %0d/%0d", what, q6, r6, q12, r12);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk) res = 1'b0;
    for (int i = 0; i < 4096 + 20; i++) begin
      check(q6 == r6, "6-bit count");
      check(q12 == r12, "12-bit count");
      check(cout6 == (r6 == 6'd62), "6-bit cout");
      check(cout12 == (r12 == 12'd4094), "12-bit cout");
      if (i > 0 && r12 == '0) wraps12++;
      @(negedge clk);
    end
    check(wraps12 == 1, "12-bit count wrapped once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
