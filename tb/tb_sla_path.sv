// tb_sla_path -- self-checking test of the state look-ahead path. The
// testbench drives it with the low four bits of a reference binary counter
// (bits 1:0 as Block 1, bits 3:2 as Block 31) and checks that in every
// cycle p1 == (count[1:0] == 2'b10) and p2 == (count[3:0] == 4'b1110).
module tb_sla_path;
  logic clk = 1'b0, res = 1'b1;
  logic [3:0] cnt;
  logic p1, p2;
  int checks = 0, failures = 0;
  int p1_seen = 0, p2_seen = 0;

  sla_path dut (.clk(clk), .res(res), .c_lo(cnt[1:0]), .c_b31(cnt[3:2]), .p1(p1), .p2(p2));

  always #5 clk = ~clk;

  always_ff @(posedge clk or posedge res)
    if (res) cnt <= 4'd0;
    else     cnt <= cnt + 4'd1;

  task automatic check(input logic got, input logic want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %b want %b (count %0d) at %0t", what, got, want, cnt, $time);
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
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      check(p1, cnt[1:0] == 2'b10, "p1");
      check(p2, cnt == 4'b1110, "p2");
      if (p1) p1_seen++;
      if (p2) p2_seen++;
      if (i == 123) begin
        res = 1'b1; #1 res = 1'b0;
      end
    end
    checks++;
    if (p1_seen == 0 || p2_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
