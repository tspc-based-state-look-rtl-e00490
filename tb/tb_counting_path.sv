// tb_counting_path -- self-checking test of the counting path on its own.
// The look-ahead inputs are generated from a reference counter in the
// testbench (pre1 = ref[1:0] == 2'b10, pre2 = ref[3:0] == 4'b1110); q must
// equal the reference in every cycle and cout must be 1 exactly when the
// reference is one below all ones. Runs two full wraps of the 8-bit count.
module tb_counting_path;
  localparam int unsigned N3 = 3;
  localparam int unsigned W  = 2 * N3 + 2;
  logic clk = 1'b0, res = 1'b1;
  logic [W-1:0] q, ref_q;
  logic cout;
  logic pre1, pre2;
  int checks = 0, failures = 0;
  int wraps = 0;

  counting_path #(.N3(N3)) dut (.clk(clk), .res(res), .pre1(pre1), .pre2(pre2), .q(q), .cout(cout));

  always #5 clk = ~clk;

  always_ff @(posedge clk or posedge res)
    if (res) ref_q <= '0;
    else     ref_q <= ref_q + 1'b1;

  assign pre1 = ref_q[1:0] == 2'b10;
  assign pre2 = ref_q[3:0] == 4'b1110;

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 res = 1'b0;
    for (int i = 0; i < 2 * (1 << W) + 5; i++) begin
      @(negedge clk);
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("FAIL count: got %0d want %0d", q, ref_q);
      end
      checks++;
      if (cout !== (ref_q == {W{1'b1}} - 1'b1)) begin
        failures++;
        $display("FAIL cout at count %0d", ref_q);
      end
      if (ref_q == '0 && i > 0) wraps++;
    end
    checks++;
    if (wraps < 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
