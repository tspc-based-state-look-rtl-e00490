// tb_tspc_sla_counter -- end-to-end test of the 8-bit state look-ahead
// counter at its default size. After reset the counter must show the
// binary count of rising edges since reset in every cycle, wrap from 255
// to 0, and assert cout exactly at count 254. The test also reproduces the
// reference waveform's key point: q7 first rises on the 128th edge after
// reset. It counts how often each mechanism fired (look-ahead signals
// pre1/pre2, every Block 3s enable, wrap, asynchronous reset mid-count)
// and counts a failure for any that never did.
module tb_tspc_sla_counter;
  localparam int unsigned W = 8;
  logic clk = 1'b0, res = 1'b1;
  logic [W-1:0] q;
  logic cout;
  int checks = 0, failures = 0;
  int unsigned edges = 0;
  int unsigned ref_cnt = 0;
  int unsigned q7_first_edge = 0;
  int n_pre1 = 0, n_pre2 = 0, n_wrap = 0, n_reset = 0;
  int n_ins[1:3] = '{0, 0, 0};

  tspc_sla_counter dut (.clk(clk), .res(res), .q(q), .cout(cout));

  always #2 clk = ~clk;   // 4 ns period

  task automatic fail(input string what);
    failures++;
    $display("FAIL %s (edges %0d, q %0d, ref %0d)", what, edges, q, ref_cnt);
  endtask

  initial begin
    #20000;
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk) res = 1'b0;
    for (int i = 0; i < 3 * 256 + 100; i++) begin
      checks++;
      if (q !== W'(ref_cnt)) fail("count");
      checks++;
      if (cout !== (W'(ref_cnt) == 8'd254)) fail("cout");
      if (dut.pre1) n_pre1++;
      if (dut.pre2) n_pre2++;
      for (int s = 1; s <= 3; s++)
        if (dut.u_counting.ins[s]) n_ins[s]++;
      if (q[7] && q7_first_edge == 0) q7_first_edge = edges;
      if (i == 3 * 256 + 40) begin
        // asynchronous reset in the middle of a count
        res = 1'b1;
        #0.5;
        checks++;
        if (q !== '0) fail("async reset");
        n_reset++;
        res = 1'b0;
        ref_cnt = 0;
        edges = 0;
      end
      @(posedge clk);
      edges++;
      ref_cnt = (ref_cnt + 1) % 256;
      if (ref_cnt == 0) n_wrap++;
      @(negedge clk);
    end
    checks++;
    if (q7_first_edge != 128) fail($sformatf("q7 first rose after %0d edges, want 128", q7_first_edge));
    // the look-ahead signals and enables fire at fixed rates
    checks++;
    if (n_pre1 == 0 || n_pre2 == 0) fail("look-ahead signal never fired");
    for (int s = 1; s <= 3; s++) begin
      checks++;
      if (n_ins[s] == 0) fail($sformatf("Block 3%0d never enabled", s));
    end
    checks++;
    if (n_wrap == 0) fail("no wrap");
    checks++;
    if (n_reset == 0) fail("no reset");
    $display("mechanisms: pre1=%0d pre2=%0d ins1=%0d ins2=%0d ins3=%0d wraps=%0d resets=%0d",
             n_pre1, n_pre2, n_ins[1], n_ins[2], n_ins[3], n_wrap, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
