// Testbench for sync_dual_edge: drives asynchronous pulses at random sub-cycle times and
// checks that the synchronised output rises at exactly the second rising edge after the
// first clock edge (rising or falling) that sees the new level, for rising and for falling
// inputs alike.
module tb_sync_dual_edge;
  logic clk = 1'b0, rst_n = 1'b0, d = 1'b0, q;
  int checks = 0, failures = 0;

  sync_dual_edge dut (.clk(clk), .rst_n(rst_n), .d_async(d), .q(q));

  always #5ns clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // Change the input offset_ps after a rising edge. The first clock edge that sees the new
  // level is the falling edge when the change happens in the high phase, otherwise the next
  // rising edge; q must follow right after the second rising edge after that edge.
  task automatic pulse_and_check(input bit level, input int offset_ps);
    int n;
    bit high_phase;
    @(posedge clk);
    #(offset_ps * 1ps);
    high_phase = clk;
    d = level;
    n = high_phase ? 2 : 3;
    repeat (n - 1) @(posedge clk);
    #1ps;
    check(q != level, $sformatf("q changed too early (level %0d offset %0d)", level, offset_ps));
    @(posedge clk);
    #1ps;
    check(q == level, $sformatf("q did not follow at the expected edge (level %0d offset %0d high %0d)",
                                level, offset_ps, high_phase));
    repeat (2) @(posedge clk);
  endtask

  initial begin
    #100us;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    check(q == 1'b0, "q low after reset");
    for (int i = 0; i < 200; i++) begin
      pulse_and_check(1'b1, int'($urandom_range(100, 9900)));
      pulse_and_check(1'b0, int'($urandom_range(100, 9900)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
