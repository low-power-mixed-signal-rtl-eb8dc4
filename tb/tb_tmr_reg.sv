// Testbench for tmr_reg: random writes, then single-event upsets injected into one copy at a
// time (output must not change, mismatch must flag the upset for one cycle and the next
// clock must scrub it), and the same bit upset in two copies (output flips, as expected
// of a triple-redundant register).
module tb_tmr_reg;
  localparam int W = 16;
  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0;
  logic [W-1:0] d = '0, u1 = '0, u2 = '0, u3 = '0, q;
  logic mismatch;
  logic [W-1:0] model;
  int checks = 0, failures = 0;

  tmr_reg #(.W(W), .INIT(16'hA5C3)) dut (
    .clk(clk), .rst_n(rst_n), .we(we), .d(d), .upset_t1(u1), .upset_t2(u2), .upset_t3(u3),
    .q(q), .mismatch(mismatch)
  );

  always #5ns clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    #200us;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1ns rst_n = 1'b1;
    check(q == 16'hA5C3 && !mismatch, "reset value");
    model = 16'hA5C3;
    for (int i = 0; i < 500; i++) begin
      logic [W-1:0] flip;
      int which;
      // write
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) begin
        we = 1'b1;
        d  = W'($urandom);
        model = d;
      end
      @(negedge clk);
      we = 1'b0;
      check(q == model && !mismatch, "value after write");
      // single upset in one copy, held for one clock
      flip  = W'(1) << $urandom_range(0, W - 1);
      which = int'($urandom_range(1, 3));
      u1 = (which == 1) ? flip : '0;
      u2 = (which == 2) ? flip : '0;
      u3 = (which == 3) ? flip : '0;
      @(negedge clk);
      u1 = '0; u2 = '0; u3 = '0;
      check(q == model, "single upset must not change the output");
      check(mismatch, "single upset must be flagged");
      @(negedge clk);
      check(q == model && !mismatch, "upset must be scrubbed after one clock");
    end
    // double upset on the same bit: majority is lost (documents the limit)
    @(negedge clk);
    u1 = 16'h0001; u2 = 16'h0001;
    @(negedge clk);
    u1 = '0; u2 = '0;
    check(q == (model ^ 16'h0001), "double upset flips the voted bit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
