// Testbench for reset_ctrl: low pulses of random length on the external reset line. A pulse
// shorter than CNT_LEN cycles must do nothing, one of CNT_LEN to GLB_LEN-1 cycles must reset
// only the coarse counters, a longer one both; the outputs go low at the clock edge that
// takes the CNT_LEN-th (GLB_LEN-th) low sample and return high at the first edge that sees
// the line high again.
module tb_reset_ctrl;
  localparam int CNT_LEN = 10, GLB_LEN = 24;
  logic clk = 1'b0, ext_nres = 1'b1, cnt_rst_n, glb_rst_n;
  int checks = 0, failures = 0;
  int n_cnt = 0, n_glb = 0;

  reset_ctrl #(.CNT_LEN(CNT_LEN), .GLB_LEN(GLB_LEN)) dut (
    .clk(clk), .ext_nres(ext_nres), .cnt_rst_n(cnt_rst_n), .glb_rst_n(glb_rst_n)
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
    #1ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (GLB_LEN + 2) @(negedge clk);
    check(cnt_rst_n && glb_rst_n, "no reset while the line is high");
    for (int i = 0; i < 60; i++) begin
      int len;
      len = (i < 3) ? CNT_LEN - 1 + i * (GLB_LEN - CNT_LEN + 1) / 2 : int'($urandom_range(1, 40));
      ext_nres = 1'b0;
      for (int c = 1; c <= len; c++) begin
        @(negedge clk);   // c rising edges have seen the line low
        check(cnt_rst_n == !(c >= CNT_LEN), $sformatf("cnt_rst_n after %0d low samples", c));
        check(glb_rst_n == !(c >= GLB_LEN), $sformatf("glb_rst_n after %0d low samples", c));
      end
      if (len >= CNT_LEN) n_cnt++;
      if (len >= GLB_LEN) n_glb++;
      ext_nres = 1'b1;
      @(negedge clk);
      check(cnt_rst_n && glb_rst_n, "reset released at the first edge that sees the line high");
      repeat (int'($urandom_range(0, 5))) @(negedge clk);
    end
    check(n_cnt > 0 && n_glb > 0 && n_cnt > n_glb, "both reset kinds exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
