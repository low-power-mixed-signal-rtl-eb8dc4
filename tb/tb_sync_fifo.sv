// Testbench for sync_fifo: random writes and reads (including simultaneous ones, writes
// when full and reads when empty) against a queue model; checks data order, empty, full
// and count every cycle, and that both the full and the empty condition were reached.
module tb_sync_fifo;
  localparam int W = 32, DEPTH = 4;
  logic clk = 1'b0, rst_n = 1'b0, wr_en = 1'b0, rd_en = 1'b0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic empty, full;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic [W-1:0] q[$];
  int checks = 0, failures = 0, n_full = 0, n_empty = 0, n_drop = 0;

  sync_fifo #(.W(W), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .wr_en(wr_en), .wr_data(wr_data), .rd_en(rd_en),
    .rd_data(rd_data), .empty(empty), .full(full), .count(count)
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
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      int bias;
      bias = (i / 500) % 2;        // alternate phases that fill and drain the FIFO
      @(negedge clk);
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == DEPTH), "full flag");
      check(int'(count) == q.size(), "count");
      if (q.size() > 0) check(rd_data == q[0], "head of FIFO");
      if (full) n_full++;
      if (empty) n_empty++;
      wr_en   = ($urandom_range(0, 9) < (bias ? 7 : 3));
      rd_en   = ($urandom_range(0, 9) < (bias ? 3 : 7));
      wr_data = $urandom;
      @(posedge clk);
      begin
        bit was_full, was_empty;
        was_full  = (q.size() == DEPTH);
        was_empty = (q.size() == 0);
        if (rd_en && !was_empty) void'(q.pop_front());
        if (wr_en && !was_full) q.push_back(wr_data);
        if (wr_en && was_full) n_drop++;
      end
    end
    check(n_full > 0 && n_empty > 0 && n_drop > 0, "full, empty and overflow all reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
