// Testbench for manchester_tx and manchester_rx: random words sent back to back through a
// line with one cycle of delay. Checks the line code itself (a 1 is
// high then low, a 0 low then high, start bit 0, even parity bit last, 2*HB cycles per bit,
// busy for the whole frame), that the decoder returns every word with a good parity, and
// that a corrupted line makes the parity check fail.
module tb_manchester;
  localparam int W = 32, HB = 2, NB = W + 2;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, line, busy, done;
  logic [W-1:0] data = '0, rx_data;
  logic rx_en = 1'b0, rx_valid, rx_pok, flip = 1'b0;
  logic [3:0] dly;
  int checks = 0, failures = 0;

  manchester_tx #(.W(W), .HB(HB)) u_tx (.clk, .rst_n, .start, .data, .line, .busy, .done);
  always_ff @(posedge clk) dly <= {dly[2:0], line};
  manchester_rx #(.W(W), .HB(HB)) u_rx (
    .clk, .rst_n, .enable(rx_en), .line(dly[0] ^ flip), .valid(rx_valid), .data(rx_data),
    .parity_ok(rx_pok)
  );

  always #5ns clk = ~clk;

  // catch the decoder output whenever it comes
  logic got_v = 1'b0, got_pok;
  logic [W-1:0] got_d;
  always @(posedge clk) if (rx_valid) begin
    got_v   <= 1'b1;
    got_pok <= rx_pok;
    got_d   <= rx_data;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    #20ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [NB-1:0] frame;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      bit corrupt;
      corrupt = (i % 10 == 9);
      @(negedge clk);
      data = $urandom;
      frame = {1'b0, data, ^data};
      rx_en = 1'b1;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      // line code, sampled in the middle of each half bit
      for (int b = NB - 1; b >= 0; b--) begin
        check(busy, "busy during the frame");
        check(line == frame[b], $sformatf("first half of bit %0d", b));
        if (corrupt && b == NB / 2) flip = 1'b1;    // invert one whole bit on the line
        repeat (HB) @(negedge clk);
        check(line == !frame[b], $sformatf("second half of bit %0d", b));
        repeat (HB) @(negedge clk);
        flip = 1'b0;
      end
      check(!busy && done, "done after the last half bit");
      repeat (4) @(negedge clk);
      check(got_v, "decoder gave a word");
      if (corrupt) check(!got_pok || got_d != data, "corrupted frame detected");
      else check(got_pok && got_d == data, $sformatf("word %h decoded as %h", data, got_d));
      got_v = 1'b0;
      rx_en = 1'b0;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
