// Testbench for crc32_word: known vectors of the CRC-32 (polynomial 0x04C11DB7, initial
// value all ones, no reflection, no final inversion, data most significant bit first),
// then random word streams against a byte-wise reference model, and the init / hold
// behaviour (init wins over en, en low keeps the value).
module tb_crc32_word;
  logic clk = 1'b0, rst_n = 1'b0, init = 1'b0, en = 1'b0;
  logic [31:0] data = '0, crc;
  int checks = 0, failures = 0;

  crc32_word dut (.clk(clk), .rst_n(rst_n), .init(init), .en(en), .data(data), .crc(crc));

  always #5ns clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // reference: table-free byte-wise update, most significant byte first
  function automatic logic [31:0] ref_byte(input logic [31:0] c, input logic [7:0] b);
    logic [31:0] r;
    r = c ^ {b, 24'h0};
    for (int i = 0; i < 8; i++) r = r[31] ? ((r << 1) ^ 32'h04C1_1DB7) : (r << 1);
    return r;
  endfunction

  task automatic feed(input logic [31:0] w);
    @(negedge clk);
    en = 1'b1;
    data = w;
    @(negedge clk);
    en = 1'b0;
  endtask

  task automatic restart();
    @(negedge clk);
    init = 1'b1;
    en = 1'b1;          // init has priority
    data = $urandom;
    @(negedge clk);
    init = 1'b0;
    en = 1'b0;
    check(crc == 32'hFFFF_FFFF, "init restores all ones");
  endtask

  initial begin
    #1ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [31:0] model;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(crc == 32'hFFFF_FFFF, "reset value");
    feed(32'h3132_3334);
    feed(32'h3536_3738);
    check(crc == 32'h49E3_C2FB, "CRC of \"12345678\"");
    restart();
    feed(32'h0000_0000);
    check(crc == 32'hC704_DD7B, "CRC of one zero word");
    restart();
    feed(32'hDEAD_BEEF);
    feed(32'h1234_5678);
    feed(32'hFFFF_FFFF);
    check(crc == 32'h3A83_F62A, "CRC of three words");
    repeat (3) @(negedge clk);
    check(crc == 32'h3A83_F62A, "en low holds the value");
    for (int n = 0; n < 50; n++) begin
      int len;
      restart();
      model = 32'hFFFF_FFFF;
      len = int'($urandom_range(1, 40));
      for (int i = 0; i < len; i++) begin
        logic [31:0] w;
        w = $urandom;
        feed(w);
        for (int b = 3; b >= 0; b--) model = ref_byte(model, w[8*b +: 8]);
      end
      check(crc == model, $sformatf("random stream %0d of %0d words", n, len));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
