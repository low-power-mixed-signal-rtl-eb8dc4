// Testbench for enc8b10b: known code groups (D0.0 and K28.5 in both disparities, D21.5,
// K28.1, D17.7 and D11.7 with the A7 special cases), then a long random stream of data and
// K28.y symbols checking: each symbol has disparity 0 or +-2 and moves the running disparity as
// the encoder reports; the stream never has more than 5 equal bits in a row; a comma
// (0011111 / 1100000) appears only inside K28.1/5/7; and that no two different inputs give
// the same symbol at the same running disparity.
module tb_enc8b10b;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, k = 1'b0, rd;
  logic [7:0] din = '0;
  logic [9:0] sym;
  int checks = 0, failures = 0;
  // seen[rd][sym] = input+1 that produced it
  int seen [2][1024];

  enc8b10b dut (.clk(clk), .rst_n(rst_n), .en(en), .din(din), .k(k), .sym(sym), .rd(rd));

  always #5ns clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // symbol written abcdei fghj (a leftmost) to the sym bit order (a in bit 0)
  function automatic logic [9:0] lr(input logic [9:0] s);
    logic [9:0] r;
    for (int i = 0; i < 10; i++) r[i] = s[9 - i];
    return r;
  endfunction

  function automatic int ones(input logic [9:0] s);
    int n = 0;
    for (int i = 0; i < 10; i++) n += int'(s[i]);
    return n;
  endfunction

  task automatic enc(input logic kk, input logic [7:0] d, output logic [9:0] s, output logic rd_before);
    @(negedge clk);
    rd_before = rd;
    en  = 1'b1;
    k   = kk;
    din = d;
    @(negedge clk);
    en  = 1'b0;
    s   = sym;
  endtask

  task automatic reset_rd();
    @(negedge clk);
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
  endtask

  initial begin
    #10ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [9:0] s, prev;
    logic r0;
    int run, comma_other;
    logic last_bit;
    bit is_k;
    logic [7:0] d;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(rd == 1'b0, "running disparity starts negative");
    // known code groups (RD- then RD+)
    enc(1'b1, 8'hBC, s, r0);  check(s == lr(10'b001111_1010), "K28.5 RD-");
    check(rd == 1'b1, "K28.5 makes RD positive");
    enc(1'b0, 8'h00, s, r0);  check(s == lr(10'b011000_1011), "D0.0 RD+");
    enc(1'b1, 8'hBC, s, r0);  check(s == lr(10'b110000_0101), "K28.5 RD+");
    check(rd == 1'b0, "K28.5 RD+ makes RD negative");
    enc(1'b0, 8'h00, s, r0);  check(s == lr(10'b100111_0100), "D0.0 RD-");
    enc(1'b0, 8'hB5, s, r0);  check(s == lr(10'b101010_1010), "D21.5");
    enc(1'b1, 8'h3C, s, r0);  check(s == lr(10'b001111_1001), "K28.1 RD-");
    enc(1'b0, 8'hF1, s, r0);  check(s == lr(10'b100011_0001), "D17.7 RD+ (primary)");
    reset_rd();
    enc(1'b0, 8'hF1, s, r0);  check(s == lr(10'b100011_0111), "D17.7 RD- uses A7");
    reset_rd();
    enc(1'b0, 8'hEB, s, r0);  check(s == lr(10'b110100_1110), "D11.7 RD- (primary)");
    enc(1'b0, 8'hEB, s, r0);  check(s == lr(10'b110100_1000), "D11.7 RD+ uses A7");
    // random stream
    reset_rd();
    run = 0;
    last_bit = 1'b0;
    comma_other = 0;
    for (int i = 0; i < 20000; i++) begin
      is_k = ($urandom_range(0, 7) == 0);
      d = is_k ? {3'($urandom_range(0, 7)), 5'd28} : 8'($urandom);
      enc(is_k, d, s, r0);
      // disparity
      check(ones(s) == 5 || ones(s) == 4 || ones(s) == 6, "symbol disparity 0 or +-2");
      if (ones(s) == 6) check(!r0 && rd, "positive symbol only from RD-");
      if (ones(s) == 4) check(r0 && !rd, "negative symbol only from RD+");
      if (ones(s) == 5) check(rd == r0, "neutral symbol keeps RD");
      // run length, a first
      for (int b = 0; b < 10; b++) begin
        if (s[b] == last_bit) run++;
        else run = 1;
        last_bit = s[b];
        if (run > 5) break;
      end
      check(run <= 5, "run length at most 5");
      // comma: abcdefg = 0011111 or 1100000 only in K28.1/5/7
      if (s[6:0] == 7'b1111100 || s[6:0] == 7'b0000011)
        if (!(is_k && (d[7:5] == 3'd1 || d[7:5] == 3'd5 || d[7:5] == 3'd7))) comma_other++;
      // uniqueness per running disparity
      if (seen[r0][s] == 0) seen[r0][s] = int'({is_k, d}) + 1;
      else check(seen[r0][s] == int'({is_k, d}) + 1, "two inputs share a symbol");
      prev = s;
    end
    check(comma_other == 0, "comma only in K28.1/5/7");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
