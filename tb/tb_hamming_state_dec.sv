// Testbench for hamming_state_dec: every 3-bit state, encoded with the package's ham_enc,
// must decode to itself without an SEU flag; every single-bit upset of every code word must
// be corrected and flagged; syndrome 7 (a double upset) must return the idle state 0.
module tb_hamming_state_dec;
  import alcor_pkg::*;
  logic [5:0] code;
  logic [2:0] state;
  logic       seu;
  int checks = 0, failures = 0;

  hamming_state_dec dut (.code(code), .state(state), .seu(seu));

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
    for (int s = 0; s < 8; s++) begin
      code = ham_enc(3'(s));
      #1ns;
      check(state == 3'(s) && !seu, $sformatf("clean code of state %0d", s));
      for (int b = 0; b < 6; b++) begin
        code = ham_enc(3'(s)) ^ (6'd1 << b);
        #1ns;
        check(state == 3'(s) && seu, $sformatf("state %0d with bit %0d flipped", s, b));
      end
    end
    // syndrome 7: positions 1,2,4 (the parity bits) flipped together
    code = ham_enc(3'd5) ^ 6'b001011;
    #1ns;
    check(state == 3'd0 && seu, "syndrome 7 goes to state 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
