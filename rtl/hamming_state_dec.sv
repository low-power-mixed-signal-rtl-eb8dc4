// hamming_state_dec: decoder for an FSM state register held as a Hamming code word.
// The 3-bit state index is stored with three parity bits at positions 1, 2 and 4 of a 6-bit
// word (alcor_pkg::ham_enc). The three parity checks C1..C3 form a syndrome that points at
// the position of a single flipped bit; the decoder corrects it and raises seu for that
// cycle, so the FSM computes its next state from the corrected state and the upset is
// counted. A syndrome that points outside the word (position 7) cannot come from one upset
// and is reported as seu with state 0 (idle). Purely combinational.
// Code construction and syndrome follow the document's 4-bit/7-bit example; dropping D4 to
// get a 6-bit word for six states is this design's reading of the 6-bit state constants.
module hamming_state_dec (
  input  logic [5:0] code,   // bit i-1 is code position i
  output logic [2:0] state,
  output logic       seu
);
  logic [2:0] syn;
  logic [5:0] fixed;

  always_comb begin
    // C1 = P1^D1^D2, C2 = P2^D1^D3, C3 = P3^D2^D3 (positions 1,3,5 / 2,3,6 / 4,5,6)
    syn[0] = code[0] ^ code[2] ^ code[4];
    syn[1] = code[1] ^ code[2] ^ code[5];
    syn[2] = code[3] ^ code[4] ^ code[5];
    fixed  = code;
    seu    = (syn != 3'd0);
    if (syn == 3'd7) begin
      fixed = '0;
    end else if (syn != 3'd0) begin
      fixed[syn - 3'd1] = ~code[syn - 3'd1];
    end
    state = {fixed[5], fixed[4], fixed[2]};
  end
endmodule
