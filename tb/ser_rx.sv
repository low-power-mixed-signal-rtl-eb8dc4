// ser_rx: testbench receiver for one double-column serial output.
// Samples the DDR line a quarter period after each clock edge (even bit in the high phase,
// odd bit in the low phase), finds the symbol boundary from three idle symbols in a row
// (K28.5: {0,1,BC} unencoded, or the two 8b/10b forms when encoded), then the word boundary
// from the first symbol that is not idle (every word is either four identical K symbols or
// four data bytes, so the first non-idle symbol is a byte 0). From then on it delivers every
// 32-bit word with its K flag (unencoded mode only) and counts K28.5 symbols in both modes.
module ser_rx #(
  parameter real TCLK = 10.0    // ns
) (
  input  logic        clk,
  input  logic        q,
  input  logic        encoded,
  output logic        valid,
  output logic [32:0] word,       // {k, data}
  output int          commas,
  output int          bad_symbols
);
  logic [29:0] hist;
  int          nbits, phase, bytes;
  bit          sym_lock, word_lock;
  logic [9:0]  s;
  logic [7:0]  b [4];
  logic [3:0]  kf;

  initial begin
    valid = 1'b0;
    word = '0;
    commas = 0;
    bad_symbols = 0;
    hist = '0;
    nbits = 0;
    sym_lock = 0;
    word_lock = 0;
    bytes = 0;
  end

  function automatic bit is_idle(input logic [9:0] v, input bit enc);
    return enc ? (v == 10'h17C || v == 10'h283) : (v == 10'h1BC);
  endfunction

  task automatic take(input logic bitv);
    hist = {bitv, hist[29:1]};         // newest bit at the top, oldest at the bottom
    nbits++;
    if (!sym_lock) begin
      if (is_idle(hist[9:0], encoded) && is_idle(hist[19:10], encoded) &&
          is_idle(hist[29:20], encoded)) begin
        sym_lock = 1;
        nbits = 0;
      end
    end else if (nbits == 10) begin
      nbits = 0;
      s = hist[29:20];
      if (is_idle(s, encoded)) commas++;
      if (!encoded) begin
        if (!word_lock && !is_idle(s, 1'b0)) word_lock = 1;
        if (word_lock) begin
          if (s[9]) bad_symbols++;
          b[bytes]  = s[7:0];
          kf[bytes] = s[8];
          bytes++;
          if (bytes == 4) begin
            bytes = 0;
            if (kf != 4'b0000 && kf != 4'b1111) bad_symbols++;
            word  = {kf[0], b[3], b[2], b[1], b[0]};
            valid = 1'b1;
            #1ps valid = 1'b0;
          end
        end
      end
    end
  endtask

  always @(posedge clk) begin
    #(TCLK * 0.25 * 1ns);
    take(q);
  end
  always @(negedge clk) begin
    #(TCLK * 0.25 * 1ns);
    take(q);
  end
endmodule
