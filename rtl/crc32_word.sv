// crc32_word: CRC-32 over a stream of 32-bit words with the Ethernet generator polynomial
// x^32+x^26+x^23+x^22+x^16+x^12+x^11+x^10+x^8+x^7+x^5+x^4+x^2+x+1 (0x04C11DB7 in normal
// notation, 0x82608EDB in the reversed-reciprocal notation the document quotes).
// Each word is shifted in most significant bit first, without reflection or final
// inversion, so a receiver that runs the same register over the message followed by the CRC
// word ends with zero. The register starts at 0xFFFFFFFF and is set back to it by init,
// which the EoC pulses when it sends the CRC. One word per cycle; crc shows the remainder
// of everything accepted so far. Polynomial, seed and the zero check follow the document;
// bit order is this design's choice.
module crc32_word (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,    // restart at all ones (has priority over en)
  input  logic        en,      // absorb data this cycle
  input  logic [31:0] data,
  output logic [31:0] crc
);
  localparam logic [31:0] POLY = 32'h04C1_1DB7;

  function automatic logic [31:0] step(input logic [31:0] c, input logic [31:0] d);
    logic [31:0] r;
    r = c;
    for (int i = 31; i >= 0; i--) begin
      r = (r[31] ^ d[i]) ? ((r << 1) ^ POLY) : (r << 1);
    end
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n || init) crc <= 32'hFFFF_FFFF;
    else if (en)        crc <= step(crc, data);
  end
endmodule
