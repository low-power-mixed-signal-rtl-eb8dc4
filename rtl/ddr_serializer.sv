// ddr_serializer: 8b/10b double-data-rate output of one double column.
// A 32-bit word is taken from the output FIFO (or, when the FIFO is empty, an idle word of
// four K28.5; in align mode a word of four K28.1) and cut into bytes 0..3, sent in that
// order. Each byte is encoded to a 10-bit symbol (enc8b10b; all four bytes of a K word are
// K symbols). The symbol goes out two bits per clock cycle, least significant bit first:
// the even bit is put out during the high clock phase from a register loaded on the falling
// edge, the odd bit during the low phase from a register loaded on the rising edge, and the
// clock itself selects between them. A word therefore takes 20 clock cycles, which at
// 320 MHz gives 640 Mb/s on the line and 512 Mb/s of payload.
// ECCR<13> enables the output (q stays low otherwise), ECCR<12> enables the encoder (when
// off the byte is sent as {0, k, byte}), ECCR<14> forces align words. The DDR scheme, byte
// order, bit order and idle/align words follow the document; the unencoded format is this
// design's choice.
module ddr_serializer
  import alcor_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ser_en,
  input  logic        enc_en,
  input  logic        align,
  input  logic [32:0] of_data,
  input  logic        of_empty,
  output logic        of_rd,
  output logic        q
);
  logic [32:0] wr;
  logic [1:0]  bi;
  logic [2:0]  pcnt;
  logic [9:0]  sh, sym_enc, sym_raw;
  logic        enc_go, rd_unused;
  logic [7:0]  cur_byte;
  logic        pe, po, a_even, b_odd;

  assign cur_byte = wr[8*bi +: 8];
  assign enc_go   = (pcnt == 3'd3);
  assign of_rd    = enc_go && bi == 2'd3 && !align && !of_empty;

  enc8b10b u_enc (
    .clk, .rst_n, .en(enc_go), .din(cur_byte), .k(wr[32]), .sym(sym_enc), .rd(rd_unused)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr      <= {1'b1, kword(K_IDLE)};
      bi      <= '0;
      pcnt    <= '0;
      sh      <= '0;
      sym_raw <= '0;
      pe      <= 1'b0;
      po      <= 1'b0;
      b_odd   <= 1'b0;
    end else begin
      b_odd <= po;
      pe    <= sh[0];
      po    <= sh[1];
      if (enc_go) begin
        sym_raw <= {1'b0, wr[32], cur_byte};
        bi      <= bi + 1'b1;
        if (bi == 2'd3) begin
          if (align)          wr <= {1'b1, kword(K_ALIGN)};
          else if (!of_empty) wr <= of_data;
          else                wr <= {1'b1, kword(K_IDLE)};
        end
      end
      if (pcnt == 3'd4) begin
        pcnt <= '0;
        sh   <= enc_en ? sym_enc : sym_raw;
      end else begin
        pcnt <= pcnt + 1'b1;
        sh   <= sh >> 2;
      end
    end
  end

  always_ff @(negedge clk) begin
    if (!rst_n) a_even <= 1'b0;
    else        a_even <= pe;
  end

  assign q = ser_en && (clk ? a_even : b_odd);
endmodule
