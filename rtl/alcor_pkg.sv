// alcor_pkg: types and constants shared by the ALCOR pixel matrix, the end of column (EoC)
// and the serial output. It fixes the 32-bit event and status word layouts, the pixel
// operation-mode encoding of PCR3<12:9>, the 8b/10b K codes of the output stream and the
// Hamming (6,3) code used for the pixel FSM state registers.
// The field widths of the event word (column, pixel, TDC, 15-bit coarse, 9-bit fine) follow
// the text; their order and the status-word layout are this design's choice.
package alcor_pkg;

  localparam int COARSE_W = 15;   // on-pixel coarse counter
  localparam int FINE_W   = 9;    // widest fine counter (Table 3.4)
  localparam int NTDC     = 4;    // TDCs per pixel

  // pixel operating modes, decoded from PCR3<12:9>
  typedef enum logic [2:0] {MODE_OFF, MODE_LET, MODE_TOT, MODE_TOT2, MODE_SR} mode_e;
  typedef enum logic [1:0] {SRC_SENSOR, SRC_TP_TDC, SRC_TP_FE} src_e;

  // 32-bit event payload
  typedef struct packed {
    logic [2:0]          col;
    logic [2:0]          pix;
    logic [1:0]          tdc;
    logic [COARSE_W-1:0] coarse;
    logic [FINE_W-1:0]   fine;
  } event_t;

  // 32-bit pixel status payload
  typedef struct packed {
    logic [2:0] col;
    logic [2:0] pix;
    logic [1:0] tag;        // 2'b11 marks a status word
    logic [7:0] lost_tdc;   // triggers lost, all TDCs busy
    logic [7:0] lost_fifo;  // payloads lost, FIFO full
    logic [7:0] seu;        // corrected state-register upsets
  } status_t;

  // K28.y codes of Table 3.7
  localparam logic [7:0] K_FRAME  = 8'h1C;  // K28.0 new coarse-counter frame
  localparam logic [7:0] K_ALIGN  = 8'h3C;  // K28.1 align comma
  localparam logic [7:0] K_ROLL   = 8'h5C;  // K28.2 coarse-counter roll-over
  localparam logic [7:0] K_STATUS = 8'h7C;  // K28.3 status words follow
  localparam logic [7:0] K_CRC    = 8'h9C;  // K28.4 CRC word follows
  localparam logic [7:0] K_IDLE   = 8'hBC;  // K28.5 idle comma

  // a K word repeats the code in all four bytes
  function automatic logic [31:0] kword(input logic [7:0] k);
    return {4{k}};
  endfunction

  // PCR3<12:9> decoding (Table 3.3)
  function automatic mode_e opmode_mode(input logic [3:0] m);
    case (m)
      4'b0001, 4'b0010, 4'b0011: return MODE_LET;
      4'b0100, 4'b0101, 4'b0110: return MODE_TOT;
      4'b1001, 4'b1010, 4'b1011: return MODE_TOT2;
      4'b1100, 4'b1101, 4'b1110: return MODE_SR;
      default:                   return MODE_OFF;
    endcase
  endfunction

  function automatic src_e opmode_src(input logic [3:0] m);
    case (m[1:0])
      2'b10:   return SRC_TP_TDC;
      2'b11:   return SRC_TP_FE;
      default: return SRC_SENSOR;
    endcase
  endfunction

  // Hamming code on a 3-bit state index, word positions 1..6 = P1 P2 D1 P3 D2 D3
  // (the 7-bit code of Fig. 3.29 with D4 held at zero and dropped)
  function automatic logic [5:0] ham_enc(input logic [2:0] d);
    logic p1, p2, p3;
    p1 = d[0] ^ d[1];         // P1 = D1 ^ D2 (^ D4)
    p2 = d[0] ^ d[2];         // P2 = D1 ^ D3 (^ D4)
    p3 = d[1] ^ d[2];         // P3 = D2 ^ D3 (^ D4)
    // bit i-1 holds position i
    return {d[2], d[1], p3, d[0], p2, p1};
  endfunction

endpackage
