// eoc_merge: double-column data merger and output FIFO of the end of column.
// A local copy of the 15-bit coarse counter divides time into frames of 2^15 cycles. Event
// words were already sorted by the columns into FIFO 0 (coarse MSB = 0) and FIFO 1
// (MSB = 1). The merger copies words of both columns into the output FIFO as soon as they
// arrive, taking first the FIFO of the half frame that has already ended (late words) and
// then the FIFO of the running half. out_loss counts the cycles in which a word was waiting
// and the output FIFO was full. At the roll-over (MSB 1 -> 0) a status round is requested
// from both columns.
// In the middle of the next frame the frame is closed and the next one opened with:
//   K28.2 roll-over, [K28.3 status, 4 status words of column 0, 4 of column 1],
//   EoC status word {out_loss[7:0], in_loss[7:0], event count[15:0]}, K28.4, CRC word,
//   K28.0 frame header, frame number (16 bits).
// K words carry the K code in all four bytes and set the 33rd FIFO bit. The CRC (crc32_word)
// covers every word written from one CRC word to the next, K words included. ECCR<15>
// enables the status words, ECCR<11> (raw mode) suppresses every header, trailer, status
// and CRC word. Output FIFO: 32 words of 33 bits; the merger waits while it is full.
// Because the trailer of frame n comes half a frame late, the words of the first half of
// frame n+1 (coarse MSB = 0) precede it in the stream; a receiver assigns every event word
// to a frame from its coarse MSB and its position relative to the headers.
// Stream contents, K codes, CRC rules, FIFO sizes and ECCR bits follow the document; the
// read order, the mid-frame trailer and the loss counting are this design's choices.
module eoc_merge
  import alcor_pkg::*;
#(
  parameter int NPIX       = 4,
  parameter int FRAME_BITS = COARSE_W,
  parameter int OUT_DEPTH  = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cnt_rst_n,
  input  logic        status_en,     // ECCR<15>
  input  logic        raw_mode,      // ECCR<11>
  // two columns
  output logic [1:0]  col_rd   [2],  // [column][fifo]
  input  logic [31:0] col_data [2][2],
  input  logic [1:0]  col_empty [2],
  input  logic [31:0] col_status [2][NPIX],
  input  logic [7:0]  col_in_loss [2],
  output logic        status_cmd,
  input  logic        loss_clr,      // clear out_loss
  output logic [7:0]  out_loss,
  // output FIFO read side
  input  logic        of_rd,
  output logic [32:0] of_data,       // {k, word}
  output logic        of_empty,
  output logic [15:0] frame_no,
  output logic [31:0] crc
);
  typedef enum logic {M_DRAIN, M_TRAIL} mst_e;

  mst_e                  st;
  logic [FRAME_BITS-1:0] lc;
  logic                  msb, msb_q;
  logic [4:0]            ti, eti;
  logic                  hdr_only;      // first frame: header without trailer
  logic [15:0]           ev_count;
  logic                  of_full, of_wr;
  logic [32:0]           of_wdata;
  logic                  crc_en, crc_init;
  logic [4:0]            base;
  logic                  dh, hsel;
  logic                  pick;          // column to read in M_DRAIN
  logic                  have;
  logic [7:0]            in_loss_sum;

  assign msb  = lc[FRAME_BITS-1];
  assign base = (status_en && !raw_mode) ? 5'd10 : 5'd1;
  assign dh   = ~msb;
  assign eti  = hdr_only ? (base + 5'd3 + ti) : ti;
  assign in_loss_sum = col_in_loss[0] + col_in_loss[1];

  always_ff @(posedge clk) begin
    if (!cnt_rst_n || !rst_n) lc <= '0;
    else                      lc <= lc + 1'b1;
  end

  // which word goes to the output FIFO this cycle
  always_comb begin
    col_rd   = '{2'b00, 2'b00};
    of_wr    = 1'b0;
    of_wdata = '0;
    crc_en   = 1'b0;
    crc_init = 1'b0;
    hsel     = (!col_empty[0][dh] || !col_empty[1][dh]) ? dh : ~dh;
    pick     = col_empty[0][hsel];
    have     = !col_empty[0][hsel] || !col_empty[1][hsel];
    case (st)
      M_DRAIN: begin
        if (have && !of_full && msb == msb_q) begin
          col_rd[pick][hsel] = 1'b1;
          of_wr    = 1'b1;
          of_wdata = {1'b0, col_data[pick][hsel]};
        end
      end
      default: begin  // M_TRAIL
        of_wr = !of_full;
        if (eti == 5'd0) begin
          of_wdata = {1'b1, kword(K_ROLL)};
        end else if (eti < base) begin
          if (eti == 5'd1)      of_wdata = {1'b1, kword(K_STATUS)};
          else if (eti < 5'd6)  of_wdata = {1'b0, col_status[0][2'(eti - 5'd2)]};
          else                 of_wdata = {1'b0, col_status[1][2'(eti - 5'd6)]};
        end else if (eti == base) begin
          of_wdata = {1'b0, out_loss, in_loss_sum, ev_count};
        end else if (eti == base + 5'd1) begin
          of_wdata = {1'b1, kword(K_CRC)};
        end else if (eti == base + 5'd2) begin
          of_wdata = {1'b0, crc};
        end else if (eti == base + 5'd3) begin
          of_wdata = {1'b1, kword(K_FRAME)};
        end else begin
          of_wdata = {1'b0, 16'h0, frame_no};
        end
      end
    endcase
    if (of_wr) begin
      if (st == M_TRAIL && eti == base + 5'd2) crc_init = 1'b1;
      else                                    crc_en   = 1'b1;
    end
  end

  crc32_word u_crc (.clk, .rst_n, .init(crc_init), .en(crc_en), .data(of_wdata[31:0]), .crc);

  sync_fifo #(.W(33), .DEPTH(OUT_DEPTH)) u_out (
    .clk, .rst_n,
    .wr_en(of_wr), .wr_data(of_wdata), .rd_en(of_rd), .rd_data(of_data),
    .empty(of_empty), .full(of_full), .count()
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st             <= M_DRAIN;
      ti             <= 5'd0;
      hdr_only       <= 1'b1;
      msb_q          <= 1'b0;
      out_loss       <= '0;
      ev_count       <= '0;
      frame_no       <= '0;
      status_cmd     <= 1'b0;
    end else begin
      msb_q      <= msb;
      status_cmd <= 1'b0;
      if (loss_clr) out_loss <= '0;
      if (raw_mode && st == M_TRAIL) st <= M_DRAIN;
      case (st)
        M_DRAIN: begin
          if (of_wr) ev_count <= ev_count + 1'b1;
          if (have && of_full && out_loss != 8'hFF) out_loss <= out_loss + 1'b1;
          if (msb && !msb_q && !raw_mode) begin     // middle of the frame: close the previous one
            st <= M_TRAIL;
            ti <= 5'd0;
          end else if (!msb && msb_q) begin         // roll-over: collect the status words
            status_cmd <= status_en && !raw_mode;
          end
        end
        default: begin
          if (of_wr) begin
            ti <= ti + 1'b1;
            if (eti == base) ev_count <= '0;
            if (eti == 5'd0) frame_no <= frame_no + 1'b1;
            if (eti == base + 5'd4) begin
              st       <= M_DRAIN;
              hdr_only <= 1'b0;
            end
          end
        end
      endcase
    end
  end
endmodule
