// eoc_column: end-of-column readout controller for one pixel column.
// When a pixel requests the bus (req) the controller opens a readout round: it raises freeze
// for two cycles, so that the pixels holding data at that moment take part, and then gives
// out slots. In a slot the grant (write enable) is high for SLOT_CYCLES = 6 cycles; the
// taking-part pixel with the highest address takes it and drives its word, which is sampled
// in the last cycle of the slot. Slots are separated by GAP_CYCLES = 3 idle cycles; the
// round closes when no pixel requests any more. A status round (status_cmd) works the same
// way, with status_req raised during the two freeze cycles, and collects one status word
// from each of the NPIX pixels into a small buffer (for four pixels it lasts 4*6 + 3*3 = 33
// cycles from the first grant, as in the document).
// Event words are sorted by the most significant bit of their coarse time into FIFO 0 and
// FIFO 1 (8 words each), which the double-column merger reads half a coarse period apart; a
// word that meets a full FIFO is counted in in_loss.
// Round structure, six-cycle slots, three-cycle gaps, 2-cycle freeze and the FIFO 0/1 split
// follow the document; the sampling point and the buffer layout are this design's choices.
module eoc_column
  import alcor_pkg::*;
#(
  parameter int NPIX        = 4,
  parameter int SLOT_CYCLES = 6,
  parameter int GAP_CYCLES  = 3,
  parameter int FIFO_DEPTH  = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,       // ECCR column enable
  // column side
  input  logic        req,
  output logic        grant,
  input  logic [31:0] data_in,
  output logic        freeze,
  output logic        status_req,
  // merger side
  input  logic        status_cmd,   // pulse: collect status words
  output logic        status_done,  // pulse: status buffer complete
  output logic [31:0] status_word [NPIX],
  input  logic [1:0]  rd_en,        // pop FIFO 0 / FIFO 1
  output logic [31:0] rd_data [2],
  output logic [1:0]  empty,
  output logic [7:0]  in_loss,
  input  logic        loss_clr      // clear in_loss
);
  typedef enum logic [2:0] {E_IDLE, E_FRZ, E_SLOT, E_GAP} est_e;

  est_e        st;
  logic [3:0]  cnt;
  logic        stat_round;
  logic [$clog2(NPIX+1)-1:0] sidx;
  logic        sample;
  logic        msb;
  logic [1:0]  full;

  assign grant      = (st == E_SLOT);
  assign freeze     = (st != E_IDLE);
  assign status_req = (st == E_FRZ) && stat_round;
  assign sample     = (st == E_SLOT) && (int'(cnt) == SLOT_CYCLES - 1);
  assign msb        = data_in[FINE_W + COARSE_W - 1];

  for (genvar h = 0; h < 2; h++) begin : g_fifo
    sync_fifo #(.W(32), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .wr_en   (sample && !stat_round && (msb == 1'(h))),
      .wr_data (data_in),
      .rd_en   (rd_en[h]),
      .rd_data (rd_data[h]),
      .empty   (empty[h]),
      .full    (full[h]),
      .count   ()
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st          <= E_IDLE;
      cnt         <= '0;
      stat_round  <= 1'b0;
      sidx        <= '0;
      status_done <= 1'b0;
      in_loss     <= '0;
      for (int i = 0; i < NPIX; i++) status_word[i] <= '0;
    end else begin
      status_done <= 1'b0;
      if (loss_clr) in_loss <= '0;
      else if (sample && !stat_round && full[msb] && in_loss != 8'hFF) in_loss <= in_loss + 1'b1;
      if (sample && stat_round && int'(sidx) < NPIX) begin
        status_word[sidx] <= data_in;
        sidx <= sidx + 1'b1;
      end
      case (st)
        E_IDLE: begin
          cnt <= '0;
          if (status_cmd) begin
            st         <= E_FRZ;
            stat_round <= 1'b1;
            sidx       <= '0;
          end else if (req && enable) begin
            st         <= E_FRZ;
            stat_round <= 1'b0;
          end
        end
        E_FRZ: begin
          cnt <= cnt + 1'b1;
          if (cnt == 4'd1) begin
            cnt <= '0;
            st  <= req ? E_SLOT : E_IDLE;
            if (!req && stat_round) status_done <= 1'b1;
          end
        end
        E_SLOT: begin
          cnt <= cnt + 1'b1;
          if (int'(cnt) == SLOT_CYCLES - 1) begin
            cnt <= '0;
            st  <= E_GAP;
          end
        end
        default: begin   // E_GAP
          cnt <= cnt + 1'b1;
          if (int'(cnt) == GAP_CYCLES - 1) begin
            cnt <= '0;
            if (req) begin
              st <= E_SLOT;
            end else begin
              st <= E_IDLE;
              if (stat_round) status_done <= 1'b1;
            end
          end
        end
      endcase
    end
  end
endmodule
