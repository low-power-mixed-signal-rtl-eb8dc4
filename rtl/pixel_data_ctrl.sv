// pixel_data_ctrl: moves a pixel's event words and its status word down the column to the
// end of column (EoC), one word per pixel per readout round.
// Column wiring (pixel 0 at the top, the EoC below the last pixel):
//   req      ORed downwards: this pixel wants the bus (FIFO not empty, or chosen in a round)
//   freeze   from the EoC: a round is open; pixels holding data at its start take part
//   grant    "write enable from EoC", passed upwards: a taking part pixel that has not sent
//            yet keeps it and stops it, so the pixel with the highest address sends first
//   data     32-bit bus, passed downwards: a sending pixel puts its word on it, every other
//            pixel forwards what comes from above; the top pixel's input is all ones (idle)
//   status_req from the EoC: every pixel takes part and sends its status word instead
// A sender drives its word for as long as the grant lasts (six cycles from the EoC), pops
// its FIFO when the grant ends and then stays out until the EoC closes the round. The status
// word carries saturating 8-bit counts of lost triggers, lost FIFO words and corrected
// state-register upsets; all three are cleared once it is sent.
// The state register is stored Hamming-coded (alcor_pkg::ham_enc) and decoded by
// hamming_state_dec every cycle, so a single upset is corrected and counted as the document
// describes. The round structure (request, freeze, grant, highest address first, one word
// per pixel, status on request) follows the document; the signal-level encoding of grant and
// req is this design's choice.
module pixel_data_ctrl
  import alcor_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [2:0]  col_id,
  input  logic [2:0]  my_addr,
  // pixel FIFO
  input  logic        fifo_empty,
  input  logic [31:0] fifo_data,
  output logic        fifo_rd,
  // loss pulses
  input  logic        lost_trg,
  input  logic        lost_fifo,
  // column chain
  input  logic        req_in,      // from the pixel above
  output logic        req_out,     // to the pixel below / EoC
  input  logic        grant_in,    // from the pixel below / EoC
  output logic        grant_out,   // to the pixel above
  input  logic [31:0] data_in,     // from the pixel above
  output logic [31:0] data_out,    // to the pixel below / EoC
  input  logic        freeze,
  input  logic        status_req,
  output logic [7:0]  seu_count
);
  typedef enum logic [2:0] {S_IDLE, S_REQ, S_SEND, S_STWAIT, S_STSEND, S_DONE} st_e;

  logic [5:0] state_code;
  logic [2:0] st_raw;
  st_e        st, nxt;
  logic       seu;
  logic       grant_q;
  logic [7:0] n_lost_trg, n_lost_fifo;
  logic       pending, sending;
  status_t    sw;

  hamming_state_dec u_dec (.code(state_code), .state(st_raw), .seu(seu));
  assign st = st_e'(st_raw);

  assign pending   = (st == S_REQ) || (st == S_STWAIT);
  assign sending   = (st == S_SEND) || (st == S_STSEND);
  assign req_out   = req_in || pending || (st == S_IDLE && !fifo_empty && !freeze);
  assign grant_out = grant_in && !pending && !sending;

  always_comb begin
    sw.col       = col_id;
    sw.pix       = my_addr;
    sw.tag       = 2'b11;
    sw.lost_tdc  = n_lost_trg;
    sw.lost_fifo = n_lost_fifo;
    sw.seu       = seu_count;
    if (st == S_SEND)        data_out = fifo_data;
    else if (st == S_STSEND) data_out = sw;
    else                     data_out = data_in;
  end

  always_comb begin
    nxt = st;
    case (st)
      S_IDLE:   if (status_req)                 nxt = S_STWAIT;
                else if (freeze && !fifo_empty) nxt = S_REQ;
      S_REQ:    if (status_req)                 nxt = S_STWAIT;
                else if (grant_in && !grant_q)  nxt = S_SEND;
                else if (!freeze)               nxt = S_IDLE;
      S_SEND:   if (!grant_in)                  nxt = S_DONE;
      S_STWAIT: if (grant_in && !grant_q)       nxt = S_STSEND;
      S_STSEND: if (!grant_in)                  nxt = S_DONE;
      S_DONE:   if (!freeze)                    nxt = S_IDLE;
      default:                                  nxt = S_IDLE;
    endcase
  end

  assign fifo_rd = (st == S_SEND) && !grant_in;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_code  <= ham_enc(3'(S_IDLE));
      grant_q     <= 1'b0;
      n_lost_trg  <= '0;
      n_lost_fifo <= '0;
      seu_count   <= '0;
    end else begin
      state_code <= ham_enc(3'(nxt));
      grant_q    <= grant_in;
      if (st == S_STSEND && !grant_in) begin
        n_lost_trg  <= '0;
        n_lost_fifo <= '0;
        seu_count   <= '0;
      end else begin
        if (lost_trg  && n_lost_trg  != 8'hFF) n_lost_trg  <= n_lost_trg + 1'b1;
        if (lost_fifo && n_lost_fifo != 8'hFF) n_lost_fifo <= n_lost_fifo + 1'b1;
        if (seu       && seu_count   != 8'hFF) seu_count   <= seu_count + 1'b1;
      end
    end
  end
endmodule
