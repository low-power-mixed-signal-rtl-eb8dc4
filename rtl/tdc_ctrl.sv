// tdc_ctrl: the pixel's TDC control and event-word generation.
// The two synchronised triggers are edge-detected. Depending on the operation mode, TDCs are
// armed and their conversions collected:
//   LET  - every rising edge of Trg1 goes to the next free TDC in round-robin order; with all
//          four busy the trigger is counted as lost.
//   ToT  - TDC pairs 0/1 and 2/3 work as one unit: the even TDC stamps the rising and the odd
//          one the falling edge of Trg1. ToT2 stamps the rising edge of Trg1 and the falling
//          edge of Trg2. If the falling edge does not come within WD_CYCLES (2^15) cycles a
//          word with the rising-edge coarse time and fine = 0 is produced for the odd TDC.
//   SR   - rising edge of Trg1, then rising edge of Trg2; if Trg1 falls first, the pair's data
//          is discarded.
// An edge reaches this block two cycles after the end (T1) of the TDC's fast ramp, so each
// conversion starts its fine counter at 2 and stores coarse = counter - 2 (the coarse count
// at T1). The fine counter stops when the TDC comparator fires; its width is 7, 8 or 9 bits
// (i_ratio, safety bit, Table 3.4) and a counter that reaches full scale produces a word
// with the fine field all ones. Finished words wait in one register per TDC and are written
// into the pixel FIFO lowest TDC first; a word that meets a full FIFO is counted as lost.
// Outputs to each analogue TDC: en (armed), fall/trg2 line selection and clr (end of
// conversion). Mode arming, lost-event counting and both watchdogs follow the document; the
// arming details (one pair acquiring at a time, clearing a TDC fired by an out-of-order
// edge) are this design's choices.
module tdc_ctrl
  import alcor_pkg::*;
#(
  parameter int WD_CYCLES = 32768
) (
  input  logic                clk,
  input  logic                rst_n,
  input  mode_e               mode,
  input  logic                i_ratio,
  input  logic                safety,
  input  logic [COARSE_W-1:0] coarse_cnt,
  input  logic                trg1_s,      // synchronised triggers
  input  logic                trg2_s,
  input  logic [NTDC-1:0]     cmp,         // TDC comparators
  output logic [NTDC-1:0]     tdc_en,
  output logic [NTDC-1:0]     tdc_fall,    // TDC listens to a falling edge
  output logic [NTDC-1:0]     tdc_trg2,    // TDC listens to Trg2
  output logic [NTDC-1:0]     tdc_clr,
  // event words to the FIFO
  output logic                ev_valid,
  output logic [1:0]          ev_tdc,
  output logic [COARSE_W-1:0] ev_coarse,
  output logic [FINE_W-1:0]   ev_fine,
  input  logic                fifo_full,
  output logic                lost_trg,    // pulse: trigger lost, TDCs busy
  output logic                lost_fifo    // pulse: word lost, FIFO full
);
  typedef enum logic [1:0] {T_FREE, T_RSV, T_CONV, T_FULL} tstate_e;
  typedef enum logic [1:0] {A_WAIT1, A_WAIT2} acq_e;

  tstate_e              ts   [NTDC];
  logic [COARSE_W-1:0]  crs  [NTDC];
  logic [FINE_W-1:0]    fcnt [NTDC];
  logic [NTDC-1:0]      drop;            // discard the word when the conversion ends
  logic [1:0]           ptr;             // round-robin pointer (TDC in LET, pair in pairs)
  logic                 cur;             // pair being acquired
  acq_e                 acq;
  logic [COARSE_W-1:0]  wd;
  logic                 t1q, t2q;
  logic                 r1, f1, r2, f2;
  logic [FINE_W-1:0]    fmax;
  logic                 paired;
  logic [1:0]           sel;             // LET: next free TDC
  logic                 sel_ok;
  logic                 pfree [2];
  logic                 psel, psel_ok;
  logic                 ev_b;            // second-edge event for the acquiring pair
  logic                 ev_abort;        // SR: Trg1 fell before Trg2 rose

  assign r1 = trg1_s & ~t1q;
  assign f1 = ~trg1_s & t1q;
  assign r2 = trg2_s & ~t2q;
  assign f2 = ~trg2_s & t2q;
  assign paired = (mode == MODE_TOT) || (mode == MODE_TOT2) || (mode == MODE_SR);

  always_comb begin
    case ({safety, i_ratio})
      2'b00:   fmax = FINE_W'(127);
      2'b11:   fmax = FINE_W'(511);
      default: fmax = FINE_W'(255);
    endcase
  end

  // LET: first free TDC from the pointer on
  always_comb begin
    sel    = ptr;
    sel_ok = 1'b0;
    for (int k = 3; k >= 0; k--) begin
      if (ts[2'(ptr + 2'(k))] == T_FREE) begin
        sel    = 2'(ptr + 2'(k));
        sel_ok = 1'b1;
      end
    end
  end

  // pairs: first free pair from the pointer on
  always_comb begin
    for (int p = 0; p < 2; p++) pfree[p] = (ts[2*p] == T_FREE) && (ts[2*p+1] == T_FREE);
    psel    = pfree[ptr[0]] ? ptr[0] : ~ptr[0];
    psel_ok = pfree[0] || pfree[1];
  end

  // TDC line selection and arming
  always_comb begin
    for (int n = 0; n < NTDC; n++) begin
      tdc_fall[n] = 1'b0;
      tdc_trg2[n] = 1'b0;
      if (n % 2 == 1) begin
        tdc_fall[n] = (mode == MODE_TOT) || (mode == MODE_TOT2);
        tdc_trg2[n] = (mode == MODE_TOT2) || (mode == MODE_SR);
      end
    end
    tdc_en = '0;
    if (mode == MODE_LET && sel_ok) tdc_en[sel] = 1'b1;
    if (paired) begin
      if (acq == A_WAIT1 && psel_ok) begin
        tdc_en[2*psel]   = 1'b1;
        tdc_en[2*psel+1] = 1'b1;
      end else if (acq == A_WAIT2) begin
        tdc_en[2*cur+1]  = 1'b1;
      end
    end
  end

  // second edge of the acquiring pair
  always_comb begin
    case (mode)
      MODE_TOT:  ev_b = f1;
      MODE_TOT2: ev_b = f2;
      default:   ev_b = r2;
    endcase
    ev_abort = (mode == MODE_SR) && f1 && !r2;
  end

  // output arbitration: lowest TDC with a finished word
  always_comb begin
    ev_valid  = 1'b0;
    ev_tdc    = '0;
    for (int n = NTDC - 1; n >= 0; n--) begin
      if (ts[n] == T_FULL) begin
        ev_valid = 1'b1;
        ev_tdc   = 2'(n);
      end
    end
    ev_coarse = crs[ev_tdc];
    ev_fine   = fcnt[ev_tdc];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int n = 0; n < NTDC; n++) begin
        ts[n]   <= T_FREE;
        crs[n]  <= '0;
        fcnt[n] <= '0;
      end
      drop      <= '0;
      ptr       <= '0;
      cur       <= 1'b0;
      acq       <= A_WAIT1;
      wd        <= '0;
      t1q       <= 1'b0;
      t2q       <= 1'b0;
      tdc_clr   <= '0;
      lost_trg  <= 1'b0;
      lost_fifo <= 1'b0;
    end else begin
      t1q       <= trg1_s;
      t2q       <= trg2_s;
      tdc_clr   <= '0;
      lost_trg  <= 1'b0;
      lost_fifo <= 1'b0;

      // running conversions
      for (int n = 0; n < NTDC; n++) begin
        if (ts[n] == T_CONV) begin
          if (cmp[n] || fcnt[n] == fmax) begin
            tdc_clr[n] <= 1'b1;
            if (!cmp[n]) fcnt[n] <= '1;         // comparator never fired
            if (drop[n]) begin
              ts[n]   <= T_FREE;
              drop[n] <= 1'b0;
            end else begin
              ts[n] <= T_FULL;
            end
          end else begin
            fcnt[n] <= fcnt[n] + 1'b1;
          end
        end
      end

      // hand one word to the FIFO
      if (ev_valid) begin
        ts[ev_tdc] <= T_FREE;
        if (fifo_full) lost_fifo <= 1'b1;
      end

      case (mode)
        MODE_LET: begin
          acq <= A_WAIT1;
          if (r1) begin
            if (sel_ok) begin
              ts[sel]   <= T_CONV;
              crs[sel]  <= coarse_cnt - COARSE_W'(2);
              fcnt[sel] <= FINE_W'(2);
              ptr       <= sel + 2'd1;
            end else begin
              lost_trg  <= 1'b1;
            end
          end
        end
        MODE_TOT, MODE_TOT2, MODE_SR: begin
          if (acq == A_WAIT1) begin
            if (r1) begin
              if (psel_ok) begin
                ts[2*psel]   <= T_CONV;
                crs[2*psel]  <= coarse_cnt - COARSE_W'(2);
                fcnt[2*psel] <= FINE_W'(2);
                cur          <= psel;
                ptr          <= {1'b0, ~psel};
                wd           <= '0;
                if (ev_b && mode == MODE_SR) begin    // both edges in the same cycle
                  ts[2*psel+1]   <= T_CONV;
                  crs[2*psel+1]  <= coarse_cnt - COARSE_W'(2);
                  fcnt[2*psel+1] <= FINE_W'(2);
                end else begin
                  // keep the odd TDC reserved while the second edge is awaited
                  ts[2*psel+1]   <= T_RSV;
                  acq            <= A_WAIT2;
                end
              end else begin
                lost_trg <= 1'b1;
              end
            end else if (ev_b && psel_ok) begin
              tdc_clr[2*psel+1] <= 1'b1;      // out-of-order edge fired the odd TDC
            end
          end else begin
            wd <= wd + 1'b1;
            if (ev_b) begin
              ts[2*cur+1]   <= T_CONV;
              crs[2*cur+1]  <= coarse_cnt - COARSE_W'(2);
              fcnt[2*cur+1] <= FINE_W'(2);
              acq           <= A_WAIT1;
            end else if (ev_abort) begin
              ts[2*cur+1]   <= T_FREE;
              tdc_clr[2*cur+1] <= 1'b1;
              if (ts[2*cur] == T_CONV) drop[2*cur] <= 1'b1;
              else                     ts[2*cur]   <= T_FREE;
              acq           <= A_WAIT1;
            end else if (mode != MODE_SR && int'(wd) >= WD_CYCLES - 1) begin
              // trigger stuck high: word with the rising-edge coarse time and fine 0
              ts[2*cur+1]   <= T_FULL;
              crs[2*cur+1]  <= crs[2*cur];
              fcnt[2*cur+1] <= '0;
              tdc_clr[2*cur+1] <= 1'b1;
              acq           <= A_WAIT1;
            end
          end
        end
        default: acq <= A_WAIT1;
      endcase
    end
  end
endmodule
