// alcor_pixel: the digital part of one ALCOR pixel together with behavioural models of its
// four analogue TDCs.
// Trigger path: the front-end discriminator outputs Trg1/Trg2 (or the test pulse, when PCR3
// selects a *_TP_TDC mode) go to the analogue TDCs directly and, through two dual-edge
// synchronisers, to tdc_ctrl, which arms the TDCs, runs their fine counters and builds the
// 32-bit event words (column, pixel, TDC, 15-bit coarse time, fine time). Words enter a
// 4-deep FIFO and leave through pixel_data_ctrl on the column bus. The coarse counter is a
// free-running 15-bit counter cleared by the coarse-counter reset. The pixel address is
// self-assigned: addr_out = addr_in + 1 goes to the next pixel down the column.
// Configuration comes from the four TMR-protected PCRs (pixel_cfg); PCR3<12:9> selects the
// operation mode and the trigger source (Table 3.3 of the ALCOR design), and the PCR
// contents are brought out for the analogue front end. i_ratio and safety come from the
// EoC configuration register of the column.
// All of this follows the document's pixel block diagram; the FIFO and counters are the
// simplest circuits that do what it describes.
module alcor_pixel
  import alcor_pkg::*;
#(
  parameter int WD_CYCLES = 32768
) (
  input  logic        clk,
  input  logic        rst_n,       // global reset
  input  logic        cnt_rst_n,   // coarse-counter reset
  input  logic [2:0]  col_id,
  input  logic [2:0]  addr_in,
  output logic [2:0]  addr_out,
  input  logic        i_ratio,
  input  logic        safety,
  // front end
  input  logic        trg1,        // discriminator outputs (asynchronous)
  input  logic        trg2,
  input  logic        tp,          // test pulse
  output logic        tp_to_fe,    // test pulse routed to the front end
  output logic [15:0] pcr_out [4],
  // configuration from the EoC
  input  logic [4:0]  pcr_addr,
  input  logic [15:0] pcr_data,
  input  logic        pcr_write,
  // column chain
  input  logic        req_in,
  output logic        req_out,
  input  logic        grant_in,
  output logic        grant_out,
  input  logic [31:0] data_in,
  output logic [31:0] data_out,
  input  logic        freeze,
  input  logic        status_req
);
  logic [2:0]          my_addr;
  logic [15:0]         pcr [4];
  logic                tmr_mm;
  mode_e               mode;
  src_e                src;
  logic                t1, t2, t1_s, t2_s;
  logic [COARSE_W-1:0] coarse;
  logic [NTDC-1:0]     cmp, en, fall, sel2, clr, busy, tdc_line;
  logic                ev_valid, lost_trg, lost_fifo;
  logic [1:0]          ev_tdc;
  logic [COARSE_W-1:0] ev_coarse;
  logic [FINE_W-1:0]   ev_fine;
  event_t              ev;
  logic [31:0]         fifo_q;
  logic                fifo_empty, fifo_full, fifo_rd;
  logic [7:0]          seu_count;

  // self-assigned address
  always_ff @(posedge clk) begin
    if (!rst_n) my_addr <= '0;
    else        my_addr <= addr_in;
  end
  assign addr_out = my_addr + 3'd1;

  pixel_cfg u_cfg (
    .clk, .rst_n, .my_addr, .pcr_addr, .pcr_data, .pcr_write,
    .pcr, .tmr_mismatch(tmr_mm)
  );
  assign pcr_out = pcr;

  assign mode     = opmode_mode(pcr[3][12:9]);
  assign src      = opmode_src(pcr[3][12:9]);
  assign tp_to_fe = (src == SRC_TP_FE) && (mode != MODE_OFF) && tp;
  assign t1       = (mode == MODE_OFF) ? 1'b0 : (src == SRC_TP_TDC) ? tp : trg1;
  assign t2       = (mode == MODE_OFF) ? 1'b0 : (src == SRC_TP_TDC) ? tp : trg2;

  sync_dual_edge u_sync1 (.clk, .rst_n, .d_async(t1), .q(t1_s));
  sync_dual_edge u_sync2 (.clk, .rst_n, .d_async(t2), .q(t2_s));

  always_ff @(posedge clk) begin
    if (!cnt_rst_n || !rst_n) coarse <= '0;
    else                      coarse <= coarse + 1'b1;
  end

  tdc_ctrl #(.WD_CYCLES(WD_CYCLES)) u_ctrl (
    .clk, .rst_n, .mode, .i_ratio, .safety,
    .coarse_cnt (coarse),
    .trg1_s     (t1_s),
    .trg2_s     (t2_s),
    .cmp,
    .tdc_en     (en),
    .tdc_fall   (fall),
    .tdc_trg2   (sel2),
    .tdc_clr    (clr),
    .ev_valid, .ev_tdc, .ev_coarse, .ev_fine,
    .fifo_full, .lost_trg, .lost_fifo
  );

  for (genvar n = 0; n < NTDC; n++) begin : g_tdc
    assign tdc_line[n] = sel2[n] ? t2 : t1;
    tdc_analog u_tdc (
      .clk, .en(en[n]), .trg(tdc_line[n]), .fall(fall[n]), .i_ratio,
      .clr(clr[n]), .cmp_fail(1'b0), .cmp(cmp[n]), .busy(busy[n])
    );
  end

  always_comb begin
    ev.col    = col_id;
    ev.pix    = my_addr;
    ev.tdc    = ev_tdc;
    ev.coarse = ev_coarse;
    ev.fine   = ev_fine;
  end

  sync_fifo #(.W(32), .DEPTH(4)) u_fifo (
    .clk, .rst_n,
    .wr_en   (ev_valid),
    .wr_data (ev),
    .rd_en   (fifo_rd),
    .rd_data (fifo_q),
    .empty   (fifo_empty),
    .full    (fifo_full),
    .count   ()
  );

  pixel_data_ctrl u_data (
    .clk, .rst_n, .col_id, .my_addr,
    .fifo_empty, .fifo_data(fifo_q), .fifo_rd,
    .lost_trg, .lost_fifo,
    .req_in, .req_out, .grant_in, .grant_out, .data_in, .data_out,
    .freeze, .status_req, .seu_count
  );
endmodule
