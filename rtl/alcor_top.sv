// alcor_top: digital top of the ALCOR SiPM readout chip: a matrix of 8 columns x 4 pixels,
// read out by four double-column ends of column, each driving one serial line q[i]
// (columns 2i and 2i+1), configured through SPI.
// The analogue parts are outside this RTL: the front ends deliver their discriminator
// outputs on trg1/trg2 (one per pixel, in place of the Ispm sensor pins), take the test
// pulse on tp_to_fe and their settings from pcr_out (per pixel) and bcr (per double
// column); the LVDS drivers sit behind q, sdo and clk_out. The TDCs are included as
// behavioural models inside each pixel.
// The external reset ext_nres is decoded by length (reset_ctrl): 10 low cycles clear the
// coarse counters, 24 reset the whole chip including the configuration. After reset the
// pixels are in LET mode and, as in the document's ECCR default, all columns and outputs
// are disabled until ECCR is written.
// The distributed sensor network (dsn_network, 4 x 6 nodes) is a separate design from the
// same document; it stands beside the chip with its own dsn_* ports and its own clock and
// reset, and shares no signal with the readout.
// Matrix size, pin list and partition follow the document.
module alcor_top
  import alcor_pkg::*;
#(
  parameter int NCOL      = 8,
  parameter int NPIX      = 4,
  parameter int WD_CYCLES = 32768
) (
  input  logic        ext_clk,
  input  logic        ext_nres,
  input  logic        sclk,
  input  logic        ss_n,
  input  logic        sdi,
  output logic        sdo,
  input  logic        tp,
  input  logic        trg1 [NCOL][NPIX],
  input  logic        trg2 [NCOL][NPIX],
  output logic        tp_to_fe [NCOL][NPIX],
  output logic [15:0] pcr_out [NCOL][NPIX][4],
  output logic [15:0] bcr [NCOL],
  output logic        clk_out,
  output logic [NCOL/2-1:0] q,
  // distributed sensor network, independent of the readout chip
  input  logic        dsn_clk,
  input  logic        dsn_rst_n,
  input  logic [23:0] dsn_fail,
  input  logic [23:0] dsn_gen_valid,
  input  logic [31:0] dsn_gen_data [24],
  output logic [23:0] dsn_gen_ready,
  output logic [23:0] dsn_stopped,
  output logic [3:0]  dsn_reach [24],
  output logic [15:0] dsn_n_fwd [24],
  input  logic        dsn_in_req,
  output logic        dsn_in_rdy,
  input  logic        dsn_in_line,
  output logic        dsn_in_back_req,
  input  logic        dsn_in_back_rdy,
  output logic        dsn_in_back_line,
  output logic        dsn_out_req,
  input  logic        dsn_out_rdy,
  output logic        dsn_out_line,
  input  logic        dsn_out_back_req,
  output logic        dsn_out_back_rdy,
  input  logic        dsn_out_back_line
);
  localparam int NDCOL = NCOL / 2;

  logic        cnt_rst_n, rst_n;
  logic [15:0] pointer, reg_wdata, reg_rdata;
  logic        reg_we, reg_re, eoc_clr;
  logic [15:0] eccr [NDCOL];
  logic [2:0]  pcr_col;
  logic [4:0]  pcr_addr;
  logic [15:0] pcr_data;
  logic        pcr_write;
  logic [15:0] eoc_status [NDCOL];
  logic [15:0] frame_no [NDCOL];

  assign clk_out = ext_clk;

  reset_ctrl u_rst (.clk(ext_clk), .ext_nres, .cnt_rst_n, .glb_rst_n(rst_n));

  spi_slave u_spi (
    .clk(ext_clk), .rst_n, .sclk, .ss_n, .sdi, .sdo,
    .pointer, .reg_we, .reg_re, .reg_wdata, .reg_rdata,
    .eoc_status     (eoc_status[pointer[1:0]]),
    .eoc_status_clr (eoc_clr)
  );

  eoc_config #(.NDCOL(NDCOL)) u_cfg (
    .clk(ext_clk), .rst_n, .pointer, .reg_we, .reg_wdata, .reg_rdata,
    .bcr, .eccr, .pcr_col, .pcr_addr, .pcr_data, .pcr_write
  );

  for (genvar d = 0; d < NDCOL; d++) begin : g_dcol
    logic        t1 [2][NPIX], t2 [2][NPIX], tpf [2][NPIX];
    logic [15:0] po [2][NPIX][4];
    for (genvar c = 0; c < 2; c++) begin : g_c
      for (genvar p = 0; p < NPIX; p++) begin : g_p
        assign t1[c][p] = trg1[2*d+c][p];
        assign t2[c][p] = trg2[2*d+c][p];
        assign tp_to_fe[2*d+c][p] = tpf[c][p];
        assign pcr_out[2*d+c][p]  = po[c][p];
      end
    end
    alcor_double_column #(.NPIX(NPIX), .DCOL(2'(d)), .WD_CYCLES(WD_CYCLES)) u_dc (
      .clk(ext_clk), .rst_n, .cnt_rst_n,
      .eccr      (eccr[d]),
      .pcr_col, .pcr_addr, .pcr_data, .pcr_write,
      .trg1      (t1),
      .trg2      (t2),
      .tp,
      .tp_to_fe  (tpf),
      .pcr_out   (po),
      .loss_clr  (eoc_clr),
      .eoc_status(eoc_status[d]),
      .frame_no  (frame_no[d]),
      .q         (q[d])
    );
  end

  dsn_network u_dsn (
    .clk(dsn_clk), .rst_n(dsn_rst_n), .fail(dsn_fail), .gen_valid(dsn_gen_valid),
    .gen_data(dsn_gen_data), .gen_ready(dsn_gen_ready), .stopped(dsn_stopped),
    .reach(dsn_reach), .n_fwd(dsn_n_fwd),
    .in_req(dsn_in_req), .in_rdy(dsn_in_rdy), .in_line(dsn_in_line),
    .in_back_req(dsn_in_back_req), .in_back_rdy(dsn_in_back_rdy), .in_back_line(dsn_in_back_line),
    .out_req(dsn_out_req), .out_rdy(dsn_out_rdy), .out_line(dsn_out_line),
    .out_back_req(dsn_out_back_req), .out_back_rdy(dsn_out_back_rdy),
    .out_back_line(dsn_out_back_line)
  );
endmodule
