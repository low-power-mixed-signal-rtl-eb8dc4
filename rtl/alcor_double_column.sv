// alcor_double_column: two pixel columns with their end-of-column logic and one serial
// output. Each column is a daisy chain of NPIX pixels (pixel 0 at the top gets address 0
// from a zero register and passes address + 1 downwards); the bottom pixel talks to the
// column's eoc_column controller. The two controllers feed eoc_merge, whose output FIFO is
// emptied by ddr_serializer onto the line q. The double-column ECCR sets the column enables,
// i_ratio and safety bits, status words, raw mode, serialiser, encoder and align mode.
// PCR writes from the SPI are broadcast down the column named by pcr_col.
// The chain signals (req, grant, data) are arrays indexed by chain position; Verilator
// reports them as circular combinational logic (UNOPTFLAT) because one array variable is
// both read and written by the pixels along the chain. Each element has a single driver:
// req and data flow down the chain, grant flows up, each element depends only on the
// element before it in its own direction and on pixel state registers, so there is no
// real combinational loop; the warning only costs simulation speed.
// Structure per the document (four pixels per column, two columns per LVDS line).
module alcor_double_column
  import alcor_pkg::*;
#(
  parameter int          NPIX      = 4,
  parameter logic [1:0]  DCOL      = 2'd0,     // double-column index
  parameter int          WD_CYCLES = 32768
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cnt_rst_n,
  input  logic [15:0] eccr,
  input  logic [2:0]  pcr_col,
  input  logic [4:0]  pcr_addr,
  input  logic [15:0] pcr_data,
  input  logic        pcr_write,
  input  logic        trg1 [2][NPIX],
  input  logic        trg2 [2][NPIX],
  input  logic        tp,
  output logic        tp_to_fe [2][NPIX],
  output logic [15:0] pcr_out [2][NPIX][4],
  input  logic        loss_clr,
  output logic [15:0] eoc_status,     // {out_loss, in_loss}
  output logic [15:0] frame_no,
  output logic        q
);
  logic [2:0]  addr  [2][NPIX+1];
  logic        req   [2][NPIX+1];
  logic        grant [2][NPIX+1];
  logic [31:0] data  [2][NPIX+1];
  logic        freeze [2], status_req [2], status_done [2];
  logic        status_cmd;
  logic [31:0] status_word [2][NPIX];
  logic [1:0]  col_rd [2];
  logic [31:0] col_data [2][2];
  logic [1:0]  col_empty [2];
  logic [7:0]  in_loss [2];
  logic [7:0]  out_loss;
  logic [32:0] of_data;
  logic        of_empty, of_rd;
  logic [31:0] crc_unused;
  logic        col_en [2];
  logic        i_ratio [2];
  logic        safety [2];

  assign col_en[0]  = eccr[0];
  assign safety[0]  = eccr[1];
  assign i_ratio[0] = eccr[2];
  assign col_en[1]  = eccr[3];
  assign safety[1]  = eccr[4];
  assign i_ratio[1] = eccr[5];

  for (genvar c = 0; c < 2; c++) begin : g_col
    localparam logic [2:0] COL = {DCOL, 1'(c)};
    assign addr[c][0]  = 3'd0;           // zero register above the column
    assign req[c][0]   = 1'b0;
    assign data[c][0]  = '1;             // idle bus is all ones
    for (genvar p = 0; p < NPIX; p++) begin : g_pix
      alcor_pixel #(.WD_CYCLES(WD_CYCLES)) u_pix (
        .clk, .rst_n, .cnt_rst_n,
        .col_id     (COL),
        .addr_in    (addr[c][p]),
        .addr_out   (addr[c][p+1]),
        .i_ratio    (i_ratio[c]),
        .safety     (safety[c]),
        .trg1       (trg1[c][p]),
        .trg2       (trg2[c][p]),
        .tp,
        .tp_to_fe   (tp_to_fe[c][p]),
        .pcr_out    (pcr_out[c][p]),
        .pcr_addr,
        .pcr_data,
        .pcr_write  (pcr_write && pcr_col == COL),
        .req_in     (req[c][p]),
        .req_out    (req[c][p+1]),
        .grant_in   (grant[c][p+1]),
        .grant_out  (grant[c][p]),
        .data_in    (data[c][p]),
        .data_out   (data[c][p+1]),
        .freeze     (freeze[c]),
        .status_req (status_req[c])
      );
    end

    eoc_column #(.NPIX(NPIX)) u_eoc (
      .clk, .rst_n,
      .enable      (col_en[c]),
      .req         (req[c][NPIX]),
      .grant       (grant[c][NPIX]),
      .data_in     (data[c][NPIX]),
      .freeze      (freeze[c]),
      .status_req  (status_req[c]),
      .status_cmd,
      .status_done (status_done[c]),
      .status_word (status_word[c]),
      .rd_en       (col_rd[c]),
      .rd_data     (col_data[c]),
      .empty       (col_empty[c]),
      .in_loss     (in_loss[c]),
      .loss_clr
    );
  end

  eoc_merge #(.NPIX(NPIX)) u_merge (
    .clk, .rst_n, .cnt_rst_n,
    .status_en   (eccr[15]),
    .raw_mode    (eccr[11]),
    .col_rd, .col_data, .col_empty,
    .col_status  (status_word),
    .col_in_loss (in_loss),
    .status_cmd, .loss_clr, .out_loss,
    .of_rd, .of_data, .of_empty,
    .frame_no,
    .crc         (crc_unused)
  );

  ddr_serializer u_ser (
    .clk, .rst_n,
    .ser_en (eccr[13]),
    .enc_en (eccr[12]),
    .align  (eccr[14]),
    .of_data, .of_empty, .of_rd,
    .q
  );

  assign eoc_status = {out_loss, 8'(in_loss[0] + in_loss[1])};
endmodule
