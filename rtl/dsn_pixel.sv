// dsn_pixel: data-transmission part of one node of the distributed sensor network.
// The node stores its own words (gen_*) and the words received from its four neighbours in
// a FIFO of FIFO_DEPTH words. The word at the head of the FIFO is sent on the side chosen
// by dsn_direction_ctrl (right, down, left, up, first reachable); it is removed from the
// FIFO when the transfer completes, and retried on the next reachable side if the
// neighbour does not answer. When no side is reachable the node stops accepting its own
// data (gen_ready low, stopped high). Words received on a side are parked in a one-word
// buffer per side, which also tells the I/O controller whether it may accept a new frame;
// parked words enter the FIFO one per clock in round-robin order over the sides (a fixed
// order starves one side under load until its sender times out and declares this node
// dead); the own word is taken when no parked word waits. fail models a broken node: all its link outputs are forced low and its
// inputs ignored, so the neighbours see a node that never answers.
// Interface: link arrays indexed by side (0 right, 1 down, 2 left, 3 up); present marks
// the sides that are wired to something.
// FIFO depth and the arbitration order are this design's choices; the routing behaviour
// follows the document.
module dsn_pixel #(
  parameter int W          = 32,
  parameter int HB         = 2,
  parameter int TIMEOUT    = 2048,
  parameter int FIFO_DEPTH = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         fail,
  input  logic [3:0]   present,
  input  logic         gen_valid,
  input  logic [W-1:0] gen_data,
  output logic         gen_ready,
  output logic         stopped,
  output logic [3:0]   reach,
  output logic [3:0]   req_o,
  input  logic [3:0]   rdy_i,
  output logic [3:0]   line_o,
  input  logic [3:0]   req_i,
  output logic [3:0]   rdy_o,
  input  logic [3:0]   line_i,
  output logic [15:0]  n_fwd       // words that left this node
);
  logic [3:0]   send, sent, no_resp, busy, can_rx, rx_valid;
  logic [W-1:0] rx_data [4];
  logic [3:0]   park_v;
  logic [W-1:0] park_d [4];
  logic [3:0]   req_oi, rdy_oi, line_oi;
  logic [3:0]   rdy_ii, req_ii, line_ii;
  logic [1:0]   dir;
  logic         all_dead;

  logic         f_wr, f_rd, f_empty, f_full;
  logic [W-1:0] f_wdata, f_rdata;
  logic         tx_act;
  logic [1:0]   tx_dir;

  assign req_o   = fail ? 4'b0 : req_oi;
  assign rdy_o   = fail ? 4'b0 : rdy_oi;
  assign line_o  = fail ? 4'b0 : line_oi;
  assign req_ii  = fail ? 4'b0 : (req_i  & present);
  assign rdy_ii  = fail ? 4'b0 : (rdy_i  & present);
  assign line_ii = fail ? 4'b0 : (line_i & present);

  for (genvar d = 0; d < 4; d++) begin : g_io
    dsn_io_ctrl #(.W(W), .HB(HB), .TIMEOUT(TIMEOUT), .YIELD(d < 2)) u_io (
      .clk(clk), .rst_n(rst_n),
      .send(send[d]), .send_data(f_rdata), .sent(sent[d]), .no_resp(no_resp[d]),
      .busy(busy[d]), .can_rx(can_rx[d]), .rx_valid(rx_valid[d]), .rx_data(rx_data[d]),
      .rx_perr(),
      .req_o(req_oi[d]), .rdy_i(rdy_ii[d]), .line_o(line_oi[d]),
      .req_i(req_ii[d]), .rdy_o(rdy_oi[d]), .line_i(line_ii[d])
    );
    assign can_rx[d]  = !park_v[d];
  end

  dsn_direction_ctrl u_dir (
    .clk(clk), .rst_n(rst_n), .present(present), .dead_set(no_resp), .rx_from(rx_valid[1:0]),
    .reach(reach), .dir(dir), .all_dead(all_dead)
  );

  sync_fifo #(.W(W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk(clk), .rst_n(rst_n), .wr_en(f_wr), .wr_data(f_wdata), .rd_en(f_rd),
    .rd_data(f_rdata), .empty(f_empty), .full(f_full), .count()
  );

  assign stopped   = all_dead;
  assign gen_ready = !all_dead && !f_full && !fail;

  // FIFO write arbitration: parked words round robin, then the own word
  logic [2:0] wsel;
  logic [1:0] rr, cand;
  always_comb begin
    wsel = 3'd7;
    for (int i = 3; i >= 0; i--) begin
      cand = rr + 2'(i);
      if (park_v[cand]) wsel = {1'b0, cand};
    end
    if (wsel == 3'd7 && gen_valid && gen_ready) wsel = 3'd4;
    f_wr    = !f_full && (wsel != 3'd7);
    f_wdata = (wsel == 3'd4) ? gen_data : (wsel < 3'd4 ? park_d[wsel[1:0]] : '0);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      park_v <= '0;
      rr     <= '0;
      for (int d = 0; d < 4; d++) park_d[d] <= '0;
    end else begin
      if (f_wr && wsel < 3'd4) rr <= wsel[1:0] + 2'd1;
      for (int d = 0; d < 4; d++) begin
        if (f_wr && wsel == 3'(d)) park_v[d] <= 1'b0;
        if (rx_valid[d]) begin
          park_v[d] <= 1'b1;
          park_d[d] <= rx_data[d];
        end
      end
    end
  end

  // transmit side: one transfer at a time
  always_comb begin
    send = '0;
    if (tx_act && !sent[tx_dir] && !no_resp[tx_dir]) send[tx_dir] = 1'b1;
  end
  assign f_rd = tx_act && sent[tx_dir];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tx_act <= 1'b0;
      tx_dir <= '0;
      n_fwd  <= '0;
    end else if (!tx_act) begin
      if (!f_empty && !all_dead && !fail && !busy[dir]) begin
        tx_act <= 1'b1;
        tx_dir <= dir;
      end
    end else if (sent[tx_dir]) begin
      tx_act <= 1'b0;
      n_fwd  <= n_fwd + 1'b1;
    end else if (no_resp[tx_dir]) begin
      tx_act <= 1'b0;                     // retry on the next reachable side
    end
  end
endmodule
