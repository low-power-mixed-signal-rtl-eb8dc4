// dsn_io_ctrl: I/O controller of one side (right, down, left or up) of a network node.
// Each side of a node owns a point-to-point link to the neighbour made of three wires per
// direction: req (request to send), rdy (ready to receive) and the Manchester data line.
// Sending: when send is asserted the controller raises req_o and waits for rdy_i; one
// cycle later it starts the Manchester frame (three-cycle request / ready / start
// handshake). When the frame has been sent it drops req_o, waits for rdy_i to fall and
// pulses sent. If rdy_i does not come within TIMEOUT cycles it drops req_o and pulses
// no_resp (the direction controller then marks this side unreachable).
// Receiving: when req_i rises while idle, and the node can accept a word (can_rx), the
// controller raises rdy_o and decodes the frame; it pulses rx_valid with the word (only if
// the parity is correct) and holds rdy_o until req_i falls.
// Collision: if both ends request at the same time, the node on the right/bottom side of
// the link keeps the link (YIELD=0 on its left/up sides) and the other one (YIELD=1 on its
// right/down sides) withdraws its request and receives first.
// The handshake, the timeout reaction and the collision priority follow the document; the
// exact state sequence and the TIMEOUT value are this design's choices.
module dsn_io_ctrl #(
  parameter int W       = 32,
  parameter int HB      = 2,
  parameter int TIMEOUT = 2048,
  parameter bit YIELD   = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  // node side
  input  logic         send,
  input  logic [W-1:0] send_data,
  output logic         sent,
  output logic         no_resp,
  output logic         busy,
  input  logic         can_rx,
  output logic         rx_valid,
  output logic [W-1:0] rx_data,
  output logic         rx_perr,
  // link side
  output logic         req_o,
  input  logic         rdy_i,
  output logic         line_o,
  input  logic         req_i,
  output logic         rdy_o,
  input  logic         line_i
);
  typedef enum logic [2:0] {IO_IDLE, IO_REQ, IO_START, IO_SEND, IO_REL, IO_RX, IO_RXEND} io_e;
  io_e st;
  logic [$clog2(TIMEOUT+1)-1:0] tmo;
  logic tx_start, tx_done;
  logic rxv, rx_pok;
  logic [W-1:0] rxd;
  logic [W-1:0] hold;

  manchester_tx #(.W(W), .HB(HB)) u_tx (
    .clk(clk), .rst_n(rst_n), .start(tx_start), .data(hold),
    .line(line_o), .busy(), .done(tx_done)
  );
  manchester_rx #(.W(W), .HB(HB)) u_rx (
    .clk(clk), .rst_n(rst_n), .enable(st == IO_RX), .line(line_i),
    .valid(rxv), .data(rxd), .parity_ok(rx_pok)
  );

  assign tx_start = (st == IO_START);
  assign busy     = (st != IO_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st       <= IO_IDLE;
      tmo      <= '0;
      req_o    <= 1'b0;
      rdy_o    <= 1'b0;
      sent     <= 1'b0;
      no_resp  <= 1'b0;
      rx_valid <= 1'b0;
      rx_data  <= '0;
      rx_perr  <= 1'b0;
      hold     <= '0;
    end else begin
      sent     <= 1'b0;
      no_resp  <= 1'b0;
      rx_valid <= 1'b0;
      rx_perr  <= 1'b0;
      unique case (st)
        IO_IDLE: begin
          if (req_i && can_rx) begin
            rdy_o <= 1'b1;
            st    <= IO_RX;
          end else if (send && !req_i) begin
            req_o <= 1'b1;
            hold  <= send_data;
            tmo   <= '0;
            st    <= IO_REQ;
          end
        end
        IO_REQ: begin
          if (req_i && YIELD && can_rx) begin
            req_o <= 1'b0;                 // the right/bottom neighbour has priority
            rdy_o <= 1'b1;
            st    <= IO_RX;
          end else if (rdy_i) begin
            st <= IO_START;
          end else if (int'(tmo) == TIMEOUT - 1) begin
            req_o   <= 1'b0;
            no_resp <= 1'b1;
            st      <= IO_IDLE;
          end else begin
            tmo <= tmo + 1'b1;
          end
        end
        IO_START: st <= IO_SEND;
        IO_SEND: begin
          if (tx_done) begin
            req_o <= 1'b0;
            st    <= IO_REL;
          end
        end
        IO_REL: begin
          if (!rdy_i) begin
            sent <= 1'b1;
            st   <= IO_IDLE;
          end
        end
        IO_RX: begin
          if (rxv) begin
            rx_valid <= rx_pok;
            rx_perr  <= !rx_pok;
            rx_data  <= rxd;
            st       <= IO_RXEND;
          end else if (!req_i) begin       // sender gave up
            rdy_o <= 1'b0;
            st    <= IO_IDLE;
          end
        end
        IO_RXEND: begin
          if (!req_i) begin
            rdy_o <= 1'b0;
            st    <= IO_IDLE;
          end
        end
        default: st <= IO_IDLE;
      endcase
    end
  end
endmodule
