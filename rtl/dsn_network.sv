// dsn_network: 4 x 6 distributed sensor network in the up-bottom topology.
// Nodes are numbered row by row, node r*COLS+c in row r and column c. Inside a row each
// node is linked to its left and right neighbours; inside a column each node is linked to
// the one below, and the bottom node of a column is linked back to the top node of the
// same column (up-bottom wrap). The left side of node 0 is the network input (words from a
// previous network) and the right side of the last node is the network output; the other
// sides on the left and right edge are not wired. Every link is the req / rdy / Manchester
// line triplet of dsn_io_ctrl in both directions.
// Each node has its own data source (gen_*), a fail input that turns it into a dead node,
// and reports its reachability flags and number of forwarded words.
// Array size, topology, input and output placement follow the document; the remaining
// parameters are this design's choices.
module dsn_network #(
  parameter int ROWS       = 4,
  parameter int COLS       = 6,
  parameter int W          = 32,
  parameter int HB         = 2,
  parameter int TIMEOUT    = 2048,
  parameter int FIFO_DEPTH = 8,
  localparam int N         = ROWS * COLS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] fail,
  input  logic [N-1:0] gen_valid,
  input  logic [W-1:0] gen_data [N],
  output logic [N-1:0] gen_ready,
  output logic [N-1:0] stopped,
  output logic [3:0]   reach [N],
  output logic [15:0]  n_fwd [N],
  // network input (left side of node 0)
  input  logic         in_req,
  output logic         in_rdy,
  input  logic         in_line,
  output logic         in_back_req,   // node 0 sending back to the input side
  input  logic         in_back_rdy,
  output logic         in_back_line,
  // network output (right side of the last node)
  output logic         out_req,
  input  logic         out_rdy,
  output logic         out_line,
  input  logic         out_back_req,
  output logic         out_back_rdy,
  input  logic         out_back_line
);
  logic [3:0] req_o [N], rdy_o [N], line_o [N];
  logic [3:0] req_i [N], rdy_i [N], line_i [N];
  logic [3:0] present [N];

  for (genvar r = 0; r < ROWS; r++) begin : g_r
    for (genvar c = 0; c < COLS; c++) begin : g_c
      localparam int K  = r * COLS + c;
      localparam int KR = r * COLS + c + 1;
      localparam int KL = r * COLS + c - 1;
      localparam int KD = ((r + 1) % ROWS) * COLS + c;
      localparam int KU = ((r + ROWS - 1) % ROWS) * COLS + c;

      assign present[K] = {1'b1, (c > 0) || (K == 0), 1'b1, (c < COLS - 1) || (K == N - 1)};

      // right side (0) <- left side (2) of the node on the right
      if (c < COLS - 1) begin : g_right
        assign req_i[K][0]  = req_o[KR][2];
        assign rdy_i[K][0]  = rdy_o[KR][2];
        assign line_i[K][0] = line_o[KR][2];
      end else if (K == N - 1) begin : g_out
        assign req_i[K][0]  = out_back_req;
        assign rdy_i[K][0]  = out_rdy;
        assign line_i[K][0] = out_back_line;
      end else begin : g_noright
        assign req_i[K][0]  = 1'b0;
        assign rdy_i[K][0]  = 1'b0;
        assign line_i[K][0] = 1'b0;
      end
      // left side (2) <- right side (0) of the node on the left
      if (c > 0) begin : g_left
        assign req_i[K][2]  = req_o[KL][0];
        assign rdy_i[K][2]  = rdy_o[KL][0];
        assign line_i[K][2] = line_o[KL][0];
      end else if (K == 0) begin : g_in
        assign req_i[K][2]  = in_req;
        assign rdy_i[K][2]  = in_back_rdy;
        assign line_i[K][2] = in_line;
      end else begin : g_noleft
        assign req_i[K][2]  = 1'b0;
        assign rdy_i[K][2]  = 1'b0;
        assign line_i[K][2] = 1'b0;
      end
      // down side (1) <- up side (3) of the node below (wrapping), and back
      assign req_i[K][1]  = req_o[KD][3];
      assign rdy_i[K][1]  = rdy_o[KD][3];
      assign line_i[K][1] = line_o[KD][3];
      assign req_i[K][3]  = req_o[KU][1];
      assign rdy_i[K][3]  = rdy_o[KU][1];
      assign line_i[K][3] = line_o[KU][1];

      dsn_pixel #(.W(W), .HB(HB), .TIMEOUT(TIMEOUT), .FIFO_DEPTH(FIFO_DEPTH)) u_node (
        .clk(clk), .rst_n(rst_n), .fail(fail[K]), .present(present[K]),
        .gen_valid(gen_valid[K]), .gen_data(gen_data[K]), .gen_ready(gen_ready[K]),
        .stopped(stopped[K]), .reach(reach[K]),
        .req_o(req_o[K]), .rdy_i(rdy_i[K]), .line_o(line_o[K]),
        .req_i(req_i[K]), .rdy_o(rdy_o[K]), .line_i(line_i[K]), .n_fwd(n_fwd[K])
      );
    end
  end

  assign in_rdy       = rdy_o[0][2];
  assign in_back_req  = req_o[0][2];
  assign in_back_line = line_o[0][2];
  assign out_req      = req_o[N-1][0];
  assign out_line     = line_o[N-1][0];
  assign out_back_rdy = rdy_o[N-1][0];
endmodule
