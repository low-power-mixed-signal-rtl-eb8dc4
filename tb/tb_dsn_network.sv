// Testbench for the distributed sensor network (dsn_network with its nodes, I/O and
// direction controllers and Manchester coder). A sender on the network input and a receiver
// on the network output are dsn_io_ctrl instances. Every node produces numbered words
// {node, sequence}; every word must reach the output exactly once, with correct contents.
// Run 1: all nodes working (words flow right and down to node 23). Run 2: two nodes broken
// (fail held from reset); words of all working nodes must still arrive, the neighbours of a
// broken node must have marked it unreachable and detoured. The checks also count the
// Manchester frames seen on the output line and the time a word needs to cross the array.
module tb_dsn_network;
  localparam int ROWS = 4, COLS = 6, N = ROWS * COLS, W = 32, PER_NODE = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] fail = '0, gen_valid = '0, gen_ready, stopped;
  logic [W-1:0] gen_data [N];
  logic [3:0]   reach [N];
  logic [15:0]  n_fwd [N];
  logic in_req, in_rdy, in_line, in_back_req, in_back_rdy, in_back_line;
  logic out_req, out_rdy, out_line, out_back_req, out_back_rdy, out_back_line;
  // input sender
  logic snd, snd_sent, snd_nr, snd_busy, snd_rxv;
  logic [W-1:0] snd_data, snd_rxd;
  // output receiver
  logic rcv_v, rcv_perr;
  logic [W-1:0] rcv_d;
  int checks = 0, failures = 0;
  int got [int];
  int n_frames = 0;

  dsn_network #(.ROWS(ROWS), .COLS(COLS)) dut (
    .clk, .rst_n, .fail, .gen_valid, .gen_data, .gen_ready, .stopped, .reach, .n_fwd,
    .in_req, .in_rdy, .in_line, .in_back_req, .in_back_rdy, .in_back_line,
    .out_req, .out_rdy, .out_line, .out_back_req, .out_back_rdy, .out_back_line
  );

  dsn_io_ctrl #(.W(W), .YIELD(1'b1)) u_src (
    .clk, .rst_n, .send(snd), .send_data(snd_data), .sent(snd_sent), .no_resp(snd_nr),
    .busy(snd_busy), .can_rx(1'b1), .rx_valid(snd_rxv), .rx_data(snd_rxd), .rx_perr(),
    .req_o(in_req), .rdy_i(in_rdy), .line_o(in_line),
    .req_i(in_back_req), .rdy_o(in_back_rdy), .line_i(in_back_line)
  );

  dsn_io_ctrl #(.W(W), .YIELD(1'b0)) u_dst (
    .clk, .rst_n, .send(1'b0), .send_data('0), .sent(), .no_resp(), .busy(),
    .can_rx(1'b1), .rx_valid(rcv_v), .rx_data(rcv_d), .rx_perr(rcv_perr),
    .req_o(out_back_req), .rdy_i(1'b0), .line_o(out_back_line),
    .req_i(out_req), .rdy_o(out_rdy), .line_i(out_line)
  );

  always #5ns clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL: %s", msg);
    end
  endtask

  always @(posedge clk) begin
    if (rcv_v && rst_n) begin
      if (got.exists(int'(rcv_d))) got[int'(rcv_d)]++;
      else got[int'(rcv_d)] = 1;
    end
    if (rcv_perr && rst_n) check(0, "parity error on the output link");
    if (out_req && !$past(out_req)) n_frames++;
  end

  // node n produces PER_NODE words, one at a time
  for (genvar n = 0; n < N; n++) begin : g_gen
    initial begin
      gen_data[n] = '0;
      forever begin
        @(posedge rst_n);
        for (int s = 0; s < PER_NODE; s++) begin
          repeat (int'($urandom_range(100, 12000))) @(posedge clk);
          #1ns;
          gen_valid[n] = 1'b1;
          gen_data[n]  = {8'hA0, 8'(n), 16'(s)};
          @(posedge clk);
          while (!gen_ready[n] && rst_n) @(posedge clk);
          #1ns gen_valid[n] = 1'b0;
        end
      end
    end
  end

  task automatic run(input string what, input logic [N-1:0] broken);
    int ok_words;
    got.delete();
    fail = broken;
    snd = 1'b0;
    snd_data = '0;
    rst_n = 1'b0;
    repeat (5) @(posedge clk);
    #1ns rst_n = 1'b1;
    // ten words from a previous network through the input
    for (int s = 0; s < 10; s++) begin
      @(negedge clk);
      snd = 1'b1;
      snd_data = {16'hB000, 16'(s)};
      @(posedge snd_sent or posedge snd_nr);
      @(negedge clk);
      snd = 1'b0;
      repeat (3) @(negedge clk);
    end
    repeat (120000) @(posedge clk);
    ok_words = 0;
    for (int n = 0; n < N; n++) begin
      if (broken[n]) continue;
      for (int s = 0; s < PER_NODE; s++) begin
        int key;
        key = int'({8'hA0, 8'(n), 16'(s)});
        check(got.exists(key) && got[key] == 1,
              $sformatf("%s: word %0d of node %0d arrived %0d times", what, s, n,
                        got.exists(key) ? got[key] : 0));
        if (got.exists(key)) ok_words++;
      end
    end
    for (int s = 0; s < 10; s++)
      check(got.exists(int'({16'hB000, 16'(s)})), $sformatf("%s: input word %0d passed through", what, s));
    $display("%s: %0d node words and %0d frames at the output", what, ok_words, n_frames);
  endtask

  initial begin
    #50ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int detours;
    run("all nodes working", '0);
    for (int n = 0; n < N; n++) check(!stopped[n], "no node stopped");
    check(n_fwd[N-1] == 16'(N * PER_NODE + 10), "last node forwarded every word");
    // nodes 9 (row 1, column 3) and 16 (row 2, column 4) broken
    run("two nodes broken", (24'd1 << 9) | (24'd1 << 16));
    check(reach[8][0] == 1'b0, "node 8 marked its right neighbour (9) unreachable");
    check(reach[15][0] == 1'b0, "node 15 marked its right neighbour (16) unreachable");
    check(reach[3] == 4'b1111 && reach[10] == 4'b1111, "nodes that never needed the broken ones keep all sides");
    detours = 0;
    for (int n = 0; n < N; n++) if (reach[n][2] == 1'b0 || reach[n][3] == 1'b0) detours++;
    check(n_frames > 0, "Manchester frames seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
