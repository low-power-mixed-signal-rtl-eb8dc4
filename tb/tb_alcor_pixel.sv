// Testbench for alcor_pixel (with its TDC control, analogue TDC models, FIFO, configuration
// registers and column readout logic), read out through one eoc_column.
// Triggers are driven at random sub-cycle times. For every expected time stamp the
// testbench works out T1 (first rising clock edge after the trigger edge if the clock is
// high, else the second), the fine count N = round(IF*(T1-T0)/Tclk) and the coarse count
// held by the counter at T1, and compares the 32-bit words that reach the EoC FIFOs
// (column, pixel, TDC, coarse, fine) with that list. Scenarios: configuration registers,
// LET with both interpolation factors, trigger loss with all TDCs busy, ToT, ToT2, SR and
// SR abort, the ToT watchdog, FIFO overflow, test-pulse modes, mode off and the status word
// with its loss counters.
module tb_alcor_pixel;
  import alcor_pkg::*;
  localparam int   WD     = 300;        // shortened ToT watchdog for the test
  localparam realtime TCLK = 10ns;       // in the module's time unit
  localparam logic [2:0] COL = 3'd5, ADDR = 3'd3;

  logic clk = 1'b0, rst_n = 1'b0, cnt_rst_n = 1'b0;
  logic i_ratio = 1'b0, safety = 1'b0;
  logic trg1 = 1'b0, trg2 = 1'b0, tp = 1'b0, tp_to_fe;
  logic [15:0] pcr_out [4];
  logic [4:0]  pcr_addr = '0;
  logic [15:0] pcr_data = '0;
  logic        pcr_write = 1'b0;
  logic [2:0]  addr_out;
  logic        req, grant, freeze, status_req;
  logic        grant_top;
  logic [31:0] data_out;
  logic        en = 1'b1, status_cmd = 1'b0, status_done;
  logic [31:0] status_word [1];
  logic [1:0]  rd_en, empty;
  logic [31:0] rd_data [2];
  logic [7:0]  in_loss;
  logic [COARSE_W-1:0] mirror;

  int checks = 0, failures = 0;
  logic [31:0] expq[$], gotq[$];

  alcor_pixel #(.WD_CYCLES(WD)) dut (
    .clk, .rst_n, .cnt_rst_n, .col_id(COL), .addr_in(ADDR), .addr_out,
    .i_ratio, .safety, .trg1, .trg2, .tp, .tp_to_fe, .pcr_out,
    .pcr_addr, .pcr_data, .pcr_write,
    .req_in(1'b0), .req_out(req), .grant_in(grant), .grant_out(grant_top),
    .data_in('1), .data_out, .freeze, .status_req
  );

  eoc_column #(.NPIX(1)) eoc (
    .clk, .rst_n, .enable(en), .req, .grant, .data_in(data_out), .freeze, .status_req,
    .status_cmd, .status_done, .status_word, .rd_en, .rd_data, .empty, .in_loss,
    .loss_clr(1'b0)
  );

  always #5ns clk = ~clk;

  // copy of the coarse counter
  always_ff @(posedge clk) begin
    if (!rst_n || !cnt_rst_n) mirror <= '0;
    else                      mirror <= mirror + 1'b1;
  end

  // pop the EoC FIFOs
  assign rd_en = ~empty;
  always @(posedge clk) begin
    if (rst_n) begin
      if (!empty[0]) gotq.push_back(rd_data[0]);
      if (!empty[1]) gotq.push_back(rd_data[1]);
    end
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // expected word for a TDC that sees an edge now
  task automatic stamp(input int tdc, input logic ir);
    fork
      begin
        realtime t0;
        int n;
        logic [COARSE_W-1:0] c;
        event_t w;
        t0 = $realtime;
        n  = clk ? 1 : 2;
        repeat (n) @(posedge clk);
        c = mirror;                              // value held at T1
        w.col    = COL;
        w.pix    = ADDR;
        w.tdc    = 2'(tdc);
        w.coarse = c;
        w.fine   = FINE_W'(int'(((ir ? 128.0 : 64.0) * ($realtime - t0)) / TCLK));
        expq.push_back(w);
      end
    join_none
  endtask

  task automatic wr_pcr(input logic [2:0] a, input logic [1:0] r, input logic [15:0] v);
    @(negedge clk);
    pcr_addr  = {a, r};
    pcr_data  = v;
    pcr_write = 1'b1;
    @(negedge clk);
    pcr_write = 1'b0;
  endtask

  task automatic set_mode(input logic [3:0] m);
    wr_pcr(ADDR, 2'd3, (16'h023C & ~16'h1E00) | {3'b0, m, 9'b0});
  endtask

  // wait at a random sub-cycle offset (avoids landing exactly on a clock edge)
  task automatic rnd_delay(input int cycles);
    #(cycles * 10ns + $urandom_range(100, 9900) * 1ps);
  endtask

  // compare what arrived with what was expected, in any order
  task automatic compare(input string what);
    int hit;
    repeat (400) @(posedge clk);
    check(gotq.size() == expq.size(),
          $sformatf("%s: %0d words expected, %0d received", what, expq.size(), gotq.size()));
    foreach (expq[i]) begin
      hit = -1;
      foreach (gotq[j]) if (hit < 0 && gotq[j] == expq[i]) hit = j;
      check(hit >= 0, $sformatf("%s: expected word %h (tdc %0d coarse %0d fine %0d) missing",
                                what, expq[i], expq[i][25:24], expq[i][23:9], expq[i][8:0]));
      if (hit >= 0) gotq.delete(hit);
    end
    foreach (gotq[j])
      $display("  %s: unexpected word %h (tdc %0d coarse %0d fine %0d)", what, gotq[j],
               gotq[j][25:24], gotq[j][23:9], gotq[j][8:0]);
    expq.delete();
    gotq.delete();
  endtask

  task automatic get_status(output status_t s);
    @(negedge clk);
    status_cmd = 1'b1;
    @(negedge clk);
    status_cmd = 1'b0;
    wait (status_done);
    @(negedge clk);
    s = status_word[0];
  endtask

  initial begin
    #20ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    status_t st;
    int tdc;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    cnt_rst_n = 1'b1;
    repeat (3) @(negedge clk);
    // ---- configuration registers
    check(pcr_out[0] == 16'h7777 && pcr_out[1] == 16'h8888 && pcr_out[2] == 16'hFFFF &&
          pcr_out[3] == 16'h023C, "PCR defaults");
    check(addr_out == ADDR + 3'd1, "address passed on incremented");
    wr_pcr(ADDR + 3'd1, 2'd0, 16'h1234);
    check(pcr_out[0] == 16'h7777, "write to another pixel ignored");
    wr_pcr(ADDR, 2'd0, 16'h1234);
    wr_pcr(ADDR, 2'd2, 16'hBEEF);
    check(pcr_out[0] == 16'h1234 && pcr_out[2] == 16'hBEEF && pcr_out[1] == 16'h8888,
          "write to own PCR0 / PCR2");
    // ---- LET, IF = 64 then 128: TDCs used in round-robin order
    tdc = 0;
    for (int r = 0; r < 2; r++) begin
      i_ratio = 1'(r);
      repeat (2) @(negedge clk);
      for (int i = 0; i < 24; i++) begin
        rnd_delay(int'($urandom_range(150, 300)));
        trg1 = 1'b1;
        stamp(tdc, i_ratio);
        tdc = (tdc + 1) % 4;
        rnd_delay(int'($urandom_range(1, 20)));
        trg1 = 1'b0;
      end
      compare(r == 0 ? "LET IF=64" : "LET IF=128");
    end
    i_ratio = 1'b0;
    // ---- trigger loss: six short pulses while four conversions run
    get_status(st);                                   // clears the counters
    for (int i = 0; i < 6; i++) begin
      rnd_delay(4);
      trg1 = 1'b1;
      if (i < 4) stamp(tdc, 1'b0);
      tdc = (i < 4) ? (tdc + 1) % 4 : tdc;
      rnd_delay(3);
      trg1 = 1'b0;
    end
    compare("LET burst");
    get_status(st);
    check(st.tag == 2'b11 && st.col == COL && st.pix == ADDR, "status word header");
    check(st.lost_tdc == 8'd2, $sformatf("two triggers lost (status says %0d)", st.lost_tdc));
    get_status(st);
    check(st.lost_tdc == 8'd0, "loss counter cleared after the status word");
    // ---- ToT: even TDC on the rising, odd TDC on the falling edge of Trg1
    set_mode(4'b0100);
    tdc = 0;
    for (int i = 0; i < 12; i++) begin
      rnd_delay(int'($urandom_range(150, 300)));
      trg1 = 1'b1;
      stamp(tdc, 1'b0);
      rnd_delay(int'($urandom_range(3, 120)));
      trg1 = 1'b0;
      stamp(tdc + 1, 1'b0);
      tdc = (tdc + 2) % 4;
    end
    compare("ToT");
    // ---- ToT2: rising edge of Trg1, falling edge of Trg2
    set_mode(4'b1001);
    for (int i = 0; i < 12; i++) begin
      rnd_delay(int'($urandom_range(150, 300)));
      trg1 = 1'b1;
      trg2 = 1'b1;
      stamp(tdc, 1'b0);
      rnd_delay(int'($urandom_range(3, 20)));
      trg1 = 1'b0;
      rnd_delay(int'($urandom_range(3, 60)));
      trg2 = 1'b0;
      stamp(tdc + 1, 1'b0);
      tdc = (tdc + 2) % 4;
    end
    compare("ToT2");
    // ---- SR: rising edge of Trg1, then rising edge of Trg2; abort if Trg1 falls first
    set_mode(4'b1100);
    for (int i = 0; i < 16; i++) begin
      bit abort;
      abort = (i % 4 == 3);
      rnd_delay(int'($urandom_range(150, 300)));
      trg1 = 1'b1;
      if (!abort) stamp(tdc, 1'b0);
      rnd_delay(int'($urandom_range(3, 30)));
      if (abort) begin
        tdc = (tdc + 2) % 4;                 // the aborted pair still takes its turn
        trg1 = 1'b0;
        rnd_delay(5);
        trg2 = 1'b1;
      end else begin
        trg2 = 1'b1;
        stamp(tdc + 1, 1'b0);
        tdc = (tdc + 2) % 4;
        rnd_delay(5);
        trg1 = 1'b0;
      end
      rnd_delay(5);
      trg2 = 1'b0;
    end
    compare("SR with aborts");
    // ---- ToT watchdog: Trg1 stuck high for longer than WD cycles
    set_mode(4'b0100);
    rnd_delay(200);
    trg1 = 1'b1;
    stamp(tdc, 1'b0);
    rnd_delay(WD + 100);
    trg1 = 1'b0;
    repeat (10) @(posedge clk);
    begin
      event_t w;
      w = expq[0];
      w.tdc  = 2'(tdc + 1);
      w.fine = '0;
      expq.push_back(w);
    end
    compare("ToT watchdog");
    // ---- FIFO overflow: EoC disabled, ten LET hits
    set_mode(4'b0001);
    en = 1'b0;
    get_status(st);
    tdc = 1 - tdc / 2;                       // LET continues from the pair pointer
    for (int i = 0; i < 10; i++) begin
      rnd_delay(200);
      trg1 = 1'b1;
      if (i < 4) stamp((tdc + i) % 4, 1'b0);
      rnd_delay(5);
      trg1 = 1'b0;
    end
    rnd_delay(200);
    en = 1'b1;
    compare("FIFO overflow");
    get_status(st);
    check(st.lost_fifo == 8'd6, $sformatf("six words lost at the FIFO (status says %0d)", st.lost_fifo));
    tdc = (tdc + 10) % 4;
    // ---- test pulse to the TDC (LET_TP_TDC): Trg1 ignored
    set_mode(4'b0010);
    for (int i = 0; i < 8; i++) begin
      rnd_delay(200);
      trg1 = 1'b1;
      rnd_delay(5);
      trg1 = 1'b0;
      rnd_delay(50);
      tp = 1'b1;
      check(!tp_to_fe, "test pulse not routed to the front end in *_TP_TDC");
      stamp((tdc + i) % 4, 1'b0);
      rnd_delay(5);
      tp = 1'b0;
    end
    compare("test pulse to TDC");
    // ---- test pulse to the front end (LET_TP_FE): routed out, Trg1 still used
    set_mode(4'b0011);
    rnd_delay(10);
    tp = 1'b1;
    #1ns check(tp_to_fe, "test pulse routed to the front end");
    tp = 1'b0;
    #1ns check(!tp_to_fe, "test pulse released");
    // ---- mode off: nothing is recorded
    set_mode(4'b0000);
    for (int i = 0; i < 5; i++) begin
      rnd_delay(100);
      trg1 = 1'b1;
      rnd_delay(5);
      trg1 = 1'b0;
    end
    compare("mode off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
