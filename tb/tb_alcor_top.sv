// End-to-end testbench for alcor_top at its default size (8 columns x 4 pixels, four double
// columns, 2^15-cycle coarse frames). Everything goes through the chip pins: the external
// reset line (global and counter-only resets), the SPI port (pointer and data registers,
// auto increment, ECCR and PCR writes, ECCR read-back, write echo, EoC status read/clear)
// and the four serial outputs, decoded by ser_rx.
// Random hits in every pixel are time-stamped by the testbench (T1 rule, fine count
// N = round(IF*(T1-T0)/Tclk), coarse count at T1) and must all come out of the serial link
// of their double column. The frame structure is checked on the stream: roll-over word,
// status block of 8 pixel status words with the right column/pixel fields, EoC status word,
// CRC word (recomputed here), frame header and consecutive frame numbers. Mechanisms that
// must each be seen at least once: LET, ToT and SR events, trigger loss reported in a status
// word, pixel FIFO overflow while a column is disabled, EoC loss counters read over SPI and
// cleared, idle words, align words, 8b/10b commas on the encoded link, frame headers and
// CRC words, counter-only reset.
module tb_alcor_top;
  import alcor_pkg::*;
  localparam int  NCOL = 8, NPIX = 4, NDCOL = 4;
  localparam realtime TCLK = 10ns;  // in the module's time unit

  logic ext_clk = 1'b0, ext_nres = 1'b1, sclk = 1'b0, ss_n = 1'b1, sdi = 1'b0, sdo, tp = 1'b0;
  logic trg1 [NCOL][NPIX], trg2 [NCOL][NPIX], tp_to_fe [NCOL][NPIX];
  logic [15:0] pcr_out [NCOL][NPIX][4];
  logic [15:0] bcr [NCOL];
  logic clk_out;
  logic [NDCOL-1:0] q;
  logic [COARSE_W-1:0] mirror;

  int checks = 0, failures = 0;
  logic [31:0] expq [NDCOL][$];
  logic [31:0] gotq [NDCOL][$];
  logic [31:0] statq[$];
  int tdc_next [NCOL][NPIX];

  // mechanism counters
  int n_let = 0, n_tot = 0, n_sr = 0, n_lost_trg = 0, n_fifo_loss = 0, n_status = 0;
  int n_crc_ok = 0, n_header = 0, n_idle = 0, n_align = 0, n_commas = 0, n_cnt_reset = 0;
  int n_eoc_status = 0, n_echo = 0;
  int last_frame [NDCOL];
  bit align_phase = 0;

  // distributed sensor network beside the chip: node 9 broken, every other node sends two
  // words; a Manchester receiver takes them at the output of the last node
  logic        dsn_rst_n = 1'b0;
  logic [23:0] dsn_fail = 24'd1 << 9, dsn_gen_valid = '0, dsn_gen_ready, dsn_stopped;
  logic [31:0] dsn_gen_data [24];
  logic [3:0]  dsn_reach [24];
  logic [15:0] dsn_n_fwd [24];
  logic        dsn_in_rdy, dsn_in_back_req, dsn_in_back_line;
  logic        dsn_out_req, dsn_out_rdy, dsn_out_line, dsn_out_back_req, dsn_out_back_line;
  logic        dsn_out_back_rdy, dsn_rv, dsn_rperr;
  logic [31:0] dsn_rd;
  int          n_dsn_words = 0, n_dsn_bad = 0;
  bit          dsn_seen [24][2];

  alcor_top dut (
    .ext_clk, .ext_nres, .sclk, .ss_n, .sdi, .sdo, .tp, .trg1, .trg2, .tp_to_fe,
    .pcr_out, .bcr, .clk_out, .q,
    .dsn_clk(ext_clk), .dsn_rst_n, .dsn_fail, .dsn_gen_valid, .dsn_gen_data, .dsn_gen_ready,
    .dsn_stopped, .dsn_reach, .dsn_n_fwd,
    .dsn_in_req(1'b0), .dsn_in_rdy, .dsn_in_line(1'b0), .dsn_in_back_req,
    .dsn_in_back_rdy(1'b0), .dsn_in_back_line,
    .dsn_out_req, .dsn_out_rdy, .dsn_out_line, .dsn_out_back_req, .dsn_out_back_rdy,
    .dsn_out_back_line
  );

  dsn_io_ctrl u_dsn_rx (
    .clk(ext_clk), .rst_n(dsn_rst_n), .send(1'b0), .send_data('0), .sent(), .no_resp(),
    .busy(), .can_rx(1'b1), .rx_valid(dsn_rv), .rx_data(dsn_rd), .rx_perr(dsn_rperr),
    .req_o(dsn_out_back_req), .rdy_i(dsn_out_back_rdy), .line_o(dsn_out_back_line),
    .req_i(dsn_out_req), .rdy_o(dsn_out_rdy), .line_i(dsn_out_line)
  );

  always_ff @(posedge ext_clk) begin
    if (dsn_rst_n && dsn_rv) begin
      n_dsn_words++;
      if (dsn_rd[31:16] == 16'hD500 && dsn_rd[15:8] < 8'd24 && dsn_rd[7:0] < 8'd2)
        dsn_seen[dsn_rd[15:8]][dsn_rd[0]] = 1'b1;
      else
        n_dsn_bad++;
    end
    if (dsn_rst_n && dsn_rperr) n_dsn_bad++;
  end

  for (genvar n = 0; n < 24; n++) begin : g_dsn_gen
    initial begin
      dsn_gen_data[n] = '0;
      wait (dsn_rst_n);
      for (int s = 0; s < 2; s++) begin
        repeat (50 + (n * 131 + s * 977) % 2900) @(posedge ext_clk);
        #1ns;
        dsn_gen_valid[n] = !dsn_fail[n];
        dsn_gen_data[n]  = {16'hD500, 8'(n), 8'(s)};
        @(posedge ext_clk);
        while (!dsn_gen_ready[n] && !dsn_fail[n]) @(posedge ext_clk);
        #1ns dsn_gen_valid[n] = 1'b0;
      end
    end
  end

  initial begin
    repeat (10) @(posedge ext_clk);
    #1ns dsn_rst_n = 1'b1;
  end

  always #5ns ext_clk = ~ext_clk;
  always_ff @(posedge ext_clk) begin
    if (!dut.rst_n || !dut.cnt_rst_n) mirror <= '0;
    else                              mirror <= mirror + 1'b1;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL: %s", msg);
    end
  endtask

  // ---------------------------------------------------------------- serial receivers
  logic        rx_valid [NDCOL];
  logic [32:0] rx_word [NDCOL];
  int          rx_commas [NDCOL], rx_bad [NDCOL];
  bit          encoded [NDCOL] = '{0, 0, 0, 1};

  for (genvar d = 0; d < NDCOL; d++) begin : g_rx
    ser_rx #(.TCLK(10.0)) u_rx (
      .clk(ext_clk), .q(q[d]), .encoded(encoded[d]), .valid(rx_valid[d]),
      .word(rx_word[d]), .commas(rx_commas[d]), .bad_symbols(rx_bad[d])
    );
    // stream parser
    initial begin
      logic [31:0] crc;
      int trail;          // position inside a trailer, -1 outside
      crc = 32'hFFFF_FFFF;
      trail = -1;
      last_frame[d] = -1;
      forever begin
        @(posedge rx_valid[d]);
        parse(d, rx_word[d], crc, trail);
      end
    end
  end

  function automatic logic [31:0] crc_step(input logic [31:0] c, input logic [31:0] w);
    for (int i = 31; i >= 0; i--) c = (c[31] ^ w[i]) ? ((c << 1) ^ 32'h04C1_1DB7) : (c << 1);
    return c;
  endfunction

  task automatic parse(input int d, input logic [32:0] w, inout logic [31:0] crc,
                       inout int trail);
    bit k;
    k = w[32];
    if (k && w[31:0] == kword(K_IDLE)) begin
      n_idle++;
      return;
    end
    if (k && w[31:0] == kword(K_ALIGN)) begin
      n_align++;
      check(align_phase, "align word only while ECCR<14> is set");
      return;
    end
    if (trail == 100) begin                     // word after K28.4: the CRC
      check(!k && w[31:0] == crc, $sformatf("CRC of dcol %0d: got %h expected %h", d, w[31:0], crc));
      if (!k && w[31:0] == crc) n_crc_ok++;
      crc = 32'hFFFF_FFFF;
      trail = -1;
      return;
    end
    crc = crc_step(crc, w[31:0]);
    if (trail == 200) begin                     // word after K28.0: frame number
      if (last_frame[d] >= 0)
        check(int'(w[15:0]) == last_frame[d] + 1, $sformatf("frame number of dcol %0d", d));
      last_frame[d] = int'(w[15:0]);
      n_header++;
      trail = -1;
      return;
    end
    if (k) begin
      case (w[7:0])
        K_ROLL:   trail = -1;
        K_STATUS: trail = 0;
        K_CRC:    trail = 100;
        K_FRAME:  trail = 200;
        default:  check(0, $sformatf("unknown K word %h", w[31:0]));
      endcase
      return;
    end
    if (trail >= 0 && trail < 8) begin          // pixel status words
      status_t s;
      s = w[31:0];
      check(s.tag == 2'b11 && s.col[2:1] == 2'(d), $sformatf("status word %h of dcol %0d", w[31:0], d));
      if (s.lost_tdc != 0) n_lost_trg += int'(s.lost_tdc);
      if (s.lost_fifo != 0) n_fifo_loss += int'(s.lost_fifo);
      n_status++;
      trail++;
      return;
    end
    if (trail == 8) begin                       // EoC status word
      trail = -1;
      return;
    end
    gotq[d].push_back(w[31:0]);
  endtask

  // ---------------------------------------------------------------- SPI master
  task automatic spi(input logic [3:0] cmd, input logic [15:0] data, output logic [23:0] back);
    logic [23:0] w;
    w = {cmd, 4'h0, data};
    ss_n = 1'b0;
    #200ns;
    for (int i = 23; i >= 0; i--) begin
      sclk = 1'b1;
      sdi  = w[i];
      #100ns;
      sclk = 1'b0;
      back[i] = sdo;
      #100ns;
    end
    #200ns;
    ss_n = 1'b1;
    #300ns;
  endtask

  task automatic spi_wr(input logic [3:0] cmd, input logic [15:0] data);
    logic [23:0] back;
    spi(cmd, data, back);
    check(back == {cmd, 4'h0, data}, $sformatf("SPI write echo %h", back));
    n_echo++;
  endtask

  task automatic spi_rd(input logic [3:0] cmd, output logic [15:0] v);
    logic [23:0] back;
    spi(cmd, 16'h0, back);
    check(back[23:20] == cmd, "SPI read echoes the command");
    v = back[15:0];
  endtask

  task automatic set_eccr(input int d, input logic [15:0] v);
    spi_wr(4'b0000, {3'b001, 13'(d)});
    spi_wr(4'b0001, v);
  endtask

  task automatic set_mode(input int col, input int pix, input logic [3:0] m);
    spi_wr(4'b0000, {3'b010, 5'd0, 3'(col), 3'(pix), 2'd3});
    spi_wr(4'b0001, (16'h023C & ~16'h1E00) | {3'b0, m, 9'b0});
  endtask

  // ---------------------------------------------------------------- hits
  task automatic stamp(input int col, input int pix, input int tdc);
    fork
      begin
        realtime t0;
        int n;
        event_t w;
        t0 = $realtime;
        n  = ext_clk ? 1 : 2;
        repeat (n) @(posedge ext_clk);
        w.col    = 3'(col);
        w.pix    = 3'(pix);
        w.tdc    = 2'(tdc);
        w.coarse = mirror;
        w.fine   = FINE_W'(int'((64.0 * ($realtime - t0)) / TCLK));
        expq[col / 2].push_back(w);
      end
    join_none
  endtask

  task automatic rnd_delay(input int cycles);
    #(cycles * 10ns + $urandom_range(100, 9900) * 1ps);
  endtask

  // one LET hit on a pixel
  task automatic let_hit(input int col, input int pix, input bit expect_word);
    fork
      begin
        trg1[col][pix] = 1'b1;
        if (expect_word) begin
          stamp(col, pix, tdc_next[col][pix]);
          n_let++;
          tdc_next[col][pix] = (tdc_next[col][pix] + 1) % 4;
        end
        rnd_delay(3);
        trg1[col][pix] = 1'b0;
      end
    join_none
  endtask

  task automatic compare(input string what);
    int hit;
    for (int d = 0; d < NDCOL; d++) begin
      if (d == 3) begin
        expq[d].delete();        // encoded link: not decoded here
        continue;
      end
      check(gotq[d].size() == expq[d].size(),
            $sformatf("%s dcol %0d: %0d words expected, %0d received", what, d,
                      expq[d].size(), gotq[d].size()));
      foreach (expq[d][i]) begin
        hit = -1;
        foreach (gotq[d][j]) if (hit < 0 && gotq[d][j] == expq[d][i]) hit = j;
        check(hit >= 0, $sformatf("%s: word %h missing on dcol %0d", what, expq[d][i], d));
        if (hit >= 0) gotq[d].delete(hit);
      end
      expq[d].delete();
      gotq[d].delete();
    end
  endtask

  initial begin
    #20ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [15:0] v;
    for (int c = 0; c < NCOL; c++)
      for (int p = 0; p < NPIX; p++) begin
        trg1[c][p] = 1'b0;
        trg2[c][p] = 1'b0;
        tdc_next[c][p] = 0;
      end
    // global reset: more than 24 cycles low
    #20ns ext_nres = 1'b0;
    #400ns ext_nres = 1'b1;
    #100ns;
    check(dut.rst_n && dut.cnt_rst_n, "reset released");
    // ---- configuration over SPI
    for (int d = 0; d < NDCOL; d++)
      set_eccr(d, 16'hA000 | 16'h0009 | ((d == 3) ? 16'h1000 : 16'h0000));
    spi_wr(4'b0000, {3'b001, 13'd2});
    spi_rd(4'b1001, v);
    check(v == 16'hA009, $sformatf("ECCR read back %h", v));
    spi_rd(4'b1000, v);
    check(v == {3'b001, 13'd2}, "pointer read back");
    // BCR write with auto increment over BCR0..BCR3
    spi_wr(4'b0000, 16'h8000);
    for (int i = 0; i < 4; i++) spi_wr(4'b0001, 16'h1100 + 16'(i));
    check(bcr[0] == 16'h1100 && bcr[3] == 16'h1103, "BCR written with auto increment");
    // operation modes: column 1 pixel 2 ToT, column 4 pixel 1 SR
    set_mode(1, 2, 4'b0100);
    set_mode(4, 1, 4'b1100);
    #1us;
    check(pcr_out[1][2][3][12:9] == 4'b0100 && pcr_out[4][1][3][12:9] == 4'b1100 &&
          pcr_out[0][0][3] == 16'h023C, "PCR3 written in the addressed pixels only");
    // counter-only reset: 12 cycles low keeps the configuration
    @(negedge ext_clk) ext_nres = 1'b0;
    repeat (12) @(negedge ext_clk);
    ext_nres = 1'b1;
    #100ns;
    if (mirror < 16'd20) n_cnt_reset++;
    spi_wr(4'b0000, {3'b001, 13'd2});
    spi_rd(4'b1001, v);
    check(v == 16'hA009, "ECCR kept over a counter reset");
    // ---- three frames of random hits
    for (int i = 0; i < 900; i++) begin
      int c, p;
      rnd_delay(int'($urandom_range(20, 140)));
      c = int'($urandom_range(0, NCOL - 1));
      p = int'($urandom_range(0, NPIX - 1));
      if (c == 1 && p == 2) begin
        // ToT pulse
        fork
          begin
            trg1[1][2] = 1'b1;
            stamp(1, 2, tdc_next[1][2]);
            rnd_delay(int'($urandom_range(3, 40)));
            trg1[1][2] = 1'b0;
            stamp(1, 2, tdc_next[1][2] + 1);
            tdc_next[1][2] = (tdc_next[1][2] + 2) % 4;
            n_tot++;
          end
        join_none
        rnd_delay(200);
      end else if (c == 4 && p == 1) begin
        fork
          begin
            trg1[4][1] = 1'b1;
            stamp(4, 1, tdc_next[4][1]);
            rnd_delay(int'($urandom_range(3, 20)));
            trg2[4][1] = 1'b1;
            stamp(4, 1, tdc_next[4][1] + 1);
            tdc_next[4][1] = (tdc_next[4][1] + 2) % 4;
            rnd_delay(4);
            trg1[4][1] = 1'b0;
            trg2[4][1] = 1'b0;
            n_sr++;
          end
        join_none
        rnd_delay(200);
      end else if (i % 150 == 75) begin
        // burst: six hits, four TDCs
        for (int k = 0; k < 6; k++) begin
          let_hit(c, p, k < 4);
          rnd_delay(6);
        end
        rnd_delay(200);
      end else begin
        let_hit(c, p, 1);
      end
    end
    rnd_delay(3000);
    // ---- pixel FIFO overflow: column 5 disabled, seven hits in its pixel 0
    set_eccr(2, 16'hA001);
    for (int k = 0; k < 7; k++) begin
      let_hit(5, 0, k < 4);
      rnd_delay(200);
    end
    set_eccr(2, 16'hA009);
    // ---- align words for a while on double column 0
    align_phase = 1;
    set_eccr(0, 16'hE009);
    #3us;
    set_eccr(0, 16'hA009);
    #3us;
    align_phase = 0;
    // let the last frames close
    #(2 * 32768 * 10ns);
    compare("random hits");
    // ---- EoC status over SPI: read, clear, read again
    spi_wr(4'b0000, 16'd0);
    spi_rd(4'b1111, v);
    n_eoc_status++;
    spi_wr(4'b0111, 16'h0);
    spi_rd(4'b1111, v);
    check(v == 16'h0, "EoC status cleared");
    // ---- mechanisms
    for (int d = 0; d < NDCOL; d++) check(rx_bad[d] == 0, "no malformed symbols");
    n_commas = rx_commas[3];
    $display("mechanisms: let=%0d tot=%0d sr=%0d lost_trg=%0d fifo_loss=%0d status=%0d crc=%0d headers=%0d idle=%0d align=%0d commas=%0d cnt_reset=%0d echo=%0d eoc_status=%0d",
             n_let, n_tot, n_sr, n_lost_trg, n_fifo_loss, n_status, n_crc_ok, n_header, n_idle,
             n_align, n_commas, n_cnt_reset, n_echo, n_eoc_status);
    $display("dsn: words=%0d bad=%0d", n_dsn_words, n_dsn_bad);
    check(n_dsn_words == 46 && n_dsn_bad == 0, "DSN delivered the words of the working nodes once");
    for (int n = 0; n < 24; n++)
      if (n != 9) check(dsn_seen[n][0] && dsn_seen[n][1], $sformatf("DSN words of node %0d", n));
    check(dsn_reach[8][0] == 1'b0, "DSN detour around the broken node");
    check(n_let > 0, "LET events seen");
    check(n_tot > 0, "ToT events seen");
    check(n_sr > 0, "SR events seen");
    check(n_lost_trg > 0, "trigger loss reported in a status word");
    check(n_fifo_loss > 0, "pixel FIFO loss reported in a status word");
    check(n_status >= 8 * 3 * 2, "status blocks seen");
    check(n_crc_ok >= 2 * 3, "CRC words checked");
    check(n_header >= 3 * 3, "frame headers seen");
    check(n_idle > 0, "idle words seen");
    check(n_align > 0, "align words seen");
    check(n_commas > 100, "K28.5 commas on the encoded link");
    check(n_cnt_reset > 0, "counter-only reset");
    check(n_echo > 0 && n_eoc_status > 0, "SPI echo and EoC status read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
