// spi_slave: configuration port of the chip (SPI slave, CPOL = 0, CPHA = 1, MSB first).
// A transaction is one 24-bit word while ss_n is low: a 4-bit command, 4 unused bits that
// give the slave time to decode the command, and a 16-bit payload. The master changes sdi
// on the rising and samples sdo on the falling sclk edge. The SPI pins are sampled with the
// system clock (sclk is at most 1/16 of it), so all logic runs in the system clock domain.
// Commands (bit 3 = read):
//   x000 pointer register   x001 data register (the register the pointer addresses)
//   x010 SPI status         0111 clear the EoC status   1111 read the EoC status
// In a write, sdo echoes sdi so the master can check what arrived. In a read, sdo echoes the
// command bits and then carries the 16-bit value. Data-register accesses go through reg_*:
// a read fetches the addressed register when the command is decoded, a write stores the
// payload at the end of the word. When pointer bit 15 is set the pointer advances after
// every data-register access (auto increment). sdo is low when ss_n is high.
// SPI status: bit 15 = a read was cut short; bit 14 = the data register was fetched and not
// shifted out completely; bit 13 = it was written while bit 14 was set; bits 12/11 = the
// same for the pointer. The word format, commands, echo and auto increment follow the
// document; the meaning given to status bits 15..11 is this design's reading of them.
module spi_slave (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sclk,
  input  logic        ss_n,
  input  logic        sdi,
  output logic        sdo,
  // register bus
  output logic [15:0] pointer,
  output logic        reg_we,
  output logic        reg_re,
  output logic [15:0] reg_wdata,
  input  logic [15:0] reg_rdata,
  // EoC status
  input  logic [15:0] eoc_status,
  output logic        eoc_status_clr
);
  logic [2:0]  sclk_s, ss_s, sdi_s;
  logic        sclk_rise, sclk_fall, ss_active, ss_end;
  logic [4:0]  bitcnt;
  logic [23:0] shin;
  logic [3:0]  cmd;
  logic        is_read, drive, sdo_bit, inc_ptr;
  logic [15:0] tx;
  logic [15:0] status;
  logic [23:0] word;

  always_ff @(posedge clk) begin
    sclk_s <= {sclk_s[1:0], sclk};
    ss_s   <= {ss_s[1:0], ss_n};
    sdi_s  <= {sdi_s[1:0], sdi};
  end
  assign sclk_rise = sclk_s[1] && !sclk_s[2];
  assign sclk_fall = !sclk_s[1] && sclk_s[2];
  assign ss_active = !ss_s[1];
  assign ss_end    = ss_s[1] && !ss_s[2];
  assign word      = {shin[22:0], sdi_s[1]};
  assign cmd       = word[3:0];

  assign sdo = ss_n ? 1'b0 : (drive ? sdo_bit : sdi);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bitcnt         <= '0;
      shin           <= '0;
      is_read        <= 1'b0;
      drive          <= 1'b0;
      sdo_bit        <= 1'b0;
      tx             <= '0;
      pointer        <= '0;
      status         <= '0;
      reg_we         <= 1'b0;
      reg_re         <= 1'b0;
      reg_wdata      <= '0;
      eoc_status_clr <= 1'b0;
      inc_ptr        <= 1'b0;
    end else begin
      reg_we         <= 1'b0;
      reg_re         <= 1'b0;
      eoc_status_clr <= 1'b0;
      inc_ptr        <= 1'b0;
      // auto increment one cycle after the access, so a write still uses the old pointer
      if (inc_ptr) pointer[14:0] <= pointer[14:0] + 1'b1;
      if (!ss_active) begin
        if (ss_end && is_read && bitcnt != 5'd24) status[15] <= 1'b1;
        bitcnt  <= '0;
        is_read <= 1'b0;
        drive   <= 1'b0;
      end else begin
        if (sclk_fall && bitcnt != 5'd24) begin
          shin   <= word;
          bitcnt <= bitcnt + 1'b1;
          if (bitcnt == 5'd3) begin
            // command decoded
            is_read <= word[3];
            if (word[3]) begin
              case (word[2:0])
                3'b000: begin tx <= pointer;   status[12] <= 1'b1; end
                3'b001: begin tx <= reg_rdata; reg_re <= 1'b1; status[14] <= 1'b1; end
                3'b010: tx <= status;
                3'b111: tx <= eoc_status;
                default: tx <= '0;
              endcase
            end
          end
          if (bitcnt == 5'd23) begin
            // last bit: writes take effect, reads are complete
            if (!word[23]) begin
              case (word[22:20])
                3'b000: begin
                  pointer <= word[15:0];
                  if (status[12]) status[11] <= 1'b1;
                end
                3'b001: begin
                  reg_we    <= 1'b1;
                  reg_wdata <= word[15:0];
                  if (status[14]) status[13] <= 1'b1;
                end
                3'b010: status <= '0;
                3'b111: eoc_status_clr <= 1'b1;
                default: ;
              endcase
            end else begin
              if (word[22:20] == 3'b000) status[12] <= 1'b0;
              if (word[22:20] == 3'b001) status[14] <= 1'b0;
            end
            inc_ptr <= (word[22:20] == 3'b001) && pointer[15];
          end
        end
        if (sclk_rise && is_read && bitcnt >= 5'd8 && bitcnt < 5'd24) begin
          drive   <= 1'b1;
          sdo_bit <= tx[5'd23 - bitcnt];
        end
      end
    end
  end
endmodule
