// pixel_cfg: the four 16-bit Pixel Configuration Registers (PCR0..PCR3) of one pixel.
// The EoC broadcasts a 5-bit PCR address (pixel address in bits 4:2, register in bits 1:0),
// the 16-bit data and a write strobe along the column; the pixel whose self-assigned address
// matches stores the data while the strobe is high. Each PCR is a triple modular redundant
// register (tmr_reg), as the document prescribes for the PCRs. Reset values are the
// document's defaults: PCR0 = 0x7777, PCR1 = 0x8888, PCR2 = 0xFFFF, PCR3 = 0x023C (LET mode).
// Timing: a write is visible on the outputs one clock after the strobe.
module pixel_cfg (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [2:0]  my_addr,
  input  logic [4:0]  pcr_addr,
  input  logic [15:0] pcr_data,
  input  logic        pcr_write,
  output logic [15:0] pcr [4],
  output logic        tmr_mismatch   // some copy disagrees with the other two
);
  localparam logic [15:0] DEF [4] = '{16'h7777, 16'h8888, 16'hFFFF, 16'h023C};
  logic [3:0] mm;

  for (genvar r = 0; r < 4; r++) begin : g_pcr
    tmr_reg #(.W(16), .INIT(DEF[r])) u_reg (
      .clk      (clk),
      .rst_n    (rst_n),
      .we       (pcr_write && pcr_addr[4:2] == my_addr && pcr_addr[1:0] == 2'(r)),
      .d        (pcr_data),
      .upset_t1 (16'h0),
      .upset_t2 (16'h0),
      .upset_t3 (16'h0),
      .q        (pcr[r]),
      .mismatch (mm[r])
    );
  end

  assign tmr_mismatch = |mm;
endmodule
