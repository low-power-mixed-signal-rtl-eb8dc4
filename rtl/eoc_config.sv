// eoc_config: the configuration registers reached through the SPI pointer.
// Pointer layout (15 bits, bit 15 is the SPI auto-increment flag):
//   <14:13> = 00  Bias Configuration Registers, <2:0> = {double column, BCR_0/BCR_1}
//   <14:13> = 01  End of Column Configuration Registers, <1:0> = double column
//   <14:13> = 10  Pixel Configuration Registers, <7:0> = {column, pixel, PCR number}
// BCR and ECCR live here; their reset values are zero, the document's ECCR default. A PCR
// write is sent to the column as PCRaddress = {pixel, PCR number}, PCRdata and a two-cycle
// PCRwrite strobe, and stored in the pixel. PCRs are write-only through this path (a read
// returns zero); BCR and ECCR read back. BCR bits only set analogue biases and are brought
// out. The three address spaces and the register contents follow the document; the pointer
// bit layout is this design's choice.
module eoc_config #(
  parameter int NDCOL = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] pointer,
  input  logic        reg_we,
  input  logic [15:0] reg_wdata,
  output logic [15:0] reg_rdata,
  output logic [15:0] bcr  [2*NDCOL],
  output logic [15:0] eccr [NDCOL],
  output logic [2:0]  pcr_col,
  output logic [4:0]  pcr_addr,
  output logic [15:0] pcr_data,
  output logic        pcr_write
);
  logic [1:0] space;
  logic       pcr_hold;

  assign space = pointer[14:13];

  always_comb begin
    reg_rdata = '0;
    case (space)
      2'b00:   reg_rdata = (int'(pointer[2:0]) < 2 * NDCOL) ? bcr[pointer[2:0]] : '0;
      2'b01:   reg_rdata = (int'(pointer[1:0]) < NDCOL) ? eccr[pointer[1:0]] : '0;
      default: reg_rdata = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 2 * NDCOL; i++) bcr[i] <= '0;
      for (int i = 0; i < NDCOL; i++)     eccr[i] <= '0;
      pcr_col   <= '0;
      pcr_addr  <= '0;
      pcr_data  <= '0;
      pcr_write <= 1'b0;
      pcr_hold  <= 1'b0;
    end else begin
      pcr_write <= pcr_hold;
      pcr_hold  <= 1'b0;
      if (reg_we) begin
        case (space)
          2'b00: if (int'(pointer[2:0]) < 2 * NDCOL) bcr[pointer[2:0]] <= reg_wdata;
          2'b01: if (int'(pointer[1:0]) < NDCOL)     eccr[pointer[1:0]] <= reg_wdata;
          2'b10: begin
            pcr_col   <= pointer[7:5];
            pcr_addr  <= pointer[4:0];
            pcr_data  <= reg_wdata;
            pcr_write <= 1'b1;
            pcr_hold  <= 1'b1;
          end
          default: ;
        endcase
      end
    end
  end
endmodule
