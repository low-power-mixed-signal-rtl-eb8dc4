// manchester_tx: Manchester encoder for the serial link between network nodes.
// A frame is a start bit (0), W data bits, most significant first, and an even-parity bit
// (1 when the data holds an odd number of ones). Every bit lasts 2*HB clock cycles; a 1 is
// sent high then low (falling transition in the middle of the bit), a 0 low then high
// (rising transition in the middle), so consecutive equal bits also produce a transition at
// the bit boundary. The line rests low between frames. start loads the word; busy stays
// high until the last half-bit has been sent and done pulses in the following cycle.
// Coding convention and parity rule follow the document; the start bit and the frame order
// are this design's choices.
module manchester_tx #(
  parameter int W  = 32,
  parameter int HB = 2     // clock cycles per half bit
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] data,
  output logic         line,
  output logic         busy,
  output logic         done
);
  localparam int NB = W + 2;
  logic [NB-1:0]         frame;
  logic [$clog2(NB+1)-1:0] nbit;
  logic [$clog2(HB+1)-1:0] hcnt;
  logic                  half;     // 0 first half, 1 second half

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      frame <= '0;
      nbit  <= '0;
      hcnt  <= '0;
      half  <= 1'b0;
      busy  <= 1'b0;
      done  <= 1'b0;
      line  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        line <= 1'b0;
        if (start) begin
          frame <= {1'b0, data, ^data};
          busy  <= 1'b1;
          nbit  <= '0;
          hcnt  <= '0;
          half  <= 1'b0;
          line  <= 1'b0;        // first half of the start bit 0
        end
      end else begin
        if (int'(hcnt) == HB - 1) begin
          hcnt <= '0;
          if (!half) begin
            half <= 1'b1;
            line <= ~frame[NB-1];
          end else begin
            half <= 1'b0;
            if (int'(nbit) == NB - 1) begin
              busy <= 1'b0;
              done <= 1'b1;
              line <= 1'b0;
            end else begin
              nbit  <= nbit + 1'b1;
              frame <= frame << 1;
              line  <= frame[NB-2];
            end
          end
        end else begin
          hcnt <= hcnt + 1'b1;
        end
      end
    end
  end
endmodule
