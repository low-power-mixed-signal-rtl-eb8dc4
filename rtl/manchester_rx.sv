// manchester_rx: Manchester decoder for the node-to-node link, counterpart of
// manchester_tx. It samples the line every clock. The first rising edge after enable is the
// middle of the start bit. From then on every transition that comes at least 3*HB/2 cycles
// after the previous mid-bit transition is the middle of the next bit: a falling one is a
// 1, a rising one a 0; transitions in between are bit boundaries and are ignored. This
// keeps decoding right for a sampling phase that drifts by up to HB/2 cycles. After W data
// bits and the parity bit it raises valid for one cycle with the word and parity_ok.
// The decoding rule is the standard one for the document's coding convention; the
// acceptance window is this design's choice.
module manchester_rx #(
  parameter int W  = 32,
  parameter int HB = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         enable,    // expect a frame
  input  logic         line,
  output logic         valid,
  output logic [W-1:0] data,
  output logic         parity_ok
);
  localparam int WIN = (3 * HB + 1) / 2;
  logic                      line_q, active, started;
  logic [$clog2(4*HB+2)-1:0] since;
  logic [$clog2(W+2)-1:0]    nbit;
  logic [W-1:0]              sh;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      line_q    <= 1'b0;
      active    <= 1'b0;
      started   <= 1'b0;
      since     <= '0;
      nbit      <= '0;
      sh        <= '0;
      valid     <= 1'b0;
      data      <= '0;
      parity_ok <= 1'b0;
    end else begin
      line_q <= line;
      valid  <= 1'b0;
      if (!enable) begin
        active  <= 1'b0;
        started <= 1'b0;
      end else if (!active) begin
        active  <= 1'b1;
        started <= 1'b0;
        nbit    <= '0;
      end else if (!started) begin
        if (line && !line_q) begin       // middle of the start bit
          started <= 1'b1;
          since   <= '0;
        end
      end else begin
        if (int'(since) < 4 * HB + 1) since <= since + 1'b1;
        if (line != line_q && int'(since) + 1 >= WIN) begin
          since <= '0;
          sh    <= {sh[W-2:0], line_q};   // falling edge (old level 1) = bit 1
          nbit  <= nbit + 1'b1;
          if (int'(nbit) == W) begin
            valid     <= 1'b1;
            data      <= sh[W-1:0];
            parity_ok <= (^sh[W-1:0]) == line_q;
            active    <= 1'b0;
            started   <= 1'b0;
          end
        end
      end
    end
  end
endmodule
