// enc8b10b: 8b/10b encoder with running disparity, one byte per call of en.
// The byte HGF EDCBA is split into a 5-bit and a 3-bit group, mapped to 6-bit (abcdei) and
// 4-bit (fghj) sub-blocks chosen by the running disparity, which is updated after each
// sub-block. k selects a control symbol; only K28.y is supported, which covers every code
// the output stream uses. The symbol is returned with a in bit 0, so sending it least
// significant bit first puts a on the line first. The use of 8b/10b with K symbols follows
// the document; the code tables are the standard ones (IBM, Widmer and Franaszek).
// Timing: sym is registered, one cycle after en; rd is the disparity after sym.
module enc8b10b (
  input  logic       clk,
  input  logic       rst_n,    // running disparity starts negative
  input  logic       en,
  input  logic [7:0] din,
  input  logic       k,
  output logic [9:0] sym,
  output logic       rd        // 1 = positive running disparity
);
  // 5b/6b table for RD-, written abcdei with a as the leftmost character
  function automatic logic [5:0] t6(input logic [4:0] x);
    case (x)
      5'd0:  t6 = 6'b100111;  5'd1:  t6 = 6'b011101;  5'd2:  t6 = 6'b101101;  5'd3:  t6 = 6'b110001;
      5'd4:  t6 = 6'b110101;  5'd5:  t6 = 6'b101001;  5'd6:  t6 = 6'b011001;  5'd7:  t6 = 6'b111000;
      5'd8:  t6 = 6'b111001;  5'd9:  t6 = 6'b100101;  5'd10: t6 = 6'b010101;  5'd11: t6 = 6'b110100;
      5'd12: t6 = 6'b001101;  5'd13: t6 = 6'b101100;  5'd14: t6 = 6'b011100;  5'd15: t6 = 6'b010111;
      5'd16: t6 = 6'b011011;  5'd17: t6 = 6'b100011;  5'd18: t6 = 6'b010011;  5'd19: t6 = 6'b110010;
      5'd20: t6 = 6'b001011;  5'd21: t6 = 6'b101010;  5'd22: t6 = 6'b011010;  5'd23: t6 = 6'b111010;
      5'd24: t6 = 6'b110011;  5'd25: t6 = 6'b100110;  5'd26: t6 = 6'b010110;  5'd27: t6 = 6'b110110;
      5'd28: t6 = 6'b001110;  5'd29: t6 = 6'b101110;  5'd30: t6 = 6'b011110;  default: t6 = 6'b101011;
    endcase
  endfunction

  // 3b/4b table for RD-, fghj; index 8 is the alternate D.x.A7
  function automatic logic [3:0] t4(input logic [3:0] y);
    case (y)
      4'd0: t4 = 4'b1011;  4'd1: t4 = 4'b1001;  4'd2: t4 = 4'b0101;  4'd3: t4 = 4'b1100;
      4'd4: t4 = 4'b1101;  4'd5: t4 = 4'b1010;  4'd6: t4 = 4'b0110;  4'd7: t4 = 4'b1110;
      default: t4 = 4'b0111;
    endcase
  endfunction

  // K.28.y 3b/4b for RD-
  function automatic logic [3:0] tk4(input logic [2:0] y);
    case (y)
      3'd0: tk4 = 4'b1011;  3'd1: tk4 = 4'b0110;  3'd2: tk4 = 4'b1010;  3'd3: tk4 = 4'b1100;
      3'd4: tk4 = 4'b1101;  3'd5: tk4 = 4'b0101;  3'd6: tk4 = 4'b1001;  default: tk4 = 4'b0111;
    endcase
  endfunction

  function automatic int ones6(input logic [5:0] v);
    int n = 0;
    for (int i = 0; i < 6; i++) n += int'(v[i]);
    return n;
  endfunction

  function automatic int ones4(input logic [3:0] v);
    int n = 0;
    for (int i = 0; i < 4; i++) n += int'(v[i]);
    return n;
  endfunction

  logic [5:0] s6;
  logic [3:0] s4;
  logic       rd_mid, rd_next;
  logic [4:0] x;
  logic [2:0] y;

  always_comb begin
    x = din[4:0];
    y = din[7:5];
    // 6-bit sub-block
    s6 = k ? 6'b001111 : t6(x);
    if (rd) begin
      if (ones6(s6) != 3) s6 = ~s6;
      else if (!k && x == 5'd7) s6 = ~s6;      // D.07 is 000111 under RD+
    end
    if (ones6(s6) > 3)      rd_mid = 1'b1;
    else if (ones6(s6) < 3) rd_mid = 1'b0;
    else                    rd_mid = rd;
    // 4-bit sub-block
    if (k) begin
      s4 = tk4(y);
    end else if (y == 3'd7 &&
                 ((!rd_mid && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
                  ( rd_mid && (x == 5'd11 || x == 5'd13 || x == 5'd14)))) begin
      s4 = t4(4'd8);
    end else begin
      s4 = t4({1'b0, y});
    end
    if (rd_mid) begin
      if (ones4(s4) != 2)          s4 = ~s4;
      else if (k || y == 3'd3)     s4 = ~s4;   // x.3 and the K codes flip under RD+
    end
    if (ones4(s4) > 2)      rd_next = 1'b1;
    else if (ones4(s4) < 2) rd_next = 1'b0;
    else                    rd_next = rd_mid;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd  <= 1'b0;
      sym <= '0;
    end else if (en) begin
      rd <= rd_next;
      // a = s6[5] ... i = s6[0], f = s4[3] ... j = s4[0]; a goes to bit 0
      sym <= {s4[0], s4[1], s4[2], s4[3], s6[0], s6[1], s6[2], s6[3], s6[4], s6[5]};
    end
  end
endmodule
