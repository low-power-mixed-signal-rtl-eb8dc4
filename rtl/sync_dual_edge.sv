// sync_dual_edge: brings an asynchronous level into the clock domain.
// The input is sampled by one flip-flop on the rising clock edge and by one on the falling
// edge; the two samples feed two cascaded rising-edge flip-flops that absorb metastability.
// The first stage takes the OR of the samples while it is low and their AND while it is
// high, so whichever sampler sees a change first passes it on, for rising and falling input
// edges alike. An input edge that arrives while the clock is high is seen by the falling
// sampler and reaches the output at the second rising edge after it (1.5 to 2 periods); one
// that arrives while the clock is low waits for the rising sampler and reaches the output at
// the third rising edge (2 to 2.5 periods). This fixed relation to the TDC's T1 edge is what
// lets the control logic stamp coarse time and start the fine counter exactly.
// The structure follows the document's synchroniser schematic; the AND for falling edges
// (needed by the ToT falling-edge stamp) and the reset are additions of this design.
module sync_dual_edge (
  input  logic clk,
  input  logic rst_n,     // synchronous, active low
  input  logic d_async,
  output logic q
);
  logic s_pos, s_neg, s1, s2;

  always_ff @(posedge clk) s_pos <= d_async;
  always_ff @(negedge clk) s_neg <= d_async;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1 <= 1'b0;
      s2 <= 1'b0;
    end else begin
      s1 <= s1 ? (s_pos & s_neg) : (s_pos | s_neg);
      s2 <= s1;
    end
  end

  assign q = s2;
endmodule
