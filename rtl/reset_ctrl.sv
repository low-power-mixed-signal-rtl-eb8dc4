// reset_ctrl: decodes the length of the active-low external reset.
// A history shift register keeps the last 24 samples of ext_nres. When the last 10 samples
// are all low the coarse-counter reset (cnt_rst_n) is asserted; when the last 24 are all low
// the global reset (glb_rst_n) is asserted as well. Both stay asserted while ext_nres stays
// low and are released one cycle after it rises. The 10- and 24-cycle lengths follow the
// document; decoding them with a history register, which needs no reset of its own and is
// valid after 24 cycles of any input, is this design's choice (it covers the document's rule
// that the reset pin be high for a few cycles after power-on).
// ext_nres is expected synchronous to clk, as the document requires.
module reset_ctrl #(
  parameter int CNT_LEN = 10,
  parameter int GLB_LEN = 24
) (
  input  logic clk,
  input  logic ext_nres,
  output logic cnt_rst_n,  // coarse-counter reset, active low
  output logic glb_rst_n   // whole-chip reset, active low
);
  logic [GLB_LEN-1:0] hist;   // hist[0] is the newest sample, 1 = low

  always_ff @(posedge clk) begin
    hist      <= {hist[GLB_LEN-2:0], ~ext_nres};
    cnt_rst_n <= ~((&hist[CNT_LEN-2:0]) & ~ext_nres);
    glb_rst_n <= ~((&hist[GLB_LEN-2:0]) & ~ext_nres);
  end
endmodule
