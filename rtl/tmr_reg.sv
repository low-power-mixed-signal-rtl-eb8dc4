// tmr_reg: triple modular redundant register. Each write stores the same word in three
// copies; the output is the bitwise majority of the three, so an upset in one copy never
// reaches the output. On every clock the voted value is written back into all copies
// (scrubbing), which keeps two upsets in different cycles from adding up; the scrubbing is
// this design's choice, the triplication and voter follow the document. The upset_* inputs
// flip a bit of one copy and model a single event upset for test; tie them to zero in use.
// Timing: a write appears on q one cycle later; the voter is combinational.
module tmr_reg #(
  parameter int          W    = 16,
  parameter logic [W-1:0] INIT = '0
) (
  input  logic         clk,
  input  logic         rst_n,     // synchronous, active low, loads INIT
  input  logic         we,
  input  logic [W-1:0] d,
  input  logic [W-1:0] upset_t1,  // SEU model: bits to flip in copy 1
  input  logic [W-1:0] upset_t2,
  input  logic [W-1:0] upset_t3,
  output logic [W-1:0] q,
  output logic         mismatch   // the copies disagree
);
  logic [W-1:0] t1, t2, t3;

  assign q        = (t1 & t2) | (t1 & t3) | (t2 & t3);
  assign mismatch = (t1 != t2) || (t1 != t3);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      t1 <= INIT;
      t2 <= INIT;
      t3 <= INIT;
    end else if (we) begin
      t1 <= d;
      t2 <= d;
      t3 <= d;
    end else begin
      t1 <= q ^ upset_t1;
      t2 <= q ^ upset_t2;
      t3 <= q ^ upset_t3;
    end
  end
endmodule
