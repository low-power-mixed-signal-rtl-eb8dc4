// dsn_direction_ctrl: routing table of a network node.
// Keeps one reachability flag per side (index 0 right, 1 down, 2 left, 3 up). At reset a
// side is reachable when a link exists there (present). A side becomes unreachable when
// its I/O controller reports that the neighbour did not answer (dead_set), and the right
// and down sides also become unreachable as soon as a word arrives from them (rx_from):
// data coming from the natural downstream direction means that the neighbour is routing
// around a fault, and sending back to it would create a loop. The selected output side is
// the first reachable one in the order right, down, left, up; all_dead tells the node to
// stop producing its own data. Flags are never set again except by reset.
// Priority order, marking rules and the stop rule follow the document; the encoding of
// sides is this design's choice.
module dsn_direction_ctrl (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] present,
  input  logic [3:0] dead_set,
  input  logic [1:0] rx_from,     // words received on the right / down side
  output logic [3:0] reach,
  output logic [1:0] dir,
  output logic       all_dead
);
  always_ff @(posedge clk) begin
    if (!rst_n) reach <= present;
    else        reach <= reach & ~dead_set & ~{2'b00, rx_from};
  end

  always_comb begin
    dir = 2'd0;
    if      (reach[0]) dir = 2'd0;
    else if (reach[1]) dir = 2'd1;
    else if (reach[2]) dir = 2'd2;
    else if (reach[3]) dir = 2'd3;
  end
  assign all_dead = (reach == 4'b0000);
endmodule
