// latch_pair: two storage stages in series on opposite clock phases, each
// with its own clock gate, able to hold two items at once.
//
// L1 closes on the rising edge of gclk and L2 on the falling edge, as in
// adjacent stages of a two-phase pipeline. Asserting gate1 or gate2
// suppresses the corresponding edge, so the stage keeps its item. Storing:
// with both gates low A enters L1 at a rising edge and moves to L2 at the
// falling edge; gate2 then freezes A in L2 while B enters L1 at the next
// rising edge, after which gate1 freezes B. Reading: releasing gate2 lets the
// environment take A from q at the next rising edge; releasing gate1 then
// moves B into L2 at the falling edge, and it is read at the following
// rising edge. This sequential storage is the mechanism the elastic pipeline
// uses to turn its bubbles into buffer space.
//
// Interface: d is sampled into L1 on the rising edge when gate1 is low; L1 is
// copied into L2 on the falling edge when gate2 is low; q is L2. gate1 and
// gate2 must be stable around the edge they control.
module latch_pair
  import isp_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  input  logic         gate1,
  input  logic         gate2,
  output logic [W-1:0] q1,
  output logic [W-1:0] q
);

  isp_reg #(.W(W), .EDGE(EDGE_RISE)) u_l1 (
    .clk, .rst_n, .en(!gate1), .d(d), .q(q1)
  );
  isp_reg #(.W(W), .EDGE(EDGE_FALL)) u_l2 (
    .clk, .rst_n, .en(!gate2), .d(q1), .q(q)
  );

endmodule
