// isp_reg: enabled register that loads on a chosen edge of gclk.
//
// This is the storage primitive of the library. It stands for one latch
// array of the two-phase pipelines: the array is opaque from the edge given
// by EDGE until the opposite edge, so the value it holds while opaque is the
// value present at that edge. The enable models the local clock gate of the
// array: when en is low the edge is suppressed and the register keeps its
// contents, exactly as a gated latch stays opaque. Clock gating itself is
// left to the synthesis tool, which maps an enabled register onto an
// integrated clock-gating cell.
//
// Interface: d/q of width W, en sampled on the selected edge, asynchronous
// active-low reset to RESET_VAL.
module isp_reg
  import isp_pkg::*;
#(
  parameter int unsigned    W         = 1,
  parameter edge_e          EDGE      = EDGE_RISE,
  parameter logic [W-1:0]   RESET_VAL = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  if (EDGE == EDGE_RISE) begin : g_rise
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n)  q <= RESET_VAL;
      else if (en) q <= d;
  end else begin : g_fall
    always_ff @(negedge clk or negedge rst_n)
      if (!rst_n)  q <= RESET_VAL;
      else if (en) q <= d;
  end

endmodule
