// esp_pipeline: two-phase clocked elastic synchronous pipeline (ESP).
//
// A plain two-phase pipeline made stallable stage by stage. Each stage adds
// one stall register, clocked on the edge opposite to its data register and
// never gated; its output gates the stage's data register. The stall input
// of the last stage comes from the downstream environment and each stall
// register feeds the one upstream, so a stall travels backward one stage per
// clock edge and never needs a global wire. While the stall window slides
// back, the bubbles that a two-phase pipeline always carries (only every
// other latch holds a live item) are filled with the items still arriving:
// N stages hold N/2 items when flowing and N items when fully stalled, and
// no item is lost. Releasing the stall re-creates the bubbles one stage per
// edge. There are no valid bits: every item is treated as data.
//
// Interface: stage 1 loads in_data on FIRST_EDGE unless in_stall is high;
// the source must hold its item while in_stall is high. out_data changes on
// the last stage's edge; the sink takes it on the opposite edge when
// out_stall is low there. Free-flow latency N/2 cycles; a stall reaches
// in_stall N edges after the edge at which out_stall is first sampled.
module esp_pipeline
  import isp_pkg::*;
#(
  parameter int unsigned W          = 8,
  parameter int unsigned N          = 4,
  parameter edge_e       FIRST_EDGE = EDGE_RISE
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] in_data,
  output logic         in_stall,
  output logic [W-1:0] out_data,
  input  logic         out_stall
);

  logic [W-1:0] q [N];
  logic         s [N];

  for (genvar i = 0; i < N; i++) begin : g_stage
    localparam edge_e E = (i % 2 == 0) ? FIRST_EDGE : other_edge(FIRST_EDGE);
    logic [W-1:0] d;
    logic         s_d;
    if (i == 0) begin : g_first
      assign d = in_data;
    end else begin : g_next
      assign d = q[i-1];
    end
    if (i == N - 1) begin : g_last
      assign s_d = out_stall;
    end else begin : g_mid
      assign s_d = s[i+1];
    end
    // data latch, gated by the stage's stall latch
    isp_reg #(.W(W), .EDGE(E)) u_data (
      .clk, .rst_n, .en(!s[i]), .d(d), .q(q[i])
    );
    // stall latch, opposite edge, never gated
    isp_reg #(.W(1), .EDGE(other_edge(E))) u_stall (
      .clk, .rst_n, .en(1'b1), .d(s_d), .q(s[i])
    );
  end

  assign in_stall = s[0];
  assign out_data = q[N-1];

endmodule
