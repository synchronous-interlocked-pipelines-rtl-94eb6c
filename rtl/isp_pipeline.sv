// isp_pipeline: linear two-phase clocked interlocked synchronous pipeline.
//
// N isp_stage instances in series on alternating clock edges (stage 1 on
// FIRST_EDGE). Valid bits travel forward with the data; stall bits travel
// backward one stage per clock edge. Between neighbouring stall latches an
// AND with the upstream stage's valid bit cancels the stall wherever there is
// a hole, so upstream items keep moving until the holes are filled and a
// stall only reaches the input when the pipeline is full. In the last stage
// an OR merges the stall from the downstream environment with a stall raised
// by the stage itself (local_stall); while local_stall is high the last
// stage holds its item and does not offer it (out_valid is masked).
//
// Handshake (both sides): an item moves across a boundary at the receiving
// side's edge when valid is 1 and the receiver's stall is 0. in_stall is
// stage 1's stall register and changes only on the edge opposite to
// FIRST_EDGE. out_valid/out_data change on the last stage's edge; the sink
// takes the item on the opposite edge when out_stall is 0 there. The
// combinational logic between the latches is left out: data passes unchanged.
// Free-running, an item takes N clock edges (N/2 cycles) from in to out and
// the pipeline holds N/2 items; fully stalled it holds N.
module isp_pipeline
  import isp_pkg::*;
#(
  parameter int unsigned W          = 8,
  parameter int unsigned N          = 4,
  parameter edge_e       FIRST_EDGE = EDGE_RISE
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] in_data,
  input  logic         in_valid,
  output logic         in_stall,
  output logic [W-1:0] out_data,
  output logic         out_valid,
  input  logic         out_stall,
  input  logic         local_stall
);

  logic [W-1:0] q     [N];
  logic         v     [N];
  logic         s     [N];
  logic         s_d   [N];

  for (genvar i = 0; i < N; i++) begin : g_stage
    localparam edge_e E = (i % 2 == 0) ? FIRST_EDGE : other_edge(FIRST_EDGE);
    if (i == N - 1) begin : g_last
      assign s_d[i] = v[i] && (out_stall || local_stall);
    end else begin : g_mid
      assign s_d[i] = v[i] && s[i+1];
    end
    isp_stage #(.W(W), .EDGE(E)) u_stage (
      .clk, .rst_n,
      .d_in   (i == 0 ? in_data  : q[(i == 0) ? 0 : i-1]),
      .v_in   (i == 0 ? in_valid : v[(i == 0) ? 0 : i-1]),
      .stall_d(s_d[i]),
      .q      (q[i]),
      .v_q    (v[i]),
      .stall_q(s[i])
    );
  end

  assign in_stall  = s[0];
  assign out_data  = q[N-1];
  // An item held by a local stall is not offered downstream.
  assign out_valid = v[N-1] && !local_stall;

endmodule
