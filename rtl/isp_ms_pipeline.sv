// isp_ms_pipeline: one-phase clocked (master-slave) interlocked pipeline.
//
// NS segments, each a master latch stage followed by a slave latch stage
// with the combinational logic only between a slave and the next master
// (here the logic is empty and data passes unchanged). The master closes on
// the rising edge of gclk and the slave on the falling edge; each has its
// own valid and stall registers and the same gating as a two-phase ISP
// stage, with the stall chain qualified by valid between every pair of
// neighbouring latches. So a flowing pipeline holds one item per segment and
// a fully stalled one holds two (master and slave both store an item), and
// stalls move back one latch per clock edge.
//
// In the circuit, the valid bit that gates the master clock is taken after
// the master latch so that the gating decision is in phase with the clock;
// that is a glitch-protection measure and has no effect at this register
// level, where the master's gating uses the incoming valid bit.
//
// Interface: as isp_pipeline. in_* are sampled on the rising edge,
// out_* change on the falling edge and are taken by the sink on the rising
// edge when out_stall is low. Free-flow latency NS cycles.
module isp_ms_pipeline
  import isp_pkg::*;
#(
  parameter int unsigned W  = 8,
  parameter int unsigned NS = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] in_data,
  input  logic         in_valid,
  output logic         in_stall,
  output logic [W-1:0] out_data,
  output logic         out_valid,
  input  logic         out_stall
);

  // latch 2*s is the master of segment s, latch 2*s+1 its slave
  localparam int unsigned NL = 2 * NS;
  logic [W-1:0] q [NL];
  logic         v [NL];
  logic         s [NL];
  logic         s_d [NL];

  for (genvar l = 0; l < NL; l++) begin : g_latch
    localparam edge_e E = (l % 2 == 0) ? EDGE_RISE : EDGE_FALL;
    logic [W-1:0] d;
    logic         vi;
    if (l == 0) begin : g_first
      assign d  = in_data;
      assign vi = in_valid;
    end else begin : g_next
      assign d  = q[l-1];
      assign vi = v[l-1];
    end
    if (l == NL - 1) begin : g_last
      assign s_d[l] = v[l] && out_stall;
    end else begin : g_mid
      assign s_d[l] = v[l] && s[l+1];
    end
    isp_stage #(.W(W), .EDGE(E)) u_latch (
      .clk, .rst_n, .d_in(d), .v_in(vi), .stall_d(s_d[l]),
      .q(q[l]), .v_q(v[l]), .stall_q(s[l])
    );
  end

  assign in_stall  = s[0];
  assign out_data  = q[NL-1];
  assign out_valid = v[NL-1];

endmodule
