// isp_stage: one stage of an interlocked synchronous pipeline (ISP).
//
// A stage holds a data word, a valid bit and a stall bit. The data and valid
// registers load on the stage's own edge (EDGE). The stall register loads on
// the opposite edge, so it is stable during the whole phase in which the
// stage's data latch would be transparent, and it gates that phase:
//   * stall_q = 1 : data and valid keep their contents (the stage is stalled
//                   and holds its item; this is the backward interlock).
//   * v_in    = 0 : the data register is not clocked (forward interlock,
//                   fine-grained power down). The valid register still loads
//                   the 0, so a hole is created in place rather than copied.
// The value loaded into the stall register, stall_d, is computed outside the
// stage by the network that connects it to its neighbours: for a plain
// pipeline it is v_q AND (stall_q of the next stage), which lets a hole
// absorb a stall instead of passing it upstream. Forks, joins, branches and
// selects compute it with their own template functions.
//
// Because every network qualifies stall_d with this stage's own valid bit,
// a stage can only be stalled while it holds valid data; an assertion checks
// this.
//
// Interface: d_in/v_in from the upstream stage (through any logic), q/v_q to
// the downstream stage, stall_d in and stall_q out. All outputs are
// registers. Reset clears valid and stall.
module isp_stage
  import isp_pkg::*;
#(
  parameter int unsigned W    = 8,
  parameter edge_e       EDGE = EDGE_RISE
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d_in,
  input  logic         v_in,
  input  logic         stall_d,
  output logic [W-1:0] q,
  output logic         v_q,
  output logic         stall_q
);

  // Data latch: gated by the stall latch and by the incoming valid bit.
  isp_reg #(.W(W), .EDGE(EDGE)) u_data (
    .clk, .rst_n, .en(!stall_q && v_in), .d(d_in), .q(q)
  );

  // Valid latch: gated by the stall latch only.
  isp_reg #(.W(1), .EDGE(EDGE)) u_valid (
    .clk, .rst_n, .en(!stall_q), .d(v_in), .q(v_q)
  );

  // Stall latch: never gated, clocked on the opposite edge.
  isp_reg #(.W(1), .EDGE(other_edge(EDGE))) u_stall (
    .clk, .rst_n, .en(1'b1), .d(stall_d), .q(stall_q)
  );

  // A stage can only be stalled while it holds valid data.
  a_stall_needs_valid: assert property (
    @(clk) disable iff (!rst_n) (!stall_q || v_q)
  ) else $error("isp_stage: stalled while holding no valid data");

endmodule
