// isp_fork: synchronized (aligned) 1-to-N fork template of the ISP library.
//
// Combinational valid/stall network placed between one upstream stage and N
// downstream stages, which all receive a copy of the upstream data. The
// copies are delivered in the same clock edge or not at all: while any
// downstream stage is stalled the fork offers no valid to any of them (so no
// stage receives a duplicate) and stalls the upstream stage:
//   stall_up_d = valid & (stall_dn[0] | ... | stall_dn[N-1])
//   valid_dn[i] = valid & ~(stall_dn[0] | ... | stall_dn[N-1])
// The data outputs are plain wires from the data inputs: only the valid
// and stall signals need logic here.
//
// Interface: valid/data come from the upstream stage's registers, stall_dn
// from the downstream stall registers. valid_dn/data_dn feed the downstream
// stages' valid and data inputs; stall_up_d feeds the upstream stall
// register. No clock: the timing is that of the stages it connects.
module isp_fork #(
  parameter int unsigned N = 2,
  parameter int unsigned W = 8
) (
  input  logic                valid,
  input  logic [W-1:0]        data,
  output logic                stall_up_d,
  output logic [N-1:0]        valid_dn,
  output logic [N-1:0][W-1:0] data_dn,
  input  logic [N-1:0]        stall_dn
);

  logic any_stall;

  always_comb begin
    any_stall  = |stall_dn;
    stall_up_d = valid && any_stall;
    for (int i = 0; i < N; i++) begin
      valid_dn[i] = valid && !any_stall;
      data_dn[i]  = data;
    end
  end

endmodule
