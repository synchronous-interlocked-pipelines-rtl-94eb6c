// isp_join: N to 1 join template of the ISP library.
//
// Combinational valid/stall network that waits until all N upstream stages
// hold valid data and then passes the concatenation of their data words to
// one downstream stage. An upstream stage that is valid stalls while the
// others are not yet valid, or while the downstream stage is stalled:
//   valid_dn    = valid_up[0] & ... & valid_up[N-1]
//   stall_up_d[i] = valid_up[i] & (~valid_dn | stall_dn)
// data_dn = {data_up[N-1], ..., data_up[0]}.
// The data outputs are plain wires from the data inputs: only the valid
// and stall signals need logic here.
//
// Interface: valid_up/data_up from the upstream stages' registers, stall_dn
// from the downstream stall register; stall_up_d feeds each upstream stall
// register. All upstream stages must load on the same clock edge.
module isp_join #(
  parameter int unsigned N = 2,
  parameter int unsigned W = 8
) (
  input  logic [N-1:0]        valid_up,
  input  logic [N-1:0][W-1:0] data_up,
  output logic [N-1:0]        stall_up_d,
  output logic                valid_dn,
  output logic [N*W-1:0]      data_dn,
  input  logic                stall_dn
);

  always_comb begin
    valid_dn = &valid_up;
    data_dn  = data_up;
    for (int i = 0; i < N; i++)
      stall_up_d[i] = valid_up[i] && (!valid_dn || stall_dn);
  end

endmodule
