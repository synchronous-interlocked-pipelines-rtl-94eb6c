// isp_branch: 1 to 1-of-N branch template of the ISP library.
//
// Combinational valid/stall network that routes the item of one upstream
// stage to exactly one of N downstream stages. The choice is made by the
// datapath as a one-hot enable vector; the enables mask the valid bit so
// that only the selected stage sees a valid item. The upstream stage is
// stalled only when the selected destination is stalled; a stall of any
// other destination does not affect it:
//   valid_dn[i] = valid & enable[i]
//   stall_up_d  = (valid_dn[0] & stall_dn[0]) | ... | (valid_dn[N-1] & stall_dn[N-1])
// The data outputs are plain wires from the data inputs: only the valid
// and stall signals need logic here.
//
// Interface: valid/data/enable from the upstream stage (enable computed from
// its data), stall_dn from the downstream stall registers; valid_dn and
// data_dn go to the downstream stages, stall_up_d to the upstream stall
// register. An assertion checks that enable is one-hot whenever valid is 1.
module isp_branch #(
  parameter int unsigned N = 2,
  parameter int unsigned W = 8
) (
  input  logic                valid,
  input  logic [W-1:0]        data,
  input  logic [N-1:0]        enable,
  output logic                stall_up_d,
  output logic [N-1:0]        valid_dn,
  output logic [N-1:0][W-1:0] data_dn,
  input  logic [N-1:0]        stall_dn
);

  always_comb begin
    stall_up_d = 1'b0;
    for (int i = 0; i < N; i++) begin
      valid_dn[i] = valid && enable[i];
      data_dn[i]  = data;
      stall_up_d  = stall_up_d || (valid_dn[i] && stall_dn[i]);
    end
  end

  always_comb
    if (valid) assert (enable != '0 && (enable & (enable - 1'b1)) == '0)
      else $error("isp_branch: enable is not one-hot for a valid item");

endmodule
