// isp_select: 1-of-N to 1 priority select template of the ISP library.
//
// Combinational valid/stall/data network that passes the item of one of N
// upstream stages to a single downstream stage: a multiplexer that is also an
// arbiter. The valid upstream stage with the highest index wins; every other
// valid upstream stage stalls until it is chosen, and the winner stalls
// while the downstream stage is stalled:
//   valid_dn      = valid_up[0] | ... | valid_up[N-1]
//   stall_up_d[i] = valid_up[i] & (stall_dn | valid_up[i+1] | ... | valid_up[N-1])
//   data_dn       = data_up[k], k the highest index with valid_up[k] = 1
// Interface: as isp_join; all upstream stages load on the same edge.
module isp_select #(
  parameter int unsigned N = 2,
  parameter int unsigned W = 8
) (
  input  logic [N-1:0]        valid_up,
  input  logic [N-1:0][W-1:0] data_up,
  output logic [N-1:0]        stall_up_d,
  output logic                valid_dn,
  output logic [W-1:0]        data_dn,
  input  logic                stall_dn
);

  logic higher;   // a valid stage of higher priority than i exists

  always_comb begin
    valid_dn = |valid_up;
    data_dn  = data_up[0];
    higher   = 1'b0;
    for (int i = N - 1; i >= 0; i--) begin
      stall_up_d[i] = valid_up[i] && (stall_dn || higher);
      if (valid_up[i] && !higher) data_dn = data_up[i];
      higher = higher || valid_up[i];
    end
  end

endmodule
