// isp_fork_nonaligned: non-synchronized 1-to-N fork of the ISP library.
//
// Like isp_fork, it copies the item of one upstream stage into N downstream
// stages, but each copy is delivered as soon as its own destination is not
// stalled, so an unstalled branch gets an early start. A register per
// destination (done) remembers which copies have already been delivered so
// that no destination receives a duplicate; the upstream stage stays
// stalled until the last copy has gone, and then done is cleared.
//   valid_dn[i] = valid & ~done[i]
//   sent[i]     = valid_dn[i] & ~stall_dn[i]
//   stall_up_d  = valid & ~&(done | sent)
//   done       <= (valid & ~&(done | sent)) ? (done | sent) : 0
// The done registers load on DN_EDGE, the edge on which the downstream
// stages load their valid bits and the upstream stage loads its stall bit.
// The data outputs are plain wires from the data inputs: only the valid
// and stall signals need logic here.
//
// Interface: as isp_fork, plus clock and reset; reset clears done.
module isp_fork_nonaligned
  import isp_pkg::*;
#(
  parameter int unsigned N       = 2,
  parameter int unsigned W       = 8,
  parameter edge_e       DN_EDGE = EDGE_RISE
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                valid,
  input  logic [W-1:0]        data,
  output logic                stall_up_d,
  output logic [N-1:0]        valid_dn,
  output logic [N-1:0][W-1:0] data_dn,
  input  logic [N-1:0]        stall_dn
);

  logic [N-1:0] done, sent, done_d;

  always_comb begin
    valid_dn   = {N{valid}} & ~done;
    sent       = valid_dn & ~stall_dn;
    stall_up_d = valid && !(&(done | sent));
    done_d     = stall_up_d ? (done | sent) : '0;
    for (int i = 0; i < N; i++) data_dn[i] = data;
  end

  isp_reg #(.W(N), .EDGE(DN_EDGE)) u_done (
    .clk, .rst_n, .en(1'b1), .d(done_d), .q(done)
  );

endmodule
