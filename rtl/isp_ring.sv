// isp_ring: fully interleaved multicycle ISP ring with out-of-order completion.
//
// A circular interlocked pipeline for computations that need a data-dependent
// number of passes through the same logic. Structure, in ring order:
//   in_reg  - input stage taking items from the environment
//   select  - isp_select template, the feedback stage has priority, so a new
//             item enters only on an edge where no item returns
//   R[0..K-1] - K ring stages on alternating edges (K odd), linked like an
//             isp_pipeline; R[K-1] is the branch stage
//   branch  - isp_branch template, sends the item either to out_reg or back
//             through fb_reg to the select stage
//   fb_reg  - feedback stage; out_reg - output stage to the environment.
// Several items circulate at once, interleaved, and leave in the order their
// computations finish. Stalls from the output propagate stage by stage
// around the ring exactly as in a linear ISP.
//
// Example datapath (this implementation's choice): a word is
// {count[CNT_W], payload}. At the branch stage an item with count 0 leaves;
// any other item goes back, and the logic in front of fb_reg decrements the
// count and increments the payload. An item entering with count c therefore
// makes c+1 passes and leaves with payload + c.
//
// Caution: a ring completely filled with items that all still need another
// pass cannot move (every stage waits for the next). This happens only after
// a long output stall has compacted the ring and a new item has filled the
// last bubble; keep output stalls short while items are circulating.
//
// Timing: in_reg, fb_reg and out_reg load on the falling edge, R[0] on the
// rising edge. The source offers an item before a falling edge and it is
// taken when in_valid && !in_stall there; out_valid/out_data change on the
// falling edge and the sink takes the item on the rising edge when
// out_stall is low. Alone in the ring, an item with count c spends
// (K+1)/2 * (c+1) cycles from in_reg to out_reg.
module isp_ring
  import isp_pkg::*;
#(
  parameter int unsigned W     = 8,
  parameter int unsigned CNT_W = 3,
  parameter int unsigned K     = 3
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

  localparam int unsigned PW = W - CNT_W;   // payload width
  localparam int FB = 1, IN = 0;            // select inputs, FB has priority
  localparam int OUT = 0;                   // branch outputs

  // input, feedback and output stages
  logic [W-1:0] in_q, fb_q, fb_d, out_q;
  logic in_v, fb_v, out_v, in_s, fb_s, out_s, out_s_d;
  logic [1:0] sel_stall_d;

  // ring stages
  logic [W-1:0] q [K];
  logic v [K], s [K], s_d [K];

  // templates
  logic sel_valid;
  logic [W-1:0] sel_data;
  logic br_stall_d;
  logic [1:0] br_enable, br_valid;
  logic [1:0][W-1:0] br_data;
  logic [CNT_W-1:0] br_count;

  isp_stage #(.W(W), .EDGE(EDGE_FALL)) u_in (
    .clk, .rst_n, .d_in(in_data), .v_in(in_valid), .stall_d(sel_stall_d[IN]),
    .q(in_q), .v_q(in_v), .stall_q(in_s));

  isp_select #(.N(2), .W(W)) u_select (
    .valid_up({fb_v, in_v}), .data_up({fb_q, in_q}), .stall_up_d(sel_stall_d),
    .valid_dn(sel_valid), .data_dn(sel_data), .stall_dn(s[0]));

  for (genvar i = 0; i < K; i++) begin : g_ring
    localparam edge_e E = (i % 2 == 0) ? EDGE_RISE : EDGE_FALL;
    if (i == K - 1) begin : g_branch
      assign s_d[i] = br_stall_d;
    end else begin : g_mid
      assign s_d[i] = v[i] && s[i+1];
    end
    isp_stage #(.W(W), .EDGE(E)) u_stage (
      .clk, .rst_n,
      .d_in   (i == 0 ? sel_data  : q[(i == 0) ? 0 : i-1]),
      .v_in   (i == 0 ? sel_valid : v[(i == 0) ? 0 : i-1]),
      .stall_d(s_d[i]),
      .q(q[i]), .v_q(v[i]), .stall_q(s[i]));
  end

  // branch decision from the branch stage's data
  assign br_count = q[K-1][W-1 -: CNT_W];
  assign br_enable[OUT] = (br_count == '0);
  assign br_enable[FB]  = (br_count != '0);

  isp_branch #(.N(2), .W(W)) u_branch (
    .valid(v[K-1]), .data(q[K-1]), .enable(br_enable), .stall_up_d(br_stall_d),
    .valid_dn(br_valid), .data_dn(br_data), .stall_dn({fb_s, out_s}));

  // logic of one more pass, in front of the feedback stage
  assign fb_d = {br_data[FB][W-1 -: CNT_W] - CNT_W'(1), br_data[FB][PW-1:0] + PW'(1)};

  isp_stage #(.W(W), .EDGE(EDGE_FALL)) u_fb (
    .clk, .rst_n, .d_in(fb_d), .v_in(br_valid[FB]), .stall_d(sel_stall_d[FB]),
    .q(fb_q), .v_q(fb_v), .stall_q(fb_s));

  assign out_s_d = out_v && out_stall;
  isp_stage #(.W(W), .EDGE(EDGE_FALL)) u_out (
    .clk, .rst_n, .d_in(br_data[OUT]), .v_in(br_valid[OUT]), .stall_d(out_s_d),
    .q(out_q), .v_q(out_v), .stall_q(out_s));

  assign in_stall  = in_s;
  assign out_data  = out_q;
  assign out_valid = out_v;

  if (K % 2 == 0) begin : g_bad_k
    $error("isp_ring: K must be odd so that the ring alternates clock edges");
  end

endmodule
