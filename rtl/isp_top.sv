// isp_top: a small interlocked synchronous pipeline system built from the
// library's stages and templates, plus the elastic pipeline and the gated
// latch pair beside it.
//
// Data path of the interlocked system (every arrow is a valid/stall link,
// stages alternate between the rising and the falling edge of clk):
//
//   in -> ISP pipeline (N_ISP stages, local stall in its last stage)
//      -> aligned fork --+-> path A: master-slave ISP (NS_MS segments) ----------+
//                        +-> path B: stage -> branch --> ring (RING_K) --+        |
//                                                   \--> direct ISP ---> select   |
//                                                                 -> merge ISP ---+
//      -> join {B, A} -> stage -> non-aligned fork -> out0 stage / out1 stage
//
// Words carry {count[CNT_W], payload}. Path A passes the word unchanged.
// Path B sends words with a non-zero count into the multicycle ring, which
// returns payload + count with count 0, and all others over the direct
// pipeline; the select stage gives the ring priority. Path B can therefore
// complete out of order, and the join pairs its results with path A's words
// in arrival order. The non-aligned fork then hands every joined word to two
// consumers, each with its own stall.
//
// Side by side, with their own ports: a two-phase elastic pipeline (no valid
// bits) of ESP_N stages and the gated latch pair.
//
// Timing: in_* is taken on the rising edge when in_valid && !in_stall.
// out0/out1 change on the falling edge and are taken on the rising edge when
// their stall is low. The ESP takes esp_in_data on the rising edge unless
// esp_in_stall is high and delivers on the rising edge unless esp_out_stall
// is high. Keep out0/out1 stalls short while items circulate in the ring
// (see isp_ring).
module isp_top
  import isp_pkg::*;
#(
  parameter int unsigned W        = 8,
  parameter int unsigned CNT_W    = 3,
  parameter int unsigned N_ISP    = 4,
  parameter int unsigned NS_MS    = 2,
  parameter int unsigned RING_K   = 3,
  parameter int unsigned N_DIRECT = 3,
  parameter int unsigned ESP_N    = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  // interlocked system
  input  logic [W-1:0]   in_data,
  input  logic           in_valid,
  output logic           in_stall,
  input  logic           local_stall,
  output logic [2*W-1:0] out0_data,
  output logic           out0_valid,
  input  logic           out0_stall,
  output logic [2*W-1:0] out1_data,
  output logic           out1_valid,
  input  logic           out1_stall,
  // elastic pipeline
  input  logic [W-1:0]   esp_in_data,
  output logic           esp_in_stall,
  output logic [W-1:0]   esp_out_data,
  input  logic           esp_out_stall,
  // gated latch pair
  input  logic [W-1:0]   lp_d,
  input  logic           lp_gate1,
  input  logic           lp_gate2,
  output logic [W-1:0]   lp_q1,
  output logic [W-1:0]   lp_q
);

  // ---------------- front ISP pipeline and aligned fork ----------------
  logic [W-1:0] p_data;
  logic p_valid, p_stall;
  logic [1:0] fk_valid, fk_stall;
  logic [1:0][W-1:0] fk_data;

  isp_pipeline #(.W(W), .N(N_ISP), .FIRST_EDGE(EDGE_RISE)) u_front (
    .clk, .rst_n, .in_data, .in_valid, .in_stall,
    .out_data(p_data), .out_valid(p_valid), .out_stall(p_stall), .local_stall);

  isp_fork #(.N(2), .W(W)) u_fork (
    .valid(p_valid), .data(p_data), .stall_up_d(p_stall),
    .valid_dn(fk_valid), .data_dn(fk_data), .stall_dn(fk_stall));

  // ---------------- path A: master-slave ISP ----------------
  logic [W-1:0] a_data;
  logic a_valid, a_stall;

  isp_ms_pipeline #(.W(W), .NS(NS_MS)) u_path_a (
    .clk, .rst_n, .in_data(fk_data[0]), .in_valid(fk_valid[0]), .in_stall(fk_stall[0]),
    .out_data(a_data), .out_valid(a_valid), .out_stall(a_stall));

  // ---------------- path B: branch, ring / direct, select ----------------
  logic [W-1:0] b_q;
  logic b_v, b_s, b_s_d;
  logic [1:0] br_en, br_valid, br_stall;
  logic [1:0][W-1:0] br_data;

  isp_stage #(.W(W), .EDGE(EDGE_RISE)) u_b_stage (
    .clk, .rst_n, .d_in(fk_data[1]), .v_in(fk_valid[1]), .stall_d(b_s_d),
    .q(b_q), .v_q(b_v), .stall_q(b_s));
  assign fk_stall[1] = b_s;

  // output 1 = ring (count != 0), output 0 = direct pipeline
  assign br_en[1] = (b_q[W-1 -: CNT_W] != '0);
  assign br_en[0] = !br_en[1];

  isp_branch #(.N(2), .W(W)) u_branch (
    .valid(b_v), .data(b_q), .enable(br_en), .stall_up_d(b_s_d),
    .valid_dn(br_valid), .data_dn(br_data), .stall_dn(br_stall));

  logic [1:0] sel_valid, sel_stall;
  logic [1:0][W-1:0] sel_data;

  isp_ring #(.W(W), .CNT_W(CNT_W), .K(RING_K)) u_ring (
    .clk, .rst_n, .in_data(br_data[1]), .in_valid(br_valid[1]), .in_stall(br_stall[1]),
    .out_data(sel_data[1]), .out_valid(sel_valid[1]), .out_stall(sel_stall[1]));

  isp_pipeline #(.W(W), .N(N_DIRECT), .FIRST_EDGE(EDGE_FALL)) u_direct (
    .clk, .rst_n, .in_data(br_data[0]), .in_valid(br_valid[0]), .in_stall(br_stall[0]),
    .out_data(sel_data[0]), .out_valid(sel_valid[0]), .out_stall(sel_stall[0]),
    .local_stall(1'b0));

  logic [W-1:0] m_in_data, b_data;
  logic m_in_valid, m_in_stall, b_valid, b_stall;

  isp_select #(.N(2), .W(W)) u_select (
    .valid_up(sel_valid), .data_up(sel_data), .stall_up_d(sel_stall),
    .valid_dn(m_in_valid), .data_dn(m_in_data), .stall_dn(m_in_stall));

  isp_pipeline #(.W(W), .N(2), .FIRST_EDGE(EDGE_RISE)) u_merge (
    .clk, .rst_n, .in_data(m_in_data), .in_valid(m_in_valid), .in_stall(m_in_stall),
    .out_data(b_data), .out_valid(b_valid), .out_stall(b_stall), .local_stall(1'b0));

  // ---------------- join, output stage, non-aligned fork ----------------
  logic [1:0] j_stall;
  logic j_valid;
  logic [2*W-1:0] j_data, o_q;
  logic o_v, o_s, o_s_d;

  isp_join #(.N(2), .W(W)) u_join (
    .valid_up({b_valid, a_valid}), .data_up({b_data, a_data}), .stall_up_d(j_stall),
    .valid_dn(j_valid), .data_dn(j_data), .stall_dn(o_s));
  assign a_stall = j_stall[0];
  assign b_stall = j_stall[1];

  isp_stage #(.W(2*W), .EDGE(EDGE_RISE)) u_o_stage (
    .clk, .rst_n, .d_in(j_data), .v_in(j_valid), .stall_d(o_s_d),
    .q(o_q), .v_q(o_v), .stall_q(o_s));

  logic [1:0] nf_valid, nf_stall;
  logic [1:0][2*W-1:0] nf_data;

  isp_fork_nonaligned #(.N(2), .W(2*W), .DN_EDGE(EDGE_FALL)) u_bcast (
    .clk, .rst_n, .valid(o_v), .data(o_q), .stall_up_d(o_s_d),
    .valid_dn(nf_valid), .data_dn(nf_data), .stall_dn(nf_stall));

  isp_stage #(.W(2*W), .EDGE(EDGE_FALL)) u_out0 (
    .clk, .rst_n, .d_in(nf_data[0]), .v_in(nf_valid[0]), .stall_d(out0_valid && out0_stall),
    .q(out0_data), .v_q(out0_valid), .stall_q(nf_stall[0]));

  isp_stage #(.W(2*W), .EDGE(EDGE_FALL)) u_out1 (
    .clk, .rst_n, .d_in(nf_data[1]), .v_in(nf_valid[1]), .stall_d(out1_valid && out1_stall),
    .q(out1_data), .v_q(out1_valid), .stall_q(nf_stall[1]));

  // ---------------- side by side ----------------
  esp_pipeline #(.W(W), .N(ESP_N), .FIRST_EDGE(EDGE_RISE)) u_esp (
    .clk, .rst_n, .in_data(esp_in_data), .in_stall(esp_in_stall),
    .out_data(esp_out_data), .out_stall(esp_out_stall));

  latch_pair #(.W(W)) u_latch_pair (
    .clk, .rst_n, .d(lp_d), .gate1(lp_gate1), .gate2(lp_gate2), .q1(lp_q1), .q(lp_q));

endmodule
