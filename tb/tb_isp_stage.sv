// tb_isp_stage: checks one ISP stage of each edge type against a reference
// model under random data, valid and stall inputs: data loads on the
// stage's own edge only when the stage is not stalled and the incoming item
// is valid, valid loads whenever the stage is not stalled, and the stall
// register loads on the opposite edge. The stall input follows the rule of
// every connecting network (it is qualified by the stage's own valid bit).
`timescale 1ns/1ps
module tb_isp_stage;
  import isp_pkg::*;
  localparam int W = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] d_in = '0;
  logic v_in = 1'b0, req_stall = 1'b0;
  logic [W-1:0] q_r, q_f;
  logic v_r, v_f, s_r, s_f;

  isp_stage #(.W(W), .EDGE(EDGE_RISE)) dut_r (
    .clk, .rst_n, .d_in, .v_in, .stall_d(req_stall && v_r), .q(q_r), .v_q(v_r), .stall_q(s_r));
  isp_stage #(.W(W), .EDGE(EDGE_FALL)) dut_f (
    .clk, .rst_n, .d_in, .v_in, .stall_d(req_stall && v_f), .q(q_f), .v_q(v_f), .stall_q(s_f));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int stalls_r = 0, holds_r = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // reference models
  logic [W-1:0] mq_r = '0, mq_f = '0;
  logic mv_r = 0, mv_f = 0, ms_r = 0, ms_f = 0;
  always @(posedge clk) if (rst_n) begin
    if (!ms_r) begin mv_r <= v_in; if (v_in) mq_r <= d_in; end
    else stalls_r++;
    if (!ms_r && !v_in) holds_r++;
    ms_f <= req_stall && mv_f;
  end
  always @(negedge clk) if (rst_n) begin
    if (!ms_f) begin mv_f <= v_in; if (v_in) mq_f <= d_in; end
    ms_r <= req_stall && mv_r;
  end

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #2 rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      // change inputs a quarter period after each edge, check before the next
      @(edge clk); #2;
      check(q_r == mq_r && v_r == mv_r && s_r == ms_r, "rising-edge stage matches model");
      check(q_f == mq_f && v_f == mv_f && s_f == ms_f, "falling-edge stage matches model");
      d_in = W'($urandom_range(255));
      v_in = 1'($urandom_range(3) != 0);
      req_stall = 1'($urandom_range(2) == 0);
    end
    check(stalls_r > 100 && holds_r > 100, "stalls and holes both exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
