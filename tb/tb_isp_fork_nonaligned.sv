// tb_isp_fork_nonaligned: a source stage feeds two destination stages
// through the non-aligned fork; each destination is drained by a sink with
// its own random stall. Every sink must receive the source sequence exactly
// once and in order. The test also counts edges at which one copy was
// delivered while the other destination was stalled (the early start that
// distinguishes this fork from the aligned one) and requires some.
`timescale 1ns/1ps
module tb_isp_fork_nonaligned;
  import isp_pkg::*;
  localparam int W = 8, N = 2;
  logic clk = 1'b0, rst_n = 1'b0;

  // source stage (falling edge)
  logic [W-1:0] src_d = '0, up_q;
  logic src_v = 1'b0, up_v, up_s, up_s_d;
  isp_stage #(.W(W), .EDGE(EDGE_FALL)) u_up (
    .clk, .rst_n, .d_in(src_d), .v_in(src_v), .stall_d(up_s_d), .q(up_q), .v_q(up_v), .stall_q(up_s));

  logic [N-1:0] valid_dn, stall_dn;
  logic [N-1:0][W-1:0] data_dn;
  isp_fork_nonaligned #(.N(N), .W(W), .DN_EDGE(EDGE_RISE)) dut (
    .clk, .rst_n, .valid(up_v), .data(up_q), .stall_up_d(up_s_d),
    .valid_dn, .data_dn, .stall_dn);

  // destination stages (rising edge) and sinks
  logic [W-1:0] dn_q [N];
  logic dn_v [N];
  logic [N-1:0] sink_stall = '0;
  for (genvar k = 0; k < N; k++) begin : g_dn
    isp_stage #(.W(W), .EDGE(EDGE_RISE)) u_dn (
      .clk, .rst_n, .d_in(data_dn[k]), .v_in(valid_dn[k]),
      .stall_d(dn_v[k] && sink_stall[k]), .q(dn_q[k]), .v_q(dn_v[k]), .stall_q(stall_dn[k]));
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0, early = 0, sent_cnt = 0;
  logic [W-1:0] exp_q [N][$];
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // source and sinks act on the falling edge
  always @(negedge clk) if (rst_n) begin
    if (src_v && !up_s) begin
      for (int k = 0; k < N; k++) exp_q[k].push_back(src_d);
      sent_cnt++;
    end
    if (!src_v || !up_s) begin
      src_v <= ($urandom_range(3) != 0);
      src_d <= W'($urandom_range(255));
    end
    for (int k = 0; k < N; k++) begin
      if (dn_v[k] && !sink_stall[k]) begin
        check(exp_q[k].size() > 0, "copy delivered that was never sent");
        if (exp_q[k].size() > 0) begin
          check(dn_q[k] == exp_q[k][0], $sformatf("destination %0d got %02h expected %02h", k, dn_q[k], exp_q[k][0]));
          void'(exp_q[k].pop_front());
        end
      end
      sink_stall[k] <= ($urandom_range(99) < 45);
    end
  end
  // early start: at a rising edge one destination takes a copy, the other is stalled
  always @(posedge clk) if (rst_n)
    if ((valid_dn[0] && !stall_dn[0] && stall_dn[1]) || (valid_dn[1] && !stall_dn[1] && stall_dn[0]))
      early++;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (4000) @(posedge clk);
    // drain
    @(negedge clk); force src_v = 1'b0; force sink_stall = '0;
    repeat (20) @(posedge clk);
    for (int k = 0; k < N; k++) check(exp_q[k].size() == 0, $sformatf("destination %0d drained", k));
    check(sent_cnt > 1000, "enough items sent");
    check(early > 50, $sformatf("early deliveries seen: %0d", early));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
