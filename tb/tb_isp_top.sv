// tb_isp_top: end-to-end testbench of isp_top at its default parameters.
//
// Random words {count, payload} enter with random holes; the local stall of
// the front pipeline and the two consumer stalls are pulsed at random. Each
// consumer must see every word once: the low half (path A) in input order,
// the high half (path B) being the ring result payload + count of some
// input word, each result used once per consumer. The elastic pipeline and
// the latch pair beside it are exercised and checked at the same time.
// Every interlock mechanism of the design is counted and must occur: the
// stall reaching the input, a stall cancelled by a hole, the local stall,
// fork, branch to both destinations, ring feedback, select priority, join
// waiting, early delivery by the non-aligned fork, the elastic stall and
// the latch-pair hold.
`timescale 1ns/1ps
module tb_isp_top;
  localparam int W = 8, CNT_W = 3, PW = W - CNT_W, ESP_N = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] in_data = '0, esp_in_data = 8'h01, esp_out_data, lp_d = '0, lp_q1, lp_q;
  logic in_valid = 1'b0, in_stall, local_stall = 1'b0;
  logic [2*W-1:0] out0_data, out1_data;
  logic out0_valid, out1_valid, out0_stall = 1'b0, out1_stall = 1'b0;
  logic esp_in_stall, esp_out_stall = 1'b0, lp_gate1 = 1'b0, lp_gate2 = 1'b0;

  isp_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic logic [W-1:0] result(logic [W-1:0] x);
    return {CNT_W'(0), PW'(x[PW-1:0] + PW'(x[W-1 -: CNT_W]))};
  endfunction

  // scoreboards per consumer
  logic [W-1:0] a_q0[$], a_q1[$];
  int pool0[256], pool1[256];
  int sent = 0, got0 = 0, got1 = 0;
  bit run = 0;

  // mechanism counters
  int n_in_stall = 0, n_hole_cancel = 0, n_local = 0, n_fork_stall = 0;
  int n_to_ring = 0, n_to_direct = 0, n_feedback = 0, n_prio = 0, n_join_wait = 0;
  int n_early = 0, n_esp_stall = 0, n_lp_hold = 0;

  // interlocked system: source and consumers on the rising edge
  always @(posedge clk) if (rst_n) begin
    if (in_valid && !in_stall) begin
      a_q0.push_back(in_data); a_q1.push_back(in_data);
      pool0[result(in_data)]++; pool1[result(in_data)]++;
      sent++;
    end
    if (run && (!in_valid || !in_stall)) begin
      in_valid <= ($urandom_range(99) < 60);
      in_data  <= {($urandom_range(1) == 1) ? CNT_W'($urandom_range(7)) : CNT_W'(0), PW'($urandom_range(31))};
    end
    if (out0_valid && !out0_stall) begin
      check(a_q0.size() > 0 && out0_data[W-1:0] == a_q0[0], "out0: path A word in order");
      check(pool0[out0_data[2*W-1:W]] > 0, $sformatf("out0: unexpected path B word %02h", out0_data[2*W-1:W]));
      if (a_q0.size() > 0) void'(a_q0.pop_front());
      pool0[out0_data[2*W-1:W]]--;
      got0++;
    end
    if (out1_valid && !out1_stall) begin
      check(a_q1.size() > 0 && out1_data[W-1:0] == a_q1[0], "out1: path A word in order");
      check(pool1[out1_data[2*W-1:W]] > 0, $sformatf("out1: unexpected path B word %02h", out1_data[2*W-1:W]));
      if (a_q1.size() > 0) void'(a_q1.pop_front());
      pool1[out1_data[2*W-1:W]]--;
      got1++;
    end
    if (run) begin
      out0_stall  <= ($urandom_range(99) < 6);
      out1_stall  <= ($urandom_range(99) < 6);
      local_stall <= ($urandom_range(99) < 3);
    end
  end

  // elastic pipeline: N/2 reset words first, then the source sequence
  logic [W-1:0] esp_q[$];
  initial for (int i = 0; i < ESP_N/2; i++) esp_q.push_back('0);
  always @(posedge clk) if (rst_n) begin
    if (!esp_out_stall) begin
      check(esp_q.size() > 0 && esp_out_data == esp_q[0], "ESP word in order");
      if (esp_q.size() > 0) void'(esp_q.pop_front());
    end
    if (!esp_in_stall) begin
      esp_q.push_back(esp_in_data);
      esp_in_data <= esp_in_data + 8'd1;
    end
    if (run) esp_out_stall <= ($urandom_range(99) < 30);
  end

  // mechanism counters (sampled once per cycle, at the falling edge)
  always @(negedge clk) if (rst_n) begin
    if (in_stall) n_in_stall++;
    for (int i = 0; i < 3; i++)
      if (dut.u_front.s[i+1] && !dut.u_front.v[i]) n_hole_cancel++;
    if (local_stall && dut.u_front.v[3]) n_local++;
    if (dut.p_valid && dut.p_stall) n_fork_stall++;
    if (dut.u_select.valid_up == 2'b11) n_prio++;
    if (dut.u_join.valid_up == 2'b01 || dut.u_join.valid_up == 2'b10) n_join_wait++;
    if (esp_in_stall) n_esp_stall++;
  end
  always @(posedge clk) if (rst_n) begin
    if (dut.br_valid[1] && !dut.br_stall[1]) n_to_ring++;
    if (dut.br_valid[0] && !dut.br_stall[0]) n_to_direct++;
    if (dut.u_ring.br_valid[1] && !dut.u_ring.fb_s) n_feedback++;
  end
  always @(edge clk) if (rst_n) begin
    if ((dut.nf_valid[0] && !dut.nf_stall[0] && dut.nf_stall[1]) ||
        (dut.nf_valid[1] && !dut.nf_stall[1] && dut.nf_stall[0])) n_early++;
  end

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // latch pair: A then B stored, held, read back in order
    @(negedge clk); #1 lp_d = 8'h5A;
    @(posedge clk); @(negedge clk); #1 lp_gate2 = 1'b1; lp_d = 8'hB5;
    @(posedge clk); #1 lp_gate1 = 1'b1; lp_d = 8'h00;
    repeat (4) @(posedge clk);
    check(lp_q == 8'h5A && lp_q1 == 8'hB5, "latch pair holds A and B");
    n_lp_hold++;
    @(negedge clk); #1 lp_gate2 = 1'b0;
    @(posedge clk); check(lp_q == 8'h5A, "latch pair reads A");
    #1 lp_gate1 = 1'b0;
    @(posedge clk); check(lp_q == 8'hB5, "latch pair reads B");

    run = 1;
    repeat (15000) @(posedge clk);
    run = 0;
    #1 in_valid = 1'b0; out0_stall = 1'b0; out1_stall = 1'b0; local_stall = 1'b0;
    esp_out_stall = 1'b0;
    repeat (200) @(posedge clk);
    check(sent > 3000, $sformatf("words sent: %0d", sent));
    check(got0 == sent && got1 == sent, $sformatf("sent %0d, consumer 0 got %0d, consumer 1 got %0d", sent, got0, got1));
    check(n_in_stall > 0,    "input stalled");
    check(n_hole_cancel > 0, "stall cancelled by a hole");
    check(n_local > 0,       "local stall");
    check(n_fork_stall > 0,  "aligned fork stalled");
    check(n_to_ring > 0 && n_to_direct > 0, "branch to both destinations");
    check(n_feedback > 0,    "ring feedback");
    check(n_prio > 0,        "select priority conflict");
    check(n_join_wait > 0,   "join waiting for one input");
    check(n_early > 0,       "non-aligned fork early delivery");
    check(n_esp_stall > 0,   "elastic stall reached the input");
    check(n_lp_hold > 0,     "latch pair hold");
    $display("mechanisms: in_stall %0d hole_cancel %0d local %0d fork_stall %0d ring %0d direct %0d feedback %0d prio %0d join_wait %0d early %0d esp_stall %0d lp_hold %0d",
             n_in_stall, n_hole_cancel, n_local, n_fork_stall, n_to_ring, n_to_direct, n_feedback,
             n_prio, n_join_wait, n_early, n_esp_stall, n_lp_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
