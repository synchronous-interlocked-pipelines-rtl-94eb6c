// tb_isp_pipeline: self-checking testbench for the 4-stage two-phase ISP.
//
// Stage 1 loads on the rising edge, so the source and the sink both act on
// rising edges: an item is accepted when in_valid && !in_stall and consumed
// when out_valid && !out_stall. A scoreboard checks order and contents.
// Directed phases check: the free-flow latency of N/2 cycles; the N-edge
// backward travel of a stall to the input; that a stalled pipeline holds N
// items; the hole-absorption sequence A,#,B,#,C,D,E with a two-cycle stall
// at the output (stages 4 and 3 stall for 2 and 1 cycles, stages 2 and 1
// and the source never); the local stall input; and a long random run.
`timescale 1ns/1ps
module tb_isp_pipeline;
  import isp_pkg::*;
  localparam int W = 8;
  localparam int N = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] in_data = '0, out_data;
  logic in_valid = 1'b0, in_stall, out_valid, out_stall = 1'b0, local_stall = 1'b0;

  isp_pipeline #(.W(W), .N(N), .FIRST_EDGE(EDGE_RISE)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  logic [W-1:0] exp_q[$];
  int           acc_cyc[$];
  int           occupancy = 0, max_occ = 0;
  int           last_latency = -1;
  int           min_latency = 1000;
  logic [W-1:0] next_item = 8'h01;
  bit           rnd_src = 0, rnd_snk = 0;
  int           src_hole_pct = 30, snk_stall_pct = 30;
  bit           src_on = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // Source and sink, both on the rising edge.
  always @(posedge clk) if (rst_n) begin
    cycle <= cycle + 1;
    if (out_valid && !out_stall) begin
      check(exp_q.size() > 0, "item delivered that was never sent");
      if (exp_q.size() > 0) begin
        check(out_data == exp_q[0], $sformatf("data %02h expected %02h", out_data, exp_q[0]));
        last_latency = cycle - acc_cyc[0];
        if (last_latency < min_latency) min_latency = last_latency;
        void'(exp_q.pop_front()); void'(acc_cyc.pop_front());
        occupancy--;
      end
    end
    if (in_valid && !in_stall) begin
      exp_q.push_back(in_data); acc_cyc.push_back(cycle);
      occupancy++;
    end
  end
  always @(posedge clk) if (rst_n) begin
    if (occupancy > max_occ) max_occ = occupancy;
  end

  // Random drivers (only when enabled).
  always @(posedge clk) if (rst_n) begin
    if (rnd_src && (!in_valid || !in_stall)) begin
      in_valid <= ($urandom_range(99) >= src_hole_pct);
      in_data  <= W'($urandom_range(255));
    end
    if (rnd_snk) out_stall <= ($urandom_range(99) < snk_stall_pct);
  end

  // Per-stage stall counters (counted once per cycle at the falling edge).
  int stall_cnt[N];
  bit count_stalls = 0;
  always @(negedge clk) if (count_stalls) begin
    if (dut.g_stage[0].u_stage.stall_q) stall_cnt[0]++;
    if (dut.g_stage[1].u_stage.stall_q) stall_cnt[1]++;
    if (dut.g_stage[2].u_stage.stall_q) stall_cnt[2]++;
    if (dut.g_stage[3].u_stage.stall_q) stall_cnt[3]++;
  end
  int in_stall_seen = 0;
  always @(posedge clk) if (count_stalls && in_stall) in_stall_seen++;

  // Offer one item (or a hole) and wait until it is accepted.
  task automatic send(bit valid, logic [W-1:0] d);
    in_valid <= valid; in_data <= d;
    @(posedge clk);
    while (valid && in_stall) @(posedge clk);
  endtask

  task automatic drain();
    in_valid <= 1'b0;
    repeat (40) @(posedge clk);
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    time t_s4, t_in;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);

    // 1. Free flow: latency N/2 cycles, full throughput.
    min_latency = 1000;
    for (int i = 0; i < 8; i++) send(1'b1, W'(8'h10 + i));
    drain();
    check(exp_q.size() == 0, "free flow: all items delivered");
    check(min_latency == N/2 && last_latency == N/2,
          $sformatf("free flow latency %0d cycles, expected %0d", last_latency, N/2));

    // 2. Progressive stall: the stall reaches the input N edges after the
    //    edge at which the sink stall is first sampled; N items stored.
    max_occ = 0; occupancy = 0;
    fork
      begin for (int i = 0; i < 20; i++) send(1'b1, W'(8'h20 + i)); end
      begin
        repeat (4) @(posedge clk);
        out_stall <= 1'b1;
        @(posedge clk);            // edge at which the stall is sampled
        t_s4 = $time;
        wait (in_stall);
        t_in = $time;
        check((t_in - t_s4) == (N - 1) * 5,
              $sformatf("stall reached the input after %0d ns", t_in - t_s4));
        repeat (6) @(posedge clk);
        check(max_occ == N, $sformatf("stalled occupancy %0d, expected %0d", max_occ, N));
        check(dut.g_stage[0].u_stage.v_q && dut.g_stage[1].u_stage.v_q &&
              dut.g_stage[2].u_stage.v_q && dut.g_stage[3].u_stage.v_q,
              "every stage holds valid data while stalled");
        out_stall <= 1'b0;
      end
    join
    drain();
    check(exp_q.size() == 0, "progressive stall: all items delivered in order");

    // 3. Hole absorption: A,#,B,#,C,D,E with a two-cycle stall raised when A
    //    reaches stage 4.
    for (int k = 0; k < N; k++) stall_cnt[k] = 0;
    in_stall_seen = 0;
    count_stalls = 1;
    fork
      begin
        send(1'b1, 8'hA0); send(1'b0, 8'h00); send(1'b1, 8'hB0); send(1'b0, 8'h00);
        send(1'b1, 8'hC0); send(1'b1, 8'hD0); send(1'b1, 8'hE0);
        in_valid <= 1'b0;
      end
      begin
        wait (dut.g_stage[3].u_stage.v_q && dut.g_stage[3].u_stage.q == 8'hA0);
        // raised as A lands in stage 4, sampled at the next two rising edges
        #1 out_stall = 1'b1;
        repeat (2) @(posedge clk);
        #1 out_stall = 1'b0;
      end
    join
    repeat (20) @(posedge clk);
    count_stalls = 0;
    check(exp_q.size() == 0, "hole absorption: all items delivered in order");
    check(stall_cnt[3] == 2, $sformatf("stage 4 stalled %0d cycles, expected 2", stall_cnt[3]));
    check(stall_cnt[2] == 1, $sformatf("stage 3 stalled %0d cycles, expected 1", stall_cnt[2]));
    check(stall_cnt[1] == 0 && stall_cnt[0] == 0, "stages 2 and 1 never stall");
    check(in_stall_seen == 0, "source never stalled");

    // 4. Local stall of the last stage behaves like a downstream stall.
    fork
      begin for (int i = 0; i < 10; i++) send(1'b1, W'(8'h40 + i)); end
      begin
        repeat (3) @(posedge clk);
        local_stall <= 1'b1;
        repeat (8) @(posedge clk);
        check(in_stall, "local stall propagates to the input");
        check(occupancy == N, "local stall fills the pipeline");
        local_stall <= 1'b0;
      end
    join
    drain();
    check(exp_q.size() == 0, "local stall: all items delivered");

    // 5. Random holes and stalls.
    rnd_src = 1; rnd_snk = 1;
    repeat (3000) @(posedge clk);
    rnd_src = 0; rnd_snk = 0;
    in_valid <= 1'b0; out_stall <= 1'b0;
    repeat (40) @(posedge clk);
    check(exp_q.size() == 0, "random: all items delivered");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
