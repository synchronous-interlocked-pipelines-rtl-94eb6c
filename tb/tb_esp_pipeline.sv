// tb_esp_pipeline: self-checking testbench for the 4-stage elastic pipeline.
//
// The source offers a new item on every rising edge unless in_stall is high;
// the sink takes out_data on every rising edge unless out_stall is high.
// Without valid bits the N/2 reset words that sit in the flowing pipeline
// come out first, so the scoreboard starts with N/2 zeros. Checks: order
// and contents, the N/2-cycle latency, the N-edge backward travel of the
// stall, the compaction of N consecutive items into the N stages when
// stalled (as in the paper's stall trace), and a random stall pattern.
`timescale 1ns/1ps
module tb_esp_pipeline;
  import isp_pkg::*;
  localparam int W = 8;
  localparam int N = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] in_data = 8'h01, out_data;
  logic in_stall, out_stall = 1'b0;

  esp_pipeline #(.W(W), .N(N), .FIRST_EDGE(EDGE_RISE)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [W-1:0] exp_q[$];
  int occupancy = N/2, max_occ = 0;
  bit rnd = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (!out_stall) begin
      check(exp_q.size() > 0, "item delivered that was never sent");
      if (exp_q.size() > 0) begin
        check(out_data == exp_q[0], $sformatf("data %02h expected %02h", out_data, exp_q[0]));
        void'(exp_q.pop_front());
        occupancy--;
      end
    end
    if (!in_stall) begin
      exp_q.push_back(in_data);
      occupancy++;
      in_data <= (in_data == 8'hff) ? 8'h01 : in_data + 8'h01;
    end
    if (rnd) out_stall <= ($urandom_range(99) < 40);
  end
  always @(negedge clk) if (occupancy > max_occ) max_occ = occupancy;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    time t0, t1;
    for (int i = 0; i < N/2; i++) exp_q.push_back('0);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (10) @(posedge clk);
    check(max_occ == N/2, $sformatf("free-flow occupancy %0d, expected %0d", max_occ, N/2));
    // latency: the item now entering appears N/2 cycles later
    begin
      logic [W-1:0] probe;
      #1 probe = in_data;
      // accepted at the next rising edge, in the last stage N edges later
      repeat (N/2) @(posedge clk);
      @(negedge clk);
      #1 check(out_data == probe, "free-flow latency is N/2 cycles");
    end

    // Progressive stall.
    #1 out_stall = 1'b1;
    @(posedge clk); t0 = $time;
    wait (in_stall); t1 = $time;
    check((t1 - t0) == 64'(N - 1) * 5, $sformatf("stall reached the input after %0d ns", t1 - t0));
    repeat (5) @(posedge clk);
    check(max_occ == N, $sformatf("stalled occupancy %0d, expected %0d", max_occ, N));
    // compaction: stage k holds the item one newer than stage k+1
    check(dut.q[0] == dut.q[1] + 8'd1 && dut.q[1] == dut.q[2] + 8'd1 &&
          dut.q[2] == dut.q[3] + 8'd1, "stalled stages hold N consecutive items");
    // Unstall: stall leaves the input N edges later, occupancy back to N/2.
    #1 out_stall = 1'b0;
    @(posedge clk); t0 = $time;
    wait (!in_stall); t1 = $time;
    check((t1 - t0) == 64'(N - 1) * 5, "stall release reached the input after N edges");
    repeat (6) @(posedge clk);
    check(occupancy == N/2, $sformatf("occupancy after release %0d, expected %0d", occupancy, N/2));

    rnd = 1;
    repeat (3000) @(posedge clk);
    rnd = 0;
    #1 out_stall = 1'b0;
    repeat (10) @(posedge clk);
    check(occupancy == N/2, "random: occupancy back to N/2");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
