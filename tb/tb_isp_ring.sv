// tb_isp_ring: self-checking testbench for the multicycle ring (K = 3).
//
// Words are {count[3], payload[5]}; an item with count c must come out with
// count 0 and payload + c. Checks: the latency of a lone item grows by
// (K+1)/2 cycles per extra pass; a short computation overtakes a long one
// (out-of-order completion); under a random mix of counts, holes and short
// output stalls every item comes out exactly once with the right result.
// Counts the mechanisms: feedback passes, input stalled by the feedback
// priority, output stalls, out-of-order exits.
`timescale 1ns/1ps
module tb_isp_ring;
  localparam int W = 8, CNT_W = 3, K = 3, PW = W - CNT_W;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] in_data = '0, out_data;
  logic in_valid = 1'b0, in_stall, out_valid, out_stall = 1'b0;

  isp_ring #(.W(W), .CNT_W(CNT_W), .K(K)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic logic [W-1:0] result(logic [W-1:0] x);
    return {CNT_W'(0), PW'(x[PW-1:0] + PW'(x[W-1 -: CNT_W]))};
  endfunction

  // scoreboard: outstanding items with their sequence numbers
  logic [W-1:0] pend_val[$];
  int           pend_seq[$];
  int           seq = 0, last_out_seq = -1, ooo = 0, got = 0;
  time          t_in, t_out;
  int           fb_passes = 0, prio_stalls = 0, out_stalls = 0;
  bit           rnd = 0;

  // source at falling edges
  always @(negedge clk) if (rst_n) begin
    if (in_valid && !in_stall) begin
      pend_val.push_back(result(in_data)); pend_seq.push_back(seq); seq++;
      t_in = $time;
      if (!rnd) in_valid <= 1'b0;
    end
    if (rnd && (!in_valid || !in_stall)) begin
      in_valid <= ($urandom_range(99) < 40);
      in_data  <= W'($urandom_range(255));
    end
    if (dut.br_valid[1] && !dut.fb_s) fb_passes++;
  end
  // sink at rising edges
  always @(posedge clk) if (rst_n) begin
    if (dut.in_v && dut.fb_v) prio_stalls++;
    if (out_valid && out_stall) out_stalls++;
    if (out_valid && !out_stall) begin
      int idx;
      idx = -1;
      foreach (pend_val[i]) if (idx < 0 && pend_val[i] == out_data) idx = i;
      check(idx >= 0, $sformatf("unexpected output %02h", out_data));
      if (idx >= 0) begin
        if (pend_seq[idx] < last_out_seq) ooo++;
        last_out_seq = pend_seq[idx];
        pend_val.delete(idx); pend_seq.delete(idx);
      end
      got++;
      t_out = $time;
    end
    if (rnd) out_stall <= ($urandom_range(99) < 8);
  end

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic lone(int c, output time lat);
    int g;
    g = got;
    @(posedge clk); #1;
    in_data = {CNT_W'(c), PW'(5'h03)}; in_valid = 1'b1;
    wait (got == g + 1);
    lat = t_out - t_in;
    repeat (4) @(posedge clk);
  endtask

  initial begin
    time l0, lc;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    lone(0, l0);
    check(l0 == 25, $sformatf("lone item, one pass: %0d ns", l0));
    for (int c = 1; c < 8; c++) begin
      lone(c, lc);
      check(lc - l0 == 64'(c * (K + 1) / 2 * 10), $sformatf("count %0d latency %0d ns", c, lc));
    end
    // a short computation overtakes a long one
    begin
      int g;
      g = got; ooo = 0;
      @(negedge clk); #1 in_data = {CNT_W'(6), PW'(1)}; in_valid = 1'b1;
      @(negedge clk); #1 in_data = {CNT_W'(0), PW'(2)}; in_valid = 1'b1;
      @(negedge clk); #1 in_valid = 1'b0;
      wait (got == g + 2);
      check(ooo == 1, "short item left before long item");
    end
    // random traffic
    ooo = 0;
    rnd = 1;
    repeat (6000) @(posedge clk);
    rnd = 0;
    @(negedge clk); #1 in_valid = 1'b0; out_stall = 1'b0;
    repeat (100) @(posedge clk);
    check(pend_val.size() == 0, $sformatf("%0d items never came out", pend_val.size()));
    check(fb_passes > 100, "feedback passes happened");
    check(prio_stalls > 20, "input stalled by feedback priority");
    check(out_stalls > 20, "output stalls happened");
    check(ooo > 20, "out-of-order completions happened");
    $display("ring: fb passes %0d, priority stalls %0d, output stalls %0d, out-of-order %0d",
             fb_passes, prio_stalls, out_stalls, ooo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
