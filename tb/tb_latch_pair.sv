// tb_latch_pair: replays the store and read sequence of two items A and B
// in the gated latch pair and checks what each stage holds after every edge,
// then checks random gate patterns against a reference model of the two
// gated stages.
`timescale 1ns/1ps
module tb_latch_pair;
  localparam int W = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] d = '0, q1, q;
  logic gate1 = 1'b0, gate2 = 1'b0;

  latch_pair #(.W(W)) dut (.*);

  always #5 clk = ~clk;   // rising edges at 5, 15, ...; falling at 10, 20, ...

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] m1, m2;
  initial begin
    repeat (2) @(negedge clk);
    #1 rst_n = 1'b1;
    // Storing A and B (gclk low, both gates open).
    d = 8'hAA;
    @(posedge clk); #1 check(q1 == 8'hAA, "A stored in L1 at rising edge");
    @(negedge clk); #1 check(q == 8'hAA, "A stored in L2 at falling edge");
    d = 8'hBB; gate2 = 1'b1;
    @(posedge clk); #1 check(q1 == 8'hBB && q == 8'hAA, "B in L1, A kept in L2");
    gate1 = 1'b1; d = 8'h11;
    repeat (3) @(edge clk);
    #1 check(q1 == 8'hBB && q == 8'hAA, "both items held while gated");
    // Reading A and B (gclk low).
    wait (!clk); #1 gate2 = 1'b0;
    @(posedge clk);            // the environment samples q here
    check(q == 8'hAA, "A read at rising edge");
    #1 gate1 = 1'b0; d = 8'h22;
    @(negedge clk); #1 check(q == 8'hBB, "B moved to L2 at falling edge");
    @(posedge clk); check(q == 8'hBB, "B read at next rising edge");

    // Random gates against a model.
    @(negedge clk); #1;
    m1 = q1; m2 = q;
    for (int i = 0; i < 400; i++) begin
      check(q1 == m1 && q == m2, "random: matches model");
      gate1 = 1'($urandom_range(1)); gate2 = 1'($urandom_range(1)); d = W'($urandom_range(255));
      @(posedge clk); if (!gate1) m1 = d;
      @(negedge clk); if (!gate2) m2 = m1;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
