// tb_isp_fork: exhaustive check of the aligned 1-to-3 fork template: for
// every combination of the upstream valid and the downstream stalls, the
// downstream valids are all 1 exactly when the item is valid and no
// destination is stalled, the upstream stall is 1 exactly when a valid item
// cannot be delivered to every destination, and every copy equals the data.
`timescale 1ns/1ps
module tb_isp_fork;
  localparam int N = 3, W = 8;
  logic valid, stall_up_d;
  logic [W-1:0] data;
  logic [N-1:0] valid_dn, stall_dn;
  logic [N-1:0][W-1:0] data_dn;
  int checks = 0, failures = 0;

  isp_fork #(.N(N), .W(W)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2; v++)
      for (int s = 0; s < (1 << N); s++) begin
        int nstall;
        valid = 1'(v); stall_dn = N'(s); data = W'($urandom_range(255));
        #1;
        nstall = $countones(stall_dn);
        check(stall_up_d == (v == 1 && nstall > 0), $sformatf("stall v=%0d s=%b", v, s));
        check(valid_dn == ((v == 1 && nstall == 0) ? {N{1'b1}} : '0), $sformatf("valid v=%0d s=%b", v, s));
        for (int i = 0; i < N; i++) check(data_dn[i] == data, "data copy");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
