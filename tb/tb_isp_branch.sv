// tb_isp_branch: exhaustive check of the 1 to 1-of-3 branch template for
// every valid, every one-hot enable and every downstream stall pattern: only
// the selected destination sees the valid item, and the upstream stage is
// stalled exactly when the selected destination is stalled.
`timescale 1ns/1ps
module tb_isp_branch;
  localparam int N = 3, W = 8;
  logic valid, stall_up_d;
  logic [W-1:0] data;
  logic [N-1:0] enable, valid_dn, stall_dn;
  logic [N-1:0][W-1:0] data_dn;
  int checks = 0, failures = 0;

  isp_branch #(.N(N), .W(W)) dut (.*);

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
      for (int sel = 0; sel < N; sel++)
        for (int s = 0; s < (1 << N); s++) begin
          valid = 1'(v); enable = N'(1 << sel); stall_dn = N'(s); data = W'($urandom_range(255));
          #1;
          for (int i = 0; i < N; i++) begin
            check(valid_dn[i] == (v == 1 && i == sel), $sformatf("valid[%0d] v=%0d sel=%0d", i, v, sel));
            check(data_dn[i] == data, "data copy");
          end
          check(stall_up_d == (v == 1 && ((s >> sel) & 1) == 1),
                $sformatf("stall v=%0d sel=%0d s=%b", v, sel, s));
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
