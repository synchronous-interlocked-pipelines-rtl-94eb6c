// tb_isp_join: exhaustive check of the 3 to 1 join template: the output is
// valid only when all inputs are valid and carries their concatenation; a
// valid input stalls while another input is missing or the output stalls.
`timescale 1ns/1ps
module tb_isp_join;
  localparam int N = 3, W = 8;
  logic [N-1:0] valid_up, stall_up_d;
  logic [N-1:0][W-1:0] data_up;
  logic valid_dn, stall_dn;
  logic [N*W-1:0] data_dn;
  int checks = 0, failures = 0;

  isp_join #(.N(N), .W(W)) dut (.*);

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
    for (int v = 0; v < (1 << N); v++)
      for (int s = 0; s < 2; s++) begin
        bit all;
        valid_up = N'(v); stall_dn = 1'(s);
        for (int i = 0; i < N; i++) data_up[i] = W'($urandom_range(255));
        #1;
        all = (v == (1 << N) - 1);
        check(valid_dn == all, $sformatf("valid v=%b", v));
        for (int i = 0; i < N; i++) begin
          check(stall_up_d[i] == (((v >> i) & 1) == 1 && (!all || s == 1)),
                $sformatf("stall[%0d] v=%b s=%0d", i, v, s));
          check(data_dn[i*W +: W] == data_up[i], "concatenation");
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
