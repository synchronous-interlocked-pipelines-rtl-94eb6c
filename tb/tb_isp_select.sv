// tb_isp_select: exhaustive check of the 1-of-3 to 1 priority select
// template (highest index wins): output valid when any input is valid, data
// of the winner, the winner stalls only with the output, every losing valid
// input stalls, invalid inputs never stall.
`timescale 1ns/1ps
module tb_isp_select;
  localparam int N = 3, W = 8;
  logic [N-1:0] valid_up, stall_up_d;
  logic [N-1:0][W-1:0] data_up;
  logic valid_dn, stall_dn;
  logic [W-1:0] data_dn;
  int checks = 0, failures = 0;

  isp_select #(.N(N), .W(W)) dut (.*);

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
        int win;
        valid_up = N'(v); stall_dn = 1'(s);
        for (int i = 0; i < N; i++) data_up[i] = W'(8'h10 * (i + 1) + $urandom_range(15));
        #1;
        win = -1;
        for (int i = 0; i < N; i++) if ((v >> i) & 1) win = i;
        check(valid_dn == (win >= 0), $sformatf("valid v=%b", v));
        if (win >= 0) check(data_dn == data_up[win], $sformatf("data v=%b", v));
        for (int i = 0; i < N; i++) begin
          bit exp_st;
          exp_st = ((v >> i) & 1) == 1 && (i != win || s == 1);
          check(stall_up_d[i] == exp_st, $sformatf("stall[%0d] v=%b s=%0d", i, v, s));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
