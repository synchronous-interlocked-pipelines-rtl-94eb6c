// tb_paper_traces: replays the two detailed stall traces of the design,
// edge by edge, on 4-stage pipelines and compares every register that holds
// (rather than passes) a value at that edge.
//
// Elastic pipeline: items ..., A, B, C, D, E flow; the sink stall is raised
// for the rising edges e2 and e4 and dropped for e6. The stall window slides
// back one stage per edge, the four stages fill with D, C, B, A, and the
// bubbles re-open one stage per edge after the release.
//
// Interlocked pipeline: the stream A, #, B, #, C, D, E (# a hole) flows and
// the sink stalls for two cycles once A is in stage 4. The holes absorb the
// stall: stage 4 stalls for two cycles, stage 3 for one, stages 2 and 1 not
// at all.
//
// Each table row lists, per stage, the stored data item ('#' = invalid,
// '.' = not held at that edge), the valid bit and the stall bit ('.' = not
// held). Edge e0 is the rising edge at which stage 1 (elastic) or stage 3
// (interlocked) takes B or A respectively.
`timescale 1ns/1ps
module tb_paper_traces;
  import isp_pkg::*;
  localparam int W = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // item letters are encoded as 8'h0A .. 8'h0F
  function automatic logic [W-1:0] code(byte c);
    return W'(c - "A" + 8'h0A);
  endfunction

  // ---------------- elastic pipeline ----------------
  logic [W-1:0] e_in = 8'h07, e_out;
  logic e_in_stall, e_out_stall = 1'b0;
  esp_pipeline #(.W(W), .N(4), .FIRST_EDGE(EDGE_RISE)) u_esp (
    .clk, .rst_n, .in_data(e_in), .in_stall(e_in_stall), .out_data(e_out), .out_stall(e_out_stall));
  always @(posedge clk) if (rst_n && !e_in_stall) e_in <= e_in + 8'd1;

  string esp_tab [10] = '{
    "B.. ..0 A.. ..0",
    "..0 B.. ..0 A..",
    "C.. ..0 B.. A.1",
    "..0 C.. B.1 A..",
    "D.. C.1 B.. A.1",
    "D.1 C.. B.1 A..",
    "D.. C.1 B.. ..0",
    "D.1 C.. ..0 B..",
    "D.. ..0 C.. ..0",
    "..0 D.. ..0 C.."
  };

  // ---------------- interlocked pipeline ----------------
  logic [W-1:0] i_in = '0, i_out;
  logic i_in_valid = 1'b0, i_in_stall, i_out_valid, i_out_stall = 1'b0;
  isp_pipeline #(.W(W), .N(4), .FIRST_EDGE(EDGE_RISE)) u_isp (
    .clk, .rst_n, .in_data(i_in), .in_valid(i_in_valid), .in_stall(i_in_stall),
    .out_data(i_out), .out_valid(i_out_valid), .out_stall(i_out_stall), .local_stall(1'b0));

  string isp_stream = "A#B#CDE";
  int    isp_pos = 0;
  always @(posedge clk) if (rst_n) begin
    if (!i_in_valid || !i_in_stall) begin
      if (isp_pos < isp_stream.len()) begin
        i_in_valid <= (isp_stream[isp_pos] != "#");
        i_in       <= (isp_stream[isp_pos] == "#") ? '0 : code(isp_stream[isp_pos]);
        isp_pos    <= isp_pos + 1;
      end else begin
        i_in_valid <= 1'b0;
      end
    end
  end

  string isp_tab [10] = '{
    "#0. ..0 A1. ..0",
    "..0 #0. ..0 A1.",
    "B1. ..0 #0. A11",
    "..0 B1. ..0 A1.",
    "#0. ..0 B1. A11",
    "..0 #0. B11 A1.",
    "C1. ..0 B1. ..0",
    "..0 C1. ..0 B1.",
    "D1. ..0 C1. ..0",
    "..0 D1. ..0 C1."
  };

  // compare one row against the stage registers
  task automatic cmp_row(string name, int row, string r,
                         logic [W-1:0] q[4], logic v[4], logic s[4], bit has_valid);
    for (int k = 0; k < 4; k++) begin
      byte d, vv, ss;
      d = r[4*k]; vv = r[4*k+1]; ss = r[4*k+2];
      if (d != ".") begin
        if (d == "#") check(!v[k], $sformatf("%s e%0d stage %0d: expected a hole", name, row, k+1));
        else check(q[k] == code(d) && (!has_valid || v[k]),
                   $sformatf("%s e%0d stage %0d: holds %02h expected %s", name, row, k+1, q[k], string'(d)));
      end
      if (vv != "." && has_valid)
        check(v[k] == (vv == "1"), $sformatf("%s e%0d stage %0d: valid", name, row, k+1));
      if (ss != ".")
        check(s[k] == (ss == "1"), $sformatf("%s e%0d stage %0d: stall %0d expected %s", name, row, k+1, s[k], string'(ss)));
    end
  endtask

  logic [W-1:0] eq[4], iq[4];
  logic ev[4], es[4], iv[4], is_[4];
  always_comb begin
    for (int k = 0; k < 4; k++) begin
      eq[k] = u_esp.q[k]; es[k] = u_esp.s[k]; ev[k] = 1'b1;
      iq[k] = u_isp.q[k]; iv[k] = u_isp.v[k]; is_[k] = u_isp.s[k];
    end
  end

  int isp_stall_cycles[4];

  initial begin : watchdog
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    fork
      begin : esp_trace
        @(posedge clk);
        forever begin
          #1 if (u_esp.q[0] == code("B")) break;
          @(posedge clk);
        end
        for (int e = 0; e < 10; e++) begin
          if (e > 0) begin @(edge clk); #1; end
          cmp_row("elastic", e, esp_tab[e], eq, ev, es, 1'b0);
          if (e == 1) e_out_stall = 1'b1;
          if (e == 5) e_out_stall = 1'b0;
        end
      end
      begin : isp_trace
        forever begin
          @(posedge clk);
          #1 if (u_isp.v[2] && u_isp.q[2] == code("A")) break;
        end
        for (int e = 0; e < 10; e++) begin
          if (e > 0) begin @(edge clk); #1; end
          cmp_row("interlocked", e, isp_tab[e], iq, iv, is_, 1'b1);
          if (e == 1) i_out_stall = 1'b1;
          if (e == 5) i_out_stall = 1'b0;
          // count each stall register once per cycle, on the edge it loads
          for (int k = 0; k < 4; k++)
            if (is_[k] && (k % 2) != (e % 2)) isp_stall_cycles[k]++;
        end
      end
    join
    // stall cycles per stage (stage 4: 2, stage 3: 1, stages 2 and 1: 0)
    check(isp_stall_cycles[3] == 2 && isp_stall_cycles[2] == 1 &&
          isp_stall_cycles[1] == 0 && isp_stall_cycles[0] == 0,
          $sformatf("stall cycles per stage %0d %0d %0d %0d", isp_stall_cycles[0],
                    isp_stall_cycles[1], isp_stall_cycles[2], isp_stall_cycles[3]));
    check(!i_in_stall, "interlocked source never stalled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
