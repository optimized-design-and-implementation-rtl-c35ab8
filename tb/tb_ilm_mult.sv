// tb_ilm_mult: iterative multiplier test at three accuracies.
// Four instances see the same operand stream: NCORR = 0 (bare pipelined
// basic block, latency 4), NCORR = 1 (default, latency 6), NCORR = 2
// (latency 7) and NCORR = 15 (latency 20, must give the exact product for
// every pair). Each output is
// compared with the reference model at its latency. Also checks that each
// added correction never makes the result worse and never overshoots.
module tb_ilm_mult;
  import ilm_ref_pkg::*;
  localparam int NV = 3000;
  localparam int L0 = 4, L1 = 6, L2 = 7, LX = 20;

  logic        clk, rst = 1'b1;
  logic [15:0] n1 = '0, n2 = '0;
  logic [31:0] p0, p1, p2, px;
  logic [15:0] va [NV];
  logic [15:0] vb [NV];
  int checks = 0, failures = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  ilm_mult #(.N(16), .NCORR(0))  dut0 (.clk(clk), .rst(rst), .n1(n1), .n2(n2), .p(p0));
  ilm_mult                       dut1 (.clk(clk), .rst(rst), .n1(n1), .n2(n2), .p(p1));
  ilm_mult #(.N(16), .NCORR(2))  dut2 (.clk(clk), .rst(rst), .n1(n1), .n2(n2), .p(p2));
  ilm_mult #(.N(16), .NCORR(15)) dutx (.clk(clk), .rst(rst), .n1(n1), .n2(n2), .p(px));

  initial begin
    repeat (NV + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    va[0] = 16'h02fb; vb[0] = 16'h0a77;
    va[1] = 16'h3103; vb[1] = 16'hde96;
    va[2] = 16'hffff; vb[2] = 16'hffff;
    va[3] = 16'h0000; vb[3] = 16'hffff;
    for (int i = 4; i < NV; i++) begin
      va[i] = 16'($urandom);
      vb[i] = 16'($urandom);
    end
    repeat (4) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < NV + LX; t++) begin
      if (t >= L0 && t - L0 < NV) begin
        checks++;
        if (longint'(p0) != mult_ref(va[t-L0], vb[t-L0], 0)) begin
          failures++;
          if (failures < 10) $display("FAIL NCORR=0 pair %0d: %h", t - L0, p0);
        end
      end
      if (t >= L1 && t - L1 < NV) begin
        longint unsigned e1;
        e1 = mult_ref(va[t-L1], vb[t-L1], 1);
        checks++;
        if (longint'(p1) != e1) begin
          failures++;
          if (failures < 10) $display("FAIL NCORR=1 pair %0d: %h exp %h", t - L1, p1, e1);
        end
        checks++;
        if (e1 < mult_ref(va[t-L1], vb[t-L1], 0) ||
            e1 > longint'(va[t-L1]) * longint'(vb[t-L1])) begin
          failures++;
          $display("FAIL correction out of range, pair %0d", t - L1);
        end
      end
      if (t >= L2 && t - L2 < NV) begin
        longint unsigned e2;
        e2 = mult_ref(va[t-L2], vb[t-L2], 2);
        checks++;
        if (longint'(p2) != e2 || e2 < mult_ref(va[t-L2], vb[t-L2], 1)) begin
          failures++;
          if (failures < 10) $display("FAIL NCORR=2 pair %0d: %h exp %h", t - L2, p2, e2);
        end
      end
      if (t >= LX && t - LX < NV) begin
        checks++;
        if (longint'(px) != longint'(va[t-LX]) * longint'(vb[t-LX])) begin
          failures++;
          if (failures < 10) $display("FAIL NCORR=15 pair %0d: %h not exact", t - LX, px);
        end
      end
      n1 = (t < NV) ? va[t] : 16'h0;
      n2 = (t < NV) ? vb[t] : 16'h0;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
