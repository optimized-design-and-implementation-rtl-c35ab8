// tb_pipelined_bb: four-stage pipelined basic block test.
// Checks that the output is zero while reset is high, then streams one
// operand pair per cycle (the two published pairs first, then zero
// operands, powers of two and random pairs) and checks, per pair, that the
// residues appear one edge after the sampling edge and P0 exactly four
// edges after it (counting the sampling edge as the first), with no bubbles.
module tb_pipelined_bb;
  import ilm_ref_pkg::*;
  localparam int NV  = 3000;
  localparam int LAT = 4;

  logic        clk, rst = 1'b1;
  logic [15:0] n1 = '0, n2 = '0, r1, r2;
  logic [31:0] p;
  logic [15:0] va [NV];
  logic [15:0] vb [NV];
  int checks = 0, failures = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  pipelined_bb #(.N(16)) dut (.clk(clk), .rst(rst), .n1(n1), .n2(n2), .p(p), .r1(r1), .r2(r2));

  initial begin
    repeat (NV + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    va[0] = 16'h02fb; vb[0] = 16'h0a77;
    va[1] = 16'h3103; vb[1] = 16'hde96;
    va[2] = 16'h0000; vb[2] = 16'h4321;
    va[3] = 16'h4321; vb[3] = 16'h0000;
    va[4] = 16'hffff; vb[4] = 16'hffff;
    va[5] = 16'h0400; vb[5] = 16'h0020;
    for (int i = 6; i < NV; i++) begin
      va[i] = 16'($urandom);
      vb[i] = 16'($urandom);
    end

    // reset: apply nonzero operands while reset is high; output stays zero
    n1 = 16'h1234;
    n2 = 16'h5678;
    repeat (6) begin
      @(negedge clk);
      checks++;
      if (p !== '0 || r1 !== '0 || r2 !== '0) begin
        failures++;
        $display("FAIL output not zero during reset: p=%h", p);
      end
    end
    rst = 1'b0;

    // stream: operand j is driven before edge j and sampled by it
    for (int t = 0; t < NV + LAT; t++) begin
      if (t >= 1 && t - 1 < NV) begin
        checks++;
        if (r1 !== residue(va[t-1]) || r2 !== residue(vb[t-1])) begin
          failures++;
          $display("FAIL residues of pair %0d: %h %h", t - 1, r1, r2);
        end
      end
      if (t >= LAT) begin
        checks++;
        if (longint'(p) != p0_ref(va[t-LAT], vb[t-LAT])) begin
          failures++;
          if (failures < 10)
            $display("FAIL pair %0d %h x %h: p=%h exp=%h", t - LAT, va[t-LAT], vb[t-LAT], p,
                     p0_ref(va[t-LAT], vb[t-LAT]));
        end
      end
      n1 = (t < NV) ? va[t] : 16'h0;
      n2 = (t < NV) ? vb[t] : 16'h0;
      @(negedge clk);
    end

    // published values, checked literally
    checks++;
    if (p0_ref(16'h02fb, 16'h0a77) != 64'h001cc600 || p0_ref(16'h3103, 16'hde96) != 64'h24544000)
      failures++;

    // a pair applied one edge before LAT-1 must not show early
    n1 = 16'h0101;
    n2 = 16'h0303;
    @(negedge clk);
    n1 = 16'h0000;
    repeat (LAT - 2) @(negedge clk);
    checks++;
    if (p == 32'(p0_ref(16'h0101, 16'h0303))) begin
      failures++;
      $display("FAIL product appeared before the fourth edge");
    end
    @(negedge clk);
    checks++;
    if (longint'(p) != p0_ref(16'h0101, 16'h0303)) begin
      failures++;
      $display("FAIL product not there after the fourth edge: %h", p);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
