// tb_ilm_ecu: error correction unit test.
// Streams random residue pairs, with powers of two and zeros mixed in so
// that correction terms of zero occur, and a random running product for
// each; the running product of pair j is presented four edges after its
// residues, as the unit's timing requires. Checks the new residues one edge
// after sampling and acc_out = acc_in + C five edges after sampling, with C
// the reference first approximation of the residue pair.
module tb_ilm_ecu;
  import ilm_ref_pkg::*;
  localparam int NV = 3000;

  logic        clk, rst = 1'b1;
  logic [15:0] r1_in = '0, r2_in = '0, r1_out, r2_out;
  logic [31:0] acc_in = '0, acc_out;
  logic [15:0] va [NV];
  logic [15:0] vb [NV];
  logic [31:0] vacc [NV];
  int checks = 0, failures = 0, zero_terms = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  ilm_ecu #(.N(16)) dut (
    .clk(clk), .rst(rst), .r1_in(r1_in), .r2_in(r2_in), .acc_in(acc_in),
    .r1_out(r1_out), .r2_out(r2_out), .acc_out(acc_out)
  );

  initial begin
    repeat (NV + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NV; i++) begin
      va[i]   = 16'($urandom);
      vb[i]   = 16'($urandom);
      if (i % 7 == 3) va[i] = 16'(1 << (i % 16));
      if (i % 11 == 5) vb[i] = 16'h0;
      vacc[i] = 32'($urandom) >> 2;
    end
    repeat (4) @(negedge clk);
    checks++;
    if (acc_out !== '0) failures++;
    rst = 1'b0;

    for (int t = 0; t < NV + 5; t++) begin
      if (t >= 1 && t - 1 < NV) begin
        checks++;
        if (r1_out !== residue(va[t-1]) || r2_out !== residue(vb[t-1])) begin
          failures++;
          $display("FAIL residues of pair %0d", t - 1);
        end
      end
      if (t >= 5) begin
        longint unsigned c;
        c = p0_ref(va[t-5], vb[t-5]);
        if (c == 0) zero_terms++;
        checks++;
        if (longint'(acc_out) != longint'(vacc[t-5]) + c) begin
          failures++;
          if (failures < 10)
            $display("FAIL pair %0d: acc_out=%h exp=%h", t - 5, acc_out, longint'(vacc[t-5]) + c);
        end
      end
      r1_in  = (t < NV) ? va[t] : 16'h0;
      r2_in  = (t < NV) ? vb[t] : 16'h0;
      acc_in = (t >= 4 && t - 4 < NV) ? vacc[t-4] : 32'h0;
      @(negedge clk);
    end
    checks++;
    if (zero_terms == 0) begin
      failures++;
      $display("FAIL no zero correction term exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
