// tb_ilm_top: end-to-end test of the whole design at its default size
// (16-bit operands, one error correction unit).
//
// The pipelined multiplier gets one operand pair per cycle with no gaps; its
// product must match the reference model six edges after the sampling edge.
// Each cycle the non-pipelined basic block gets an independent pair and its
// P0 and residues are checked at once. The test counts how often each
// mechanism of the design occurred and fails if one never did:
//   reset         output held at zero while reset is high
//   zero_operand  an operand of zero, product forced to zero
//   corr_nonzero  the correction unit added a nonzero term
//   corr_zero     a residue was zero, so the correction added nothing
//   exact         one correction was enough for the exact product
//   inexact       the corrected product still differs from the exact one
//   comb          a non-pipelined basic block result was checked
module tb_ilm_top;
  import ilm_ref_pkg::*;
  localparam int NV  = 20000;
  localparam int LAT = 6;

  logic        clk, rst = 1'b1;
  logic [15:0] n1 = '0, n2 = '0, c_n1 = '0, c_n2 = '0, c_r1, c_r2;
  logic [31:0] p, c_p;
  logic [15:0] va [NV];
  logic [15:0] vb [NV];
  int checks = 0, failures = 0;
  int n_reset = 0, n_zero = 0, n_cnz = 0, n_cz = 0, n_exact = 0, n_inexact = 0, n_comb = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  ilm_top dut (
    .clk(clk), .rst(rst), .n1(n1), .n2(n2), .p(p),
    .c_n1(c_n1), .c_n2(c_n2), .c_p(c_p), .c_r1(c_r1), .c_r2(c_r2)
  );

  initial begin
    repeat (NV + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    va[0] = 16'h02fb; vb[0] = 16'h0a77;
    va[1] = 16'h3103; vb[1] = 16'hde96;
    va[2] = 16'h0000; vb[2] = 16'h1111;
    va[3] = 16'h8000; vb[3] = 16'h7fff;
    for (int i = 4; i < NV; i++) begin
      va[i] = 16'($urandom);
      vb[i] = 16'($urandom);
      // sparse operands, so that one correction is often exact
      if (i % 5 == 0) va[i] = 16'(1 << (i % 16)) | 16'(1 << ((i / 16) % 16));
      if (i % 97 == 0) vb[i] = 16'h0;
    end

    n1 = 16'hbeef;
    n2 = 16'hcafe;
    repeat (8) begin
      @(negedge clk);
      checks++;
      n_reset++;
      if (p !== '0) begin
        failures++;
        $display("FAIL output not zero during reset");
      end
    end
    rst = 1'b0;

    for (int t = 0; t < NV + LAT; t++) begin
      logic [15:0] ca, cb;
      if (t >= LAT) begin
        logic [15:0] a, b;
        longint unsigned e, c1;
        a  = va[t-LAT];
        b  = vb[t-LAT];
        e  = mult_ref(a, b, 1);
        c1 = p0_ref(residue(a), residue(b));
        checks++;
        if (longint'(p) != e) begin
          failures++;
          if (failures < 10) $display("FAIL pair %0d %h x %h: p=%h exp=%h", t - LAT, a, b, p, e);
        end
        if (a == 0 || b == 0) n_zero++;
        else if (c1 == 0) n_cz++;
        else n_cnz++;
        if (a != 0 && b != 0) begin
          if (e == longint'(a) * longint'(b)) n_exact++;
          else n_inexact++;
        end
      end
      ca = 16'($urandom);
      cb = 16'($urandom);
      c_n1 = ca;
      c_n2 = cb;
      n1 = (t < NV) ? va[t] : 16'h0;
      n2 = (t < NV) ? vb[t] : 16'h0;
      #1;
      checks++;
      n_comb++;
      if (longint'(c_p) != p0_ref(ca, cb) || c_r1 !== residue(ca) || c_r2 !== residue(cb)) begin
        failures++;
        $display("FAIL basic block %h x %h: %h", ca, cb, c_p);
      end
      @(negedge clk);
    end

    $display("mechanisms: reset=%0d zero_operand=%0d corr_nonzero=%0d corr_zero=%0d exact=%0d inexact=%0d comb=%0d",
             n_reset, n_zero, n_cnz, n_cz, n_exact, n_inexact, n_comb);
    if (n_reset == 0)   begin failures++; $display("FAIL reset never exercised"); end
    if (n_zero == 0)    begin failures++; $display("FAIL zero operand never exercised"); end
    if (n_cnz == 0)     begin failures++; $display("FAIL nonzero correction never exercised"); end
    if (n_cz == 0)      begin failures++; $display("FAIL zero correction never exercised"); end
    if (n_exact == 0)   begin failures++; $display("FAIL exact result never exercised"); end
    if (n_inexact == 0) begin failures++; $display("FAIL inexact result never exercised"); end
    if (n_comb == 0)    begin failures++; $display("FAIL basic block never exercised"); end
    checks += 7;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
