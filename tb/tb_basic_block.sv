// tb_basic_block: non-pipelined basic block test.
// Checks the two published operand pairs (02fb x 0a77 -> 001cc600 with
// residues 00fb, 0277; 3103 x de96 -> 24544000 with residues 1103, 5e96),
// zero operands, powers of two (exact), all-ones and random pairs against
// the reference P0 = 2^(k1+k2) + r1*2^k2 + r2*2^k1. Also checks that P0
// never exceeds the true product and misses it by exactly r1*r2.
module tb_basic_block;
  import ilm_ref_pkg::*;
  logic [15:0] n1, n2, r1, r2;
  logic [31:0] p;
  int checks = 0, failures = 0;

  basic_block #(.N(16)) dut (.n1(n1), .n2(n2), .p(p), .r1(r1), .r2(r2));

  task automatic check(input logic [15:0] a, input logic [15:0] b);
    longint unsigned e;
    n1 = a;
    n2 = b;
    #1;
    e = p0_ref(a, b);
    checks++;
    if (longint'(p) != e || r1 !== residue(a) || r2 !== residue(b)) begin
      failures++;
      $display("FAIL %h x %h: p=%h exp=%h r1=%h r2=%h", a, b, p, e, r1, r2);
    end
    if (a != 0 && b != 0) begin
      checks++;
      if (longint'(p) + longint'(residue(a)) * longint'(residue(b)) != longint'(a) * longint'(b)) begin
        failures++;
        $display("FAIL error term %h x %h", a, b);
      end
    end
  endtask

  task automatic check_val(input logic [15:0] a, input logic [15:0] b, input logic [31:0] ep,
                           input logic [15:0] e1, input logic [15:0] e2);
    n1 = a;
    n2 = b;
    #1;
    checks++;
    if (p !== ep || r1 !== e1 || r2 !== e2) begin
      failures++;
      $display("FAIL vector %h x %h: p=%h r1=%h r2=%h", a, b, p, r1, r2);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_val(16'h02fb, 16'h0a77, 32'h001cc600, 16'h00fb, 16'h0277);
    check_val(16'h3103, 16'hde96, 32'h24544000, 16'h1103, 16'h5e96);
    check(16'h0000, 16'h1234);
    check(16'h1234, 16'h0000);
    check(16'h0000, 16'h0000);
    check(16'hffff, 16'hffff);
    check(16'h0001, 16'h0001);
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) check(16'(1 << i), 16'(1 << j));
    for (int i = 0; i < 5000; i++) check(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
