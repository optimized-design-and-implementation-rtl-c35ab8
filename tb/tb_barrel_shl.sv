// tb_barrel_shl: barrel shifter test.
// Every shift amount 0..15 with all-ones, single-bit and random data; the
// 32-bit output must equal the input multiplied by 2^sh.
module tb_barrel_shl;
  logic [15:0] din;
  logic [3:0]  sh;
  logic [31:0] dout;
  int checks = 0, failures = 0;

  barrel_shl #(.N(16)) dut (.din(din), .sh(sh), .dout(dout));

  task automatic check(input logic [15:0] d, input int s);
    longint unsigned e;
    din = d;
    sh  = 4'(s);
    #1;
    e = longint'(d) * (64'd1 << s);
    checks++;
    if (longint'(dout) != e) begin
      failures++;
      $display("FAIL din=%h sh=%0d dout=%h exp=%h", d, s, dout, e);
    end
  endtask

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 16; s++) begin
      check(16'hffff, s);
      check(16'h0001, s);
      check(16'h8000, s);
      for (int i = 0; i < 100; i++) check(16'($urandom), s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
