// tb_prio_enc: priority encoder test.
// All one-hot inputs must encode to their bit position; random multi-bit
// inputs must encode to their highest set bit; zero encodes to 0.
module tb_prio_enc;
  import ilm_ref_pkg::*;
  logic [15:0] oh;
  logic [3:0]  k;
  int checks = 0, failures = 0;

  prio_enc #(.N(16)) dut (.onehot(oh), .k(k));

  task automatic check(input logic [15:0] v);
    int e;
    oh = v;
    #1;
    e = (v == 0) ? 0 : msb_pos(v);
    checks++;
    if (int'(k) != e) begin
      failures++;
      $display("FAIL in=%h k=%0d exp=%0d", v, k, e);
    end
  endtask

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'h0);
    for (int i = 0; i < 16; i++) check(16'(1 << i));
    for (int i = 0; i < 2000; i++) check(16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
