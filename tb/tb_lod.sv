// tb_lod: exhaustive test of the leading-one detector.
// Every 16-bit operand is applied; the output must be 2^msb (0 for zero)
// and nonzero must flag any set bit.
module tb_lod;
  import ilm_ref_pkg::*;
  logic [15:0] a, onehot;
  logic        nonzero;
  int checks = 0, failures = 0;

  lod #(.N(16)) dut (.a(a), .onehot(onehot), .nonzero(nonzero));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      logic [15:0] exp_oh;
      int k;
      a = 16'(v);
      #1;
      k = msb_pos(a);
      exp_oh = (k < 0) ? 16'h0 : 16'(1 << k);
      checks++;
      if (onehot !== exp_oh || nonzero !== (v != 0)) begin
        failures++;
        if (failures < 10)
          $display("FAIL a=%h onehot=%h exp=%h nonzero=%b", a, onehot, exp_oh, nonzero);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
