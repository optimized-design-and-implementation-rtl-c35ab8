// tb_k_decoder: decoder test over every 5-bit input; output must be 2^k12.
module tb_k_decoder;
  logic [4:0]  k12;
  logic [31:0] dout;
  int checks = 0, failures = 0;

  k_decoder #(.N(16)) dut (.k12(k12), .dout(dout));

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      k12 = 5'(i);
      #1;
      checks++;
      if (longint'(dout) != (64'd1 << i)) begin
        failures++;
        $display("FAIL k12=%0d dout=%h", i, dout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
