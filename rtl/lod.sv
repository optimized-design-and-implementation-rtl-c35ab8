// lod: leading-one detector.
//
// Keeps only the most significant '1' of the operand and clears every other
// bit, so the output is the one-hot word 2^k where k is the characteristic
// number of the operand. XOR-ing the operand with this word removes the
// leading one and leaves the residue N - 2^k. The detector is a priority
// chain from the MSB down: a bit passes when it is set and no higher bit is.
// An all-zero operand gives an all-zero output and nonzero = 0; the nonzero
// flag is this design's addition, used to give zero operands a defined
// product. Purely combinational.
module lod import ilm_pkg::*; #(
  parameter int unsigned N = ILM_N
) (
  input  logic [N-1:0] a,
  output logic [N-1:0] onehot,
  output logic         nonzero
);
  logic [N:0] seen;  // seen[i]: some bit at position >= i is set

  always_comb begin
    seen[N] = 1'b0;
    for (int i = N - 1; i >= 0; i--) begin
      onehot[i] = a[i] & ~seen[i+1];
      seen[i]   = seen[i+1] | a[i];
    end
    nonzero = seen[0];
  end
endmodule
