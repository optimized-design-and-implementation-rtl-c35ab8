// barrel_shl: left barrel shifter, N-bit input to 2N-bit output.
//
// Computes dout = din << sh with log2(N) mux levels, level j shifting by 2^j
// when bit j of sh is set. In the basic block it scales one operand's
// residue N1 - 2^k1 by the other operand's power of two 2^k2 (and the other
// way round). For N = 16 the output is 32 bits wide, so nothing is lost for
// any shift of 0..15; the top output bit is then always 0 (the largest
// result is a 16-bit value shifted by 15) and is kept only so the port has
// the full product width. Purely combinational.
module barrel_shl import ilm_pkg::*; #(
  parameter int unsigned N  = ILM_N,
  localparam int unsigned KW = $clog2(N)
) (
  input  logic [N-1:0]   din,
  input  logic [KW-1:0]  sh,
  output logic [2*N-1:0] dout
);
  logic [2*N-1:0] lvl [KW+1];

  always_comb begin
    lvl[0] = {{N{1'b0}}, din};
    for (int j = 0; j < KW; j++)
      lvl[j+1] = sh[j] ? (lvl[j] << (1 << j)) : lvl[j];
    dout = lvl[KW];
  end
endmodule
