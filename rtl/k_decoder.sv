// k_decoder: decoder from the characteristic sum to its power of two.
//
// Takes k12 = k1 + k2 (0..2N-2, 5 bits for N = 16) and drives the one-hot
// 2N-bit word 2^k12, the leading term of the approximate product. Purely
// combinational.
module k_decoder import ilm_pkg::*; #(
  parameter int unsigned N   = ILM_N,
  localparam int unsigned KSW = $clog2(N) + 1
) (
  input  logic [KSW-1:0] k12,
  output logic [2*N-1:0] dout
);
  always_comb begin
    for (int i = 0; i < 2 * N; i++)
      dout[i] = (k12 == KSW'(i));
  end
endmodule
