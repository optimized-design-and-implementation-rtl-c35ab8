// prio_enc: priority encoder for the characteristic number.
//
// Turns the one-hot output of the leading-one detector into the binary bit
// position k (0..N-1, 4 bits for N = 16). Written as a true priority encoder,
// the highest set bit wins, so it is also defined for inputs that are not
// one-hot. An all-zero input gives k = 0. Purely combinational.
module prio_enc import ilm_pkg::*; #(
  parameter int unsigned N  = ILM_N,
  localparam int unsigned KW = $clog2(N)
) (
  input  logic [N-1:0]  onehot,
  output logic [KW-1:0] k
);
  always_comb begin
    k = '0;
    for (int i = 0; i < N; i++)
      if (onehot[i]) k = KW'(i);
  end
endmodule
