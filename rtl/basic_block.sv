// basic_block: non-pipelined basic block of the iterative logarithmic
// multiplier.
//
// Writing each operand as N = 2^k + r, with k the position of its leading
// one and r = N - 2^k the residue, the exact product is
//   N1*N2 = 2^(k1+k2) + r1*2^k2 + r2*2^k1 + r1*r2.
// The basic block computes the first three terms, the first approximation
// P0 = 2^(k1+k2) + r1*2^k2 + r2*2^k1, using only leading-one detection,
// shifting and addition. Per operand a leading-one detector finds 2^k, an
// XOR with the operand gives r and a priority encoder gives k. Each residue
// is shifted left by the *other* operand's k, the two shifted residues are
// added, k1 + k2 is decoded into 2^(k1+k2), and a last adder forms P0. The
// residues r1, r2 are also outputs: the next correction term r1*r2 is their
// product, computed in the same way.
//
// Interface: unsigned N-bit operands n1, n2; 2N-bit P0 on p; residues r1, r2.
// Timing: purely combinational.
// The structure is the documented one. For a zero operand the documented
// output is undefined; here p is forced to 0, the exact product, which is
// this design's choice.
module basic_block import ilm_pkg::*; #(
  parameter int unsigned N   = ILM_N,
  localparam int unsigned KW  = $clog2(N),
  localparam int unsigned PW  = 2 * N
) (
  input  logic [N-1:0]  n1,
  input  logic [N-1:0]  n2,
  output logic [PW-1:0] p,
  output logic [N-1:0]  r1,
  output logic [N-1:0]  r2
);
  logic [N-1:0]  lead1, lead2;
  logic          nz1, nz2;
  logic [KW-1:0] k1, k2;
  logic [KW:0]   k12;
  logic [PW-1:0] sh1, sh2, pow12, shsum;

  lod      #(.N(N)) u_lod1 (.a(n1), .onehot(lead1), .nonzero(nz1));
  lod      #(.N(N)) u_lod2 (.a(n2), .onehot(lead2), .nonzero(nz2));
  prio_enc #(.N(N)) u_enc1 (.onehot(lead1), .k(k1));
  prio_enc #(.N(N)) u_enc2 (.onehot(lead2), .k(k2));

  assign r1 = n1 ^ lead1;
  assign r2 = n2 ^ lead2;

  barrel_shl #(.N(N)) u_shl1 (.din(r1), .sh(k2), .dout(sh1));  // r1 * 2^k2
  barrel_shl #(.N(N)) u_shl2 (.din(r2), .sh(k1), .dout(sh2));  // r2 * 2^k1

  assign k12 = {1'b0, k1} + {1'b0, k2};
  k_decoder #(.N(N)) u_dec (.k12(k12), .dout(pow12));

  assign shsum = sh1 + sh2;
  assign p     = (nz1 && nz2) ? pow12 + shsum : '0;
endmodule
