// ilm_top: top level of the 16-bit iterative logarithmic multiplier design.
//
// Holds the two multiplier implementations side by side, each with its own
// ports:
//   * the pipelined iterative multiplier (ilm_mult): a four-stage pipelined
//     basic block followed by NCORR error correction units, one operand pair
//     per cycle, product on p after ilm_mult's latency (6 cycles for the
//     default single correction unit);
//   * the non-pipelined basic block (basic_block): combinational first
//     approximation of c_n1*c_n2 on c_p, with the residues c_r1 = c_n1 - 2^k1
//     and c_r2 = c_n2 - 2^k2 from which a correction term would start.
// Both take unsigned operands; clk and rst (synchronous, active high) serve
// the pipelined multiplier only. Placing both in one top is this design's
// choice; they share no logic.
module ilm_top import ilm_pkg::*; #(
  parameter int unsigned N     = ILM_N,
  parameter int unsigned NCORR = ILM_NCORR
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [N-1:0]   n1,
  input  logic [N-1:0]   n2,
  output logic [2*N-1:0] p,
  input  logic [N-1:0]   c_n1,
  input  logic [N-1:0]   c_n2,
  output logic [2*N-1:0] c_p,
  output logic [N-1:0]   c_r1,
  output logic [N-1:0]   c_r2
);
  ilm_mult #(.N(N), .NCORR(NCORR)) u_mult (
    .clk(clk), .rst(rst), .n1(n1), .n2(n2), .p(p)
  );

  basic_block #(.N(N)) u_comb (
    .n1(c_n1), .n2(c_n2), .p(c_p), .r1(c_r1), .r2(c_r2)
  );
endmodule
