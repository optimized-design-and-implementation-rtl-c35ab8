// ilm_mult: pipelined iterative logarithmic multiplier.
//
// A pipelined basic block gives the first approximation P0 of N1*N2, which
// is never larger than the true product and misses it by exactly r1*r2, the
// product of the residues left after removing each operand's leading one.
// NCORR error correction units follow in a chain; unit i approximates the
// remaining residue product in the same way and adds its correction term
// C(i), so the result is P0 + C(1) + ... + C(NCORR). Each unit takes its
// residues from the stage-1 registers of the block before it, so unit i
// starts i cycles after the basic block. Accuracy is chosen with NCORR:
// 0 gives the bare basic block, N-1 gives the exact product for every
// operand pair.
//
// Interface: clk, rst (synchronous, active high, output reads 0), unsigned
// N-bit operands n1, n2, 2N-bit product p. No handshake: a new operand pair
// may enter on every cycle.
// Timing: p is valid LATENCY rising edges after the edge that samples the
// operands (counting that edge): 4 for NCORR = 0, NCORR + 5 otherwise,
// because P0 is delayed one cycle to meet C(1) and each unit adds one adder
// stage. The residues left by the last block of the chain have no consumer
// and stay unconnected. The chaining of correction units follows the
// iterative algorithm; the alignment registers and the latency are this
// design's.
module ilm_mult import ilm_pkg::*; #(
  parameter int unsigned N     = ILM_N,
  parameter int unsigned NCORR = ILM_NCORR,
  localparam int unsigned PW = 2 * N
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [N-1:0]  n1,
  input  logic [N-1:0]  n2,
  output logic [PW-1:0] p
);
  logic [N-1:0]  r1 [NCORR+1];
  logic [N-1:0]  r2 [NCORR+1];
  logic [PW-1:0] acc [NCORR+1];
  logic [PW-1:0] p0;

  pipelined_bb #(.N(N)) u_bb (
    .clk(clk), .rst(rst), .n1(n1), .n2(n2),
    .p(p0), .r1(r1[0]), .r2(r2[0])
  );

  if (NCORR == 0) begin : g_bare
    assign acc[0] = p0;
  end else begin : g_align
    // P0 is ready one cycle before the first correction term.
    always_ff @(posedge clk) begin
      if (rst) acc[0] <= '0;
      else     acc[0] <= p0;
    end
  end

  for (genvar i = 0; i < NCORR; i++) begin : g_ecu
    ilm_ecu #(.N(N)) u_ecu (
      .clk(clk), .rst(rst),
      .r1_in(r1[i]), .r2_in(r2[i]), .acc_in(acc[i]),
      .r1_out(r1[i+1]), .r2_out(r2[i+1]), .acc_out(acc[i+1])
    );
  end

  assign p = acc[NCORR];
endmodule
