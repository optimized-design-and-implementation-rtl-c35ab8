// ilm_ecu: error correction unit of the iterative logarithmic multiplier.
//
// The error of the basic block is exactly the product of the two residues,
// r1*r2. A correction unit approximates that product in the same way the
// basic block approximated N1*N2: it is a pipelined basic block fed with the
// residues of the block before it, giving the correction term
//   C = 2^(j1+j2) + (r1 - 2^j1)*2^j2 + (r2 - 2^j2)*2^j1,
// with j1, j2 the leading-one positions of r1, r2, followed by one adder
// that adds C to the running product. Its own new residues go to the next
// unit, so units chain; each one removes one more '1' from each operand and
// a chain of N-1 units gives the exact product. A zero residue gives C = 0,
// the stopping rule of the iteration.
//
// Interface: residues r1_in, r2_in from the stage-1 registers of the
// previous block; running product acc_in; new residues r1_out, r2_out
// (registered, one cycle after r*_in); acc_out = acc_in + C.
// Timing: C is ready four cycles after r*_in is sampled; acc_in must be
// valid at that same point, and acc_out follows one cycle later.
// The unit's function is the documented one; its make-up (a pipelined basic
// block plus one registered adder) and its timing are this design's.
module ilm_ecu import ilm_pkg::*; #(
  parameter int unsigned N  = ILM_N,
  localparam int unsigned PW = 2 * N
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [N-1:0]  r1_in,
  input  logic [N-1:0]  r2_in,
  input  logic [PW-1:0] acc_in,
  output logic [N-1:0]  r1_out,
  output logic [N-1:0]  r2_out,
  output logic [PW-1:0] acc_out
);
  logic [PW-1:0] corr;

  pipelined_bb #(.N(N)) u_bb (
    .clk(clk), .rst(rst),
    .n1(r1_in), .n2(r2_in),
    .p(corr), .r1(r1_out), .r2(r2_out)
  );

  always_ff @(posedge clk) begin
    if (rst) acc_out <= '0;
    else     acc_out <= acc_in + corr;
  end
endmodule
