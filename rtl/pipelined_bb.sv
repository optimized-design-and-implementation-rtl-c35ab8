// pipelined_bb: four-stage pipelined basic block.
//
// Computes the same first approximation as basic_block,
//   P0 = 2^(k1+k2) + (N1 - 2^k1)*2^k2 + (N2 - 2^k2)*2^k1,
// split into four register stages to shorten the longest combinational path:
//   stage 1  leading-one detectors, priority encoders and the XORs that
//            remove the leading ones; registers k1, k2, r1 = N1-2^k1,
//            r2 = N2-2^k2
//   stage 2  k1 + k2 and the two barrel shifters r1<<k2, r2<<k1; registered
//   stage 3  decoder 2^(k1+k2) and the sum of the two shifted residues;
//            registered
//   stage 4  final adder; the output register holds P0
// The stage-1 residue registers drive the outputs r1, r2, so a following
// correction unit can start one cycle after the operands enter.
//
// Interface: clk, rst (synchronous, active high, clears every register so
// that p reads 0 during and after reset), unsigned operands n1, n2.
// Timing: one operand pair per cycle; operands sampled at a rising edge
// appear on r1, r2 after that edge and on p after the fourth edge.
// The stage split, the reset-to-zero output and the four-cycle latency are
// the documented ones. The flag that forces p to 0 for a zero operand
// (documented as giving an unknown output) is this design's choice.
module pipelined_bb import ilm_pkg::*; #(
  parameter int unsigned N  = ILM_N,
  localparam int unsigned KW = $clog2(N),
  localparam int unsigned PW = 2 * N
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [N-1:0]  n1,
  input  logic [N-1:0]  n2,
  output logic [PW-1:0] p,
  output logic [N-1:0]  r1,
  output logic [N-1:0]  r2
);
  // ---------------- stage 1 ----------------
  logic [N-1:0]  lead1, lead2;
  logic          nz1, nz2;
  logic [KW-1:0] k1_c, k2_c;

  lod      #(.N(N)) u_lod1 (.a(n1), .onehot(lead1), .nonzero(nz1));
  lod      #(.N(N)) u_lod2 (.a(n2), .onehot(lead2), .nonzero(nz2));
  prio_enc #(.N(N)) u_enc1 (.onehot(lead1), .k(k1_c));
  prio_enc #(.N(N)) u_enc2 (.onehot(lead2), .k(k2_c));

  logic [KW-1:0] s1_k1, s1_k2;
  logic          s1_nz;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_k1 <= '0;
      s1_k2 <= '0;
      r1    <= '0;
      r2    <= '0;
      s1_nz <= 1'b0;
    end else begin
      s1_k1 <= k1_c;
      s1_k2 <= k2_c;
      r1    <= n1 ^ lead1;
      r2    <= n2 ^ lead2;
      s1_nz <= nz1 & nz2;
    end
  end

  // ---------------- stage 2 ----------------
  logic [PW-1:0] sh1_c, sh2_c;
  barrel_shl #(.N(N)) u_shl1 (.din(r1), .sh(s1_k2), .dout(sh1_c));
  barrel_shl #(.N(N)) u_shl2 (.din(r2), .sh(s1_k1), .dout(sh2_c));

  logic [KW:0]   s2_k12;
  logic [PW-1:0] s2_sh1, s2_sh2;
  logic          s2_nz;

  always_ff @(posedge clk) begin
    if (rst) begin
      s2_k12 <= '0;
      s2_sh1 <= '0;
      s2_sh2 <= '0;
      s2_nz  <= 1'b0;
    end else begin
      s2_k12 <= {1'b0, s1_k1} + {1'b0, s1_k2};
      s2_sh1 <= sh1_c;
      s2_sh2 <= sh2_c;
      s2_nz  <= s1_nz;
    end
  end

  // ---------------- stage 3 ----------------
  logic [PW-1:0] pow_c;
  k_decoder #(.N(N)) u_dec (.k12(s2_k12), .dout(pow_c));

  logic [PW-1:0] s3_pow, s3_shsum;
  logic          s3_nz;

  always_ff @(posedge clk) begin
    if (rst) begin
      s3_pow   <= '0;
      s3_shsum <= '0;
      s3_nz    <= 1'b0;
    end else begin
      s3_pow   <= pow_c;
      s3_shsum <= s2_sh1 + s2_sh2;
      s3_nz    <= s2_nz;
    end
  end

  // ---------------- stage 4 ----------------
  always_ff @(posedge clk) begin
    if (rst) p <= '0;
    else     p <= s3_nz ? s3_pow + s3_shsum : '0;
  end
endmodule
