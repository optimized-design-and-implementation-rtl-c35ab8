// ilm_ref_pkg: reference models for the multiplier testbenches.
//
// Straight-line arithmetic models written from the defining equations, with
// no structure shared with the RTL: the leading-one position is found by a
// loop over the bits, the residue by subtraction, P0 by multiplying with
// powers of two, and the corrected product by iterating on the residues.
package ilm_ref_pkg;
  localparam int unsigned N = 16;

  // Position of the most significant '1'; -1 for zero.
  function automatic int msb_pos(input logic [N-1:0] a);
    msb_pos = -1;
    for (int i = 0; i < N; i++)
      if (a[i]) msb_pos = i;
  endfunction

  // Residue a - 2^k (zero stays zero).
  function automatic logic [N-1:0] residue(input logic [N-1:0] a);
    int k;
    k = msb_pos(a);
    residue = (k < 0) ? a : N'(int'(a) - (2 ** k));
  endfunction

  // First approximation 2^(k1+k2) + r1*2^k2 + r2*2^k1; zero if an operand is zero.
  function automatic longint unsigned p0_ref(input logic [N-1:0] a, input logic [N-1:0] b);
    int ka, kb;
    longint unsigned ra, rb;
    ka = msb_pos(a);
    kb = msb_pos(b);
    if (ka < 0 || kb < 0) return 0;
    ra = longint'(a) - (64'd1 << ka);
    rb = longint'(b) - (64'd1 << kb);
    p0_ref = (64'd1 << (ka + kb)) + ra * (64'd1 << kb) + rb * (64'd1 << ka);
  endfunction

  // Product after ncorr correction terms.
  function automatic longint unsigned mult_ref(input logic [N-1:0] a, input logic [N-1:0] b,
                                               input int ncorr);
    logic [N-1:0] x, y;
    x = a;
    y = b;
    mult_ref = p0_ref(x, y);
    for (int i = 0; i < ncorr; i++) begin
      x = residue(x);
      y = residue(y);
      mult_ref += p0_ref(x, y);
    end
  endfunction
endpackage
