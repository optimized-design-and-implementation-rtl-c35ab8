// ilm_pkg: shared constants of the iterative logarithmic multiplier.
//
// The multiplier works on unsigned N-bit operands and produces a 2N-bit
// product. N = 16 is the operand width the design is built for; the number
// of error correction units defaults to one, the configuration for which
// area and power figures are usually quoted. Every module takes these as
// typed parameter defaults so that smaller or larger variants can be built.
package ilm_pkg;
  parameter int unsigned ILM_N     = 16;  // operand width
  parameter int unsigned ILM_NCORR = 1;   // error correction units after the basic block
endpackage
