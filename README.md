# 16-bit iterative logarithmic multiplier

An unsigned 16 × 16 → 32-bit multiplier built only from leading-one
detection, shifts and additions. It needs no partial-product array. The
idea comes from logarithmic (Mitchell-style) multiplication, with one
change: the error is not thrown away. It is computed again by the same
hardware, so the result can be made as exact as wanted.

## The arithmetic

Any nonzero operand can be split at its leading one:

    N = 2^k + r,    k = position of the most significant '1',  r = N - 2^k < 2^k

The exact product then expands to

    N1·N2 = 2^(k1+k2) + r1·2^k2 + r2·2^k1  +  r1·r2
            \________________________/
                  first approximation P0

Each of the three terms of P0 is cheap:

- `2^(k1+k2)` is a decoded sum of two 4-bit numbers.
- `r1·2^k2` and `r2·2^k1` are barrel shifts.

The only term left out is `r1·r2`, so P0 is never larger than the true
product. `r1·r2` is again a product of two numbers, each with one fewer
'1' than its operand. The same circuit can approximate it, giving a
correction term C(1) and new residues. Each correction unit removes one
more '1' from each operand. The product is exact as soon as either residue
reaches zero, so 15 correction units always give the exact 32-bit product.
A zero residue makes its correction term 0, which is how the iteration
stops.

Two worked examples, which the testbenches check bit-exact:

| N1     | N2     | k1 | k2 | r1     | r2     | P0         |
|--------|--------|----|----|--------|--------|------------|
| 0x02fb | 0x0a77 | 9  | 11 | 0x00fb | 0x0277 | 0x001cc600 |
| 0x3103 | 0xde96 | 13 | 15 | 0x1103 | 0x5e96 | 0x24544000 |

## The basic block

The basic block computes P0 together with the residues r1 and r2. Per
operand:

1. `lod` keeps only the leading one, giving the one-hot word 2^k.
2. XOR with the operand clears that bit, giving r.
3. `prio_enc` turns 2^k into k (4 bits).

The two halves are cross-coupled: r1 is shifted by **k2** and r2 by
**k1** (`barrel_shl`, 16 → 32 bits). A 4-bit adder forms k1+k2 (5 bits),
and `k_decoder` turns it into 2^(k1+k2). One 32-bit adder sums the two
shifted residues, and a second 32-bit adder adds the decoded power of two.

`basic_block` is this circuit built purely combinationally.

`pipelined_bb` is the same circuit in four register stages:

| stage | computes                                      | registered         |
|-------|-----------------------------------------------|--------------------|
| 1     | LOD, XOR, priority encoder                    | k1, k2, r1, r2     |
| 2     | k1+k2, the two barrel shifts                  | k1+k2, r1<<k2, r2<<k1 |
| 3     | decoder 2^(k1+k2), sum of the shifted residues | both             |
| 4     | final 32-bit adder                            | P0 (output)        |

The stage-1 residue registers drive the `r1`/`r2` outputs.

Timing: the stage-1 registers sample the operands at a rising edge. The
residues appear right after that edge, and P0 after the fourth edge,
counting the sampling edge as the first. A new operand pair can enter on
every cycle.

Reset is synchronous and active high. It clears every register, so the
output reads zero during and after reset.

## Error correction units and the iterative multiplier

`ilm_ecu` is a `pipelined_bb` fed with the residues of the block before
it, plus one registered 32-bit adder that adds its term C to a running
product. It takes its residues from the stage-1 registers of the previous
block, not from that block's output. So unit *i* starts only *i* cycles
after the operands enter, and correction units overlap almost entirely
with the basic block.

`ilm_mult` chains the pipelined basic block and `NCORR` correction units:

    n1,n2 ─► pipelined_bb ──P0──► [align reg] ──► ecu 1 ──► ecu 2 ── … ──► p
                 │ r1,r2 (after stage 1)            ▲ │        ▲
                 └──────────────────────────────────┘ └─r1,r2──┘

C(1) is ready one cycle after P0, so P0 goes through one alignment
register first. After that, the running sum and the next correction term
always arrive together.

Latency, in rising edges from the sampling edge (counted as the first):

| NCORR       | latency | result                     |
|-------------|---------|----------------------------|
| 0           | 4       | P0 (bare pipelined basic block) |
| 1 (default) | 6       | P0 + C(1)                  |
| 2           | 7       | P0 + C(1) + C(2)           |
| k ≥ 1       | k + 5   | P0 + C(1) + … + C(k)       |
| 15          | 20      | exact N1·N2 for all operands |

Every correction term is ≥ 0. Adding one never overshoots the true
product, so the 32-bit sum cannot overflow.

Accuracy with one correction unit: the result is exact whenever one
operand has at most two '1' bits. In the end-to-end test, where one pair
in five has an operand with at most two '1' bits and the rest are random,
about 20 % of the products were exact.

## Top level

`ilm_top` holds both implementations side by side. They share no logic.

- The pipelined iterative multiplier: `clk`, `rst`, `n1`, `n2` → `p`.
- The combinational basic block: `c_n1`, `c_n2` → `c_p` (P0), with the
  residues on `c_r1` and `c_r2`.

Parameters:

- `N = 16`: operand width. Widths are derived from it; powers of two are
  assumed.
- `NCORR = 1`: number of correction units.

The defaults are in `ilm_pkg`.

## Where this RTL makes its own choices

- **Zero operands.** The plain algorithm gives a meaningless result
  (`0 × b` would come out as `b`). Here a zero flag from the LOD travels
  through the pipeline and forces the product to 0. The correction chain
  needs this anyway, because a zero residue must give a zero correction.
- **Correction unit make-up.** The unit is a `pipelined_bb` plus one
  adder. The alignment register, the chained accumulation and the
  resulting latency are this design's choices.
- **Reset** is synchronous.
- **No handshake.** There is no valid or ready signal; the pipeline
  accepts a pair every cycle. If you need a valid flag, add a
  LATENCY-deep shift register next to it.
- **Internal structure.**
  - `lod` is an MSB-first priority chain.
  - `prio_enc` is a true priority encoder, defined for any input.
  - `barrel_shl` has log2(N) mux levels.
  - `barrel_shl`'s top output bit is always 0 for N = 16. It is kept so
    the port has the full 32-bit width.
- **Signed operands** are not supported. The operands are unsigned.

Not included:

- Mitchell's original approximate multiplier and its analytic correction.
  It is only a point of comparison for this method.
- Any FPGA-specific mapping. Area, power and clock rate depend on
  synthesis for a particular device and have not been checked here.

## Files and simulation

`rtl/`:

- `ilm_pkg.sv`: defaults.
- Building blocks: `lod.sv`, `prio_enc.sv`, `barrel_shl.sv`, `k_decoder.sv`.
- `basic_block.sv`, `pipelined_bb.sv`, `ilm_ecu.sv`, `ilm_mult.sv`,
  `ilm_top.sv`.

`tb/`:

- `ilm_ref_pkg.sv` holds reference models written from the equations
  above. They use loops over bits, subtraction and multiplication, and
  share no structure with the RTL.
- There is one self-checking testbench per module, `tb_<module>.sv`. Each
  prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.
- `tb_lod` is exhaustive over all 65536 operands.
- `tb_ilm_mult` runs NCORR = 0, 1, 2 and 15 side by side. It checks every
  latency and checks that NCORR = 15 is exact.
- `tb_ilm_top` runs the default design end to end on 20 000 back-to-back
  operand pairs. It counts how often each behaviour occurred: reset, zero
  operand, zero and nonzero correction term, exact and inexact result,
  combinational block.

Running one testbench with Verilator 5:

    verilator --binary --timing --assert -Wall -Wno-fatal \
      -y rtl -y tb +libext+.sv -Irtl -Itb \
      rtl/ilm_pkg.sv tb/ilm_ref_pkg.sv tb/tb_ilm_top.sv \
      --top-module tb_ilm_top -o sim
    ./obj_dir/sim

Each testbench finishes in well under a second.
