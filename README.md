# Reversible-gate modular adders for a residue number system

A residue number system (RNS) represents an integer by its remainders modulo several
pairwise co-prime moduli. Addition then splits into independent narrow additions, one per
modulus, with no carries between them. This RTL builds such an adder for the moduli set
**{2^N−1, 2^(N+K), 2^N+1}**. Its full adders and half adders are the reversible HNG and
Peres gates, and Feynman gates do the XOR work around them. The central piece is the
**modulo 2^N−1 adder with end-around carry**. It comes in five versions on different
carry-propagate adders:

* carry-skip
* carry-select
* carry-lookahead
* ripple-carry
* Brent–Kung parallel-prefix

The top level `rns_adder_top` does the following:

1. It converts two binary operands into residues.
2. It adds the residues channel by channel.
3. It converts the residue sum back to binary, giving `s = (a + b) mod M` with
   `M = (2^N−1)·2^(N+K)·(2^N+1)`.

Everything is combinational. There is no clock, no reset and no handshake. Outputs are
valid one propagation delay after the inputs change.

## Reversible gates

Each of the three gates is a bijection on its inputs, so no information is lost:

| gate | inputs | outputs | used as |
|---|---|---|---|
| Feynman (`feynman_gate`) | A, B | A, A⊕B | XOR for sum and propagate bits |
| Peres (`peres_gate`) | A, B, C | A, A⊕B, AB⊕C | half adder with C = 0 (sum A⊕B, carry AB); propagate/generate stage |
| HNG (`hng_gate`) | A, B, C, D | A, B, A⊕B⊕C, (A⊕B)C⊕AB⊕D | full adder with D = 0 (sum A⊕B⊕C, carry majority) |

The outputs that are not needed, such as the copies of A and B, are "garbage" outputs. In
the RTL they are left unconnected, on signals named `unused_*`. The gates are ordinary
combinational logic, so the netlist behaves the same as a conventional adder would. The
reversible structure is kept so that each gate maps one to one onto a reversible cell.

Only the full and half adders, and the XORs that form sum and propagate bits, are
reversible gates. Some logic has no reversible form given in the original design, so it
is plain logic:

* the carry-skip AND/OR gates;
* the carry-select multiplexers;
* the lookahead sum-of-products;
* the Brent–Kung prefix cells.

## Modulo 2^N−1 addition and the end-around carry

Modulo 2^N−1, the weight 2^N equals 1. A carry out of the top bit is therefore worth exactly
one unit at bit 0. It must be added back in: this is the *end-around carry* (EAC). Feeding the
carry-out straight back into the carry-in would form a combinational loop. Each adder here
avoids that:

* **`csa_eac_rev`**: an N-bit 3-to-2 carry-save adder of N HNG full adders. Its carry
  vector is rotated by one bit, so the carry of bit N−1 lands in bit 0. The outputs satisfy
  `sum + carry ≡ a + b + c (mod 2^N−1)`. Its delay is one full adder.
* **`rca_eac_rev`**: the ripple-carry version. A row of HNG full adders computes a + b + cin.
  Its carry-out then enters a second ripple row of Peres half adders, which adds it to the
  first row's sum. The carry out of the half-adder row is dropped. That is exact as long as
  neither operand is 2^N−1 when cin = 1.
  The adder has 2N constant inputs (D = 0 of each HNG gate, C = 0 of each Peres gate) and
  3N garbage outputs (two per HNG gate, one per Peres gate).
* **`bk_mod_adder`**: the prefix version. Peres gates form the bit propagates and generates,
  and a Brent–Kung tree gives the group generate of all N bits, which is the carry-out.
  One extra row of black cells then forms `c_i = G[i:0] | P[i:0]·cout` for every bit.
  Feynman gates finish with `s_i = p_i ⊕ c_(i−1)`, where `c_(−1) = cout`. The tree is
  computed in place by a procedural loop:
  * the up-sweep combines node i with node i−2^l when (i+1) is a multiple of 2^(l+1);
  * the down-sweep fills the positions j·2^(l+1)+2^l−1.

  At N = 8 this is the familiar 8-bit Brent–Kung tree. Any N ≥ 2 works.
* **`mod_adder_eac`**: the modulo adder of the top level. Its parameter `KIND` chooses one
  of five adders:
  * `ADD_SKIP`, `ADD_SELECT` or `ADD_CLA`: the chosen N-bit adder runs with carry-in 0, and
    a Peres half-adder row adds its carry-out back. This is the same trick as the ripple
    version.
  * `ADD_RCA` or `ADD_BK`: the module uses `rca_eac_rev` or `bk_mod_adder`.

**Two codes for zero.** These adders can return all ones (2^N−1), which is congruent to 0.
This happens when a + b = 2^N−1. `mod_adder_eac` passes that value through unchanged. Its
users map it to 0 wherever a canonical residue is needed: the forward converter, the
channel-1 output of the top level and the reverse converter. The reverse converter also
accepts all ones as an input residue.

## The three compared carry-propagate adders

All three are 16 bits wide by default (`WIDTH = 16`), built from 4-bit blocks (`BLOCK = 4`),
with the interface `{cout, s} = a + b + cin`. A width that is not a multiple of the block size
is padded with zero bits internally.

* **`carry_skip_rev`**: each block is a ripple chain of HNG full adders. Feynman gates form
  the propagate bits. The block carry-out is `ripple_cout | (&p_block & cin_block)`. So when
  every bit of a block propagates, the incoming carry bypasses the ripple chain.
* **`carry_select_rev`**: each block holds two HNG ripple chains, one assuming carry-in 0
  and one assuming carry-in 1. Multiplexers pick the sum bits and the carry-out when the
  real block carry-in arrives.
* **`cla_rev`**: Peres gates give p and g. Each 4-bit group computes all its carries at once
  as sums of products of p, g and the group carry-in. Feynman gates form the sums. Group
  carries ripple from one group to the next.

The carry-skip adder is the default `KIND` everywhere, since it was the variant found to
use the least power.

## Forward conversion (`forward_converter`)

The input has 3N+K bits. Each residue is produced as follows:

* **x2 = x mod 2^(N+K)** is the low N+K bits.
* **x1 = x mod 2^N−1** uses the fact that 2^N ≡ 1. The input is cut into ⌈(3N+K)/N⌉ chunks
  of N bits (four chunks for 1 ≤ K ≤ N), and their sum is reduced modulo 2^N−1. A chain of
  CSAs with EAC (`csa_eac_chain`) and one `mod_adder_eac` do this, and an all-ones result
  becomes 0.
* **x3 = x mod 2^N+1** uses the fact that 2^N ≡ −1, so x is congruent to the alternating
  sum c0 − c1 + c2 − c3 of the chunks. A negative chunk enters as its N-bit complement,
  because −c ≡ ~c + 2.
  * The reduction uses CSAs with a *complemented* end-around carry (`csa_ceac_rev`). The top
    carry is worth 2^N ≡ −1, so its inverse is wrapped into bit 0. Each such CSA adds a
    constant 1.
  * The four chunks plus one correction constant make five operands, which three CSAs
    reduce to two. The constant is 2·(negated chunks) − (number of CSAs), which is 1 for
    four chunks.
  * `mod_2np1_adder` adds the two vectors. Their sum is below 2·(2^N+1), so one conditional
    subtraction is enough.

## Reverse conversion (`reverse_converter`)

This is the least obvious part of the design. The low N+K bits of X are x2 itself. The
upper 2N bits are

    Y = (X − x2) / 2^(N+K),   0 ≤ Y < 2^2N − 1,

so Y can be computed modulo 2^2N−1 = (2^N−1)(2^N+1). The Chinese remainder theorem for the
pair {2^N−1, 2^N+1} gives the number that matches x1 and x3:

    X ≡ x3 + (2^(2N−1) + 2^(N−1)) · (x1 − x3)      (mod 2^2N − 1)

This holds for two reasons:

* Modulo 2^N+1 the second term vanishes.
* Modulo 2^N−1, 2^(2N−1) + 2^(N−1) ≡ 2^N ≡ 1.

Then

    Y ≡ 2^−(N+K) · (X − x2)                          (mod 2^2N − 1)

Modulo 2^2N−1 these operations are cheap:

* multiplying by 2^j is a left rotation of the 2N-bit word by j;
* negating is a bitwise complement;
* dividing by 2^(N+K) is a rotation by −(N+K).

The operand preparation is therefore pure wiring and yields five 2N-bit words:

1. x3;
2. x1·(2^(2N−1) + 2^(N−1)), two non-overlapping rotated copies of x1;
3. the complement of x3·2^(2N−1);
4. the complement of x3·2^(N−1);
5. the complement of x2.

Each of them is rotated by −(N+K). Three 2N-bit CSAs with EAC reduce the five words to two.
A 2N-bit `mod_adder_eac` adds those two, and an all-ones result is mapped to 0. The output is
`x = {Y, x2}`. At the defaults (N = 8, K = 4), the final modulo 2^16−1 adder is a 16-bit
carry-skip adder.

## Top level (`rns_adder_top`)

| parameter | default | meaning |
|---|---|---|
| `N` | 8 | moduli 2^N−1 and 2^N+1 |
| `K` | 4 | modulus 2^(N+K); 1 ≤ K ≤ N |
| `KIND` | `ADD_SKIP` | adder family (`rns_pkg::adder_kind_e`) |

The defaults give the moduli {255, 4096, 257}, 28-bit operands and M = 268,370,176.

The datapath is as follows:

* Two forward converters produce `a_r1..a_r3` and `b_r1..b_r3`.
* Channel 1 adds modulo 2^N−1 with `mod_adder_eac`. `eac1` is its end-around carry.
* Channel 2 adds in binary with the adder of the same family and drops the carry-out;
  `wrap2` is that dropped carry. `ADD_RCA` and `ADD_BK` use the carry-skip adder here.
* Channel 3 adds modulo 2^N+1 with `mod_2np1_adder`. `wrap3` shows when it subtracted the
  modulus.
* The reverse converter turns `s_r1..s_r3` into `s`.

Any operands below 2^(3N+K) are accepted, including values at or above M. The result is
always `(a + b) mod M`.

## Where this RTL departs from the original design, and how far to trust it

* **Moduli set.** It is read as {2^N−1, 2^(N+K), 2^N+1}. The values N = 8 and K = 4 are
  not given in the original; they are chosen so that the reverse converter's final adder is
  16 bits wide, the width of the compared adders.
* **Reverse-converter operands.** The operand preparation is derived independently, as
  shown above. It needs five operands and three CSAs, where the original diagram draws
  four operands and two CSAs.
* **Modulo 2^N+1 residues.** The original names CSAs with complemented end-around carry
  and a modulo 2^N+1 adder, but not their operands. The chunk signs and the correction
  constant are derived here. The modulo 2^N+1 adder is a simple add-and-correct circuit.
* **End-around carry.** For the carry-skip, carry-select and carry-lookahead adders the
  carry-out is added back by a Peres half-adder row. How it is re-inserted there is not
  specified in the original.
* **Widths and gate choices not given in the original:**
  * the 16-bit width of the carry-select and carry-lookahead adders;
  * the rippled group carries of the lookahead adder;
  * the use of Feynman and Peres gates around the lookahead and prefix logic.
* **Addition only.** Channel subtraction and multiplication are general RNS operations
  that the original design does not develop, so they are not built.
* **Not built.** The versions of the three adders made from ordinary gates were only
  baselines in the original comparison, and are not built.
* **Small example from the original.** The original shows a small worked example with the
  moduli {5, 3, 2}. This set is not of the {2^N−1, 2^(N+K), 2^N+1} form with K ≥ 1, so it
  cannot be reproduced. The number 29 from that example is converted and added at the
  default size.

Every module has a self-checking testbench that compares against integer arithmetic. The
gates are checked over their full truth tables. The 4-bit and 8-bit modulo adders and the
modulo 257 adder are checked over every operand pair. The other blocks get tens of
thousands of random and corner-case vectors, as does the top level with all five adder
kinds.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and finishes. For example, to run
the end-to-end test of all five adder kinds:

    verilator --binary --timing -Wno-fatal --top-module tb_rns_adder_top \
        -y rtl -y tb +libext+.sv rtl/rns_pkg.sv tb/tb_rns_adder_top.sv
    ./obj_dir/Vtb_rns_adder_top

Some testbenches:

* `tb/tb_rns_adder_full.sv` runs the top level exactly at its defaults.
* Each block has `tb/tb_<module>.sv`.
* `rtl/rns_pkg.sv` must come first on the command line because the modules import it.

To try another adder family or size, override `KIND`, `N` and `K` on `rns_adder_top`.
