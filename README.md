# Fault-tolerant multiplexer-based fast adders

An adder is everywhere in a datapath, and a single upset in one can corrupt an
address, a loop count or a product. This RTL gives three combinational adders
that share one fast carry architecture:

| module            | what it does                                                             |
|-------------------|--------------------------------------------------------------------------|
| `fast_adder`      | plain fast adder, no fault tolerance (the base architecture)              |
| `st_fast_adder`   | self-testing: adds at full speed and flags the full adder or block carry that is wrong |
| `sc_fast_adder`   | self-correcting: masks faults in up to two of three copies of every full adder and in one of three copies of every block carry circuit |

`ft_adder_top` places the three side by side, each with its own ports. All
of them are purely combinational: no clock, no reset, no state. Width is the
parameter `WIDTH` (a positive multiple of 8, default 16). The design follows
the article *Fast adder with the ability of multiple faults detection and
correction*. The article reports results for 8, 16, 32 and 64 bits; all four
widths are simulated here.

## 1. The fast carry

Every cell is a multiplexer full adder (`fa_mux`). With `X = A XNOR B`:

    S    = X XNOR Cin
    Cout = X ? A : Cin

If the two operand bits are equal, the carry out is that bit: it is generated
(1,1) or killed (0,0). Otherwise the cell passes the carry in on. A 4-bit
ripple chain of these cells therefore has this carry out: `A_i` of the most
significant bit with `X_i = 1`, or `Cin` only if all four bits propagate.
`carry4_first` evaluates that rule with four 2:1 muxes and a 3-input NOR. Its
depth is three muxes:

    m_hi  = X4 ? A4 : A3
    sel   = X4 ? 1  : X3
    m_mid = sel ? m_hi : A2
    m_lo  = X1 ? A1 : Cin
    C4    = NOR(X4,X3,X2) ? m_lo : m_mid

(Index 1 is bit 0 of the vectors in the RTL.)

The upper 4 bits of an 8-bit pair use `carry4_second`. It is the same tree
with `A5` where `Cin` would be, so it needs no carry in. `carry8` then picks
the upper result unless all of `X5..X8` are 0, in which case it passes `C4`
on. `fast_adder` cuts the operands into 4-bit `rca4` groups. The groups give
the sums and the `X` values, and one `carry8` per pair gives the group carries
`C4`, `C8`. The `C8` of each pair is the carry in of the next pair. The sum
bits still ripple inside a group, but a carry crosses each group through at
most two muxes.

## 2. The self-testing full adder (`st_fa`, `fa_checker`)

Look at a full adder's truth table. `S` equals `Cout` only for the inputs
000 and 111. For the other six inputs the two outputs are complements. So the
checker predicts `S` from `Cout` and compares:

    m1    = (A XNOR B)   ? Cout : ~Cout
    m2    = (B XNOR Cin) ? m1   : ~Cout
    err_n = S XNOR m2

`m2` is `Cout` when A = B = Cin, and `~Cout` otherwise. **`err_n` is active
low:** 1 means the outputs are consistent, 0 means a fault. This is the polarity
of the article's "Error" signal, and all `e*` / `err_n` outputs in this RTL
use it.

The detection works only if one fault cannot corrupt `S` and `Cout` in a
consistent way. `st_fa` therefore builds the sum from its own `A XNOR B`
gate. The carry path has a second `A XNOR B` gate, and the checker shares that
one. These faults are always detected:

* a flip of the sum-path XNOR;
* a flip of `S`;
* a flip of `Cout`.

A flip of the carry-path XNOR is detected for some inputs and not for others,
because the checker sees the same wrong value. Faults in the checker itself
are not covered; neither the article nor this RTL covers them.

Because the two XNOR gates are logically identical, a synthesis tool will
merge them unless told to keep them (a `keep`/`dont_touch` attribute, or
separate hierarchy preserved during synthesis). Do that in a real
implementation. Otherwise the two paths are no longer independent.

## 3. Self-testing fast adder (`st_block4`, `st_fast_adder`)

A 4-bit block is four `st_fa` cells in a ripple chain (Error `E1..E4`) plus
the block's carry generation circuit `carry_gen4`. The carry circuit computes
the fast carry `Cnew`. An XNOR compares `Cnew` with the ripple carry out of
the fourth cell and gives `E_Cnew`. `Cnew` goes on to the next block, so the
checking adds nothing to the carry path. The adder detects but does not
correct: a faulty sum is still delivered, together with the flags:

* `e_fa[i]` is 0 when full adder *i* is inconsistent;
* `e_cnew[g]` is 0 when the fast and ripple carries of block *g* disagree;
* `fault` is 1 when any flag is 0.

Pair structure: blocks alternate between lower (`UPPER = 0`) and upper
(`UPPER = 1`) positions of an 8-bit pair. The lower block's carry circuit is
`carry4_first`. The upper block's is `carry4_second` followed by the pair
multiplexer, whose "all propagate" input is this block's carry in, which is
the lower block's `Cnew`. Both compute the same function (the block's carry
out). Each `carry_gen4` computes its own `X` values, so it shares no gate with
the full adders or with its own redundant copies.

## 4. Self-correcting fast adder (`sc_fa`, `tmr_carry_gen4`, `sc_block4`, `sc_fast_adder`)

`sc_fa` runs a main `st_fa` and two redundant copies on the same inputs. Two
levels of muxes choose the outputs:

    out = e1 ? main : (e2 ? first_redundant : second_redundant)

One or two copies may fail, and the result is still correct as long as their
checkers detect the faults. The selection does not use `e3`; `sc_fa` brings
it out only for observation. The selection is no majority vote: a voter over
three copies is outvoted as soon as two of them are wrong, while this
selection still delivers the third copy's result when the two faulty copies
flag themselves.

Each block carry is triplicated (`tmr_carry_gen4`). The voter needs one XNOR
and one mux:

    E_Cnew = Cnew2 XNOR Cnew3
    Cnew   = E_Cnew ? Cnew2 : Cnew1

This is the majority of the three copies. `sc_block4` chains four `sc_fa`
cells through their corrected carries for the sums. The block's carry out is
the voted `Cnew`. `sc_fast_adder` chains the blocks as in section 3.

What is not protected: the selection muxes of `sc_fa`, the voter, and the
final `fault` OR of `st_fast_adder`. A fault there is not corrected. The same
holds for any two copies of one carry circuit failing together.

## 5. Fault-injection inputs

Every fault-tolerant module has `inj*` inputs. **They are not part of the
adder: tie them to 0.** They exist so that the fault handling can be simulated
with any simulator, without `force`. A 1 flips one internal node:

* `st_inj_t` (in `ft_adder_pkg`) has one bit per `st_fa` site:
  * `INJ_XS`: the sum-path XNOR;
  * `INJ_S`: the sum;
  * `INJ_XC`: the carry-path/checker XNOR;
  * `INJ_COUT`: the carry.
* `sc_fa` takes one `st_inj_t` per copy (index 0 = main).
* `carry_gen4` has one bit that flips its output.
* `tmr_carry_gen4` has one bit per copy.

At the top they are packed arrays: `st_inj_fa[WIDTH]`, `st_inj_cg[WIDTH/4]`,
`sc_inj_fa[WIDTH][3]` and `sc_inj_cg[WIDTH/4][3]`. Each is an XOR on one net.
A tool removes it when the input is tied to 0, so the structure being
synthesised is the adder's own.

## 6. Ports of `ft_adder_top`

| prefix | inputs                                   | outputs                                         |
|--------|------------------------------------------|-------------------------------------------------|
| `pl_`  | `a`, `b` [WIDTH], `cin`                  | `s` [WIDTH], `cout`                             |
| `st_`  | `a`, `b`, `cin`, `inj_fa`, `inj_cg`      | `s`, `cout`, `e_fa` [WIDTH], `e_cnew` [WIDTH/4], `fault` |
| `sc_`  | `a`, `b`, `cin`, `inj_fa`, `inj_cg`      | `s`, `cout`                                     |

All outputs are combinational functions of the inputs. In mux delays, one
4-bit carry circuit is three muxes deep and an 8-bit pair four. No cycle-level
timing applies.

## 7. Where this RTL departs from or adds to the article

* **Parameter and width.** The article draws only a 16-bit block diagram and
  synthesises 8 to 64 bits. Here `WIDTH` defaults to 16. Above 16 bits the
  pairs are chained (the `C8` of one pair is the carry in of the next), as the
  16-bit diagram does. With this chaining `C16` is seven muxes deep
  (four to `C8`, then three). The article quotes five muxes for the 16-bit
  carry, which would need a carry for bits 9-16 computed without a carry in
  and merged with `C8` in one mux. Its block diagram shows the chained form,
  and that is what is built.
* **Carry generation circuit of the fault-tolerant blocks.** The article draws
  it only as a box. Here each 4-bit block gets the half of the 8-bit pair
  circuit that belongs to it, with its own XNOR gates.
* **Block carry out.** The block carry out is the fast `Cnew`, not the ripple
  carry. `E_Cnew` compares the two.
* **Added outputs and inputs.** `fault` (the OR of all flags) and the
  observation output `e` of `sc_fa` are additions. So are all `inj*` inputs.
* **Checker structure.** The checker is built from the article's gate
  diagram and verified against the full-adder truth table.
* **Not reproduced.** The article compares transistor counts, synthesised
  area, delay and power, and gives "probability of multiple fault correction"
  tables. Those figures come from transistor-level counting and a
  commercial synthesis flow. This RTL does not reproduce them.

## 8. Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. `tb/tb_ft_model_pkg.sv` holds the reference
models: the faulty `st_fa` behaviour, the consistency rule, the copy selection
and a majority function.

* **Exhaustive tests.** These cover `fa_mux`, `rca4`, the carry circuits
  (`carry8` over all 2^17 inputs), `fa_checker` and `carry_gen4`. `st_fa` runs
  every input against all 16 injection patterns. `sc_fa` runs every input
  against all 4096 patterns, compared exactly with the model. `st_block4` and
  `sc_block4` run every input with single and multiple faults.
* **Random tests.** `fast_adder` runs at 8, 16, 32 and 64 bits;
  `st_fast_adder` and `sc_fast_adder` at 16 and 64 bits. Long carry
  propagation is biased in. In the self-correcting adder, up to two faulty
  copies of every full adder and one faulty carry copy per block are injected
  at once, and the sum must stay exact.
* **End-to-end test.** `tb_ft_adder_top` runs the top at its default width. It
  counts that each mechanism occurred, and fails if one never did:
  * full propagation across all blocks;
  * self-test detection of a full adder and of a block carry;
  * switching to the first and to the second redundant copy (confirmed on the
    internal `e` of bit 0);
  * carry voting;
  * many simultaneous faults.

* **Multiple-fault campaign.** `tb_sc_fault_campaign` (helper
  `sc_campaign_unit`) puts 1 to 5 faults at random injection sites of
  8-, 16- and 32-bit self-correcting adders, 2000 additions per case. Every
  result must match the behavioural fault model, and every single fault away
  from the carry-path XNOR must be corrected. It prints the share of correct
  sums: about 98% with one fault, falling to 84-92% with five. Uncorrected
  results come from carry-path XNOR faults that the checker cannot see, and
  from fault combinations that disable two copies of one carry circuit or all
  three copies of one full adder. The sites cover the adders and carry
  circuits, not the selection muxes or voters, so these numbers are not the
  area-based percentages the article quotes.

* **Detection campaign.** `tb_st_fault_campaign` (helper `st_campaign_unit`)
  does the same for the self-testing adder, checking every Error flag against
  the model. Of the additions that came out wrong, it flags 96-97% with one
  fault and over 99% with four or five. The misses are carry-path XNOR faults
  that leave `S` and `Cout` consistent.

Run any testbench with plain Verilator 5, from the directory that holds
`rtl/` and `tb/`:

    verilator --binary --timing --assert --top-module tb_ft_adder_top \
        -y rtl -y tb +libext+.sv -Irtl -Itb \
        rtl/ft_adder_pkg.sv tb/tb_ft_model_pkg.sv tb/tb_ft_adder_top.sv
    ./obj_dir/Vtb_ft_adder_top

Each testbench finishes in seconds. To change the width, override `WIDTH`
on `fast_adder`, `st_fast_adder`, `sc_fast_adder` or `ft_adder_top`. Keep it a
multiple of 8; an elaboration-time assertion checks this.
