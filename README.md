# Approximate TMR with a fault-tolerant pass-transistor voter

Triple modular redundancy (TMR) masks any single faulty module by voting over
three copies of a circuit, at the price of 200 % extra area. Approximate TMR
(ATMR) replaces the copies by cheaper *approximate* modules. Each approximate
module is the original function G with its output complemented on a few input
vectors, and no vector is complemented in more than one module. A majority vote
over the three modules therefore still gives G for every input, with far fewer
gates.

The price is robustness. On an *unprotected* vector, one module already
disagrees with G, so the vote rests on the other two. One more fault on either
of them, or on the voter input it drives, gives a wrong output. Two things
follow, and both are in this RTL:

* **Pre-blocking.** Input vectors that test-pattern generation marks as
  vulnerable are never complemented. The main worked example keeps 0000 and
  0001 identical to G in all three modules.
* **A voter built for ATMR.** The voter must mask faults inside itself and
  faults on its own input transistors. Here it is a six-transistor
  pass-transistor majority circuit. Every transistor whose gate is driven by
  input A or B is replaced by a quadded structure, which gives 18 transistors.

Everything is combinational; there is no clock and no reset.

## Files

| file | contents |
|---|---|
| `rtl/atmr_pkg.sv` | fault encodings, transistor and node indices, `voter_fault_t` |
| `rtl/quad_switch.sv` | quadded transistor structure (A+A)(A+A), switch-level |
| `rtl/ptl_voter.sv` | the fault-tolerant voter, switch-level with fault injection |
| `rtl/atmr_fig6_modules.sv` | main example: input-vulnerability-aware ATMR of a 4-input function |
| `rtl/atmr_fig3_modules.sv` | second 4-input ATMR example |
| `rtl/atmr_tt_modules.sv` | three ATMR modules given as truth tables (default: 3-input example) |
| `rtl/atmr_top.sv` | four ATMR channels side by side, each with its own voter |
| `tb/tb_*.sv` | self-checking testbenches, one per module plus a TMR-versus-ATMR comparison |

## The ATMR modules

Inputs are written a b c d, with a as the most significant bit. In the table,
a prime means complement.

| channel | original G | module 1 | module 2 | module 3 | complemented at |
|---|---|---|---|---|---|
| `fig6` (main) | c'(b' + ad) | c'(a + b') | c'b' | c'(d + b') | 1100, 1101, 0101 |
| `fig3` | ac'd + a'b'(d' + c') | ac'd + a'b' | c'(ad + a'b') | a'b'd' + c'd | 0011, 0010, 0101 |
| `tab4` | 1 at 000, 100, 101, 110 | G ⊕ {010} | G ⊕ {101, 111} | G ⊕ {000} | 000, 010, 101, 111 |
| `tab2` | 1 at 010, 100, 101, 110 | G itself | G ⊕ {011, 100, 111} | G ⊕ {001} | 001, 011, 100, 111 |

In `fig6` the vectors 0000 and 0001 are pre-blocked. Its modules need
3 + 2 + 3 = 8 literals, against 12 for three copies of G. The `fig3` modules
need 15 literals against 21. The two 3-input channels come from truth tables
and use `atmr_tt_modules`, a table lookup per module. To build another ATMR
from tables, override `N`, `TT_G` and `TT_1`..`TT_3`: bit *i* of a table is the
output for input vector *i*.

The algorithms that pick which vectors to complement are not hardware.
Pre-blocking, listing candidate minterms and maxterms, and choosing three
modules under the blocking rule all run at design time. The modules here are
the results for the worked examples.

## The voter

```
             VDD
              |
   A ->  [PMOS quad Tp1..Tp4]
              |
   B ->  [PMOS quad Tp5..Tp8]
              |
              S  <---[NMOS quad Tn1..Tn4, gate B]--- A
              S  <---[NMOS quad Tn5..Tn8, gate A]--- B
              |
      S -> gates of Tn9 (passes A to V) and Tp9 (passes C to V)
```

Node S is XNOR(A, B):

* A = B = 0: the PMOS chain pulls S to 1.
* A = 0, B = 1: the quad gated by B passes A = 0.
* A = 1, B = 0: the quad gated by A passes B = 0.
* A = B = 1: both NMOS quads pass 1.

The output stage is a two-transistor pass multiplexer. When S = 1, A and B
agree, and Tn9 passes A to V. When S = 0, they disagree, and Tp9 passes C,
which decides the vote. V is therefore maj(A, B, C).

**Quadded redundancy.** Each quad is two parallel pairs of transistors in
series, all with the same gate signal. Any single open or closed transistor
leaves the quad's behaviour unchanged. Two open transistors break it only if
they are the two of one pair. Two closed transistors break it only if they are
in different pairs. Tp9 and Tn9 are not redundant, because their gates are
driven by the internal node and not by a voter input. A fault on them can
change the output.

### Fault model

`ptl_voter` is a switch-level model. It is ordinary synthesizable logic, so
faults can be injected without `force`. The `flt` input of type
`voter_fault_t` carries two kinds of fault:

* `flt.gate[t]` puts stuck-at-0 or stuck-at-1 on the gate terminal of
  transistor `t` (`TP1`..`TP9`, `TN1`..`TN9`). An NMOS gate stuck at 1 and a
  PMOS gate stuck at 0 leave the switch closed. The opposite values leave it
  open.
* `flt.node[n]` forces one of six internal nodes: `NODE_P1`..`NODE_P3` between
  the pairs of the PMOS chain, `NODE_NB` and `NODE_NA` in the middle of the two
  NMOS quads, and `NODE_S`. A forced node acts as a source for every
  conducting path that reaches it.

A node is resolved from all the paths that conduct into it. It takes their
value when they agree. It is undefined when they fight (contention) or when
none conducts (floating). `v_valid = 0` flags an undefined output, and `v` is
then 0. Drive strength and charge storage are not modelled. The weak 1 that an
NMOS passes and the weak 0 that a PMOS passes, which in silicon may call for
output buffers, are not modelled either. An undefined output should be read as
a fault that was not masked.

Under this model, single node faults reproduce the published vulnerability of
the voter. Inputs are written A B C, with A most significant. Stuck-at-0 faults
can reach the output only for inputs 001, 110 and 111. Stuck-at-1 faults can
reach it only for 011, 100 and 101. Five of the eight input vectors are fully
masked for each fault polarity, a quality-of-circuit figure of 1 − 3/8 = 0.625.
`tb_ptl_voter` checks these sets. The fault-masking ratio and the electrical
figures (delay, power) are outside a logic model and are not reproduced.

## Top level

`atmr_top` has four independent channels: `fig6`, `fig3`, `tab4` and `tab2`.
In each channel, module 1 drives voter input A, module 2 drives B and module 3
drives C. Each channel has these ports:

| port | dir | meaning |
|---|---|---|
| `x_<ch>` | in | input vector (4 bits for fig6/fig3, 3 bits for tab4/tab2) |
| `flip_<ch>` | in | 3 bits; inverts voter input A/B/C to model a fault on a module output |
| `vflt_<ch>` | in | `voter_fault_t`; `atmr_pkg::VOTER_NO_FAULT` for normal use |
| `v_<ch>` | out | voted output |
| `v_valid_<ch>` | out | 0 when a voter fault leaves the output undefined |
| `g_<ch>` | out | the original function G, for comparison |

With no fault injected, `v_<ch>` equals `g_<ch>` for every input. A flip on a
protected vector is masked. On an unprotected vector, a flip of either module
that agrees with G changes the output. This is the weakness of ATMR that TMR
does not have. For example, in channel `tab4` at input 000, flipping module 1
gives 0 where G is 1. Tie the flip and fault inputs to zero for normal use. The
voter then reduces to a plain majority gate in synthesis.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops. With plain
Verilator:

```
verilator --binary --timing -Irtl rtl/atmr_pkg.sv rtl/quad_switch.sv rtl/ptl_voter.sv \
  rtl/atmr_fig6_modules.sv rtl/atmr_fig3_modules.sv rtl/atmr_tt_modules.sv \
  rtl/atmr_top.sv tb/tb_atmr_top.sv --top-module tb_atmr_top
./obj_dir/Vtb_atmr_top
```

| testbench | what it shows |
|---|---|
| `tb_quad_switch` | all 3^4 fault combinations per gate value for NMOS and PMOS; the tolerance rules for up to three faults |
| `tb_ptl_voter` | majority with no fault; all 32 single quad faults masked; exact failing inputs of each Tp9/Tn9 fault; node-fault vulnerable sets and QoC |
| `tb_atmr_fig6_modules`, `tb_atmr_fig3_modules` | G and each module against the Karnaugh-map tables; vote equals G; pre-blocked vectors untouched |
| `tb_atmr_tt_modules` | both 3-input examples row by row; unprotected sets |
| `tb_tmr_vs_atmr` | the same voter behind three copies of G and behind the approximate modules: every single voter-input flip is masked in TMR (24 of 24), only 16 of 24 in ATMR |
| `tb_atmr_top` | all channels end to end: no fault, every single voter-input flip, every quad fault, every mux fault; counts each mechanism and fails if one never occurs |

The top has no parameters, so `tb_atmr_top` also runs the full design. It takes
well under a second.

## Where this departs from, or goes beyond, the source design

* Placing the four examples in one top, the fault-injection ports, the
  `v_valid` flag, the node names and the switch-level resolution rules are
  choices of this implementation.
* The voter's transistor-level properties are modelled only as switches. Delay,
  power, effective resistance and voltage swing are not represented.
* Benchmark circuits that were evaluated only as counts (literals, candidate
  list sizes, fault coverage) have no RTL, because their netlists and modules
  are not available.
* The comparison voters used as baselines are not included.
