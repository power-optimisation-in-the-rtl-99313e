# Reversible-logic flip-flops, shift registers and a down counter

A reversible gate maps its inputs one-to-one onto its outputs, so no
information is lost when it switches; by Landauer's argument such logic can
in principle avoid the energy cost that erasing information carries. The
price is that every gate has as many outputs as inputs, a wire may not simply
branch (copies are made with a gate and a constant 0 input), and unused
outputs ("garbage") and constant inputs become the cost measures, next to the
gate count.

This RTL implements a family of small sequential circuits built in that
style, following the paper *Power Optimisation in the Design of Flip Flops
Using Reversible Logic*:

* a D flip-flop made from a **single** Sayem gate;
* a master-slave T flip-flop made from two Sayem gates and a Feynman gate;
* 4-bit serial-in serial-out (SISO) and serial-in parallel-out (SIPO) shift
  registers made from the D flip-flop;
* a 4-bit synchronous down counter made from the T flip-flop, with RSJ and
  Peres gates forming the toggle enables;
* a half adder made from one Peres gate.

Every gate is written as its own module with its exact reversible mapping, and
the circuits are wired gate by gate, so the gate, constant-input and garbage
counts of the RTL can be read off the source.

## The gates

| gate | module | mapping |
|---|---|---|
| Feynman (FG) | `feynman_gate` | P = A, Q = A⊕B |
| Sayem (SG) | `sayem_gate` | P = A, Q = A'B⊕AC, R = A'B⊕AC⊕D, S = AB⊕A'C⊕D |
| Fredkin (FRG) | `fredkin_gate` | P = A, Q = A'B⊕AC, R = A'C⊕AB |
| Peres (PG) | `peres_gate` | P = A, Q = A⊕B, R = AB⊕C |
| RSJ | `rsj_gate` | P = A, Q = A'B⊕C, R = A'B⊕D, S = B |

The key observation for everything that follows: with D = 0, the Sayem gate's
Q and R outputs are both `A ? C : B`, a 2:1 multiplexer. Feed R back into B
and you have a D latch with A as the clock and C as the data; Q is a second
copy of the latch output, P repeats the clock, and S is garbage.

The RSJ gate is the one part whose mapping is this implementation's own. The
counter needs, after a flip-flop, a copy of its Q and two copies of the next
toggle enable ("incoming enable and not Q"), from two constant inputs. The
mapping above does exactly that with C = D = 0 and is a bijection (A and B
come out on P and S, from which C and D can be recovered). The Fredkin gate is
part of the gate set but none of the circuits uses it; it is brought out on
the top level as a stand-alone gate.

## Clocking model: how latch loops become synchronous RTL

The gate-level circuits are latches closed by feedback wires, clocked by a
signal called CLK. Written literally, that is a combinational loop, which
simulators and synthesis tools handle poorly. This RTL keeps the gates and
their wiring but makes two modelling choices:

1. **Every feedback wire (Sayem R output back into B) is a register** clocked
   by a free-running system clock `clk`. A latch's output is the register
   value.
2. **The circuit's CLK becomes a level input `ck`**, sampled on every rising
   edge of `clk`. In the circuits it acts as a strobe: a shift strobe for the
   registers, the count pulse for the counter.

So each Sayem-gate latch computes, once per `clk` cycle,
`state <= ck ? data : state` (or the opposite phase), which is exactly the
gate's multiplexer. All circuits are synchronous to `clk`; `rst_n` is a
synchronous, active-low reset that clears every stored bit (the original
circuits have no reset).

Each flip-flop passes `ck` out again on `ck_out` (the Sayem gate's P output),
and the registers and the counter chain CLK from one flip-flop to the next
exactly as drawn in the original circuits. It is a wire-through and adds no
delay.

## D flip-flop (`rev_dff`)

One Sayem gate: A = CLK, B = fed-back R, C = D, D = 0. It implements
Q⁺ = D·CLK + Q·CLK'. In this RTL: in each `clk` cycle with `ck = 1`, `d` is
loaded and appears on `q` after that edge; with `ck = 0`, `q` holds. One gate,
one constant input, two garbage outputs (S, and P when it is not chained).

## T flip-flop (`rev_tff`): the part to read carefully

A master-slave pair of Sayem latches around a Feynman gate:

```
SG1 (master):  A = ck      B = SG1.R (loop)   C = FG.Q   D = 0
               P -> SG2.A  R/Q -> SG2.B       S = garbage
SG2 (slave):   A = SG1.P   B = master         C = SG2.R (loop)   D = 0
               P -> ck_out R/Q = slave -> FG.A                  S = garbage
FG:            A = slave   B = t
               P = q       Q = slave xor t -> SG1.C
```

* SG1 (master) follows `q xor t` while CLK = 1 and holds while CLK = 0.
* SG2 (slave) copies the master while CLK = 0 and holds while CLK = 1.
* The Feynman gate gives both the output `q` and `q xor t`, since the slave's
  output is needed twice.

The consequence is that **`q` changes only after a CLK pulse ends**: during
the pulse the master takes `q xor t` while the slave holds the old value;
once CLK is low the slave takes the master's value. With the synchronous model
and a one-cycle `ck` pulse, the new `q` appears on the second `clk` edge after
the pulse starts. Holding `ck` high for several cycles delays the update until
it falls, and `q` changes once per pulse, never twice. The original design
calls this flip-flop "positive-edge triggered"; its wiring, which this RTL
follows, makes it a master-slave stage whose output moves at the end of the
CLK pulse. Three gates, two constant inputs, three garbage outputs.

## Shift registers (`rev_siso`, `rev_sipo`)

`rev_siso` is N D flip-flops in a row (default N = 4): serial input into the
first, each Q into the next D, serial output from the last. Every `clk` cycle
with `ck = 1` is one shift; a bit reaches `so` after N shifts. 4 gates and 4
constant inputs for N = 4.

`rev_sipo` adds a Feynman gate (B = 0) after each of the first N−1 flip-flops,
because each Q must now go both to the next flip-flop and to a parallel
output. Its P output drives the next D, its Q output is `o[i]`. `o[0]` holds
the newest bit, `o[N-1]` the oldest, which is also the serial output. After N
shifts `o` holds the last N serial bits. 7 gates and 7 constant inputs for
N = 4.

## Down counter (`rev_down_counter`)

Four T flip-flops share the count pulse (`ck`, chained CLK-out to CLK-in). A
down counter toggles bit *i* when counting is enabled and every lower bit is
0, so the toggle enables form the chain

```
T0 = count_en
T1 = T0 & ~QA      (RSJ after flip-flop A, also outputs QA)
T2 = T1 & ~QB      (RSJ after flip-flop B, also outputs QB)
T3 = T2 & ~QC      (Peres gate, C = 0, A = ~QC through a NOT;
                    a second NOT on its P output gives QC)
```

Each RSJ passes Q on as the visible output and produces the next enable twice:
one copy for the next flip-flop's T, one to carry the chain on. The count
decrements by one, wrapping from 0 to 15, at the end of every `ck` pulse taken
while `count_en` = 1, and holds for pulses taken with `count_en` = 0. Between
two pulses `ck` must be low for at least one `clk` cycle. `count_en` must be
steady while a pulse is high.

Gate budget: 4 × 3 in the flip-flops, 2 RSJ, 1 Peres = 15 gates (plus two
one-input reversible NOTs), 13 constant inputs and 12 garbage outputs (two
Sayem S outputs per flip-flop, the last CLK out, the two RSJ S outputs and
the Peres Q output).

## Half adder (`rev_half_adder`)

One Peres gate with C = 0: Q = A⊕B is the sum, R = AB is the carry, P is
garbage.

## Top level (`rev_seq_top`)

The circuits are independent. The top places them side by side on one `clk`
and `rst_n` and brings out each one's ports with a prefix: `siso_*`,
`sipo_*`, `cnt_*`, `ha_*`, `frg_*`. Parameter `SR_BITS` (default 4) sets the
width of both shift registers. Several outputs only repeat an input (the
CLK pass-throughs and the Fredkin P output); that is how these reversible gates
are defined.

## Where this RTL departs from, or adds to, the original design

* The clocking model above (CLK as a sampled level, latch loops as
  registers, synchronous reset) is this implementation's.
* The RSJ gate's mapping is this implementation's; the original names the gate
  and its role only.
* Counting direction: the original calls the counter a down counter and forms
  the toggle enables with AND gates fed from the flip-flop outputs. Read
  literally, ANDing the true Q outputs would count up. This RTL builds the
  down counter the text describes, so the enables use the complements: inside
  the RSJ mapping, and through a NOT in front of the Peres gate. A second NOT
  after the gate's pass-through output restores QC, so QC still comes out of
  the Peres gate as drawn, and the garbage count stays at the original 12.
* The half adder's single cell is taken to be a Peres gate; the original
  reports a one-cell reversible half adder without naming the gate.
* A 4-bit adder is mentioned in the original but never described, so it is
  not implemented.
* The original's power comparison of the half adder comes from a commercial
  synthesis flow and cell library; RTL simulation cannot reproduce it.
* The shift-register width is a parameter (default 4, the original's size).

## Simulating

Every module has a self-checking testbench in `tb/` named `tb_<module>`. It
prints `TB_RESULT checks=<n> failures=<m>` and has a watchdog. For example:

```
verilator --binary --timing --assert -Irtl tb/tb_rev_down_counter.sv \
          --top-module tb_rev_down_counter
./obj_dir/Vtb_rev_down_counter
```

* Gate testbenches (`tb_feynman_gate`, `tb_sayem_gate`, `tb_peres_gate`,
  `tb_fredkin_gate`, `tb_rsj_gate`, `tb_rev_half_adder`) try every input and
  check the mapping is a bijection (Fredkin: also that it conserves ones).
* `tb_rev_dff` and `tb_rev_tff` compare against the characteristic
  equations under random strobes, require every truth-table row, and check
  the one- and two-edge latencies. `tb_rev_tff` also checks that `q` never
  moves while `ck` is high.
* `tb_flipflop_truth_tables` applies the D and T flip-flop truth tables
  row by row, in table order (a T-table row with CLK = 1 is one complete
  `ck` pulse).
* `tb_rev_siso` and `tb_rev_sipo` compare against reference shift
  registers, check the N-shift latency and whole-word loading.
* `tb_rev_down_counter` runs over several full count cycles with random
  pulse and gap lengths, checks the wrap, the hold with the enable off, the
  two-edge latency, and asserts the count never moves by anything but −1.
* `tb_rev_seq_top` runs every circuit at once at the default parameters for
  2000 cycles. It counts each mechanism (shift, hold, word load, count step,
  count hold, wrap, carry, Fredkin swap) and fails if any never happened.

## Files

`rtl/`: `feynman_gate`, `sayem_gate`, `peres_gate`, `fredkin_gate`,
`rsj_gate` (gates); `rev_half_adder`; `rev_dff`, `rev_tff` (flip-flops);
`rev_siso`, `rev_sipo` (shift registers); `rev_down_counter`; `rev_seq_top`.
`tb/`: one testbench per module, plus `tb_flipflop_truth_tables`.

Some gate outputs are garbage by design and are left unconnected. Verilator's
`-Wall` lint reports these as empty pin connections.
