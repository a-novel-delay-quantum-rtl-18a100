# Reversible (2^i × j) RAM built from reversible gates

A reversible gate maps each input pattern to a distinct output pattern.
No information is lost, so in principle no Landauer heat (kT·ln 2 per
erased bit) has to be dissipated. Circuits made of such gates obey two
rules that ordinary logic does not:

* **No fan-out.** A signal feeds exactly one gate input. A second copy has
  to be made explicitly, usually with a Feynman (CNOT) gate whose target
  is tied to 0.
* **Constants in, garbage out.** Functions that are not bijections
  (AND, OR, a multiplexer) are embedded in a larger reversible gate. Some
  inputs are tied to constants (*ancilla* inputs) and some outputs go
  unused (*garbage* outputs).

This RTL describes a small random-access memory of 2^i words × j bits,
built from such gates, and the library of 3×3 and 5×5 reversible gates it
draws on. The work it follows is "A Novel Delay & Quantum Cost Efficient
Reversible Realization of (2^i × j) Random Access Memory". That work's
figures of merit are quantum cost, garbage outputs and logical depth, not
FPGA area. Every gate here is therefore written as its own module, with
its constant inputs and garbage outputs visible. Synthesis flattens them
into ordinary logic; the structure is there to be read.

Simulation and synthesis model the *logic function* only: the RTL says
nothing about physical reversibility.

## The gate library

All gates are combinational. Vector ports are packed with the first
named line as the MSB: `abc = {A,B,C}` and `pqr = {P,Q,R}`.

| module | size | outputs | use in this design |
|---|---|---|---|
| `not_gate` | 1×1 | P = A' | stand-alone |
| `feynman_gate` | 2×2 | P = A, Q = A⊕B | fan-out copy in `rev_dff` |
| `peres_gate` | 3×3 | P = A, Q = A⊕B, R = AB⊕C | stand-alone |
| `fredkin_gate` | 3×3 | P = A, Q = A'B⊕AC, R = A'C⊕AB | decoder, write mux, AND/OR |
| `tr_gate` | 3×3 | P = A, Q = A⊕B, R = AB'⊕C | stand-alone |
| `urg_gate` | 3×3 | P = C⊕AB, Q = B, R = C⊕(A+B) | stand-alone |
| `cog_gate` | 3×3 | P = A, Q = AC⊕A'B, R = BC+B'C' | stand-alone |
| `sbv_gate` | 5×5 | P = A'B'C'⊕E, Q = B⊕C, R = C, S = D', T = B' | nine's complementer |

The Fredkin gate is a *controlled swap*. When A = 0, B and C pass
straight through; when A = 1 they change places. This makes it the
workhorse of the RAM, in three ways:

* `fredkin_and`: inputs (x, y, 0). Then R = xy, P = x, and Q = x'y is
  garbage.
* `fredkin_or`: inputs (x, y, 1). Then Q = x + y, P = x, and R = x' + y
  is garbage.
* As a 2:1 multiplexer, R = A ? B : C.

In every use, P returns the control input unchanged. A control signal can
therefore be *chained* from one gate to the next instead of being fanned
out.

`sbv_nines_complement` ties E = 0 and feeds a BCD digit B3..B0 into A..D.
The outputs {P,Q,R,S} = {B3'B2'B1', B2⊕B1, B1, B0'} are then 9 − B for the
digits 0..9, and T = B2' is the only garbage output. Inputs 10..15 are
not BCD digits, and their result is meaningless.

Two points where the published gate descriptions are internally
inconsistent, and how this RTL resolves them:

* **TR gate.** The gate's drawing gives R = AB'⊕B, but its truth table
  only fits R = AB'⊕C. The RTL follows the truth table.
* **Feynman gate.** Its truth table labels the second output R; the RTL
  calls it Q, as the gate symbol does.

The URG, COG and SBV equations are implemented exactly as specified. The
SBV gate as specified is not a bijection: A and E both enter only P, so
they cannot both be recovered. It is implemented as given anyway; its
nine's-complement use is unaffected.

## The RAM (`rram`)

```
            addr ──► rev_decoder ──► wl[0..2^i-1]   (one-hot word lines)
                                     │
   we ──► Fredkin AND (we, wl[r]) ──► wr[r]          (row write strobe)
                                     │
   din[b] ─────────────► we_ms_dff cell[r][b] ◄── clk, rst_n
                                     │ q
          Fredkin AND (wl[r], q) ──► rd[r][b]
                                     │
   column b: Fredkin OR chain over rows ──► dout[b]
```

* **Write.** When `we` is 1 at a rising clock edge, the row selected by
  `addr` stores `din`. Every other cell holds, because its write strobe
  is 0 and its write-enable multiplexer feeds back the stored bit.
* **Read.** The read is asynchronous. Each cell's bit is ANDed with its
  word line, and a chain of 2^i − 1 Fredkin ORs per column combines the
  rows. `dout` therefore follows `addr` within the same cycle. After a
  write edge it shows the new word.
* **Reset.** `rst_n` is active-low and asynchronous, and clears every
  cell.
* **Check.** A concurrent assertion checks that exactly one word line is
  high at every clock edge.

Parameters are `ADDR_W` (i, default 2) and `DATA_W` (j, default 4). The
published work keeps i and j symbolic; the 4 × 4 default is this
design's choice. Any ADDR_W ≥ 1 and DATA_W ≥ 1 elaborates. The testbench
also runs an 8 × 5 instance.

### The decoder tree (`rev_decoder`)

This is the least obvious part of the design. The decoder is a binary
tree of 2^i − 1 Fredkin gates whose root line is a constant 1. Each gate
takes one line L on B, a constant 0 on C and an address bit a on A. It
splits L into Q = a'L (the "bit is 0" child) and R = aL (the "bit is 1"
child). Level k of the tree has 2^k gates, all controlled by address bit
i−1−k (MSB first). After i levels exactly one leaf is 1, and leaf m is
word line m.

The address bit of a level must reach 2^k gates without fan-out. It is
therefore threaded through them: gate n's P output drives the A input of
gate n+1 in the same level. The P of the last gate in each level leaves
the decoder as `addr_garbage`, which simply equals the address.

Inside the RTL, nodes are numbered as in a heap:

* node 1 is the root;
* node n has children 2n and 2n+1;
* node 2^i + m is word line m;
* gate n sits at level ⌊log2 n⌋.

Cost of the tree: 2^i − 1 Fredkin gates, one constant-1 input,
2^i − 1 constant-0 inputs, and i garbage outputs.

### The memory cell (`we_ms_dff`, `rev_dff`)

`we_ms_dff` is the write-enabled master-slave D flip-flop. It is built
from three parts:

1. A Fredkin multiplexer (A = we, B = d, C = stored bit) whose output is
   R = we ? d : stored.
2. A `rev_dff`, which stores R at the rising edge.
3. Inside `rev_dff`, a Feynman gate that copies the stored bit twice: one
   copy drives `q`, the other feeds back into the multiplexer.

The master and slave latches are represented together by one
edge-triggered register, which is how the pair behaves at its ports. The
choice of the rising edge is this design's.

For comparison, the published cell is quoted with logical depth 16,
quantum cost 16 and 3 garbage outputs. Its gate-level circuit is not
reproduced here, so these figures do not describe this RTL's cell. This
cell uses 1 Fredkin + 1 Feynman gate around the storage element, with 2
garbage outputs from the multiplexer.

## How far this follows the published design

Taken from the published work:

* the equations of every library gate;
* the Fredkin AND/OR constructions;
* the SBV nine's-complementer wiring;
* the overall RAM organisation: a reversible i-to-2^i decoder driving a
  2-D array of write-enabled reversible D flip-flops.

Choices made by this design:

* the structure of the decoder (Fredkin tree);
* the structure of the memory cell and of the read path;
* asynchronous read, rising-edge write and the asynchronous reset;
* the default sizes.

The published work also proposes a new 3×3 "Modified Fredkin" (MF) gate
for its RAM. This RTL does not implement the MF gate; the ordinary
Fredkin gate takes its place. The
quantum costs and depths of this RTL's blocks will therefore differ from
the published ones.

Inside the RAM, `we`, `din` and the word lines fan out over ordinary
wires. The no-fan-out rule is respected within the decoder, within the
cell (the Feynman copy) and in the Fredkin control chains. The RAM as a
whole is not, and does not claim to be, a fan-out-free reversible
netlist.

`reversible_ram_top` places the RAM and the stand-alone gates (NOT,
Peres, TR, URG, COG, SBV, and the nine's complementer) side by side, each
with its own ports. The stand-alone gates do not connect to the RAM.

Lint notes:

* Verilator reports unused signals for the garbage outputs. They are
  garbage by definition and are left unconnected on purpose.
* Synthesis reports outputs wired straight to inputs. These are the
  P = A pass-through outputs of the gates.

## Files

| file | content |
|---|---|
| `rtl/reversible_ram_top.sv` | top: RAM plus stand-alone gates |
| `rtl/rram.sv` | the 2^i × j RAM |
| `rtl/rev_decoder.sv` | i-to-2^i Fredkin-tree decoder |
| `rtl/we_ms_dff.sv`, `rtl/rev_dff.sv` | memory cell and storage element |
| `rtl/fredkin_and.sv`, `rtl/fredkin_or.sv` | AND / OR from one Fredkin gate |
| `rtl/*_gate.sv`, `rtl/sbv_nines_complement.sv` | gate library |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench is self-checking and prints one line,
`TB_RESULT checks=N failures=M`, before `$finish`. For example, the
end-to-end test of the top at its default sizes:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_reversible_ram_top \
    tb/tb_reversible_ram_top.sv -Mdir obj
./obj/Vtb_reversible_ram_top
```

The testbenches compare each design against models written
independently of it:

* **Gates.** Compared with their truth tables for every input pattern.
  For URG and COG, the test also checks that the gate is a bijection.
* **Decoder.** Every address checked, at i = 2 and i = 3.
* **Flip-flops and RAM.** Random traffic against a bit or array model.
  The RAM reads both before and after each write edge, and is also
  checked through reset.

The top-level test also counts how often each mechanism occurred:

* reset;
* write;
* read;
* a cycle with we = 0 whose din differed from the stored word;
* a pass over each gate;
* a nine's complement.

If any of them never occurred, that counts as a failure.

To change the memory size, override `ADDR_W` and `DATA_W` on `rram` or
`reversible_ram_top`.
