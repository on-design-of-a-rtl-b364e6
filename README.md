# Parity preserving reversible RAM

A small random access memory in which every logic element is a *reversible*
gate (as many outputs as inputs, each input vector mapping to exactly one output
vector) that is also *parity preserving*: the XOR of a gate's outputs always
equals the XOR of its inputs. Reversible logic avoids the erasure of
information and the kT·ln2 heat that goes with it; parity preservation makes
any single-bit fault inside a gate visible as a parity mismatch between the
gate's inputs and outputs, without adding separate checking logic.

The memory is organised as 2^n words of m bits. It is built from only four gate
types: the Feynman double gate (F2G), the Fredkin gate (FRG), the NFT gate and
a 4x4 gate called PH3 whose job is to make a master-slave flip-flop out of a
single gate plus a copier. Because a reversible circuit may not fan a signal
out, copies are made explicitly by F2G gates, and the clock and write-enable
lines are passed from cell to cell through the cells' own pass-through outputs.

The RTL here is a logical model of that circuit: it reproduces every gate's
function and the way the gates are wired, so the memory can be simulated and
the gate structure inspected. It does not model the physical reversibility of
an implementation; gate outputs that the circuit leaves unused ("garbage
outputs") are simply left unconnected.

## The gate library

| Gate | Size | Equations | Role in the RAM |
|------|------|-----------|-----------------|
| F2G (`f2g_gate`) | 3x3 | P=A, Q=A^B, R=A^C | copier: (A,0,0) gives (A,A,A); 1x2 decoder: (A,1,0) gives (A,A',A) |
| FRG (`frg_gate`) | 3x3 | P=A, Q=A'B+AC, R=A'C+AB | 2:1 multiplexer (Q = A ? C : B); line splitter with C=0: (A'B, AB) |
| NFT (`nft_gate`) | 3x3 | P=A^B, Q=B'C^AC', R=BC^AC' | AND gate: with A=0, R = B&C |
| PH3 (`ph3_gate`) | 4x4 | P=A, Q=A?B:C, R=A?C:D, S=A?D:B | the core of each flip-flop |

FRG and PH3 are *conservative*: they only permute their inputs, so they keep
the number of ones, not just its parity. PH3 passes A through and rotates the
other three inputs: with A=0 the outputs (Q,R,S) are (C,D,B), with A=1 they are
(B,C,D).

Every gate module carries an immediate assertion that input and output parity
agree. It runs on every evaluation of every gate in every simulation, so all the
testbenches, including the full RAM, also confirm the parity property
throughout.

## The PH3 flip-flop

This is the least obvious part of the design. `pp_ms_dff` is a master-slave D
flip-flop made of one PH3 and one F2G, with two feedback wires:

```
            +----------------------- Qm (master) ------------------+
            |                                                      |
   clk ---> A  P ---> clk_o                                        |
   Qs  ---> B  Q ---> slave node Qs --> F2G(A=Qs,0,0) --P--> Qs (to PH3 B)
   Qm  ---> C  R ---> unused                          --Q--> q
   d   ---> D  S ---> master node Qm ------------------+  --R--> q_copy
```

Substituting this wiring into the PH3 equations gives

* master (S output) = clk·d + clk'·Qs
* slave (Q output)  = clk·Qs + clk'·Qm

While clk is high the master follows d and the slave holds its own value. When
clk falls the slave takes the master's value, which is d as it was just before
the edge; the master then reads the slave, which is the same value, so the pair
is stable until clk rises again. The result is a flip-flop triggered by the
**falling** edge of clk. The F2G copies the slave output three ways: one copy
is the hold feedback into PH3, one is the output q, one (q_copy) is spare for
the memory cell.

In the RTL the two feedback nodes are written as level-sensitive latches
(`always_latch`): the master is transparent while clk is high and the slave
while clk is low, each taking its value from the PH3 output that drives it. This
gives the same behaviour as the gate loop and keeps a zero-delay simulation
free of races. Lint tools report the storage nodes as circular combinational
logic; each loop goes through a latch that is closed whenever the loop matters,
so this is expected for a latch-based flip-flop. Synthesis maps each flip-flop
to two latches (64 latch bits for the default 8x4 memory). The latches have no
reset, so the memory powers up with arbitrary contents.

## The memory cell

`pp_mem_cell` adds write control with one FRG in front of the flip-flop:
control A = W, B = the stored value (q_copy), C = D. Its Q output, W ? D : stored,
feeds the flip-flop. With W = 0 the cell reloads its own value and never
changes; with W = 1 it takes D at the next falling edge. The cell has three
inputs (D, clk, W) and three outputs: Q, and W and clk passed through unchanged
on the FRG's and PH3's P outputs (`w_o`, `clk_o`). That pass-through is how a
row of cells shares its clock and write-enable without fan-out: each cell hands
both lines to the next, and only the last cell's copies are unused.

## Decoder, multiplexers and copy chains

* **Decoder** (`pp_decoder`, n x 2^n). The most significant address bit enters
  an F2G fed (A,1,0), giving A' and A. Each following level takes the next lower
  address bit as the control of one FRG per existing line, third input 0, and
  splits every line x into x·bit' and x·bit. After n levels the 2^n lines are
  one-hot. Gate count: 2^n - 1.
* **Multiplexer** (`pp_mux`, 2^m x 1). A binary tree of FRG 2:1 multiplexers,
  select bit 0 on the level next to the inputs. Gate count: 2^m - 1.
* **Copy chain** (`pp_fanout`). A chain of F2G(x,0,0) gates: P carries x to the
  next gate, Q and R are two copies. 2^n copies cost 2^(n-1) gates.

Inside the decoder and multiplexers a select or address bit is not fanned out
either: it runs from FRG to FRG through the P outputs. The multiplexer brings
the end of each level's chain out on `sel_o`, so the m multiplexers of the
memory pass the address from one to the next.

## Putting the RAM together

`pprram` (top; parameters `ADDR_W` = n, `DATA_W` = m):

```
 addr --> pp_decoder --> row line r --+
 w ----> pp_fanout (one copy per row) +--> NFT(0, line, w) --> row write enable
 din[b] --> pp_fanout (one copy per row) --> D of cell (r,b)
 clk ----> first cell of each row

 row r:  cell(r,0) -> cell(r,1) -> ... -> cell(r,m-1)    (clk and W passed along)

 bit b:  pp_mux over cell(0..2^n-1, b), select = addr  --> dout[b]
```

Gate budget at the default 8 words x 4 bits (n=3, m=4):

| Part | Gates |
|------|-------|
| 4 output multiplexers, 7 FRG each | 28 |
| decoder | 7 |
| 32 memory cells, 3 gates each | 96 |
| row AND gates (NFT) | 8 |
| W copy chain (F2G) | 4 |
| data copy chains, 4 x 4 F2G | 16 |
| **total** | **159** |

which equals the closed form 2^(n-1)·(9m+5) - m - 1 for this gate structure.

## Interface and timing

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock; writes take effect on its falling edge |
| `w` | in | 1 | write enable |
| `addr` | in | `ADDR_W` | word address |
| `din` | in | `DATA_W` | write data |
| `dout` | out | `DATA_W` | contents of word `addr` |

* **Write**: hold `addr`, `din` and `w = 1` while clk is high and up to its
  falling edge. The addressed word takes `din` at that edge. Changing the
  inputs while clk is high is allowed; the value present at the falling edge
  wins, because the master latches are transparent during the high phase.
* **No write**: with `w = 0` no word changes, whatever `addr` and `din` do.
* **Read**: `dout` is combinational, `mem[addr]`. After a write to the word
  being addressed it changes right after the falling edge, not before.

## Choices made in this RTL

The circuit description leaves some details open; these are the choices made
here:

* Default size 8 words x 4 bits. The structure is generic in n and m; any
  `ADDR_W >= 1` and `DATA_W >= 1` work (tested from 2x1 to 32x3 and 16x8).
* The clock reaches each row's first cell by plain wiring; no copy gates are
  spent on it.
* The F2G of each flip-flop has both B and C tied to 0, so a flip-flop has two
  constant inputs, one more than the published cost figures for this
  flip-flop give; no wiring with a single constant was found that keeps the
  described behaviour.
* Address bit order: msb on the decoder's first (F2G) level, lsb on the
  multiplexers' first level.
* NFT equations are the published NFT gate; F2G and FRG are the standard
  definitions. PH3 follows its full truth table.
* The row write enable is the AND of the decoder line and a copy of W, taken from
  an NFT's R output.

## Simulating

Every block has a self-checking testbench in `tb/` that ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb tb/pprram_tb.sv \
          --top-module pprram_tb -Mdir obj_pprram
./obj_pprram/Vpprram_tb
```

Replace `pprram_tb` with any other testbench name. Verilator will print
UNOPTFLAT warnings for the flip-flop latches (see above) and UNUSEDSIGNAL
warnings for the gates' garbage outputs; neither affects the result.

| Testbench | What it checks |
|-----------|----------------|
| `frg_gate_tb`, `f2g_gate_tb`, `nft_gate_tb`, `ph3_gate_tb` | all input vectors against written-out truth tables; parity/conservation; reversibility (all outputs distinct) |
| `pp_decoder_tb` | one-hot output for every address, n = 1..4 |
| `pp_mux_tb` | out = in[sel] for random data, m = 1, 2, 3, 4 |
| `pp_fanout_tb` | all copies equal the input |
| `pp_ms_dff_tb` | master follows d while clk is high, q updates only at the falling edge |
| `pp_mem_cell_tb` | writes with W=1, holds with W=0, Q stable outside the falling edge |
| `pprram_tb` | the default 8x4 memory against an array model: fill, 400 random write / inhibited-write / overwrite cycles with every word read back after each, dout timing around the falling edge, and bus values that change during the high phase |
| `pprram_sizes_tb` | random traffic on 2x1, 4x2, 16x8 and 32x3 memories (uses the helper `pprram_traffic`) |

## Files

`rtl/` holds one module per file: the four gates, `pp_decoder`, `pp_mux`,
`pp_fanout`, `pp_ms_dff`, `pp_mem_cell` and the top `pprram`. `tb/` holds the
testbenches listed above.
