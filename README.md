# Multiple-sequence generator from an inverted nonlinear autonomous machine

Testing a sequential circuit needs test patterns in a fixed order, and the
same pattern may have to come back later in the list. A plain LFSR gives
good pseudo-random patterns but cannot be made to play a chosen ordered list.
Storing the list in a memory works but costs one word per pattern. This
generator sits between the two. It plays a given ordered list of N-bit
patterns exactly, repeats included, and then keeps running as a pseudo-random
generator. It is built only from flip-flops and XOR/XNOR gates.

The machine is a set of N short shift registers, one per output bit. Each new
bit is an XOR of taps on all the registers. Because any register can feed any
other, the N bit-streams are generated jointly, and a few flip-flops per bit
are enough where a stored list would need L.

This RTL implements the machine in a generic, table-driven form. It also
provides two concrete generators:

| generator | bits N | stages M | deterministic patterns L | flip-flops | gates | after the list |
|-----------|--------|----------|--------------------------|------------|-------|----------------|
| `msg_gen6` (main) | 6 | 2 | 16 | 12 | 6 multi-input XOR/XNOR (23 two-input) | pseudo-random, period 1,260 |
| `msg_gen4` (small example) | 4 | 1 | 6 | 4 | 4 XOR/XNOR | loop of 7 patterns |

## The machine: INLAM(N, M)

Signal `V_i` (i = 1..N) has a shift register of M stages. Stage k holds
`V_i D^k`, the value `V_i` had k clocks ago. Each clock, a new value of every
signal is formed and shifted into stage 1:

    V_i = XOR over j, k of ( a_ijk · V_j D^k )  XOR  C_i        k = 0 .. M

* `a_ijk = 1` connects stage k of row j to the gate of row i.
* k = 0 stands for the current, undelayed value of another signal. This is
  what lets, for example, `V1 = V2 XOR V1 D` hold inside one clock period.
  The undelayed connections must not form a loop; the network checks this
  when simulation starts.
* `C_i = 1` makes row i's gate an XNOR. The inversion adds no state, and it
  doubles the set of sequences a row can satisfy. With all C_i = 0 the
  machine is linear, and with M = 1 and no undelayed taps it is the ordinary
  linear autonomous machine, i.e. an LFSR in matrix form.

The output of the machine is the last stage of every row, `V D^M`.

### Why it replays the list

Write the wanted list as N bit-streams `b_i1 .. b_iL`. Preset the registers
with the first M patterns, so that stage k holds pattern M-k+1. The machine
then produces the list exactly if every later pattern satisfies the row
equations:

    b_in = XOR_{j,k} a_ijk · b_j(n-k)  XOR  C_i      for n = M+1 .. L

For each row this is a linear system over GF(2) in the unknown `a_ijk` and
`C_i`. It has L-M equations and M·N + N-1 unknowns; the row's own undelayed
term is excluded. The taps come from solving these systems by time-frame
expansion:

1. Try M = 0, i.e. each signal as a combination of the others.
2. If the system has no solution, try the inverted right-hand side (C_i = 1).
3. If that fails too, add one more delay stage and try again.

With M = L-1 every row becomes a cyclic store of its own stream, so the
search always ends. A larger M makes the systems easier to solve and costs N
more flip-flops. Once the list has been played, nothing constrains the
machine further: it continues along its state graph, which gives the
pseudo-random tail. For the six-bit generator the list lies on a single
state cycle of length 1,260, so the list comes round again after 1,260
patterns.

The tap solver is a software step. It is not part of this RTL, and the tables
below are its published results.

### Timing

* `rst` is synchronous and active high. It loads the preset patterns, so
  pattern 1 is on `pattern` in the first cycle after reset.
* Each rising edge with `en` high advances one pattern; pattern n appears
  n-1 enabled clocks after reset.
* `en` low holds the machine.
* There is no pipeline: the XOR network is one combinational stage between
  the registers, and undelayed taps make it a chain of rows.

## The two generators

### Six-bit generator (`msg_gen6`)

Equations (`~` marks an XNOR row):

    V1  =  V2 + V4 + V5 + V2 D + V3 D^2
    ~V2 =  V5 + V6 D + (V1 + V2) D^2
    V3  =  (V2 + V3 + V4 + V5) D + (V1 + V2 + V6) D^2
    V4  =  (V4 + V5 + V6) D + (V2 + V4) D^2
    ~V5 =  (V1 + V2) D + (V5 + V6) D^2
    V6  =  V1 + V4 + V4 D + V2 D^2

The six row gates have 29 inputs in all, i.e. 23 two-input XORs. Rows V3,
V4 and V5 depend on registers only. V2 waits for V5, V1 for V2, V4 and V5,
and V6 for V1 and V4, so the longest combinational path passes four row
gates.

The sixteen patterns, one bit-stream per signal, leftmost first:

    V1  1010000111000010
    V2  0110100110000010
    V3  1111000100110011
    V4  0111101010011010
    V5  0011101001010111
    V6  1011110001110101

Pattern 12 repeats pattern 4. Hex values with bit 0 = V1 are
`25 0e 3f 3c 3a 20 18 07 0b 31 24 3c 08 30 1f 34`. The register presets are
pattern 2 in stage 1 and pattern 1 in stage 2 of every row.

### Four-bit example (`msg_gen4`)

    V1 = V2 + V1 D
    V2 = V3 + V2 D
    V3 = V1 D + V3 D + V4 D
    V4 = ~(V1 + V1 D)

It plays V1 = 101100, V2 = 111010, V3 = 000111, V4 = 100101. In hex, with
bit 0 = V1, that is `b 2 3 d 6 c`. It then loops through
`8 7 2 3 d 6 c` and never shows pattern 1 again. All rows but V3 take an
undelayed input, and the chain V3 → V2 → V1 → V4 runs against the row order.

## RTL structure

    msg_top                     both generators side by side, shared clock
    ├─ msg_gen6             INLAM(6,2) with the six-bit tables
    │   └─ inlam
    │       ├─ inlam_shift_register × N   one row: M stages, all tapped
    │       └─ inlam_xor_network          XOR/XNOR of the taps, undelayed terms
    └─ msg_gen4             INLAM(4,1) with the four-bit tables
        └─ inlam …
    msg_pkg                     sizes, pattern types, connection/preset tables

`msg_top` ports: `clk`, plus `gen6_rst`, `gen6_en`, `gen6_pattern[5:0]` and
`gen4_rst`, `gen4_en`, `gen4_pattern[3:0]`.

### Table layout (for writing a new generator)

Parameters of `inlam`:

| parameter | type | meaning |
|-----------|------|---------|
| `N`, `M` | `int unsigned` | signals, stages per signal |
| `A` | `logic [M:0][N-1:0][N-1:0]` | `A[k][i-1][j-1] = a_ijk`; `A[0]` holds the undelayed taps |
| `C` | `logic [N-1:0]` | bit i-1 set: row i is XNOR |
| `SEED` | `logic [M-1:0][N-1:0]` | `SEED[p]` = pattern p+1 |

Bit i-1 of every vector is `V_i`. In a `'{...}` literal the first element is
the highest index: k = M first, and row V_N first within each plane (see
`msg_pkg`). To use a new list, solve the systems above for it, write the
three tables and instantiate `inlam` with them. If an undelayed loop slips
in, the start-up assertion stops the simulation.

`inlam_xor_network` evaluates undelayed taps with N sweeps over the rows,
each reading the values the previous rows just produced. Any loop-free
dependence order settles within N sweeps. Synthesis folds the sweeps into
plain XOR logic with no combinational loop.

## Design choices beyond the published machine

* The reset and enable are additions of this design. The published machine
  is free-running from preset flip-flop values.
* The output is the last stage of each row, as in the published drawings.
  Loading stage k with pattern M-k+1 is this design's general rule for the
  presets; it reproduces the published preset values of both generators.
  The first M patterns therefore come from the presets, not from the
  network.
* Bit i-1 carries `V_i`.
* Undelayed (k = 0) taps are supported in general, with the loop check and
  sweep evaluation described above.
* Not included: the tap solver (software), generators for other test sets
  (their tap tables are not available), and the independent per-signal
  inverted LFSRs that the joint machine replaces.

## Verification

Every testbench is self-checking and ends with a
`TB_RESULT checks=… failures=…` line.

| testbench | what it checks |
|-----------|----------------|
| `tb_inlam_shift_register` | stages against a software history, under a random enable and mid-run resets (M = 2 and M = 5) |
| `tb_inlam_xor_network` | all 4,096 tap combinations of the six-bit network and all 16 of the four-bit one against the equations written out term by term |
| `tb_inlam` | six-bit table and 3,000 patterns of continuation; the linear case as the LFSR x^4+x+1 (15 states, period 15); a 5-signal, 3-stage machine with undelayed taps against a history-based model |
| `tb_msg_gen6` | all 16 patterns in order, one per clock; pattern 12 = pattern 4; continuation; enable hold; state period exactly 1,260; the list returning after it |
| `tb_msg_gen4` | the 6 patterns, the 7-pattern loop, pattern 1 never returning, hold |
| `tb_msg_top` | both generators at full size for 8,000 clocks with random enables and staggered resets, every output scored; it counts full list replays, pseudo-random patterns, the recurrent pattern, wrap-around, holds and resets, and fails if any never happens |

The shared reference data and equations are in `tb/msg_ref_pkg.sv`.

To run one testbench with Verilator (from the folder that holds `rtl/` and
`tb/`):

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
        rtl/msg_pkg.sv tb/msg_ref_pkg.sv tb/tb_msg_top.sv --top-module tb_msg_top
    ./obj_dir/Vtb_msg_top

Replace `tb_msg_top` with any other testbench name. Each one runs in well
under a second.
