# Error-correcting iterative arithmetic by recomputing with partitioning and voting

An iterative circuit is a chain of identical cells in which each cell passes a
"secondary" signal to the next one. A ripple adder is the usual example: each
cell passes its carry up the chain. Triple modular redundancy (TMR) makes such a
circuit fault tolerant. It builds three copies and votes on their outputs, which
costs more than 200 % extra hardware. Recomputing the whole result three times
costs more than 200 % extra time instead.

This RTL uses a cheaper mix of the two, called recomputing with partitioning and
voting (RWPV). The N-cell chain is replaced by three copies of one third of it.
Each copy is N/3 cells long. The operands are cut into a low, a middle and a
high third, and the three copies work through them one third per phase. In
every phase all three copies compute the same third, so their outputs can be
voted. The delay of a chain grows linearly with its length. Three passes through
a chain one third as long therefore take about as long as one pass through the
full chain. The result is error correction for roughly the hardware of one full
array plus multiplexers, voters and latches, and little extra time. The time
cost falls as N grows.

The repository holds three such circuits, each 96 bits wide by default:

| prefix  | unit cell                                      | chain signal            |
|---------|------------------------------------------------|-------------------------|
| `ripp_` | 1-bit full adder (ripple carry adder)          | carry, active high      |
| `fadd_` | 4-bit lookahead adder, 74LS83 function         | carry, active high      |
| `falu_` | 4-bit ALU, 74LS181 function (32 functions)     | Cn carry, active low    |

## Structure of one RWPV circuit (`rwpv`)

```
              a, b (N bits)                     ext
          +------+------+------+                 |
          | low  | mid  | high |                 |
          +--+---+--+---+--+---+                 |
             |      |      |                     |
  for each part p in {ITL, ITM, ITH}:            |
     MUX1 (3:1 by SEL) --> a_sel, b_sel          |
     MUX2 (2:1): phase 1 -> ext <----------------+
                 phase 2/3 -> own LC
     IT part (N/3 bits of cells) --po--> VOTER (bitwise 2 of 3) --+--> LATCH SL (phase 1)
                               \                                  +--> LATCH SM (phase 2)
                                so --> LC (1 bit) -> own MUX2     +--> SH (phase 3, unlatched)
                                  \
                                   --> V (2 of 3) --> out (phase 3)

  res = {SH, SM, SL}
```

The three parts never exchange signals. Each part carries its own secondary
signal from one phase to the next through its own one-bit latch, LC. The parts
only meet at the voters. A part with a permanent fault therefore stays wrong in
every phase, but it is always the only wrong voter input, so it is outvoted. For
the same reason, any number of errors inside one part are corrected. This covers
its cells, its input multiplexers, its LC and its secondary path. Errors in two
parts at the same bit position are not corrected. The top-level testbench checks
that such errors do reach the output.

### The three phases

One phase takes one clock cycle. `rwpv_ctrl` sequences them:

| cycle | SEL  | parts compute   | secondary input of each part | stored at the end of the cycle        |
|-------|------|-----------------|------------------------------|---------------------------------------|
| 1 (`start` high) | L | `a[W-1:0]`, `b[W-1:0]` | `ext`              | voted primary output → SL; each part's carry → its LC |
| 2     | M    | middle thirds   | own LC                       | voted primary output → SM; carries → LC |
| 3 (`valid` high) | H | high thirds | own LC                   | nothing: `res = {SH, SM, SL}` and `out` are read now |

Here W = N/3. The result is valid in the third cycle of an operation, and only in
that cycle. Phase 3 stores nothing: the voter output SH and the secondary-output
vote `out` are read straight off the combinational paths. If `start` is held
high, a new operation begins in the cycle after `valid`, giving one result every
three cycles. `a`, `b` and `ctl` must stay constant from the `start` cycle to the
`valid` cycle. An assertion in `rwpv` checks this. `ext` is read only in the
`start` cycle.

The clock period must cover one pass through a third of the chain. That pass
runs through MUX1 or MUX2, then N/3 cells, then the voter, and then the setup of
LC or LATCH. Three such cycles replace one pass through the full chain of N
cells. This is where the time overhead comes from. It is roughly three
multiplexer delays and three voter delays, compared with the delay of N cells.

### Why V reads the carry before LC

V is the one-bit voter that produces the secondary output of the whole circuit
(the final carry). If LC were a level-sensitive latch, it would be transparent in
phase 3, and V would see the phase-3 carry through it. Here LC is an
edge-triggered register. It still holds phase 2's carry during phase 3. So V
votes the three parts' carries as they enter LC, which gives the same value a
transparent latch would.

## Unit cells

* **`rwpv_fa_cell`**: a gate-level full adder. a^b feeds a second XOR with the
  carry in, which gives the sum. The carry out is a NAND of the NANDs of (a,b) and
  (a^b, ci).
* **`rwpv_cla4`**: a 4-bit adder. Generate and propagate are computed per bit.
  All internal carries and c4 come from two-level lookahead equations. Between
  cells the carry ripples.
* **`rwpv_alu4`**: the 74181 function, using active-high data. For each bit the
  select lines form x = a | (b&S0) | (~b&S1) and y = (a&b&S3) | (a&~b&S2). In
  arithmetic mode (M = 0), F = x + y + carry, with lookahead carries. In logic
  mode (M = 1), F = ~(x^y). This yields the part's 16 logic and 16 arithmetic
  functions, for example S = 1001 gives A plus B and S = 0110 gives A minus
  B minus 1 (A − B when the carry is in). The carry in `cn_n` and the carry out
  `cn4_n` are active low, as on the part, so cells chain output to input. The
  ALU circuit's `falu_ext` and `falu_out` are therefore active low as well. The
  group P/G and A=B outputs exist on the cell but are not used in the chain.

In all three circuits, `ctl = {M, S[3:0]}` goes unchanged to every cell. It is
not cut into thirds like the operands, and the adders ignore it.

## Interface of `rwpv_top`

Each circuit has its own copy of the following ports, named `<prefix>_<port>`.
Only `clk` and `rst_n` are shared.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `start` | in | 1 | begin an operation; this cycle is phase 1 |
| `a`, `b` | in | N | operands |
| `ctl` (`falu_` only) | in | 5 | {M, S[3:0]} |
| `ext` | in | 1 | carry in (ALU: active-low Cn) |
| `inj_pi` | in | 3 × N/3 | per part: XOR mask on operand a after MUX1 |
| `inj_po` | in | 3 × N/3 | per part: XOR mask on the part's primary output |
| `inj_so` | in | 3 | per part: XOR mask on the part's carry out, before LC and V |
| `res` | out | N | voted result {SH, SM, SL} |
| `out` | out | 1 | voted carry out (ALU: active low) |
| `valid` | out | 1 | phase 3: `res` and `out` are valid |
| `busy` | out | 1 | an operation is in progress |

The `inj_*` inputs are test access for injecting errors, indexed 0 = ITL,
1 = ITM, 2 = ITH. Tie them to zero in a real design; synthesis then removes the
XORs. `rst_n` is an asynchronous, active-low reset. It clears the sequencer and
all latches.

Parameters: `N_RIPP`, `N_FADD` and `N_FALU` all default to 96. N must be a
multiple of 3 for the ripple adder and a multiple of 12 for the 4-bit-cell
circuits. The technique was evaluated at N = 12, 24, 36, 48 and 96, and all of
these sizes are simulated here. `rwpv` itself takes `CELL` (see `rwpv_pkg`) and
`N`.

## Design choices not fixed by the method

* Each phase is one clock cycle, and LC and LATCH are edge-triggered registers
  with load enables. The method describes level-sensitive latches whose delay
  overlaps the next phase.
* The start/valid/busy handshake, the operand-hold rule, back-to-back operation
  and the reset values are this implementation's own.
* V votes the carries at LC's input, as explained above.
* `ctl` is broadcast to all cells, not multiplexed.
* The 74LS83 and 74LS181 cells reproduce the parts' logic functions, not their
  internal gate networks. The delay figures behind the method's time-overhead
  numbers depend on those gate networks and timings, and a cycle-level model
  does not reproduce them.
* The error-injection inputs are an addition for verification.

Not built: the non-redundant and TMR circuits used only for comparison, and the
delay model used to estimate the time overhead, which has no logic of its own.

## Files

`rtl/`:
* `rwpv_pkg.sv`: cell kind and phase enums.
* `rwpv_top.sv`: the three circuits side by side.
* `rwpv.sv`: one RWPV circuit.
* `rwpv_ctrl.sv`: phase sequencer.
* `rwpv_it_part.sv`: one third of the chain.
* `rwpv_fa_cell.sv`, `rwpv_cla4.sv`, `rwpv_alu4.sv`: unit cells.
* `rwpv_mux3.sv`: MUX1.
* `rwpv_mux2.sv`: MUX2.
* `rwpv_latch.sv`: LC and LATCH.
* `rwpv_voter.sv`: VOTER and V.

`tb/` has one self-checking testbench per module, `tb_<module>.sv`, plus the
following:
* `tb_rwpv_top.sv`: all three circuits at the default 96 bits for 3000
  operations. It covers errors in each part, both permanent and transient; errors
  in two parts, which must show up at the output; back-to-back operation; both
  ALU modes; latency; and rate.
* `tb_rwpv_sizes.sv`, with its helper `rwpv_size_check.sv`: the circuits at
  N = 12, 24, 36 and 48.
* `rwpv_tb_ref_pkg.sv`: the reference model. It holds the 74181 function table
  written out case by case, independent of the x/y form used in the RTL.

Each testbench prints `TB_RESULT checks=<n> failures=<n>`. To run one with
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/rwpv_pkg.sv tb/rwpv_tb_ref_pkg.sv tb/tb_rwpv_top.sv --top-module tb_rwpv_top
./obj_dir/Vtb_rwpv_top
```

Replace `tb_rwpv_top` with any other testbench name. Every testbench finishes in
well under a second.
