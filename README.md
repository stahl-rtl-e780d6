# STAHL: a scan-test-aware hardened latch, its scan cell and scan chain

Radiation-hardened latches keep their state in several redundant feedback
loops and vote between them with C-elements, so that a particle strike on one
node cannot upset the stored value. The same redundancy hides manufacturing
defects: a short or open inside one loop is outvoted by the healthy loop and
never shows at the output, so scan test passes a cell that is no longer
hardened. STAHL removes that conflict with a mode input. In **function mode**
the cell is one hardened latch whose two loops are cross-checked by two
C-elements. In **shift mode** the cross-connections are switched away and the
cell splits into two ordinary latches, each of which can be tested like an
unhardened latch.

This repository holds synthesizable SystemVerilog for the three levels of the
design, plus self-checking testbenches:

| level | module | what it is |
|---|---|---|
| latch | `stahl_latch` (uses `c_element`) | the hardened latch, two inputs and two outputs |
| scan cell | `stahl_scan_cell` | a scan flip-flop made of two STAHL latches and two muxes |
| scan chain | `stahl_scan_chain` (top) | `N_CELLS` scan cells chained SI to SO, default 3 |

The RTL is a **logic-level model of a transistor circuit**. Read the section
"What the logic model keeps and what it drops" before relying on it for
anything timing- or charge-related.

## The STAHL latch

Ports: data `d0`, `d1`; outputs `q0`, `q1`; clock `ck`/`ckb`; mode
`en`/`enb` (`en = 1` shift mode, `en = 0` function mode); strike-injection
bundle `seu`. The latch is transparent while `ck = 0` and holds while
`ck = 1`.

Inside are two feedback loops. Loop FL0 is node N1 (written from D0 through
transmission gate TG1), its inverse N3, and N8, which closes the loop back to
N1 through TG3. Loop FL1 is the same from D1: N2, N4, N7, TG2, TG4. Two
inverting C-elements drive the outputs. A C-element drives `Z = ~A` when its
inputs agree and leaves `Z` floating, so it keeps its value, when they
disagree. Inverters from Q0 and Q1 back into the loops restore a loop after a
strike.

The two mode muxes decide what the C-elements compare:

| | CE0 inputs (A, B) | CE1 inputs (A, B) | behaviour |
|---|---|---|---|
| function, `en = 0` | N3, N4 | N3, N4 | one hardened latch; `d0` and `d1` must be equal; `q0 = q1 = d` |
| shift, `en = 1` | N3, N3 | N4, N4 | two independent latches `d0 -> q0`, `d1 -> q1`; C-elements act as inverters |

**Why a strike is harmless in function mode.** Both C-elements see both
loops. A strike on either loop makes their inputs disagree, so both outputs
float and hold. When the transient ends, the held output drives the struck
loop back to its value. A strike on a mux output (N5, N6) splits only one
C-element's inputs and is masked the same way. A strike on an output node Q0
or Q1 glitches that output until the C-element pulls it back. This is the one
exposed node type: a glitch can still travel into downstream logic.

**Why the cell is testable in shift mode.** Each loop now drives one
C-element alone, so a defect in a loop changes that latch's output and is seen
at the scan output. Only the two cross-connections, FL0 to CE1 and FL1 to CE0,
are switched off in shift mode and stay untested there. The chain-level
procedure below covers part of that gap.

## The scan cell

`stahl_scan_cell` turns two STAHL latches into a rising-edge scan flip-flop:

- STAHL-A is the master. It is clocked by `ck` and is transparent while
  `ck = 0`.
- STAHL-B is the slave. It gets `ck` and `ckb` swapped and is transparent
  while `ck = 1`.
- A's outputs Q0 and Q1 feed B's inputs D2 and D3. B's outputs are Q2 and Q3.
- Input mux: A.D0 = `d` always. A.D1 = `si` when `en = 1`, and `d` when
  `en = 0`.
- Output mux: `q` = Q2 when `en = 1`, and Q3 when `en = 0`. `so` = Q3 always.

In function mode both halves of both latches carry `d`, and the cell is one
hardened D flip-flop. In scan mode the cell is two independent flip-flops:

- the **upper flip-flop**, `d -> Q2 -> q`, which keeps serving the
  functional logic;
- the **lower flip-flop**, `si -> Q3 -> so`, which is one link of the scan
  chain.

## The scan chain and how it is tested

`stahl_scan_chain` connects `N_CELLS` cells in series: `si` goes to cell 0,
`s[i]` is the scan output of cell `i`, and `so = s[N_CELLS-1]`. Every cell's
`d[i]`/`q[i]` pair goes to the design's combinational logic, which sits
outside this module. Only `ck` and `en` need to be routed. The chain makes
`ckb` and `enb` with one inverter each. It needs no extra control signal and
no extra scan chain compared with ordinary mux-scan.

Because the upper and lower flip-flops are independent, the design under test
keeps running functional clock cycles on the upper flip-flops while a pattern
shifts through the lower ones. This is deliberate: the functional logic loads
many different values into the upper halves during shifting, which exercises
shorts between the two halves of each cell at no cost in test data.

Capture works through the output mux. When `en` falls, every `q[i]` switches
from the upper flip-flop to the lower one, that is, to the pattern just
shifted in. The next rising `ck` edge loads `d[i]` into both halves of every
cell. What `d[i]` holds at that edge depends on how long `en` was low:

- **Standard capture.** `en` falls early enough for the pattern to propagate
  through the logic. The chain captures the logic's response to the pattern.
  This tests the logic, the lower flip-flops and the output mux.
- **Fast capture.** `en` falls just before the rising edge, sooner than the
  logic's propagation delay. The logic still shows its response to the
  *upper* flip-flops' state, and that response is captured. This makes the
  upper flip-flops observable. It requires a tight timing relation between
  `en` and `ck`, and a combinational path with enough hold time.

Example, three cells, logic = one inverter per cell:

1. Flush bits Fa, Fb are shifted through the lower flip-flops.
2. The pattern 111 is shifted in.
3. A standard capture takes the response 000, which is shifted out.
4. Meanwhile the upper flip-flops keep toggling, since each `d[i] = ~q[i]`.
   Four cycles after the capture they are back at 000.
5. A fast capture then takes their response, 111, which is shifted out in
   turn.

`tb_stahl_scan_chain` runs exactly this sequence.

If the fast-capture timing cannot be met, a separate control signal can drive
the output mux instead of `en`. That variant is not implemented here.

## What the logic model keeps and what it drops

The published cell is a 36-transistor circuit. The RTL keeps its structure
and logic behaviour. It gives up everything analogue:

- **Zero delay everywhere.** Each loop is one stored bit: N1, with N3 = ~N1
  and N8 = N1. Each C-element is a level-sensitive latch with enable `A == B`.
  The synthesized netlist therefore has latches by design: 4 in a latch, 8 in
  a scan cell. They are not inference accidents.
- **Non-overlapping transmission gates.** A loop's input gate is modelled as
  conducting only when `ck = 0` **and** `ckb = 1`. The mux passes its "1"
  input only when `en = 1` and `enb = 0`. This keeps a latch clocked by `ck`
  and one clocked by `ckb` from being transparent in the same simulation
  step, so the master/slave pair cannot race. With proper complementary
  inputs this is identical to the transistor behaviour.
- **The restoring path is modelled by its effect.** The inverters and gates
  that restore a loop from the output are not drawn as gates. A loop strike
  that ends while the latch holds in function mode leaves the loop at its old
  value. The same strike in shift mode leaves the loop flipped, since the cell
  is then an ordinary latch. A small flop clocked by the end of the strike
  records that flip. A strike while the latch is transparent lasts only as
  long as the strike input, because the data input rewrites the loop.
- **Strike inputs are an addition of this model.** `stahl_pkg::seu_t`
  bundles one strike bit each for FL0 (N1/N3/N8), FL1 (N2/N4/N7), N5, N6, Q0
  and Q1. A bit held high is a particle strike lasting that long. The real
  cell has no such pins: tie them to `stahl_pkg::SEU_NONE`, i.e. zero.
- **Not modelled:** critical charge, pulse shape, delay, power, transistor
  sizing, and the resistive open and short defects used to grade defect
  coverage. Those belong to circuit simulation.
- **No reset.** Like any latch, the cell holds whatever was last written.
  Start a simulation by clocking known data in, as the testbenches do.
- **Function mode with `d0 != d1` on a bare latch is illegal.** The C-elements
  then hold their old outputs. The scan cell never does this: it feeds `d` to
  both inputs in function mode.
- **Fast capture needs delay in the surrounding logic.** The RTL has none of
  its own. The chain testbench models the logic as an inverter with 100 ps
  delay, against a 500 ps (2 GHz) clock.

## Files

- `rtl/stahl_pkg.sv`: the `seu_t` strike bundle and `SEU_NONE`.
- `rtl/c_element.sv`: the inverting C-element.
- `rtl/stahl_latch.sv`: the latch.
- `rtl/stahl_scan_cell.sv`: the scan flip-flop.
- `rtl/stahl_scan_chain.sv`: the chain, top level, parameter `N_CELLS` (default 3).
- `tb/comb_inverter_model.sv`: a delayed inverter standing in for the design's
  combinational logic. It is behavioural and not synthesizable.
- `tb/tb_*.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M` and has a watchdog.

## Simulating

With Verilator 5:

```
verilator --binary --timing -y rtl -y tb rtl/stahl_pkg.sv \
          tb/tb_stahl_scan_chain.sv --top-module tb_stahl_scan_chain
./obj_dir/Vtb_stahl_scan_chain
```

Replace the testbench name to run another one. All of them finish in well
under a second.

What the testbenches check:

- `tb_c_element`: the hold and inverting behaviour over random input
  sequences, against a reference model.
- `tb_stahl_latch`:
  - random operation in both modes against a reference that keeps both loops
    and both C-element states;
  - strikes on every node type in function mode: no change on loops and
    muxes, a glitch only while struck on outputs, loops restored afterwards;
  - permanent upsets from loop strikes in shift mode;
  - holding on mode switches and on `d0 != d1`.
- `tb_stahl_scan_cell`:
  - thousands of random cycles of `d`, `si` and `en` against a model of the
    upper and lower flip-flops, checking `q` and `so` on both sides of every
    edge;
  - function-mode strikes on both latches in both clock phases.
- `tb_stahl_scan_chain`, at the default size:
  - a long scan flush;
  - the procedure above, with R = 000 and R' = 111;
  - random patterns with both capture types;
  - function-mode cycles with random strikes on internal nodes, which must
    change nothing;
  - function-mode strikes on output nodes, which may glitch only the struck
    pin and only while the strike lasts;
  - shift-mode strikes, which must flip the struck bit.

  It counts every mechanism: flush, functional toggling during shift,
  standard capture, fast capture differing from standard, the mode switch of
  `q`, masked strikes, recovered output glitches and shift-mode upsets. It fails if any of them never
  occurred.
