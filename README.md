# Compute-line memory: NOR on the bit-line, held by a keeper

In an ordinary SRAM the bit-lines only carry data to a sense amplifier. Here
the bit-line is where the computing happens. The storage cells of one column
sit on a pair of bit-lines, XBL and YBL. In a compute cycle, each *selected*
cell that holds a 1 pulls XBL down. A small keeper circuit pulls XBL back up
when nobody pulls it down, and drives YBL to the opposite level. XBL thus
settles to the NOR of the selected bits. In the same cycle, that result is
written into whichever cells have their write word line raised. No precharge
and no sense amplifier are involved. A sequence of such cycles evaluates any
Boolean function in place, because NOR is complete. Many columns ("compute-lines")
can share one command word and so work as a bit-wise SIMD machine.

This RTL is a cycle-level logic model of that architecture. It covers the
minimal compute-line (four cells, one external input, one output, one keeper),
an array of such lines under a control unit, and a nine-cycle NOR full adder
for bit-serial addition. The circuits themselves are transistor-level:
capacitive bit-lines, weak and strong pulls, pass transistors. Here each one
is modelled by its logical effect per compute cycle. One compute cycle is one
clock cycle.

## One compute cycle

A command word (`ccma_pkg::cl_cmd_t`) drives one cycle:

| field    | meaning |
|----------|---------|
| `xsl`    | operation select-line; when low, nothing pulls and the bit-lines hold |
| `bk`     | keeper command: enables the weak pull-up of XBL and the YBL inverter |
| `xr_in`  | read the external input bit XI |
| `xr[3:0]`| read word lines of cells XB1..XB4 |
| `xw[3:0]`| write word lines of cells XB1..XB4 |
| `xw_out` | write the output cell XO (the line's local output) |

In addition, each line has local inputs with read lines `lr`.

During the cycle:

```
pd       = XSL & ( XI&xr_in | OR_j(LI_j & lr_j) | OR_j(XB_j & xr_j) )
XBL_eval = (XBL_old | XSL&BK) & ~pd          -- NOR of the selected bits
YBL_eval = (XSL&BK) ? ~XBL_eval : YBL_old
```

At the rising edge, every cell with its write line high stores `XBL_eval`.
What follows from this:

* **NOT** is a NOR with one source selected. A **constant 1** is a cycle with
  no source selected. A **copy** takes two cycles.
* **Reading and writing the same cell in one cycle is legal** (a *reflexive*
  cycle). The cell contributes its old value.
* **With BK low**, the pull-up is off, so XBL can only fall:
  `XBL_old & ~pd`.
* **With XSL low**, the line is passive. A write in such a cycle stores the
  held XBL level.
* **Writing from the external input inverts.** A cell fetched from XI holds
  `~XI`.

### Bit-line state between cycles

XBL and YBL are never precharged. They keep whatever the last cycle left.
The model tracks this state (`xbl`, `ybl`), because it decides how much the
bit-lines toggle. Three states occur:

| state | XBL/YBL | left by |
|-------|---------|---------|
| C1    | 0/1     | a cycle whose result is 0 (XBL pulled down) |
| C3    | 1/0     | a directive cycle whose result is 1 |
| C2    | 0/0     | a reflexive cycle that writes 1 into a cell that held 0 |

C2 needs an explanation. The target cell is read and, by the end of the
cycle, holds a fresh 1. It then starts pulling XBL down. By then the keeper's
inverter has already driven YBL low and released it. Both lines end low. In
the RTL this is the `late_pd` / `late_x` pull-down. It lowers the held level
of XBL, but not the value written in that cycle.

A compute cycle that writes one cell falls into one of seven kinds:

| kind | cycle type | result | target cell before |
|------|------------|--------|--------------------|
| R1   | directive  | 0      | 0 |
| R2   | directive  | 0      | 1 |
| R3   | directive  | 1      | 0 |
| R4   | directive  | 1      | 1 |
| R5   | reflexive  | 0      | 0 |
| R6   | reflexive  | 0      | 1 |
| R7   | reflexive  | 1      | 0 (conflicting) |

The next state follows from the kind:

* R1, R2, R5 and R6 leave C1.
* R3 and R4 leave C3.
* R7 leaves C2.

`m_cl_tb` and `cl_stats_tb` check these rules on every such cycle.

### Bit-line activity compared with a precharged bit-line

A conventional bit-line pair is precharged every cycle, and one of its two
lines is then discharged. Per cycle it has one rise on each line and one fall
on one line. The compute-line only moves a line when its value changes. The
exception is R7, where XBL rises and then falls again.

The table gives the transitions saved per cycle: the conventional count
minus this design's count. Each entry is listed for C1 / C2 / C3.
`m_cl_tb` measures the transitions on the model's bit-lines in every
classified cycle, and checks that all 84 entries are reproduced.

|          | R1    | R2    | R3    | R4    | R5    | R6    | R7          |
|----------|-------|-------|-------|-------|-------|-------|-------------|
| XBL up   | 1/1/1 | 1/1/1 | 0/0/1 | 0/0/1 | 1/1/1 | 1/1/1 | 0/0/1       |
| XBL down | 1/1/0 | 1/1/0 | 0/0/0 | 0/0/0 | 1/1/0 | 1/1/0 | −1/−1/−1    |
| YBL up   | 1/0/0 | 1/0/0 | 1/1/1 | 1/1/1 | 1/0/0 | 1/0/0 | 1/1/1       |
| YBL down | 0/0/0 | 0/0/0 | 0/1/1 | 0/1/1 | 0/0/0 | 0/0/0 | 0/1/1       |

## The full adder in nine NOR cycles

Cells XB1, XB2 and XB3 hold c, a and b. XB4 is scratch. The sum goes to XO
and the carry goes back into XB1, ready for the next bit.

| cycle | operation              | value                   | reflexive |
|-------|------------------------|-------------------------|-----------|
| 1     | XB4 = NOR(XB2, XB3)    | n1 = NOR(a,b)           |           |
| 2     | XB2 = NOR(XB2, XB4)    | n2                      | yes       |
| 3     | XB3 = NOR(XB3, XB4)    | n3                      | yes       |
| 4     | XB2 = NOR(XB2, XB3)    | n4 = XNOR(a,b)          | yes       |
| 5     | XB3 = NOR(XB2, XB1)    | n5                      |           |
| 6     | XB2 = NOR(XB2, XB3)    | n6                      | yes       |
| 7     | XB1 = NOR(XB1, XB3)    | n7                      | yes       |
| 8     | XO  = NOR(XB2, XB1)    | sum = a ^ b ^ c         |           |
| 9     | XB1 = NOR(XB4, XB3)    | carry = NOR(n1, n5)     |           |

Before each bit, two fetch cycles load a_k into XB2 and b_k into XB3 through
the external input. Before bit 0, one more fetch loads c0 into XB1. Fetches
store `~XI`, so the control unit drives XI with the complemented operand.

After the last bit, one cycle writes `NOR(XB1)` to XO. The control unit reads
the carry-out from it. The sum bit is collected during cycle 9, when XO
already holds it.

An addition of W-bit numbers therefore issues 1 + 11·W + 1 commands. `done`
pulses 11·W + 4 cycles after `start` is taken: 92 cycles for the default
W = 8. All lines add their own operands at the same time.

**Chaining (`cin_keep`).** When `cin_keep` is high with `start`, the carry
fetch is skipped. The carry that the previous addition left in XB1 is used
instead, and `done` comes one cycle earlier. Two W-bit additions then form
one 2W-bit addition: low halves first, then high halves with `cin_keep`.

## The array (`ccma`)

* **Compute-lines.** There are M lines (`m_cl`, default M = 8), each with four
  cells, one external input, one output XO and one keeper.
* **Shared command word.** The control unit's command word goes to every line
  (bit-wise SIMD).
* **Private select-lines.** Each line's select-line is additionally gated by
  `xsl_mask[k]`. A masked line computes nothing. If the word writes, the
  masked line stores its held XBL level. Masking therefore does not protect a
  line's cells from writes.
* **Local inputs (a ring).** Line k has M local inputs. Local input j is wired
  to the XO of line (k + j) mod M. Reading local input j in every line at once
  moves each line's XO j places around the ring, inverted, into a cell. With
  j = 0 a line reads its own XO back. The ring is one choice among the fixed
  wirings the architecture allows.
* **Control unit (`ccma_ctrl`).** It either runs the addition program, or,
  while idle, passes host command words through (`host_valid`, `host_cmd`,
  `host_xsl_mask`, `host_xi`, `host_lr`). While the program runs, host
  commands are ignored.
* **Stand-alone keepers.** Beside the memory sit an nKeeper and a pKeeper
  (`kp_*` ports, four pull transistors each), the two bit-line circuits the
  line keeper is derived from. With `c=0, w=1`, the nKeeper line becomes
  NOR(x) and the pKeeper line becomes NAND(x). With neither weak branch nor
  strong pull active, both lines hold their level.

## Files

| file | contents |
|------|----------|
| `rtl/ccma_pkg.sv`  | command word type, cell masks, full-adder program (`fa_cmd`) |
| `rtl/nkeeper.sv`   | nKeeper bit-line: n_new = (n_old OR (w AND NOT c)) AND NOR(x) |
| `rtl/pkeeper.sv`   | pKeeper bit-line: p_new = (p_old AND NOT (w AND NOT c)) OR NAND(x) |
| `rtl/m_input.sv`   | input block: pulls XBL down when XI & XSL & XR |
| `rtl/m_output.sv`  | output block: storage nodes XB/YB written from XBL/YBL |
| `rtl/m_cmc.sv`     | storage cell = input block + output block, XI tied to XO |
| `rtl/m_keeper.sv`  | line keeper: nKeeper on XBL + BK-controlled YBL inverter |
| `rtl/m_cl.sv`      | one compute-line |
| `rtl/ccma_ctrl.sv` | control unit / sequencer |
| `rtl/ccma.sv`      | top level |

Every testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=N failures=F`:

* `<module>_tb.sv` tests one module.
* `ccma_tb.sv` runs the top at its default size. It covers additions,
  chained additions, host commands, fetch, ring transfers, masking, BK low, a
  conflicting cycle and the keeper pair, and it fails if any of these never
  happened.
* `cl_stats_tb.sv` runs 20,000 random two-operand, one-output operations on a
  four-cell line. It prints the share of each kind of compute cycle and the
  bit-line transitions saved.

## Simulating

Verilator 5, from the project root:

```
verilator --binary --timing -Irtl -y rtl rtl/ccma_pkg.sv tb/ccma_tb.sv \
          --top-module ccma_tb -Mdir obj_ccma
./obj_ccma/Vccma_tb
```

Replace `ccma_tb` with any other testbench name. `-y rtl` lets Verilator find
the modules by file name. The package must be listed first. Each run takes
well under a second.

To change the size, set `M` and `W` on `ccma` (and in `ccma_tb`). The number
of cells per line, `ccma_pkg::N_CMC`, is fixed at 4 by the command word and
the adder program.

## How far to trust it, and where it departs

**What is modelled.** The logic behaviour of the circuits is modelled, with
one result per clock. The rest is the bit-line level held between cycles, the
three states C1/C2/C3, and which cells hold what. Not modelled:

* voltages and currents;
* the charge-sharing disturbance of reflexive cycles;
* a line with so many cells that the keeper cannot hold it (a real design
  must size the number of lines and cells per line for this);
* the energy saved.

**Followed closely:**

* the cell, input, output and keeper behaviour;
* XBL = XSL·NOR(selected), YBL = ¬XBL, and a write copies XBL;
* the nKeeper update law;
* NOR/NOT on XBL with a single select-line;
* four cells per minimal line, z = 4 keeper transistors;
* a nine-cycle full adder that leaves the sum in XO and the carry in XB1, with
  cycles 2, 3, 4, 6 and 7 reflexive;
* the shared command word (SIMD), per-line select-lines, and local inputs wired
  to local outputs;
* the transition rules between bit-line states.

**This design's own choices:**

* one clock per compute cycle;
* reset levels (cells 0, XBL/YBL = 0/1);
* XSL low means the bit-lines hold, rather than XBL being forced to 0;
* the exact NOR network of the full adder and its cell allocation;
* fetching through the inverting input with complemented operands;
* the extra cycle that reads the carry-out;
* the ring wiring of the local inputs;
* M = 8 lines and W = 8 bits;
* the host pass-through port and the start/done handshake;
* writing the pair 0/0 into a cell stores 0;
* in the pKeeper, the strong pull-up term is NAND(x), as its pMOS gates and
  its stated NAND function require, and its weak pull-down uses the same
  `w & ~c` enable as the nKeeper.

**Not built:**

* The full symmetric compute-line, with a second select-line YSL that would
  give NAND on YBL. It is only referred to, not specified, so the YSL
  select-line and the interleaved sharing of one XSL/YSL pair between
  neighbouring lines are absent.
* Keeper variants that work without the BK command.
* A shorter addition iteration for operand bits a_k and b_k that are already
  stored in the line. Only the carry can be kept (`cin_keep`). Four cells
  cannot hold multi-bit operands, and every line's XO is overwritten with its
  sum bit in each iteration.

**Statistics.** For random operations with two operands and one output on four
cells, `cl_stats_tb` measures:

* reflexive cycles: 50 %;
* result 1 (XBL not pulled down): 25 %;
* directive target cell at 1: 50 %.

All three match the expected probabilities: 1 − (2!·3!)/(4!·1!) = 1/2 for
reflexive, and 1/2² for result 1. The split between the reflexive kinds
differs from a model that treats "target was 1" and "XBL not pulled down" as
independent. In a reflexive cycle the target is itself an operand, so a 1
result implies it was 0. The conflicting kind R7 therefore occurs in about
12.5 % of cycles, not 6.25 %. With the measured shares, the transitions saved
per cycle come out at about:

| line, direction | transitions saved |
|-----------------|-------------------|
| XBL up          | 78 % |
| XBL down        | 53 % |
| YBL up          | 81 % |
| YBL down        | 6 %  |

The independent model, with R7 at 6.25 %, gives 84 %, 65 %, 85 % and 3.5 %.
