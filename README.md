# Embryonic 8-bit adder with a single shared self-check unit

This is a fault-tolerant 8-bit adder in the style of *embryonics*, where
hardware repairs itself the way an embryo replaces dead cells with stem
cells. A classic embryonic array gives every cell its own gene memory,
controller and self-checker. Here the cells are bare full adders built from
multiplexers, and one copy of each of these serves all of them:

* a configuration register,
* a control unit,
* a self-check unit (the "unicellular" checker).

Ten cells are provided: eight working cells and two spares, arranged
logically as a 2 x 5 matrix. The adder is **bit-serial**:

* Only one cell works in any clock cycle. It computes one bit position.
* The shared checker compares that cell's sum and carry with a reference
  full adder.
* If the result is right, the sum bit is stored and the carry moves on.
* If it is wrong, the cell is declared dead. The same bit is then computed
  again on the next live cell.

Spares are never used while no fault is seen.

```
               +--------------------------- config_reg (26 bits) ----------------------+
               | sel0 sel1 ... sel7 (3 bits each)                 data0='0' data1='1'  |
               +-----------------------------------+-----------------------------------+
                                                   |
  a,b --> operand regs --+--> ea_cell_array: cell0 .. cell7, spare cell8, spare cell9
                         |        ^ en (one-hot), sel, cin, data bits   | sum[10], carry[10]
                         |        |                                     v
                         +--> control_unit: counter, 3-bit sel reg, carry reg, dead[10],
                                  active-cell pointer, output register
                                     |  a_i, b_i, cin, sum, carry    ^ err
                                     v                               |
                                  self_check: 3 x (golden LUTs, 2 XOR, OR) -> 2-of-3 vote
```

## The cell: a full adder made of MUXes

`ea_cell` contains four multiplexers and nothing else:

| MUX | select | data inputs (select 00, 01, 10, 11) | output |
|---|---|---|---|
| input-1, 8:1 | `sel` | `a_reg[0..7]` | `a_i` |
| input-2, 8:1 | `sel` | `b_reg[0..7]` | `b_i` |
| sum, 4:1 | `{a_i, b_i}` | `cin, ~cin, ~cin, cin` | `sum = a_i ^ b_i ^ cin` |
| carry, 4:1 | `{a_i, b_i}` | `data0, cin, cin, data1` | `carry` |

The carry MUX's data inputs 0 and 1 are not hard-wired. They come from the
configuration register. With the reset contents (`data0 = 0`, `data1 = 1`),
the carry MUX computes the majority of `a_i`, `b_i` and `cin`.

A cell whose `en` is low is idle or dead, and drives 0 on both outputs. The
`fault` input is a test hook. It inverts `a_i` and/or `b_i` on their way to
the function MUXes, which models an upset on a select line of those MUXes.

## The configuration register

`config_reg` holds 8 x 3 + 2 = 26 bits:

| bits | meaning | reset value |
|---|---|---|
| `[3i+2:3i]`, i = 0..7 | selection code used for bit position i | `i` |
| `[24]` | carry-MUX data bit `data0` | 0 |
| `[25]` | carry-MUX data bit `data1` | 1 |

The reset value is `26'b10_111_110_101_100_011_010_001_000`. There is a
synchronous write port (`cfg_we`, `cfg_wdata`). Any permutation of the
selection codes still gives a correct adder of the permuted operand bits.
For example, reversed codes add the bit-reversed operands.

## How an addition runs (control unit)

`control_unit` sequences one addition:

1. **Start.** `start` is accepted in any state except `ST_RUN`. In that
   cycle `load` is high and the top level captures `a` and `b` into the
   operand registers. The control unit clears the bit counter and the carry
   register. It loads the 3-bit selection register with field 0 of the
   configuration register, and points at the first cell not marked dead.
2. **Each cycle in `ST_RUN`.** Only the active cell is enabled. It receives
   the selection register, the carry register as `cin`, and the data bits.
   The control unit routes that cell's sum and carry to the self-check unit.
   It also sends the checker the operand bits `a_reg[sel]` and `b_reg[sel]`,
   which it picks itself rather than taking them from the cell. The carry
   register goes to the checker as well.
   * **Pass:** the sum bit goes into `result[count]` and the carry into the
     carry register. The counter advances, and the selection register loads
     the next field. The pointer moves to the next live cell.
   * **Fail** (`error` high for one cycle): the active cell's `dead` bit is
     set and the pointer moves to the next live cell. Counter, selection
     register and carry stay as they are, so the same bit is redone there
     in the next cycle.
3. **End.** After bit 7 passes, the state becomes `ST_DONE`, with `sum` and
   `cout` valid. If the pointer runs past the last cell while bits remain,
   the state becomes `ST_FAIL` instead.

**Latency.** `done` rises 8 + *k* cycles after the clock edge that took
`start`, where *k* is the number of faults found during this addition.

**Dead cells.** Dead marks persist until reset, so later additions skip
those cells and start on the first live one. Two spares mean at most two
cells can die before the adder fails. Both failures may happen within one
addition.

Worked example with cell 3 faulty (10 cells: indices 0..7 working, 8 and 9
spare):

| cycle | bit | active cell | check | action |
|---|---|---|---|---|
| 1-3 | 0-2 | 0-2 | pass | store bits 0-2 |
| 4 | 3 | 3 | **fail** | cell 3 dead, pointer to 4 |
| 5 | 3 | 4 | pass | store bit 3 |
| 6-9 | 4-7 | 5-8 | pass | spare 8 computes bit 7 |
| 10 | | | | `done` |

Every later addition uses cells 0, 1, 2 and 4 to 8, and takes 8 cycles.

## The self-check unit and its TMR

`self_check` has three identical lanes. Each lane has:

* a golden output generator (`golden_gen`): two 8-entry LUTs holding the
  full adder's sum and carry, addressed by `{a, b, cin}`;
* an XOR comparing the cell's sum with the golden sum;
* an XOR comparing the cell's carry with the golden carry;
* an OR joining the two XORs.

A 2-of-3 majority gate over the lane outputs gives `err`. This protects both
the reference LUTs and the comparators against a single upset lane.
`tmr_mismatch` (`lane_mismatch` inside the unit) shows when the lanes
disagreed, that is, when the voter masked one lane. The `lut_flip` inputs
invert stored LUT bits of a chosen lane, for testing.

## What is and is not protected

* **Any wrong cell output is caught and repaired.** This covers faults in a
  cell's input MUXes, its function MUXes or their select lines, because the
  checker picks the operand bits independently of the cell.
* **A double flip of both function-MUX select lines never yields a wrong,
  accepted result.** The sum is unchanged. The carry changes only when
  `a_i == b_i`, and the checker catches that case.
* **Dead marks are permanent.** A transient upset retires a cell forever,
  until reset. The number of faults that can be survived without reset is
  the number of spares.
* **Shared blocks are not protected.** These are the control unit, the
  operand registers and the configuration register. A corrupted selection
  code goes unnoticed, because the checker uses the same code. The data bits
  go to the cells but not to the checker, so corrupted data bits are caught
  when the carry MUX selects them.

## Top-level interface (`embryonic_adder`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | begin an addition (ignored while `busy`) |
| `a`, `b` | in | 8 | operands, sampled in the `start` cycle |
| `cfg_we`, `cfg_wdata` | in | 1, 26 | configuration register write |
| `cell_fault` | in | 10 x 2 | test hook: per-cell select-line flips (`emb_pkg::cell_fault_t`) |
| `lut_flip` | in | 3 x 16 | test hook: per-lane LUT bit flips; `[7:0]` sum, `[15:8]` carry |
| `sum`, `cout` | out | 8, 1 | result; hold until the next start |
| `state` | out | 2 | `ST_IDLE`, `ST_RUN`, `ST_DONE`, `ST_FAIL` |
| `busy`, `done`, `fail` | out | 1 | state decodes |
| `error` | out | 1 | the checker rejected the active cell this cycle |
| `tmr_mismatch` | out | 1 | the checker's lanes disagreed this cycle |
| `dead` | out | 10 | retired cells |
| `active_cell` | out | 4 | index of the cell now working |

Tie `cell_fault` and `lut_flip` to zero in normal use.

The parameters are `W` (adder width, 8) and `N_SP` (spares, 2). The derived
parameters (`N`, `SEL_B`, `CW`, `PTR_W`) follow from them. The package
`emb_pkg` holds the shared types and the default sizes.

## Where this design makes its own choices

The cell's MUX structure, the 26-bit register and its contents, the
counter-plus-3-bit-register controller, cell forwarding on error, the
XOR/OR checker and the TMR follow the published architecture. The
following are choices of this implementation:

* **MUX data order.** The order of the data inputs on the sum and carry
  MUXes is the one that makes a full adder.
* **Configuration layout.** The bit order of the configuration fields, and
  the positions of the two data bits at the top, are this design's.
* **Routing.** Cells are drawn as a chain, each passing carry and selection
  bits to its neighbour. Here those values live in the control unit's carry
  and selection registers, and are broadcast to all cells on shared lines.
  The behaviour is the same, since only one cell works at a time.
* **Shared operand registers.** The input-1 and input-2 registers are
  shared by all cells and sit in the top level, not in each cell.
* **Checker operand bits.** The checker's operand bits come from the control
  unit's own selection MUX.
* **TMR scope.** TMR covers the whole checker lane, not only the golden
  generator.
* **Control details.** The following are not specified by the architecture
  and were chosen here:
  * one bit per clock;
  * carry into bit 0 fixed at 0;
  * the `start`/`done` handshake;
  * the `ST_FAIL` state;
  * dead marks that persist until reset;
  * asynchronous reset.
* **Test hooks.** The fault-injection inputs exist for testing.

The published implementation reports 26 LUTs and 6 registers on a Zynq-7000
FPGA. This RTL keeps every register explicit: 74 flip-flops in total, of
which 26 are configuration, 16 are operands, 8 are result and 10 are dead
marks. It has not been mapped to an FPGA.

## Files

| file | contents |
|---|---|
| `rtl/emb_pkg.sv` | sizes, `cell_fault_t`, full-adder LUT constants, `ctrl_state_e` |
| `rtl/ea_cell.sv` | one MUX full-adder cell |
| `rtl/ea_cell_array.sv` | 8 working + 2 spare cells |
| `rtl/config_reg.sv` | 26-bit configuration register |
| `rtl/golden_gen.sv` | reference sum/carry LUTs |
| `rtl/self_check.sv` | TMR self-check unit |
| `rtl/control_unit.sv` | sequencing, cell forwarding, result register |
| `rtl/embryonic_adder.sv` | top level |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_fault_campaign.sv` | 30 random single-bit fault injections, one per addition |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
Build and run one with Verilator 5, for example the end-to-end test. The
package goes first, and `-y rtl` finds the modules by name:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/emb_pkg.sv \
          tb/tb_embryonic_adder.sv --top-module tb_embryonic_adder -o sim
./obj_dir/sim
```

What the testbenches check:

* **`tb_embryonic_adder`** runs at the default size and checks every
  addition's result and cycle count. It exercises each mechanism and
  reports a failure for any that never happens:
  * fault detection and retry;
  * work on spare 1 and on spare 2;
  * dead cells being skipped later;
  * a checker lane upset being outvoted;
  * running out of cells;
  * a configuration rewrite.
* **`tb_fault_campaign`** resets, injects one select-line flip into a random
  working cell, and adds random operands, 30 times. It expects all 30
  faults to be repaired, with the right sum, exactly one dead cell and 9
  cycles.
* **`tb_control_unit`** tests the controller against behavioural models of
  the cells and the checker. It covers multiple faults in one addition and
  a non-default configuration.

All testbenches pass. Each module's testbench also fails against a deliberately
broken copy of that module.
