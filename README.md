# CIDAN-XE: threshold-logic processing elements next to DRAM row buffers

CIDAN-XE computes inside a DRAM chip without touching the DRAM arrays, the
sense amplifiers or the DRAM timing rules. A small processing element, the
**NPE** (neuron processing element), sits behind every group of four bitline
sense amplifiers (BLSA) of a bank. When a row is activated, every NPE latches
its four bits of that row. All NPEs then run the same short schedule, and the
results are driven back onto the bitlines and written into a row. With
8192-bit rows and four banks used in parallel, one instruction works on
8192 four-bit lanes at once.

The NPE is built from four **artificial neurons**. Each neuron is a clocked
threshold gate, so one cell can be an AND, OR, majority, a carry or a sum
bit, depending on which inputs are routed to it and which threshold is set.
Multi-bit operations are short cycle-by-cycle schedules over the four
neurons. This repository holds synthesizable SystemVerilog for:

- the neuron, the NPE and the NPE array;
- the sequencer that generates the schedules;
- the bank multiplexer;
- the controller that turns an instruction into DRAM commands.

## The artificial neuron

`artificial_neuron` has four binary inputs a, b, c, d with weights 1, 1, 1
and 2, and a threshold T of 1, 2 or 3. On a clock edge with `en` high it
stores

    q <= (a + b + c + 2d >= T)

With `en` low, q holds. Some useful settings:

| function | inputs | T |
|---|---|---|
| OR(a,b) | a, b | 1 |
| AND(a,b) | a, b | 2 |
| MAJ(a,b,c), a carry | a, b, c | 2 |
| NOT a | ~a | 1 |
| sum bit, from x, y, c_in and the carry out c | x, y, c_in, d=~c | 3 |

The sum bit works because x + y + c_in - 2c is the sum bit. Writing -2c as
2·(1-c) - 2 turns it into a positive-weight gate with T=3. Negative terms
are always handled this way: invert the input and raise the threshold.

## The NPE

`npe` holds four neurons, AN0 to AN3. Each neuron has:

- a 16-bit local register (`local_register`);
- four input muxes (`routing_mux`), one per input a, b, c, d.

Each mux has a 5-bit select, plus an invert bit that this design adds:

| select | source |
|---|---|
| 0, 1 | constant 0, constant 1 |
| 2 | the neuron's own output (feedback) |
| 3..5 | the other three neurons of the NPE; neighbour i of AN n is AN (n+1+i) mod 4 |
| 6..9 | AN0..AN3 of the previous NPE in the array |
| 10..11 | AN0..AN1 of the next NPE |
| 12..27 | bits 0..15 of the neuron's own register |
| 28..31 | constant 0 |

A neuron can read only its own register. To give every neuron every operand
bit, a load is **broadcast**: the NPE's four BLSA bits go into the same
nibble of all four registers. By convention:

- operand X goes in nibble 0 (bits 0..3);
- Y goes in nibble 1 (bits 4..7);
- Z goes in nibble 2 (bits 8..11);
- nibble 3 (bits 12..15) is scratch.

Besides loading, a register can:

- store its neuron's output in one bit (`ROP_WRQ`);
- rotate right by a nibble (`ROP_ROT`);
- clear (`ROP_CLR`).

A load wins over any other register operation.

On a write, the NPE drives four bits back to its bitlines. Those bits are
either the four neuron outputs (bit k from AN k) or one nibble of one
neuron's register. `wb_sel_t` chooses which.

The control word (`npe_ctrl_t`) has one field per neuron: four selects, four
invert bits, the threshold, the enable, the register operation and the
register bit address. All NPEs of the chip share the same control word.

## Operation schedules (`npe_sequencer`)

The sequencer produces the control word cycle by cycle. In the schedules
below, x_t, y_t and z_t are bits of the three operands, and each step is one
clock.

| op | cycles | schedule | result |
|---|---|---|---|
| NOT, AND, OR, NAND, NOR, MAJ | 1 | AN k computes bit k | neuron outputs |
| XOR | 2 | AN k: x_k & y_k, then x_k + y_k + 2·~(x&y) ≥ 3 | neuron outputs |
| ADD | 6 | ripple carry, see below | sum nibble in AN1 bits 12..15 |
| CARRY | 1 | AN0 copies the carry left in AN2; the others give 0 | {000, carry} |
| CMP | 4 | AN0: g ← x_t + ~y_t + g ≥ 2 for t = 0..3 | {000, X>Y} |
| RELU | 5 | CMP, then AN k: x_k & g | X if X>Y, else 0 |
| SEL | 4 | g to every neuron; x&g; y&~g; OR of the two | X if g, else Y |
| MUL | 48 | shift and add, see below | low nibble of X·Y |
| MULHI | 1 | nothing evaluated | high nibble of the last X·Y |

Bitwise operations follow one truth table per neuron. NAND and NOR invert
both inputs and use the OR or AND threshold.

**ADD.** Three neurons work as a pipeline:

- AN2 computes carry c_t = MAJ(x_t, y_t, c_{t-1}) in cycles 0..3. It gets
  c_{t-1} through its feedback input.
- AN3 copies AN2 one cycle later, so it holds c_{t-2} while AN2 holds
  c_{t-1}.
- AN1 computes sum bit s_{t-1} in cycles 1..4 from x_{t-1}, y_{t-1}, AN3
  (carry-in) and ~AN2 (carry-out, weight 2), with T=3.
- From cycle 2 to 5, AN1 writes its previous result into register bit
  12 + (t-2).
- The write-back then takes AN1's nibble 3.

That gives five evaluation cycles and one store cycle:

| cycle | AN2 | AN3 | AN1 | AN1 register |
|---|---|---|---|---|
| 0 | c0 | c_in | – | – |
| 1 | c1 | c0 | s0 | – |
| 2 | c2 | c1 | s1 | bit 12 ← s0 |
| 3 | c3 | c2 | s2 | bit 13 ← s1 |
| 4 | – | – | s3 | bit 14 ← s2 |
| 5 | – | – | – | bit 15 ← s3 |

**Chaining.** Operands wider than four bits are processed as 4-bit
segments, lowest first, with `chain=1` on every segment but the first:

- A chained ADD uses the carry still held in AN2 as c_in.
- A chained CMP starts from the comparison still held in AN0. A higher
  segment overrides the result only when its bits differ, so after the top
  segment AN0 holds the comparison of the whole operand.
- CARRY writes out the final carry. It clears AN1..AN3, so it must end an
  addition chain.
- An 8-bit add is ADD, ADD (chained), CARRY.
- A 32-bit accumulation is eight chained ADDs and a CARRY.

**Max pooling** is CMP over all segments followed by one SEL per segment:

- The first SEL (`chain=0`) takes g from AN0 and keeps it in bit 15 of
  every register.
- Later SELs (`chain=1`) read g from bit 15, because AN0 has been
  overwritten by then.
- A 2×2 window is two maxima and then the maximum of those two.

**MUL** runs shift-and-add over the four bits of Y. The product grows in
an 8-bit accumulator in register bits 8..15.

- For each i, AN3, which keeps X and Y, forms the partial product
  P_i = X & y_i one bit per cycle.
- AN0..AN2 copy P_i into their register bits 0..3, one cycle behind AN3.
- For i = 0 the copy goes straight into accumulator bits 8..11, after the
  registers are cleared. That takes 6 cycles.
- For i = 1..3, accumulator bits 8+i..11+i and P_i go through the ADD
  pipeline: a carry neuron, AN3 as the carry buffer, and AN1 as the sum
  neuron.
  - AN1 writes the four sum bits and the carry out back into the
    accumulator.
  - A fourth neuron copies each of those bits one cycle later.
- The carry neuron must read the current accumulator from its own register.
  So the carry and copy roles swap between AN2 and AN0 from one iteration
  to the next: AN2 for i = 1 and 3, AN0 for i = 2.
- Each of these iterations takes 14 cycles: 6 to form the partial product,
  8 for the add.

The product ends in AN1. MUL writes back its low nibble. A following MULHI,
which reads no rows, writes back the high nibble.

An 8×8-bit multiply splits both operands into halves. It computes the four
4-bit products V0 = X_L·Y_L, V1 = X_H·Y_L, V2 = X_L·Y_H and V3 = X_H·Y_H,
then adds them as V0 + ((V1+V2) << 4) + (V3 << 8) with chained ADDs. That
is 8 MUL/MULHI and 6 ADD/CARRY instructions (`tb_workload_mul8`).

**Average pooling** is a series of ADDs. The division by a power of two is a
choice of which bit positions to read back.

## From the DRAM to the NPEs

A row of `ROW_BITS` bits feeds `ROW_BITS/4` NPEs (`npe_array`). NPE p sees
row bits 4p..4p+3. Its neighbour lines come from NPEs p-1 and p+1, and are 0
at the ends of the array.

There are four arrays, one for each bank used in parallel. `bank_npe_mux`
connects them to the chosen bank group, banks 4g..4g+3:

- array i reads bank 4g+i;
- only the banks of that group can be written.

With the default 16 banks there are four groups. The number of NPEs is the
same whatever the bank count.

## The controller (`cidan_controller`)

One instruction (`instr_t`) gives:

- the operation;
- the chain bit;
- the bank group;
- up to three operand rows (X, Y, Z) and a result row.

The same row address is used in all four banks of the group, so the data
must be laid out across the four banks row by row. An instruction runs as a
series of **rounds**, one round per operand, followed by a compute step and
a write-back round:

1. **Operand round.**
   - Activate the operand row in banks 0, 1, 2, 3 of the group, one after
     another.
   - T_RCD after each ACT, latch that bank's row into its NPE array
     (register nibble = operand number).
   - When all four are latched and T_RAS has passed since the last ACT,
     issue a single PRE that closes all four banks.
2. Repeat for the next operand once T_RP has passed.
3. **Compute.** The sequencer starts right after the last operand PRE, so
   the schedule runs while the banks precharge.
4. **Write-back round.**
   - Activate the result row in the four banks.
   - T_RCD after each ACT, issue a WR: that array drives its bank's
     bitlines.
   - PRE once T_WR and T_RAS have passed.

A two-operand instruction is therefore:

    ACT×4, PRE, ACT×4, PRE, compute, ACT×4, WR×4, PRE

Every ACT obeys these rules, across rounds and across instructions:

- **tRRD**: at least T_RRD cycles since the last ACT.
- **tFAW**: at most four ACTs in any T_FAW window.
- **tRP**: at least T_RP cycles since the last PRE.

Only one command is issued per clock, and a WR that is due goes before an
ACT. The write-back round waits for the sequencer to finish. `instr_done`
pulses one cycle after the final PRE. A CARRY instruction reads no operands,
so it goes straight to compute.

The defaults are DDR3-1600 timings at a 1.25 ns clock:

| parameter | default (cycles) | value |
|---|---|---|
| T_RCD | 11 | 13.75 ns |
| T_RAS | 28 | 35 ns |
| T_RP | 11 | 13.75 ns |
| T_RRD | 6 | 7.5 ns |
| T_FAW | 24 | 30 ns |
| T_WR | 12 | 15 ns |

With these defaults a 4-bit ADD takes 2·(3·6+28+11) + (3·6+28) + 2 = 162
cycles, about 200 ns. Almost all of it is DRAM row cycling; the NPE
schedule itself is 6 cycles.

The NPEs run on the command clock. A slower NPE clock would need a
synchronizer that this design does not have.

## Top level (`cidan_xe_top`)

The top holds:

- the controller;
- the sequencer;
- the bank multiplexer;
- four NPE arrays.

The DRAM itself is outside. Each bank's sensed row comes in on `bank_rd`.
The rows the NPEs drive go out on `bank_wr`/`bank_wr_en`. Commands go out on
`cmd`, `cmd_bank` (= 4·group + bank) and `cmd_row`.

Defaults: `ROW_BITS=8192` (8192 NPEs in total, 2048 per bank) and
`NUM_BANKS=16`. Per NPE, the state is 4 neuron flip-flops and 64 register
bits, so the default top holds about 560k flip-flops.

## Departures from the published CIDAN-XE and what is missing

- **Multiplication takes 48 cycles, not 21.** The published 4-bit
  multiplier works differently:
  - it forms all four partial products in parallel on the four neurons;
  - it adds them in pairs, in 5 + 5 cycles;
  - it adds the two sums, in 7 cycles.

  That relies on neurons reading each other's stored bits. Here a neuron
  reads only its own register and the other neurons' current outputs, so
  MUL is a serial shift-and-add. It also needs a second instruction, MULHI,
  to write back the upper four bits of the product.
- **The shared buffer is not built.** The published design writes results
  to another bank through a buffer shared among banks, whose size and
  protocol are not specified. Here results go back to the banks they came
  from, in any row the instruction names. Keeping a set of reserved output
  rows per bank is left to software.
- **The write-back activates the result row.** The published command
  sequence shows WR directly after compute. A DRAM write needs an open row,
  so this design adds ACT×4 before the WRs and a PRE after them.
- **NOT and the negative weights use inverted inputs.** The neuron has only
  positive weights. The invert bit on each mux input realises NOT and the
  subtracted terms of the sum and compare functions.
- **The comparator runs on AN0.** The published equations and one of the
  published schedule figures put it on different neurons; this design
  follows the equations.
- **Own choices:**
  - the mux source encoding;
  - the neighbours outside the NPE;
  - broadcast loading into register nibbles;
  - the XOR, CARRY, SEL and MUL schedules;
  - the chain bit;
  - the instruction format and handshake;
  - the bank grouping;
  - tRCD, tRAS, tRP and tWR;
  - synchronous active-low reset everywhere.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_artificial_neuron` | all input/threshold combinations, enable and reset |
| `tb_routing_mux` | every select code with and without inversion |
| `tb_local_register` | random load/WRQ/ROT/CLR sequences against a model |
| `tb_npe` | random control words against a reference NPE model |
| `tb_npe_array` | loads, neighbour lines across NPEs and array ends, write-back |
| `tb_npe_sequencer` | every operation on random operands, MUL on all 256 operand pairs, chained 8-bit ADD, CMP and maximum, cycle counts |
| `tb_bank_npe_mux` | group selection and write enables |
| `tb_cidan_controller` | command timeline against the timing rules, using a behavioural DRAM (`tb/dram_model.sv`) |
| `tb_cidan_xe_top` | end to end at reduced size (see below) |
| `tb_cidan_xe_full` | the top at its default size (see below) |
| `tb_workload_raw32` | 32-bit ADD, compare, max, XOR, OR, NOT as chained 4-bit instructions; prints cycles per 32-bit operation |
| `tb_workload_mul8` | 8×8 → 16-bit multiplication from four 4-bit products and chained adds |

`dram_model` flags any timing violation. Until T_RCD after an ACT, it shows
an inverted row, so a premature latch is caught.

`tb_cidan_xe_top` runs with 32-bit rows, 8 banks and short timings. It runs
every operation, chained 8-bit add, compare and maximum, 2×2 max pooling,
ReLU and 4-bit multiplication on two bank groups. It also counts that each of these happens at least
once:

- an ACT held back by tRRD, by tFAW and by tRP;
- a WR taking the slot of an ACT;
- compute during a precharge;
- add and compare chaining;
- a bank-group switch.

`tb_cidan_xe_full` instantiates the top with all defaults: 8192 NPEs and 16
banks. It runs one ADD and one CARRY and checks all 8192 lanes and the
instruction latency. Verilator turns it into several hundred C++ files. The build takes about
16 minutes on one core and needs more than 5 GB of memory, so run it on its
own. The simulation itself takes about a second.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -o sim --Mdir obj \
        rtl/cidan_pkg.sv $(ls rtl/*.sv | grep -v cidan_pkg) \
        tb/dram_model.sv tb/tb_npe.sv --top-module tb_npe
    ./obj/sim

Parameters of the reduced end-to-end test are at the top of
`tb/tb_cidan_xe_top.sv`. To change an operation, edit its `case` branch in
`npe_sequencer`; the testbenches' reference models show the expected
results.
