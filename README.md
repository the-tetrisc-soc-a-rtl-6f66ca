# TETRISC: a quad-core fabric that regroups its cores into lockstep without losing state

TETRISC is a four-core RISC-V system whose cores can run in several ways:

* four independent tasks (performance mode);
* with some cores clock-gated to cool down and reduce power (destress mode);
* in core-level N-modular-redundant lockstep groups: DMR, two independent DMR pairs (D-DMR), TMR, or QMR.

The mode can change at run time, triggered by software or by radiation, temperature and aging sensors. A switch takes a cycle or two and does not stop the system. Joining a redundant group usually means checkpointing the joining core and later restoring it. Here that is avoided by giving every flip-flop of every core a second, "slave" flip-flop. The joining core runs on a copy of its master's state held in the slave flip-flops. Its own state stays frozen in its original flip-flops until it leaves the group.

This repository holds the SystemVerilog of everything around the processor cores. It contains:

* the ResiliCell state registers of each core;
* the HiRel Framework Controller (HFC), which votes, routes, sequences mode switches and counts errors;
* the shared memory: a round-robin crossbar to four Hsiao-SEC-DED-protected, scrubbed SRAM banks;
* a per-core event/interrupt unit.

The RISC-V cores themselves (RI5CY), the analog sensors and the pads are not included. The top level has ports where they connect.

## The ResiliCell

Every core flip-flop is replaced by a `resilicell`. Its state lives in two flip-flops:

* **F**, the original flip-flop, holds the core's own state.
* **S**, the slave flip-flop, is loaded from a multiplexer that picks one of the `NUM_MASTERS` master cores.

Two controls drive the cell. Both are common to all cells of a core.

| `prog` | `red` | F loads | S loads | core logic sees |
|---|---|---|---|---|
| 0 | 0 | own next state `d` | holds | F |
| 1 | 0 | own next state `d` | master's **next** state `master_d[src_sel]` | F |
| x | 1 | holds | own next state `d` | S |

A core joins a group in two steps:

1. **Programming.** S copies the master's next state for `PROG_CYCLES` cycles (default 1). Meanwhile the core keeps running its own task on F.
2. **Switch.** In the same clock edge that ends programming, `red` goes high. From the next cycle the joining core computes from S, which now equals the master's F.

From then on master and member receive the same inputs, so they stay cycle-identical. To leave the group, `red` is dropped. The core continues from F, exactly where it stopped.

S copies the master's *next* state (its D input), not its current output. Because of this the member is already in step with the master in the first redundant cycle.

Three options of the cell are parameters:

* **`NUM_MASTERS`** (1 to 4): fewer multiplexer inputs, so fewer cores can act as master. The default of 4 lets every core be master. An analysis of the fault rates of the extra hardware points to 2 masters as the best reliability trade-off. With `NUM_MASTERS = m`, only cores `0..m-1` can head a group. The HFC refuses a mode whose group master is outside that range.
* **`DAISY`** (vII): S copies the master's *current* state instead. The member then runs one cycle behind the master: a delayed lockstep that resists common-cause faults. It only forms a working lockstep with one-cycle input delay buffers and output compare buffers. These are **not** built in the HFC. Leave `DAISY = 0` in the full system.
* **`HARDEN`** (vIII, per cell via `HARDEN_MASK` in `resilicell_bank`): adds a copy of F and an XOR, so an upset of F while it is frozen in redundant mode raises `err`. The real cell clocks the copy through a delay element. In RTL it is the same clock. The mask exists because hardening should cover only the cells whose upsets matter. Those cells are found by fault injection on a given workload, and the per-flip-flop result is not part of this design, so the mask defaults to no cells hardened.

`resilicell_bank` holds the `WIDTH = 3041` cells of one RI5CY core. That is the number of flip-flops in that core.

## The HiRel Framework Controller (`hfc`)

### Modes as a membership matrix

A mode (`hfc_mode_t`) has two parts:

* a 4x4 bit matrix. Row `m` lists the cores in the group whose master is core `m`.
* a 4-bit clock-gate mask.

A valid matrix has these properties:

* every core appears in exactly one row;
* a non-empty row contains its own master;
* only rows `0..NUM_MASTERS-1` are used.

Predefined matrices are in `tetrisc_pkg`:

| mode | matrix | groups |
|---|---|---|
| performance | `MATRIX_PERF` | {0} {1} {2} {3} |
| DMR | `MATRIX_DMR` | {0,1} {2} {3} |
| D-DMR | `MATRIX_DDMR` | {0,1} {2,3} |
| TMR | `MATRIX_TMR` | {0,1,2} {3} |
| QMR | `MATRIX_QMR` | {0,1,2,3} |

Destress is any mode with clock-gate bits set. Cores inside a group of two or more are never gated.

### Voting and routing (OML / IML)

The output multiplexing logic (`hfc_oml`) runs one programmable voter per group (`nmr_voter`). Each voter takes a bitwise majority over the members' complete bus requests (request, write enable, address, write data). The result goes out on the master's crossbar port. Ports of the other members stay idle.

On a tie (DMR, or 2:2 in QMR) the master's bit is forwarded and a *voter error* is raised. A member whose request differs from the forwarded value gets a *discrepancy*. So:

* TMR corrects one faulty core;
* QMR corrects one and detects two;
* DMR only detects.

The input multiplexing logic (`hfc_iml`) gives every member the master port's response and interrupt. All members of a group therefore see identical inputs.

### Sequencing a mode change (`rc_sequencer`)

When the wanted mode differs from the active one, the sequencer programs every core that gets a new master. It then makes the new mode active and sets `red` of all group members in one clock edge. It also:

* keeps a programmed core and its master clocked;
* sets `core_clk_en` from the mask of the active mode;
* postpones the switch while a joining or newly gated core has a granted bus access whose read data is still to arrive, so no response is lost.

A change that programs no core (leaving groups, gating) takes effect on the next edge. A change that programs cores takes effect `PROG_CYCLES` cycles later.

### Registers and actions

The HFC registers sit at `0x1000_0000`. They use the common bus, described under "Memory" below.

| offset | name | access | contents |
|---|---|---|---|
| 0x00 | MODE | rw | [15:0] matrix, [19:16] clock-gate mask: user-defined mode |
| 0x04 | ACTION | rw | [0] irq on discrepancy, [1] irq on voter error, [2] clock off discrepant core, [3] resynchronise discrepant core |
| 0x08 | SENSOR_EN | rw | which sensor alarms select SENSOR_MODE |
| 0x0C | SENSOR_MODE | rw | mode used while an enabled alarm is present |
| 0x10 | STATUS | ro | [0] reconfiguration busy, [1] sensor mode wanted |
| 0x14 | ERR | w1c | [3:0] discrepancy per core, [4] voter error, [5] invalid mode written, [9:6] vIII cell upset per core, [10] TMR register upset |
| 0x18 | ACTIVE | ro | mode in force |
| 0x20+4c | ERRCNT[c] | r, write clears | cycles in which core c disagreed with its group vote |
| 0x30+4c | AGING[c] | ro | aging monitor count of core c |
| 0x40 | VERRCNT | r, write clears | cycles with a voter error |

The actions are taken on a member core's discrepancy:

* **Resynchronise:** one programming cycle copies the master's state into the member again. This only happens if the master agreed with the vote.
* **Clock off:** removes the member from its group and gates its clock by rewriting the mode in use.

`irq` is high while an enabled ERR flag is set. It reaches the cores through the event unit.

### Sensor-defined modes

The alarms (`sensor_alarm`) are synchronised by two flip-flops. Suggested order: [0] temperature, [1] aging, [2] SEU monitor / solar particle event predictor. While any alarm enabled in SENSOR_EN is present, SENSOR_MODE is the wanted mode. When the alarms clear, MODE applies again.

The aging registers sample `aging_count[c]` only while core c is clocked. `aging_en[c]` follows the core's clock enable, so the sensor sleeps with a gated core.

All HFC control state (modes, actions, active mode) is held in `tmr_reg` triple-redundant registers. Each copy reloads the voted value every cycle.

## Memory

Bus (`tetrisc_pkg`): `mem_req_t {req, we, addr, wdata}` and `mem_rsp_t {gnt, rvalid, err, rdata}`. Timing:

* `gnt` comes in the request cycle;
* `rvalid` (with `rdata` or `err`) comes exactly one cycle after a granted access, for reads and writes alike;
* accesses are 32-bit words only.

`mem_xbar` decodes these address ranges:

* `0x0000_0000 ... NUM_BANKS*WORDS*4 - 1`: banks, contiguous;
* `0x1xxx_xxxx`: the peripheral port. Address bit 12 picks the HFC or the event unit in the top.

Any other address is answered with `err`. Each target has its own round-robin arbiter. In QMR all four cores share one port, so the memory sees the group as a single initiator.

`ecc_mem_bank` wraps one `sram_macro` of 8192 x 40 bits. Four banks give 128 KiB.

* **Writes** are encoded with a Hsiao (39,32) SEC-DED code (`hsiao_pkg`). Data column *i* of the H matrix is the *i*-th smallest 7-bit value of weight 3, and the check bits are the unit columns. Bit 39 is stored as 0.
* **Reads** are decoded. A single-bit error is corrected in the returned data and written back in a later cycle, with priority over the bus. A double error returns `err`.
* **Scrubbing:** after every `SCRUB_INTERVAL` (64) idle cycles, a background scrubber reads the next word. A correctable error found there is written back the same way. A write-back is dropped if the bus writes the same word meanwhile.

`corrected` and `uncorrectable` pulse for every event. An uncorrectable error in any bank is an event input of the event unit.

## Event unit

`event_unit` at `0x1000_1000` has a mask register (`0x00+4c`) and a pending register (`0x10+4c`, write 1 to clear) for each core. The event inputs are:

* [0] HFC interrupt;
* [1] uncorrectable memory error;
* the rest external.

`irq[c] = |(pending[c] & mask[c])`. In a lockstep group the IML hands the master's line to all members.

## Top level (`tetrisc_top`)

For each core c, the top contains:

* a latch-based clock gate (`clock_gate`);
* the core's ResiliCell bank.

It also holds one `hfc`, one `mem_xbar`, the banks and the event unit.

A core plugs in through these ports:

* `core_q[c]`: its state;
* `core_d[c]`: its next state;
* `core_req[c]` / `core_rsp[c]`: its bus;
* `core_irq[c]`: its interrupt line;
* `core_clk_en[c]`: whether its clock runs this cycle. A gated core must not change its bus request.

All parameters default to the sizes of the real system:

| parameter | default |
|---|---|
| `STATE_W` | 3041 |
| `NUM_MASTERS` | 4 |
| `NUM_BANKS` | 4 |
| `WORDS` | 8192 |
| `NUM_SENSORS` | 3 |

## Choices of this design

These points are this implementation's own. The system description states only the principle.

* The register maps, the mode encoding, the bus protocol and the address map.
* The error counters count *cycles* of disagreement, not distinct events.
* The tie-breaking rule of the voter: the master wins and a voter error is flagged.
* Programming lasts one cycle. It copies the master's next state rather than its present state.
* Mode switches wait for outstanding bus responses.
* The scrub rate, the write-back policy and the syndrome handling (an odd-weight syndrome that matches no column counts as uncorrectable).
* TMR flip-flops are modelled as three RTL registers with a voter. The radiation-hardened transistor-level flip-flop is a cell design.
* The vII delayed-lockstep buffers are not built (see above). The vIII delay element is not modelled.
* Triple-redundant registers are used for the HFC and sequencer control state only. The crossbar, memory-bank and event-unit registers are plain flip-flops; in a hardened netlist they would be replaced by TMR flip-flops at the cell level, which does not change the RTL behaviour.

## Simulating

Every block has a self-checking testbench `tb/tb_<block>.sv`. Each ends by printing `TB_RESULT checks=N failures=M`. Example with Verilator 5:

```
cd <checkout>
verilator --binary --timing -Irtl -Itb --top-module tb_tetrisc_top \
  rtl/tetrisc_pkg.sv rtl/hsiao_pkg.sv \
  $(ls rtl/*.sv | grep -v _pkg) tb/tb_core_model.sv tb/tb_tetrisc_top.sv
./obj_dir/Vtb_tetrisc_top
```

The two packages must come first. For a unit testbench, the packages plus the testbench are enough: `-Irtl` finds the modules it instantiates.

`tb_tetrisc_top` runs the top with every parameter at its default: 3041-cell state registers and 128 KiB of memory. It takes about a minute. `tb_core_model` is the only model of a core. It is a small behavioural state machine, not a RISC-V core. Its state fills the 3041 cells. It writes and reads back a private pattern stream through the bus, accumulates what it reads, counts interrupts, and obeys register commands from the testbench.

The testbench walks through these modes:

1. performance;
2. DMR;
3. D-DMR;
4. TMR with an injected state upset and resynchronisation;
5. QMR with an upset and clock-off;
6. DMR with an upset that can only be detected;
7. destress;
8. a sensor-triggered TMR.

It checks that group members stay bit-identical to their master. It also checks that every core's pattern stream survives the switches. It injects single-bit memory errors, which get corrected. Finally it counts each mechanism: mode switches, programming, postponed switches, discrepancies, voter errors, resyncs, clock-off, gating, the sensor mode, ECC corrections, bus contention and interrupts.
