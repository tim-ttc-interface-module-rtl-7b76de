# TIM: TTC Interface Module for the SCT and Pixel ROD crates

One TIM sits in each crate of Read-Out Drivers (RODs) for the ATLAS silicon tracker (SCT) and pixel detector. It has two jobs:

- **Downstream.** It takes the timing, trigger and control (TTC) stream and passes it to every ROD in the crate. Its back-of-crate card (BOC) delivers that stream over an 8-line bus. The stream is:
  - the 40.08 MHz bunch crossing (BC) clock;
  - the fast commands: Level-1 Accept (L1A), event counter reset (ECR), bunch counter reset (BCR), calibrate (CAL) and front-end reset (FER);
  - for every trigger, the event ID: a 24-bit L1ID, a 12-bit BCID and a trigger type (8 bits plus 2 spare). The event ID goes out on two serial lines.
- **Upstream.** It collects the busy signals of up to 16 RODs and returns their masked OR to the trigger system as the crate busy.

The module works in two modes:

- **Run mode.** Clock, commands and event ID all come from the experiment's TTC system through a TTCrx receiver chip.
- **Stand-alone (SA) mode.** The TIM produces all of it itself, so a crate can be tested with no TTC system. The sources are:
  - its own crystal or an external clock;
  - VME commands;
  - NIM/ECL front-panel inputs and a trigger switch;
  - a trigger oscillator and an ECR oscillator;
  - a 32k-word sequencer RAM that plays arbitrary bus patterns.

  A sink RAM of the same size records what was sent, so it can be checked afterwards.

This repository holds a SystemVerilog model of that module:

- synthesizable RTL for all of its logic;
- behavioural models of its programmable clock delay lines;
- a self-checking testbench for every block, plus an end-to-end testbench of the whole module at full size.

## Block structure

The board splits its logic over nine programmable devices. The RTL keeps that split:

| Board function | Module(s) |
|---|---|
| VME interface | `vme_interface` |
| Registers (in the VME device) | `tim_regs` |
| Stand-alone A: VME/external commands, synchronisers, trigger delay | `sa_gen_a` |
| Stand-alone B: automatic triggers | `sa_gen_b`, with two `rate_oscillator`s (trigger and ECR/FER) |
| L1ID | `l1id_gen` |
| BCID and trigger type | `bcid_ttid_gen` |
| Serialiser and FIFOs | `serialiser`, two `tim_fifo` (ID FIFO, TT FIFO) |
| Output mapping | `output_mapping` |
| Sequencer and sink | `seq_sink`, two 32k x 8 `tim_ram` |
| ROD busy | `rod_busy` |
| TTC interface (TTCrx outputs) | `ttc_interface` |
| Output flip-flops, TTC(0-7)A and B | `ttc_output_reg` |
| Clock sources and selection | `clock_select` |
| Delay lines DL1-DL4 | `prog_delay_line` (behavioural) |

`tim_pkg` holds the shared constants and types:

- the fast-command struct `fast_cmd_t`, with one single-cycle pulse per command;
- the bus bit positions;
- the register map;
- the control register layout.

`tim_top` wires everything together.

## Clocks and the two modes

Clocking is the least obvious part of the module. Every output has to stay in step with the clock that is actually in use, while the source of that clock can change.

- **SA clock.** The 80.16 MHz crystal is divided by two (`intclk`). Each clock path has its own enable:
  - `intclk` is gated by `enintclk`;
  - the three external clock inputs (one NIM, two ECL) are ORed, then gated by `enextclk`.

  The two gated paths are ORed into `clkin`. Delay line DL1 then shifts `clkin` by the amount set in register 0A.
- **BC clock.**
  - In SA mode the BC clock is the delayed SA clock.
  - In Run mode it is the TTCrx clock.

  The BC clock drives the 9 + 8 clock outputs to the RODs and BOCs.
- **TTC clock.** DL2 (the ROD setup delay, `sw2`) turns the BC clock into the TTC clock. The TTC clock clocks the two 8-bit output registers and goes to the front panel.
- **Logic clock.** The clock for all internal logic is the TTC clock passed through:
  - DL3, the TTC setup delay (`sw3`), in Run mode only, to line up with the TTCrx data;
  - then DL4, the TIM setup delay (`sw4`).

Every delay line is modelled as a pure transport delay:

- delay = 500 ps + setting × 250 ps;
- each edge is rescheduled on its own, so a clock shorter than the delay still passes through intact.

The real parts are separate chips. For synthesis, put a delay cell or a wire in their place.

### Mode and source

The TTC bus source is chosen from the control register:

- `seq_mode` set: the sequencer drives the bus;
- otherwise, `samode` set: the stand-alone generators;
- otherwise: the TTCrx.

In Run mode every TTCrx command passes through one register in `ttc_interface`, then the output register. That places it on the backplane two logic clocks after the TTCrx gives it, with no other delay in the path.

The FER line has one option: with `fer_from_ecr` set, it is driven together with every ECR.

## Event ID path

This is the part with the most state.

1. **A trigger arrives.**
   - In SA mode, `l1id_gen` counts L1As: an ECR clears the counter, so the first event after an ECR has L1ID 0. `bcid_ttid_gen` counts BC clocks and is cleared by BCR; on each L1A it captures that count as the BCID, together with the trigger type from register 0C.
   - In Run mode the TTCrx delivers the event ID for each L1A some cycles later, on its multiplexed counter bus (`ttc_interface`). The BCID is strobed first, then the low and high halves of the event number. The trigger type comes on the TTCrx data port. `ttc_interface` raises `id_valid` once both the high half and the trigger type have arrived, in either order.
2. **Queueing.** The 36-bit {L1ID, BCID} word is written to the ID FIFO and the trigger type to the TT FIFO (`tim_fifo`, first-word fall-through, 256 deep by default).
   - A write to a full FIFO is dropped.
   - A dropped write sets a sticky overflow flag, which can be read in STATUS and cleared through the CMD register.
3. **Serialising.** The `serialiser` starts a frame whenever it is idle and both FIFOs hold an entry. It pops both FIFOs in the same cycle, so the two always stay in step.

The serial frame, sent one bit per logic clock:

```
Serial ID:  1 | L1ID[23] ... L1ID[0] | BCID[11] ... BCID[0] | 0 (gap)
Serial TT:  1 | TT[9] ... TT[0]      | 0 ...                | 0 (gap)
cycle:      0   1 ............................................. 36  37
```

A new frame can start every 38 clocks. At 40.08 MHz that is a sustained 1.05 MHz of triggers; the FIFOs absorb bursts above that rate.

### Bus lines

| TTC bit | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| signal | L1A | ECR | BCR | CAL | Serial ID | Serial TT | FER | spare |

A sequencer word is placed on the bus as it is, bit for bit.

## Stand-alone command sources

- **VME.** Writing bits [5:0] of register 02 gives one pulse of each selected command (the same order as `fast_cmd_t`: L1A, ECR, BCR, CAL, FER, spare).
- **Front panel.** Six NIM and six ECL lines each carry one command. Each line:
  - passes a three-stage synchroniser into the logic clock domain;
  - is edge-detected, so a long input level gives one pulse;
  - is gated by `ext_en` and its bit in register 2A.

  The trigger switch is a seventh trigger input.
- **Trigger delay.** External and switch triggers go through a programmable delay of 0-255 whole clock cycles (register 0E).
- **Oscillators.** The trigger oscillator (period in register 04) drives `sa_gen_b`, which can stop after a set number of triggers (register 2C; 0 means endless). The ECR oscillator (register 06) drives ECR, and FER as well when `fer_from_ecr` is set.
- **Busy inhibit.** With `busy_inhibit` set, stand-alone triggers are dropped while the synchronised crate busy is high.

## Sequencer and sink

The sequencer RAM (32768 x 8) is loaded through registers 16/18: an address register, then a data register that advances the address on each access.

- **Playback.** Start and stop are bits 6 and 7 of register 02. A start plays addresses 0 to SEQ_END (register 1A), one word per clock. With `seq_loop` set, playback repeats until stopped.
- **Sink.** With `sink_en` set, the sink RAM records the registered TTC(0-7)A bus every clock until it is full. A new rising edge of `sink_en` starts again at address 0. The processor reads the words back through registers 1C/1E and the count of recorded words in register 20.

## Linking two crates

Two TIMs can run a multi-crate test with no TTC system, one driving the other:

- The master's front-panel clock output goes to one of the slave's ECL clock inputs.
- The master's front-panel copy of the bus goes to the slave's six ECL command inputs: L1A, ECR, BCR, CAL, FER and spare.

The slave runs in SA mode on the external clock (CTRL = 0x0085), with all external commands enabled (register 2A = 0x3F). It counts the same L1As and resets, so it produces the same L1IDs. It serialises them itself. The serial lines themselves are not passed between the two modules.

Each external input goes through the slave's synchroniser and edge detector. As a result:

- the slave's commands trail the master's by a few clocks;
- two commands on consecutive clocks would merge into one.

## ROD busy

`crate_busy` is the OR of `rod_busy & mask`. It is combinational, so the busy reaches the trigger system with no clock in the way.

For monitoring, each ROD busy is synchronised and can be read as it is now (register 12). A sticky copy (register 14) records whether that ROD has been busy; writing 1 to a bit clears it.

## VME and registers

`vme_interface` is a D16 slave. It answers:

- A24 accesses (address modifiers 39/3D), with the base on A23-A16;
- A32 accesses (09/0D) when `cfg_a32` is set, with the base on A31-A16.

The base is either the preset `cfg_base` or, with `cfg_use_ga`, taken from the slot's geographical address (GA on A23-A19). Offsets run up to 0xFF.

The strobes pass through synchronisers. After that, the slave:

- gives DTACK two to three clocks after the data strobe arrives;
- holds DTACK until the data strobe is released.

`irq_n` is asserted while `irq_en` is set and there is a clock failure, which means Run mode without TTCrx ready. The interrupt-acknowledge cycle is not modelled.

| Offset | Register | Access |
|---|---|---|
| 00 | CTRL: [0] samode, [1] enintclk, [2] enextclk, [3] seq_mode, [4] fer_from_ecr, [5] auto_trig, [6] auto_ecr, [7] ext_en, [8] busy_inhibit, [9] seq_loop, [10] irq_en, [11] sink_en. Reset value 0x0003 (SA mode, internal clock). | R/W |
| 02 | CMD: [5:0] fast commands, [6] sequencer start, [7] sequencer stop, [8] clear FIFO overflow | W |
| 04 | trigger oscillator period (clocks; 0 = off) | R/W |
| 06 | ECR oscillator period | R/W |
| 08 | trigger window size / delay (stored only) | R/W |
| 0A | SA clock delay (DL1), [7:0] | R/W |
| 0C | SA trigger type, [9:0] | R/W |
| 0E | external trigger delay, [7:0] | R/W |
| 10 | busy mask | R/W |
| 12 | busy status | R |
| 14 | busy latched; write 1 to clear | R/W1C |
| 16 / 18 | sequencer address / data | R/W |
| 1A | sequencer end address | R/W |
| 1C / 1E | sink address / data | R/W / R |
| 20 | sink word count | R |
| 22 / 24 | last L1ID [15:0] / [23:16] | R |
| 26 | last BCID | R |
| 28 | STATUS: [0] trigger count reached, [1] crate busy, [2] serialiser busy, [3] sink full, [4] sequencer running, [5] ID FIFO empty, [6] ID FIFO full, [7] FIFO overflow, [8] clock failure | R |
| 2A | external command enables, [5:0] | R/W |
| 2C | number of automatic triggers (0 = endless) | R/W |
| 2E | automatic triggers issued | R |

## Where this model departs from the board, or chooses for it

The original description names most of these functions but gives no encodings, formats or sizes for them.

**Own choices.** These are all decisions of this model:

- the register map, except registers 08 and 0A;
- the bus bit positions;
- the serial frame format;
- the FIFO depth;
- the delay-line step;
- the trigger-delay range;
- the oscillator and trigger-count mechanisms;
- how the TTCrx broadcast bits map to CAL (bit 2), FER (bit 3) and spare (bit 4).

**Not built:**

- the trigger window: delay lines DL5-DL8, set from register 08. How the window is formed and used is not defined, so register 08 is only stored.
- the 36 front-panel LEDs, and the separate NIM/ECL front-panel outputs of the stand-alone and mapping devices. The front panel gets a single 8-bit copy of the TTC bus (`fp_ttc`).
- the two clock LEDs. The NIM and two ECL front-panel clock outputs are one port, `clk_out`.
- the TTCrx chip itself, the crystal, the line drivers and receivers, and the JTAG programming chain.

**Clock output count.** The 17 BC clock outputs (9 + 8) follow the board's detailed drawing. The functional overview shows 16.

**Model simplifications:**

- The RAMs are synchronous arrays, where the board uses asynchronous SRAM parts.
- The delay lines are behavioural models.

## Simulating

Each block has a testbench `tb/<module>_tb.sv`. It checks the block against an independent model and ends by printing `TB_RESULT checks=<n> failures=<n>`. `tb/ttcrx_model.sv` is a behavioural TTCrx: it makes the 40.08 MHz clock, L1A/BCR/ECR and broadcast commands, and the event-ID strobe sequence.

Build and run the end-to-end test like this:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/tim_pkg.sv tb/tim_top_tb.sv --top-module tim_top_tb
./obj_dir/Vtim_top_tb
```

Any other block works the same way, with its own testbench as the top.

`tim_top_tb` runs the module at its full default size (16 RODs, 32k sequencer and sink, 256-entry FIFOs). It takes about ten seconds, and covers:

- register access through real VME cycles;
- VME, front-panel, switch and oscillator triggers;
- trigger bursts that queue in the FIFOs and one that overflows them;
- busy inhibit;
- ECR and FER;
- sequencer playback recorded by the sink and read back;
- Run mode with TTCrx-driven events and broadcast commands;
- switches between the modes;
- the clock-failure interrupt.

It decodes every serial frame on the bus and compares it with the expected event IDs. It also counts each of these mechanisms, and reports a failure for any that never occurs.

`tim_multicrate_tb` links two full-size modules as described above. It checks that the slave repeats every command and every L1ID of the master, and that its BCIDs keep the master's spacing.

The reset is asynchronous. A two-state simulator produces no falling edge from a signal that starts at 0, so the testbenches drive the reset from 1 to 0 and back.

The simulator used is two-state. Every register that is read has a reset, and the testbenches do not depend on x propagation.
