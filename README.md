# Precise exception handling unit for a single-issue in-order pipeline

This is a small, area-lean exception unit for a 32-bit, single-issue, in-order
five-stage RISC pipeline (fetch, decode, execute, memory, write-back). It was
conceived for the node processor of a processing-in-memory chip. Most of the
work is left to software; the hardware does only what software cannot.

- **Recognition in one place.** An exception may arise in fetch, decode,
  execute or memory. Every cause is acted on only when its instruction is in
  the memory stage. By then all older instructions have completed. The younger
  ones in fetch, decode and execute are flushed. This is what makes exceptions
  precise.
- **Three hardware vectors, one software dispatcher.** Reset, the undefined
  instruction and the shared "software-vectored" entry each have a fixed
  handler address. Every other cause sets one bit of a 32-bit **Exception
  Source Word (ESW)**. A single handler reads the ESW and dispatches in software.
  The handler's order of examining the bits is the priority scheme, for example
  MSB first.
- **A minimal state-saving set.** On an exception, hardware saves the faulting
  PC (FADR), the next PC (NFADR), the PSW (into SSW) and, for data faults, the
  data address (MADR). It switches to supervisor mode with exceptions disabled.
  Nesting is left to software: a handler that saves FADR/NFADR/SSW may turn
  exceptions back on.

## Handler addresses and exception sources

| Vector | Address |
|---|---|
| Reset | `0x0800_0000` |
| Undefined instruction (also used for breakpoints) | `0x0800_0100` |
| Software-vectored (all ESW causes) | `0x0800_0200` |

ESW bits. **HW** bits are set by hardware lines. **SW** bits are set only by
software through the ESR, and are used by handlers to signal each other (the
"fix-up" and "processing" bits) or by the kernel.

| Bit | Cause | Set by |
|---|---|---|
| 1 / 2 | unmapped / invalid instruction access | HW |
| 3 / 4 | unmapped / invalid data access (MADR captured) | HW |
| 5 | parcel-buffer receive interrupt | HW |
| 6 | parcel-buffer send interrupt (no route) | HW |
| 7 | interval timer | HW |
| 8 / 9 | wide-word / FP instruction while its PSW enable is 0 | HW |
| 10 | address fault fix-up | SW |
| 11 / 12 | received packet processing / send error processing | SW |
| 15 | FP divide by zero (OR over 8 lanes) | HW |
| 17 | FP overflow or underflow (OR over 8 lanes) | HW |
| 18 | context swapper | SW |
| 19 | system call | HW |
| 20 | privileged instruction in user mode | HW |
| 21 | scalar ALU overflow or divide by zero | HW |
| 22 | wide-word integer overflow (OR over 8 lanes) | HW |
| 23 | FP IEEE 754 inexact/invalid (OR over 8 lanes) | HW |
| 24 / 25 / 26 | integer / WW / FP fix-up | SW |
| 28 / 29 / 30 / 31 | lock buzzer / thread rescheduler / thread dispatcher / return to user mode | SW |
| 0, 13, 14, 16, 27 | reserved for the kernel | SW |

## How an exception flows

1. **Capture** (`esw_reg`). A hardware line sets its ESW bit. It stays set until
   software writes the **ERR** (exception reset register) with that data bit at 1.
   Software sets a SW bit by writing the **ESR** (exception set register).
   Hardware bits ignore ESR. A set and a clear of the same bit in one cycle give
   clear.
2. **Detection** (`exc_detect`). The ESW's *next* value is ORed with its current
   value, so a bit being raised this cycle counts at once. The result is masked
   by the **EMR** (exception mask register, 1 = enabled) and OR-reduced together
   with the undefined-instruction flag. It is then gated by the PSW's global
   exception-enable bit, giving `excep_detected`. The unit takes the exception
   (`exception`, one cycle) only outside a handler and on a valid memory-stage
   instruction.
3. **Taking it** (`pc_src_sel`, `fault_regs`, `psw_reg`). In that cycle,
   `pipeline_flush` is asserted and `next_pc` is the handler address. At the
   clock edge:
   - FADR takes `pc_mem` and NFADR takes `pc_ex`.
   - SSW takes the PSW.
   - In the PSW, the mode bit becomes supervisor (0) and exception-enable
     becomes 0. The WW/FP enable bits are kept, so the handler can skip saving
     register files the interrupted code could not have used.
   - The instruction in the memory stage is cancelled. It is re-executed if the
     handler returns to FADR.
4. **Return** (`rfe_delay_slot`). RFE is a delayed branch.
   - When RFE is in decode, `next_pc` becomes FADR.
   - The handler is not finished when RFE itself completes. It finishes when
     RFE's **delay-slot instruction** reaches the memory stage.
   - At that point `excep_finished` pulses, the PSW is reloaded from SSW and
     exceptions are enabled again.
   - If a cause is still pending, it is taken on the very next instruction,
     which is the one at FADR. The delay slot has already run. If completion
     happened at the RFE itself, the pending exception would flush the delay
     slot before it executed.

### Why NFADR exists

Branches have one delay slot. Suppose the faulting instruction sits in the delay
slot of a taken branch. FADR alone cannot tell the handler where execution
continues afterwards. NFADR holds the PC of the instruction that was in execute,
which is the branch target. If `NFADR != FADR + 4`, the handler knows it
interrupted a delay slot. To resume after the faulting instruction (system call,
emulated instruction), it writes NFADR into FADR before RFE. The end-to-end test
does exactly this for a system call placed in a delay slot.

Similarly, the handler uses the PSW's WW/FP enable bits (saved in SSW) to decide
which register state needs saving.

## Timing summary

| Event | Cycle |
|---|---|
| Cause present in memory stage, enabled, not in handler | `exception`, `pipeline_flush`, `next_pc` = vector (combinational) |
| Next edge | FADR, NFADR, SSW, PSW, handler state updated; vector fetched |
| RFE in decode | `next_pc` = FADR (combinational) |
| 3 stage advances later (delay slot in memory stage) | `rfe`, `excep_finished`; PSW <- SSW at the edge |
| Reception blocked for 1024 consecutive cycles | receive interrupt on the 1024th blocked cycle |

## Modules

| File | Role |
|---|---|
| `rtl/ehu_pkg.sv` | vectors, ESW bit numbers, PSW fields, register map, PC-select codes |
| `rtl/ehu_top.sv` | the unit: EMR, protected-register decode, wiring of the blocks below |
| `rtl/hw_exc_sources.sv` | hardware causes -> ESW bit positions; WW/FP availability and privilege checks; OR over lanes |
| `rtl/pbuf_rx_irq.sv` | parcel-buffer receive interrupt (interrupt bit, eid mismatch, 1024-cycle block) |
| `rtl/esw_reg.sv` | the ESW with ESR/ERR semantics |
| `rtl/exc_detect.sv` | detection and handler-state flip-flop |
| `rtl/fault_regs.sv` | FADR, NFADR, SSW, MADR |
| `rtl/psw_reg.sv` | PSW |
| `rtl/pc_src_sel.sv` | flush and next-PC mux |
| `rtl/rfe_delay_slot.sv` | marks the RFE delay slot down the pipeline |

Parameters of `ehu_top`:

- `LANES` = 8: wide-word/FP lanes whose flags are ORed.
- `BLOCK_CYCLES` = 1024: receive-block timeout.
- `EID_W` = 8: parcel eid width.

### Protected-register map (`preg_waddr` / `preg_raddr`)

| Addr | Register | Access |
|---|---|---|
| 0 | ESW | read |
| 1 | ESR | write: set SW bits with a 1 in the data |
| 2 | ERR | write: clear bits with a 1 in the data |
| 3 | EMR | read/write, resets to all masked |
| 4 | PSW | read/write |
| 5 | SSW | read/write |
| 6 | FADR | read/write |
| 7 | NFADR | read/write |
| 8 | MADR | read/write |

Writes take effect at the clock edge and are ignored while the PSW says user
mode. The read port is combinational and independent of the write port.

PSW fields:

| Bit | Field |
|---|---|
| 0 | mode (0 = supervisor) |
| 1 | exception enable |
| 2 | WW enable |
| 3 | FP enable |

The other bits are plain storage. Reset leaves the PSW at 0: supervisor, with
exceptions disabled.

### What the surrounding processor must provide

- Memory-stage PC, execute-stage PC and a valid flag.
- Cause flags carried down the pipeline to the memory stage: undefined
  instruction, instruction class (WW, FP, privileged, system call) and the
  address-translation faults.
- The branch unit's next PC, an RFE-in-decode flag, and the three stage
  write-enables.
- On `pipeline_flush`: squash fetch, decode and execute, and do not retire the
  memory-stage instruction when `exception` is high.

The interval timer, address translation, the parcel buffer's send path and the
FP/WW datapaths are outside this unit; their flags are inputs.

## Design choices not fixed by the original description

- **Register interface.** The register address map, the PSW bit positions,
  the reset values (PSW 0, EMR 0, ESW 0) and the separate read and write
  ports.
- **Handler-state flip-flop.** It is set when an exception is taken and
  cleared at completion.
- **`mem_valid` qualifier.** A pipeline bubble is never taken as the faulting
  instruction.
- **Undefined-instruction gating.** Undefined instructions obey the global
  enable like every other cause. The original description also calls the
  primary handlers interruptible by undefined instructions. A design that
  wants that should bypass the enable for `undefined_instr` in `exc_detect`.
- **MADR capture.** MADR captures on any flagged data fault, even a masked
  one, rather than only on a taken exception.
- **FP lane flags.** The FP flags, like the WW integer flag, are ORed over the
  eight lanes.
- **Parcel-buffer receive interrupt.** The interrupt-bit and eid conditions
  are evaluated when a parcel is read. The timeout fires once per blocked
  episode.
- **Precedence rules.** An exception wins over completion, which wins over a
  protected write. Reset wins over every PC source. A flush cancels an RFE in
  decode.

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`) comparing
against an independent reference model, with random and directed stimulus. Each
prints `TB_RESULT checks=N failures=M`.

`tb/tb_ehu_top.sv` runs the unit at its default parameters inside a behavioural
five-stage pipeline with delay-slot branches. It runs a small program:

- **Reset handler.** Enables exceptions, raises a software exception through
  the ESR, then drops to user mode.
- **Undefined-instruction handler.**
- **Software-vectored handler.** Reads the ESW, clears the top enabled bit
  through ERR, chooses retry or skip using FADR/NFADR, unmasks masked pending
  causes, and returns with RFE.
- **User program.** It triggers these causes: an unmapped data access, system
  calls (one in a branch delay slot), an FP lane exception, a WW instruction
  with WW disabled, a privileged instruction, an undefined instruction, a masked
  timer interrupt, a parcel read with its interrupt bit set, and a wait loop
  ended by the 1024-cycle receive timeout.

The test checks the following:

- User instructions retire exactly once and in program order.
- User code runs in user mode with exceptions on; handlers run in supervisor
  mode with them off.
- FADR, NFADR, SSW and MADR hold the right values, and every exception uses the
  right vector.
- Completion happens at the RFE delay slot, and the timeout occurs on the 1024th
  blocked cycle.
- Every mechanism fires at least once: flush, masking, pending-after-RFE,
  delay-slot discontinuity, PSW restore, and the rest.

To simulate, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ehu_pkg.sv \
  -y rtl -y tb +libext+.sv --top-module tb_ehu_top tb/tb_ehu_top.sv -o sim
./obj_dir/sim
```

Replace `tb_ehu_top` with any other `tb_*` name to run a single block.

## Limits

- **Pipeline model.** The end-to-end testbench's pipeline has no stalls. Stalls
  are exercised only in the unit test of `rfe_delay_slot`.
- **Placeholder sources.** The timer, address translation and parcel-send
  sources are stand-in testbench stimulus.
- **No physical results.** The area, timing and power figures of the original
  0.18 µm standard-cell implementation come from its physical design and are
  not reproduced here: 233 µm × 233 µm, 2.643 ns, 7.6 mW.
