# Fail-silent FPGA core

Some systems must stop talking the moment they go wrong, rather than keep
sending data that may be wrong. This RTL implements a fail-silent
arrangement for an FPGA or for the FPGA core of a configurable SoC. The
system function is built twice, in two working regions. The two copies are
compared output by output. On the first disagreement every output pin of
the device is released (tri-stated) from the next clock cycle on, and it
stays released. An interrupt to the embedded processor then takes the device
down for good, or, in the variant aimed at radiation-induced configuration
upsets, rewrites the configuration and restarts.

On the chip, the two working regions are kept apart by a *guard band*. This
is a strip of fabric whose logic and routing neither region may use, made
wide enough that no single fault (a stuck wire, a flipped configuration bit
that closes a routing switch) can couple the two regions. The guard band is
a floorplanning rule and has no RTL of its own. What the RTL does is keep
each part that must be placed separately in its own instance:

| instance | placed in | module |
|---|---|---|
| `u_region1`, `u_region2` | working regions 1 and 2 | `lfsr_system_function` |
| `g_out[k].u_iso1`, `u_iso2` | edge of the guard band | `plb_lut3` |
| `u_mon` | guard band | `fault_monitor_bank` / `fault_monitor` |
| `g_out[k].u_iob` | I/O ring next to region 1 | `io_buffer` |
| `u_cfg`, `u_ctrl` | configuration logic / processor side | `config_memory`, `fail_silent_controller` |
| `g_tmr[m]`, `u_voter` | three regions of a separate TMR arrangement | `lfsr_system_function`, `tmr_voter` |

The guard band's width depends on the routing of the target device. It is
one column of 4x4 logic-block tiles on an Atmel AT94K40 (48x48 blocks,
leaving working regions 20 and 24 blocks wide). On a Virtex-4 it is six
logic blocks, the length of a Hex line, provided Long lines are not used.

## Data flow

```
 in1_en ─► region 1 (LFSR) ──d──► io_buffer ══ pad ══ board
                                      │ (read-back of the pad)
                                      ▼
                               iso LUT (identity)
                                      │ a
                                 fault monitor ──oe──► io_buffer tri-state control
                                      │ b      └─ok──► controller (falling edge)
                               iso LUT (identity)
                                      ▲
 in2_en ─► region 2 (LFSR) ───────────┘
```

* Both regions get their own copy of the input set (`in1_en`, `in2_en`).
  By default only region 1 drives pins, and region 2 exists only to be
  compared against. With `OUTPUT_SETS = 2`, region 2 drives a second set of
  pins (`pad2_*`) through its own buffers, under the same enable. With
  read-back, those pins then feed the monitor in place of region 2's internal
  output. In that form each region's own pins carry its value during the one
  mismatch cycle before both sets are silenced.
* The buffer is bidirectional. With `PAD_READBACK = 1` (the default), the
  monitor compares the level actually on the pad, not what region 1 meant to
  drive. So a shorted pin or a fault on the board net also trips it. With
  `PAD_READBACK = 0` the monitor takes region 1's output before the buffer.
  This is the basic form, and it does not see pin or board faults.
* Each monitor input passes through a 3-input LUT programmed as the
  identity (`8'hAA`). On the chip this puts a logic block between a
  region's wire and the guard band's wire, so they never share a routing
  segment.

## The fault monitor: compare, latch, hold

The monitor is one flip-flop with feedback:

```
q <= q & (a == b);      // reset value 1 = outputs enabled
```

`q` drives the tri-state enable. A mismatch sampled at clock edge *t* clears
`q` right after edge *t*. The feedback keeps it cleared even when the regions
agree again. Only `clr` or `rst_n` sets it back to 1. The testbenches check
this one-edge latency on every trip.

With several outputs there is one monitor per output. All of their `q`s are
ANDed into one enable for every output buffer, so one bad output silences
them all. The whole set of monitors can be replicated (`REPLICAS`), with
the copies ANDed as well. Then a monitor flip-flop stuck at 1 cannot keep the
pins enabled. For buffers with an active-low enable, `ACTIVE_HIGH = 0` builds
the dual circuit: `q <= q | (a != b)` with reset value 0, and the monitors
ORed together.

`fault_monitor_bank.ok` is 1 while nothing is latched, whatever the
polarity. It is the interrupt line (`fail_irq_n`). `tripped[k]` says which
output's monitor fired.

## What happens after the trip

The pins are silent one edge after the mismatch, without any help. The
interrupt routine that follows exists to make the silence permanent, or to
recover from it. In a real device that routine runs on the embedded
processor. Here it is `fail_silent_controller`, a state machine that issues
the same configuration writes. It starts at the first clock edge at which
`fail_irq_n` is low after having been high. `scrub_mode`, sampled at that
edge, selects the sequence:

**Shutdown** (`scrub_mode = 0`), one configuration write per cycle:
1. `IO_OFF`: rewrite the I/O configuration so that every output buffer
   becomes an input with a weak pull-up (`PULL_UP = 0` gives pull-down).
   From then on the buffer's tri-state control cannot enable it, even if the
   monitors are cleared.
2. `ERASE`: write 0 to every core configuration word. This is the
   un-programmed state: LUTs output 0 and LFSRs have no feedback. The I/O
   words keep the safe setting from step 1.
3. `NOTIFY`: set `failed`. Set `core_power_down` if `power_down_en` is set.
4. `HALTED`: stay here until reset. The processor's own configuration writes
   are no longer passed through.

From the cycle the interrupt line falls to `failed` takes
`IO_WORDS + CORE_WORDS + 2` cycles (7 at the defaults).

**Scrub** (`scrub_mode = 1`):
1. `SCRUB`: write every configuration word from `golden_cfg`.
2. `RESTART`: for one cycle, restart both regions from their seed and
   re-arm the monitors. Add one to `seu_count`.

The output is silent for `CFG_WORDS + 2` cycles (7 at the defaults). It then
resumes the system function's sequence from its start.

While the controller is idle, the processor's writes (`host_*`) go straight
to configuration memory. Writing a changed word there is how a configuration
upset is emulated in the tests.

## Configuration memory

`config_memory` is write-only from the processor's side. All its bits drive
the fabric in parallel. Reset clears it to all zeros (un-programmed). The
layout is defined in `fs_pkg`:

| words | contents |
|---|---|
| 0 (`IO_WORDS` = 1) | `io_cfg_t`: `drive_en`, `pull_en`, `pull_up` per output |
| 1 to 4 (`CORE_WORDS` = 4) | `core_cfg_t`: `taps1`, `taps2` (LFSR feedback masks), `iso1_init`, `iso2_init` (isolation LUT tables) |

Use `fs_pkg::pack_image(io, core)` to build an image, and `io_of` /
`core_of` to take one apart. The I/O fields sit in words of their own, so
that the shutdown sequence can make the pins safe without a
read-modify-write (the memory cannot be read).

## System function

The function in each region is an 8-bit Fibonacci LFSR. It uses the
primitive polynomial x^8 + x^6 + x^5 + x^4 + 1 (tap mask `8'hB8`) and seed
`8'h01`, so its period is 255. The most significant bit is the fail-silent
output. `in*_en` advances it by one step. The tap mask comes from
configuration memory, so a flipped configuration bit really changes what the
region computes. To protect another function, replace
`lfsr_system_function` in both regions and widen `NUM_OUTPUTS`.

## Guard-banded TMR

Guard bands also make triple modular redundancy trustworthy on an FPGA.
Three modules that the tools are free to intermingle can be broken together
by a single switch upset between their wires. Three modules in separate
banded regions cannot. The top carries such an arrangement beside the
fail-silent core. It has three LFSR copies with their own tap inputs
(`tmr_taps`) and a bitwise 2-of-3 `tmr_voter`. `tmr_outvoted` shows which
module disagreed with the majority. It shares nothing with the fail-silent
side.

## Parameters

| where | name | default | meaning |
|---|---|---|---|
| `fs_pkg` | `LFSR_WIDTH` | 8 | width of the system function's LFSR |
| `fs_pkg` | `LFSR_TAPS` / `LFSR_SEED` | `8'hB8` / `8'h01` | polynomial and seed |
| `fs_pkg` | `NUM_OUTPUTS` | 1 | fail-silent outputs |
| `fs_pkg` | `CFG_WORD_W` | 8 | configuration write width |
| `fail_silent_fpga` | `MON_REPLICAS` | 1 | copies of the monitor set |
| `fail_silent_fpga` | `PULL_UP` | 1 | pull direction applied at shutdown |
| `fail_silent_fpga` | `PAD_READBACK` | 1 | 1: monitor the pad level; 0: monitor region 1's output before the buffer |
| `fail_silent_fpga` | `OUTPUT_SETS` | 1 | 2: region 2 also drives its own pins (`pad2_*`) under the same enable |
| `fail_silent_fpga` | `OE_ACTIVE_HIGH` | 1 | 0: active-low tri-state control, with the OR-combined dual monitors |
| `fault_monitor(_bank)` | `ACTIVE_HIGH` | 1 | enable polarity (0 builds the OR dual) |

## What is taken from the architecture and what is this design's own

Taken from the architecture:
* the two replicated regions with separate input sets;
* one region driving bidirectional output buffers, with the pad read-back
  going to the monitor;
* identity-LUT isolation;
* the compare-and-latch monitor with one-cycle silencing;
* AND combining of per-output and replicated monitors, and the OR dual for an
  active-low enable;
* the falling-edge interrupt;
* the shutdown order: outputs to pulled inputs, then erase the configuration,
  then notify, with optional power-down;
* scrubbing on the interrupt;
* a 2-of-3 voter behind guard-banded modules;
* an LFSR with a primitive polynomial and its MSB as the output, as the
  system function.

This design's own choices:
* LFSR width, polynomial and seed;
* the input set as a step enable;
* the configuration layout and word width;
* doing the interrupt routine in a state machine instead of processor code;
* keeping the I/O words' pull setting through the erase;
* the golden-image input and the restart and re-arm after a scrub;
* dropping processor writes while a sequence runs and after shutdown;
* the synchronous clears;
* the status outputs (`tripped`, `ok`, `seu_count`, `outvoted`).

Not modelled:
* the guard band itself (placement);
* the FPGA routing fabric and its faults (bridging faults between routing
  segments cannot be expressed in RTL; here a fault is a changed
  configuration bit, a driven pad or mismatched inputs);
* the processor and its program memory;
* the analog pad cell. `io_buffer` provides the pad controls, and the pad
  level comes in on `pad_i`.

## Simulating

Every testbench in `tb/` checks itself. Each one ends by printing
`TB_RESULT checks=N failures=M`. For example, the end-to-end test at default
parameters:

```
verilator --binary --timing --assert --top-module tb_fail_silent_fpga \
  -y rtl -y tb +libext+.sv -Irtl rtl/fs_pkg.sv tb/tb_fail_silent_fpga.sv
./obj_dir/Vtb_fail_silent_fpga
```

`tb_fail_silent_fpga` models the board net around the pin. It then takes the
design through these steps:
1. Programming and a fault-free run.
2. A configuration upset in region 2, which trips the monitors and is
   scrubbed.
3. A fault driven onto the board net.
4. A one-cycle mismatch of the input sets.
5. A corrupted TMR module, which the voter masks.
6. A region-1 upset in shutdown mode with power-down. The test checks the
   pulled-up pin, the erased core and that the pin cannot be re-enabled.

It checks the pin against an independent model of the LFSR sequence on
every enabled cycle. It checks the one-edge silencing on every trip. It
checks the 7-cycle scrub and shutdown timings. It counts each mechanism and
fails if any of them never happened.

`tb_fail_silent_fpga_variants` runs the other build options. One instance
has no pad read-back, an active-low enable and duplicated monitors. A second
instance has two output sets. The test checks that a board-net fault goes
unseen without read-back, and that a monitor replica stuck at "enabled" does
not hide a fault.

The unit testbenches (`tb_<module>`) test each block on its own. The
monitor-bank test forces a replica's flip-flop stuck at 1 to show that the
replicated copy still silences the outputs.

## How far it has been checked

* All testbenches pass with Verilator 5 in two-state mode, with variables
  that are not reset starting at random values.
* Every module has been modified on purpose to break it in one way that
  matters (for example, the monitor's feedback removed, or the buffer enable
  tied high). The block's testbench failed each time.
* The top level has only been simulated with `NUM_OUTPUTS = 1`. The
  multi-output AND combining is exercised in the monitor-bank test, with three
  outputs.
* Synthesis gives about 100 flip-flops for the whole top. No latches or
  combinational loops are inferred.
