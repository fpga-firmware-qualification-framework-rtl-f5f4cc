# FFQF: a debuggable AXI copy bus for FPGA subsystems

In a typical FPGA design, functional subsystems talk over thousands of
point-to-point wires. Nobody can watch that traffic, change it or pause it.
This design replaces those wires with one memory-mapped AXI4 bus. A single
master copies register contents from one subsystem to another on a fixed
time-division schedule. With all traffic on one master port, four debug
features become cheap:

- **Monitor.** A spy on the master port can trigger on chosen addresses and
  data, and record the traffic around the trigger.
- **Injection.** The schedule can copy from a test memory instead of a real
  subsystem, so a subsystem under test receives made-up inputs.
- **Soft breakpoint.** The subsystems' clock is stopped between two copies.
  Every register is then frozen in a consistent state. The buses stay alive,
  so a processor can read the trace buffers and refill the test memory.
- **State trace.** Ring buffers record chosen internal state words on every
  subsystem clock cycle, so the cycles leading up to a break can be replayed
  in simulation.

This RTL follows the FPGA firmware-qualification template (FFQF) described in
a master's thesis on the subject. The structure, the schedule format, the
monitor's control/status register and the breakpoint rules come from that
work. Encodings, address maps and widths it does not fix are this design's
own. Each file's header comment says which is which.

## Structure

```
                 functional bus (clk)                          subsystems (sub_clk)
 start ──► comm_arbiter ──cmd──► axi_master ──► axi_interconnect ─┬─► axi_reg_slave A ◄─► a_rd/a_wr regs
            ▲   │ break_active       │ spy                         ├─► axi_reg_slave B ◄─► b_rd/b_wr regs
            │   ▼                    ▼                             └─► axi_inject_bram (fn port)
  schedule  │ clk_gate_bufr ──► sub_clk            axi_monitor ◄── par_probe
  memory ◄──┘                                       │  ▲ config    │ acquisition (4 buffers)
                                                    ▼  │           ▼
 dbg_req ──► axi_interconnect (4 slaves): schedule memory, axi_monitor_slave (config writes,
                                          acquisition reads), injection memory (dbg port), state_acq
```

The debug blocks sit on a second AXI interconnect of their own, mastered by
the processor. They therefore stay readable while the functional bus is
frozen, and debug traffic never disturbs the copy schedule.

`ffqf_top` holds everything except the subsystems themselves and the
processor. Their connections are ports:

- `a_*` and `b_*` are the register interfaces of two subsystems, A and B.
- `dbg_req`/`dbg_resp` is the processor's AXI master port.
- `state_data` carries the words to trace.
- `cap` drives the FPGA's configuration-capture primitive.
- `sub_clk` is the gated clock for the subsystems.

### Address maps

On both buses the slave is selected by byte-address bits [23:16]. A window
that holds no slave answers with DECERR.

| Functional bus | Contents |
|---|---|
| `0x00_0000` | subsystem A: read registers at `+0x0000+4i` (i < 6), write registers at `+0x1000+4i` (i < 7) |
| `0x01_0000` | subsystem B: same layout |
| `0x02_0000` | injection memory (1024 words) |

| Debug bus | Contents |
|---|---|
| `0x0000_0000` | copy schedule (512 words; alternative schedule from word 256) |
| `0x0001_0000` | monitor: a write goes to the configuration memory (record at words 0–7); a read returns acquisition buffer k at `+k*0x1000` (k = 0 AR addresses, 1 R data, 2 AW addresses, 3 W data) |
| `0x0002_0000` | injection memory |
| `0x0003_0000` | state trace: channel c, i-th oldest record at word `c*1024+i`; word 4096 = valid records, 4097 = total records |

The 6-read/7-write register split is the case-study current controller's
register map. A register slave reads 0 at any unmapped offset and ignores
writes there.

## The copy schedule

The schedule memory holds pairs of 32-bit lines, ended by `0xDEADBEEF`:

```
line 2k    {len[7:0], source address[23:0]}
line 2k+1  {len[7:0], destination address[23:0]}
```

For each pair, `comm_arbiter` reads both lines (one cycle each, blockram
latency). It then gives `axi_master` one copy of `len` words, at most 16,
which is the AXI burst limit. The master issues the read burst. Once the
first word is back it issues the write burst, and it forwards each word as
it arrives. The read and write therefore overlap.

A copy of n words takes **7 + n cycles** from command to write response. A
whole schedule cycle starts on `sched_start`: in the case study that is the
real-time-data-ready strobe of the communication interface. With `free_run`
set, a new cycle starts as soon as the previous one ends. A start pulse that
arrives during a cycle is kept and starts the next one.

The case-study schedule has three copies:

1. one real-time word A→B;
2. four parameter words A→B;
3. six status words B→A.

In `tb_ffqf_top` this schedule takes **50 cycles** at 80 MHz, which is 625 ns.
The real-time word reaches B **12 cycles** after the start (150 ns). The
thesis quotes 62 cycles and 18 cycles. The testbench checks against those
figures as upper bounds. The whole schedule easily fits the 375 kHz control
loop period of 213 cycles.

### Injection stepping

The injection memory is an ordinary slave, so a schedule line that points
there feeds test data to a subsystem. Test vectors for many cycles are
stored in consecutive blocks. The arbiter adds `inj_idx * inj_step` to every
source address that falls in the injection window. `inj_idx` counts finished
normal schedule cycles and wraps at `inj_blocks`. The schedule itself never
needs rewriting. With `inj_step = 0x10`, cycle k reads block k.

## Breakpoints

This is the part that needs the most care. Stopping a subsystem is easy:
hold its clock high and every flip-flop keeps its value. The hard part is
stopping all subsystems at a point where no transfer is half done.

**Soft break.** Sources are `ext_break`, the monitor's Break control bit,
and a monitor trigger with "break on trigger" set. The arbiter takes the
request only between copies, in one of two places: when idle, or just before
it would read the next source line. A copy already handed to the master
always finishes. So a subsystem never holds half of a burst, and no shadow
registers are needed.

When the break is taken:

1. The arbiter saves its schedule position.
2. It raises `break_active`, which stops `sub_clk`.
3. While the request stays high, it runs the alternative schedule at word
   256 over and over. It re-reads the schedule each time, so the processor
   can change it during the break.

When the request drops:

1. The arbiter finishes the alternative copy in progress.
2. It restores the saved position.
3. It clears `break_active`. The normal schedule goes on with the copy that
   would have come next.

**Hard break.** A monitor trigger with TriggerCapture set:

- stops `sub_clk` in the very next cycle, wherever the schedule is;
- freezes the arbiter (`hold`);
- pulses `cap` for one cycle, for the vendor primitive that snapshots all
  flip-flops into configuration memory.

The debug bus keeps running, so buffers can still be read. The arbiter
resumes when the monitor is reset.

**Clock gate.** `clk_gate_bufr` models the regional clock buffer with enable
(BUFR CE) that the gating is meant for. Its output is `clk | stop`, where
`stop` is `!ce` latched while the clock is high. The gated clock therefore
stays high while stopped, and an enable change never shortens a pulse. On a
real part this module is replaced by the vendor buffer. It is a behavioural
model: synthesis sees one latch.

**State trace.** `state_acq` writes each of its `state_data` words into its
own 1024-word ring buffer on every cycle that `sub_clk` runs. After a stop,
the newest record is the state from the last subsystem clock edge. An
address translator adds the write pointer once the buffer has wrapped, so
reading a channel's window from its base gives the trace oldest first.

## The monitor

`axi_monitor` watches the functional master's five AXI channels. A beat
counts only on valid && ready. It is steered by an 8-bit control register,
`mon_ctrl`, and reports on an 8-bit status register, `mon_status`:

| ctrl bit | name | effect |
|---|---|---|
| [1:0] | MonitorType | 00 off, 01 AXI, 10 parallel probe |
| 2 | ReadConfig | load the 8-word configuration record |
| 3 | Reset | reset acquisition state machines, fill counters, break and hard-break |
| 4 | Enable | arm the selected monitor |
| 5 | TriggerCapture | a trigger becomes a hard break with a `cap` pulse |
| 6 | Break | request a soft break now |

| status bits | meaning |
|---|---|
| [1:0] | config reader: IDLE, WAIT, STORE, DONE |
| [3:2] | parallel monitor: IDLE, WAIT_DATA, TRIGGERED, DONE |
| [6:4] | AXI monitor: IDLE, WAIT_ADDRESS, WAIT_DATA, TRIGGERED, DONE |

The monitor is a single slave on the debug bus (`axi_monitor_slave`).
Writes go to its configuration memory, and reads return its acquisition
buffers. The configuration therefore cannot be read back: the processor
keeps its own copy. The configuration record, written at `0x0001_0000`,
has eight words:

| word | contents |
|---|---|
| 0, 1 | address reference and mask |
| 2, 3 | data reference and mask |
| 4, 5 | probe reference and mask |
| 6 | mode |
| 7 | number of words to acquire (0 = until a buffer is full) |

Mode word fields:

- [1:0] address compare;
- [3:2] data compare;
- [5:4] probe compare;
- [8] watch reads;
- [9] watch writes;
- [12] break on trigger.

Each compare code is 0 equal, 1 not equal, 2 smaller or 3 larger. It is
applied after masking both operands; `match_unit` does the compare.

**AXI mode.** An AR or AW beat whose address matches moves the monitor to
WAIT_DATA. The first data beat of that burst whose data matches is the
trigger. From that beat on, every AR, R, AW and W beat is written into its
buffer through the buffer's own native port, one word per cycle, until the requested
count is reached.

**Parallel mode.** The monitor compares the 32-bit `par_probe` register every
cycle. After a match it stores the probe every cycle into buffer 0.

## Timing and interface conventions

- Everything runs on `clk` (80 MHz in the original system), except the
  subsystems on `sub_clk`. Reset `rst_n` is asynchronous and active low.
- AXI here is AXI4 with 32-bit data, no IDs (there is one master per bus),
  INCR bursts of up to 16 four-byte beats, and one outstanding read and one
  outstanding write. The signals are bundled in the packed structs
  `axi_req_t`/`axi_resp_t` of `ffqf_pkg`.
- Every slave is built on `axi_slave_fe`. It accepts AW or AR in the idle
  cycle and moves one beat per cycle. The first R beat comes two cycles after
  AR acceptance, and B comes one cycle after the last W beat.
- The interconnect adds no cycles: it routes each channel combinationally.

## Where this design departs from the thesis

- **Copy latency.** A copy of n words is 7+n cycles here, against 14+n+1
  (minimum) and 16+n+1 (maximum) in the thesis. This makes the case-study
  schedule 50 cycles instead of 62, and the real-time word 12 cycles instead
  of 18.
- **Hard break.** The thesis says the interconnect cannot be used during a
  hard break. Here only the functional arbiter is frozen, and the debug bus
  stays usable.
- **Own choices where the thesis is silent:**
  - bit placement of the schedule length;
  - the location of the alternative schedule;
  - the layout of the monitor configuration record;
  - the monitor state transitions;
  - the trace buffer depth and status words;
  - all address maps;
  - the `wr_stb` write strobes of the register slave;
  - releasing a hard break through the monitor's Reset bit.
- **Traced words.** `state_data` is a free port. The thesis traces a
  subsystem's register inputs and outputs; to do the same, connect those
  registers to it.
- **Not built:**
  - the MicroBlaze processor and its peripherals;
  - the configuration-capture primitive and ICAP read-back (only `cap` is
    brought out);
  - the subsystems of the case study, which `tb_ffqf_top` replaces with
    counters.

## Files

| file | contents |
|---|---|
| `rtl/ffqf_pkg.sv` | AXI structs, compare and state encodings, control-bit positions |
| `rtl/ffqf_top.sv` | the template |
| `rtl/comm_arbiter.sv` | schedule execution, soft break, injection stepping |
| `rtl/axi_master.sv` | pipelined burst copy engine |
| `rtl/axi_interconnect.sv` | one-master AXI decoder/multiplexer with DECERR and handshake assertions |
| `rtl/axi_slave_fe.sv` | AXI slave front end used by every slave |
| `rtl/axi_reg_slave.sv` | subsystem register interface |
| `rtl/axi_bram_slave.sv` | dual-port blockram, native + AXI (schedule memory) |
| `rtl/axi_inject_bram.sv` | injection memory with two AXI ports |
| `rtl/axi_monitor.sv`, `rtl/match_unit.sv` | bus spy and its comparator |
| `rtl/axi_monitor_slave.sv` | the monitor's AXI slave: configuration memory and acquisition buffers |
| `rtl/state_acq.sv` | ring-buffer state trace |
| `rtl/clk_gate_bufr.sv` | behavioural clock-gate buffer |
| `tb/tb_*.sv` | one self-checking testbench per block; `tb_ffqf_top` runs the whole template at its default parameters |
| `tb/axi_tb_master.sv` | AXI master bus-functional model used by the testbenches |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog ends it if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/ffqf_pkg.sv tb/tb_ffqf_top.sv --top-module tb_ffqf_top
./obj_dir/Vtb_ffqf_top
```

Substitute any other `tb_<block>` name to run that block's testbench.

`tb_ffqf_top` runs six steps. Each mechanism is counted, and a run fails if
any count stays zero.

1. It loads the case-study schedule and runs one schedule cycle, checking
   the data moved and the cycle and latency budgets.
2. It arms the monitor on writes to B's real-time register and reads back
   the acquired words.
3. It raises a soft break while the schedule runs freely. It checks that:
   - the clock stops between copies;
   - the alternative schedule injects data;
   - the newest trace record is from the last cycle before the stop;
   - everything resumes after release.
4. It steps the injection address across blocks.
5. It fires a hard break from the probe register with capture.
6. It reads an empty debug window and expects DECERR.

`tb_interconnect_scaling` runs the interconnect with 2, 4, 6 and 8 blockram
slaves side by side. It checks that decoding, DECERR and burst timing do not
depend on the slave count: a 16-word read takes 20 cycles in every
configuration. `tb_axi_master` measures a copy of 1 to 16 words at 7 + n
cycles.

Some testbenches use reduced sizes to run quickly: `tb_state_acq`
simulates 3 channels of 16 records. All parameters can be changed at
instantiation:

- arbiter and monitor memory sizes: `CFG_AW`, `ACQ_AW`;
- alternative schedule location: `ALT_BASE`;
- register counts: `NUM_RD`, `NUM_WR`;
- trace size: `SA_CH`, `SA_DEPTH_AW`.
