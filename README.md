# APSI: a PC-controlled FPGA prototyping interface with an on-chip logic analyser

When an FPGA design is brought up on a board, two things are needed again and
again: a way for the PC to read and write anything inside the chip (memories,
peripheral registers) without first writing processor software, and a way to
see what the internal signals actually did. This RTL provides both for the
APSI system (Advanced Programmable System Interface):

* a **parallel-port bridge** that makes the PC a bus master inside the FPGA.
  Every byte cycle of the PC's parallel port in EPP mode becomes one byte
  transfer on the on-chip bus, so a script on the PC can load a memory, poll a
  status bit or drive a peripheral exactly as a processor would. Two versions
  exist, for the IBM CoreConnect On-chip Peripheral Bus (`opb_epp`) and for
  Wishbone (`epp`);
* **LA_RCS**, an internal logic state analyser (`opb_la`, `wb_la`). It
  samples a group of internal signals into on-chip RAM after a trigger, and
  the PC reads them back over the same bridge. Two features make the small
  on-chip memory go much further: *clock enable for captured data* (CED)
  keeps only the clock edges whose signals match a pattern, and *run-length
  coding* (RLC) stores a repeated state once, followed by a repeat count.

Everything is synthesizable SystemVerilog in `rtl/`. Self-checking testbenches
and behavioural models of the PC port and of bus memories are in `tb/`.

## System view

```
                 +----------------------------- apsi_system -----------------------------+
 PC parallel ----+-> opb_epp ==OPB (OR-combined)==+== opb_la #0 (LA0_BASE) <- probe0      |
 port (EPP)      |   (master)   ^                 +== opb_la #1 (LA1_BASE) <- probe1      |
                 |   request/   |                 +== external OPB slaves (memory, UART)  |
                 |   grant <-> external arbiter   +== external OPB masters (processor)    |
                 |                                                                      |
 2nd parallel ---+-> epp ==Wishbone==+== wb_la (WB_LA_BASE) <- probe2                   |
 port (EPP)      |   (master)        +== external Wishbone slave (everything else)      |
                 +----------------------------------------------------------------------+
```

The OPB system is the main one: two independent analysers sit on one bus
with the bridge, as in the two-analyser example system of APSI, and the
processor, memory controller and any peripherals under test connect from
outside through the external master and slave ports. The Wishbone system beside
it has its own parallel port and shows the same pieces on the other bus. The
OPB is built the usual way, as a wired OR: each master and slave drives zeros
when it is not active, and `apsi_system` ORs them together. The OPB arbiter is
not part of this RTL: the bridge's `epp_M_request`/`epp_OPB_MGrant` pair is
brought out.

Default address map (parameters of `apsi_system`): OPB analysers at
`0x8000_0000` and `0x8001_0000`, Wishbone analyser at `0x8000_0000`. Each
analyser occupies a 32 KiB window at the default sizes. Every other address
goes to the external slaves.

All logic runs on one clock `clk` with a synchronous active-high reset `rst`.

## The parallel-port bridge

### What the PC does

The PC uses the four EPP cycle types. The bridge gives them these meanings:

| PC cycle      | Effect in the bridge                                                |
|---------------|---------------------------------------------------------------------|
| address write | shift the byte into the 32-bit bus address from the right          |
| address read  | return the status byte: bit 0 = a bus transfer failed since the last status read (cleared by this read) |
| data write    | one bus byte write at the current address, then address + 1         |
| data read     | one bus byte read at the current address, then address + 1          |

A block transfer is therefore four address writes (most significant byte
first) followed by one data cycle per byte. Writing a 32-bit register on the
OPB means four data writes, most significant byte first, because the OPB is
big-endian: the byte at address offset 0 is bits 31..24. On Wishbone the
bytes go little-endian, least significant first.

### EPP handshake

`epp_port` is the peripheral side of the port, shared by both bridges. The PC
pulls `epp_nastrb` or `epp_ndstrb` low with `epp_nwrite` giving the
direction. The bridge finishes the cycle, including the bus transfer for data
cycles, and only then raises `epp_wait`. For reads the byte is already on
`epp_dout` with `epp_doe` high at that point. The PC then releases the strobe
and the bridge drops `epp_wait` and `epp_doe`. The strobes and `epp_nwrite`
pass through two-flop synchronisers. The data byte is sampled when the
synchronised strobe is seen low, two clocks after the PC set it. The bidirectional data
lines are split into `epp_din`, `epp_dout` and `epp_doe`; the pad's tristate
buffer belongs at the top of the chip.

### The bus side

`opb_epp` requests the OPB and waits for the grant. From the next clock it
drives `M_select` with the address, one byte enable (`M_BE[3]` = offset 0),
the direction and, for writes, the byte on its lane. It holds them until
`OPB_xferAck` or `OPB_errAck`. `OPB_retry` makes it drop select and arbitrate
again. If no slave answers within 16 cycles and none asserts `OPB_toutSup`,
the bridge abandons the transfer (the OPB bus timeout). The status byte then
reports an error, and a read returns `0xFF` to the PC. `epp` does the same
with Wishbone classic cycles (`cyc_o`/`stb_o` held until `ack_i` or `err_i`)
and has the same 16-cycle timeout, so a missing slave cannot hang the PC.

A parallel port is slow next to the on-chip bus. Each byte costs a full EPP
handshake (about twenty system clocks in the testbenches, and much more on a
real port), so the bridge is for control and moderate block transfers, not
for testing a fast core at speed.

## LA_RCS, the internal logic analyser

### Data path

```
probe --> [reg] --+--> la_trigger (arm / pattern / force / stop) --window--+
                  +--> la_ced (value & mask) ---------------sample_en------+--> la_rlc --> la_capture_ram
                  +------------------------------------------------------data--^         (DEPTH x PROBE_W+1)
```

`la_core` holds this chain and the control registers. `opb_la` and `wb_la`
only add the bus slave. The probe is registered once. A sample on the probe
input reaches the memory two clocks later, and the analyser takes one sample
per clock.

* **Trigger.** An *arm* command (from the PC) empties the memory and starts
  waiting. The first clock edge on which the probe matches the trigger
  pattern starts the capture, and that sample is the first one stored. A
  *force* command starts the capture at once, without a pattern. Arm and force
  in one write start the capture with the next clock edge. The capture runs
  until the memory is full or a *stop* command arrives. The analyser can be
  armed again at any time, so one script can capture a transmission, read it,
  then capture the reception and read that too.
* **CED (clock enable for captured data).** While capturing, an edge is kept
  only if the probe matches the CED pattern. A pattern is a value and a mask,
  and mask bits at 0 are "don't care". With CED on `xferAck` of a traced bus,
  only the clock edges that complete a transfer are stored. Add an address
  range to the pattern and only one device's transfers are stored. This saves
  memory, and it also leaves out the idle clocks that make a bus waveform hard
  to read.
* **RLC (run-length coding).** See below.
* **Capture memory.** `DEPTH` words of `PROBE_W+1` bits, one write port and
  one synchronous read port, which maps onto FPGA block RAM.

### The run-length format

Every memory word is `PROBE_W+1` bits wide. The top bit says what the word
holds:

* top bit 0: a **value word**, the `PROBE_W` probe bits of one sample;
* top bit 1: a **count word** for the value word just before it. A state
  seen `n >= 2` times in a row is stored as its value word and one count word
  holding `n - 2`. A state seen once is a lone value word.

With 7 probe bits (8-bit words), the samples `1,2,2,3,3,3,4,4,4,4` become
`01 02 80 03 81 04 82` (hex).

The hardware writes at most one word per sample. The first repeat of a value
opens a count word at the next free address, and every further repeat
rewrites that same word with the new count. A new value commits the count
word and is written after it. The count is kept in a 32-bit counter (or
`PROBE_W` bits if that is fewer). A run too long for it is closed, and a new
value word starts a new run, so no sample is lost.

**Repeat limit.** A long idle state would otherwise swamp the waveform. For
example, a UART line changes only every thousand clocks or so. `MAX_REP`
(0 = no limit) is the largest number of times one state is recorded, and
further identical samples are dropped. With `MAX_REP = 16`, every UART bit
shows as exactly 16 samples, whatever its real length. This changes what the
decoded waveform means: a state's recorded length is then a lower bound.

With RLC switched off, every kept sample is a value word.

**Memory full.** The capture ends (status *done* and *full*) on the first
sample that has no room. That is a new value word when the memory is full, or
the first repeat of a value that sits in the last word. Until then a
continuing run keeps updating its count word in place. A capture of one
unchanging state therefore never fills the memory and runs until *stop*.

**Decoding** (what the PC side does with the words read back): go through the
words in order. For a value word, emit the value. For a count word with count
`c`, emit the previous value `c + 1` more times.

### Registers

Word offsets from the analyser base address (`apsi_pkg` has the constants):

| Word    | Name        | Access | Contents |
|---------|-------------|--------|----------|
| 0       | CTRL        | rw     | bit 0 RLC on (reset 1), bit 1 CED on (reset 0) |
| 1       | CMD/STATUS  | w      | bit 0 arm, bit 1 force trigger, bit 2 stop (acted on when byte 0 is written) |
|         |             | r      | bit 0 armed, bit 1 capturing, bit 2 done, bit 3 memory full |
| 2       | MAX_REP     | rw     | repeat limit, 0 = none |
| 3       | WORD_COUNT  | r      | memory words holding data |
| 4       | INFO        | r      | [15:0] `PROBE_W`, [31:16] log2 `DEPTH` |
| 8..15   | TRIG_VALUE  | rw     | trigger value, 32-bit slices, least significant first |
| 16..23  | TRIG_MASK   | rw     | trigger mask (1 = compare) |
| 24..31  | CED_VALUE   | rw     | CED value |
| 32..39  | CED_MASK    | rw     | CED mask (1 = compare) |

Writes honour the byte enables, so the PC can write a register one byte at a
time. The command bits act on the write of the least significant byte
(bits 7..0), which comes last in an OPB byte sequence. `PROBE_W` can be up to
256.

The upper half of the window is the capture memory. Entry `e` takes
`STRIDE` 32-bit words, where `STRIDE` is the next power of two of
`ceil((PROBE_W+1)/32)` (4 at the default 64 probe bits). The slices are stored
least significant first, and the RLC flag is bit `PROBE_W` of the entry. At
the defaults, entry `e` is at byte offset `0x4000 + 16*e`, and its flag is
bit 0 of the third word.

### Bus slave timing

`opb_la` decodes an access in the first clock of `OPB_select`, reads the
register or memory in the second, and gives `Sl_xferAck` with the data on
`Sl_DBus` in the third. `Sl_DBus` is zero at every other time. `wb_la` has the
same timing with `ack_o`/`dat_o` and also reports `hit_o` for address
routing. Reads return the whole 32-bit word, and the bus master picks its
byte lane.

### Tracing a bus

`apsi_pkg::opb_trace_t` packs the OPB signals of a typical bus-debugging
trace into the default 64 probe bits. These are the low 24 address bits, the
32-bit data bus, and `busLock`, `errAck`, `RNW`, `rst`, `select`, `seqAddr`,
`timeout` and `xferAck`, with `xferAck` in bit 0. With the CED pattern
`value = 1, mask = 1`, only completed transfers are stored. With address bits
63..52 added to the mask, only one device's transfers are stored. The system
testbench does exactly this on the system's own OPB.

## Modules

| Module           | Role |
|------------------|------|
| `apsi_pkg`       | shared enums, register map constants, byte-lane helpers, `opb_trace_t` |
| `apsi_system`    | top: OPB system and Wishbone system side by side |
| `epp_port`       | EPP peripheral front end, address register, status |
| `opb_epp`        | EPP-to-OPB bridge (OPB master) |
| `epp`            | EPP-to-Wishbone bridge (Wishbone master) |
| `opb_la`, `wb_la`| LA_RCS with OPB / Wishbone control interface |
| `la_core`        | bus-independent analyser: registers, data path, read-back |
| `la_trigger`     | arm/trigger/stop sequencer |
| `la_ced`         | value/mask clock enable |
| `la_rlc`         | run-length encoder |
| `la_capture_ram` | capture memory |

Parameters: `PROBE_W` (traced bits, default 64), `DEPTH` (memory entries,
default 1024), base addresses, and `TIMEOUT` of the bridges (16 cycles).

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  rtl/apsi_pkg.sv tb/tb_apsi_system.sv -y rtl -y tb --top-module tb_apsi_system
./obj_dir/Vtb_apsi_system
```

Replace `tb_apsi_system` by any other testbench. Read `rtl/apsi_pkg.sv`
first, because the modules import it. The other files are found through `-y`.

| Testbench          | What it establishes |
|--------------------|---------------------|
| `tb_apsi_system`   | whole system at default parameters, driven through two models of the PC port: 400-byte block write/read/compare at addresses 1..400; bus trace with CED on xferAck, checked against every acknowledged OPB cycle; trace limited to a UART address range; a signal changing every 1000 clocks captured with RLC and a repeat limit of 16; memory full; errAck and timeout in the status byte; Wishbone block transfer and capture. It also counts retries, arbitration waits and RLC count words, and each must occur |
| `tb_apsi_script`   | the same system driven from the recorded stream `tb/apsi_test_script.hex` (64 bytes at addresses 1..64 written, read back and compared; byte at address a is (7a+3) mod 256; then the status byte) |
| `tb_opb_epp`, `tb_epp` | bridges against behavioural memories: block transfers, byte lanes, retry, error, timeout, idle outputs zero |
| `tb_epp_port`      | address assembly, auto-increment, status read-and-clear, handshake |
| `tb_opb_la`, `tb_wb_la` | slave timing, windows, byte enables, pattern-triggered and CED captures read back, 1024-word capture |
| `tb_la_core`       | registers, trigger, CED, repeat limit, full, two-clock latency, 41-bit entries in two slices |
| `tb_la_rlc`        | the worked example, random streams against a reference encoder, counter overflow, full |
| `tb_la_trigger`, `tb_la_ced`, `tb_la_capture_ram` | the small blocks |

`tb/epp_model.sv` is a task-driven model of the PC port
(`set_address`, `data_write`, `data_read`, `addr_read`). It is the simplest
way to drive the design from your own testbench. Its `play` task replays a
recorded command stream from a hex file, so a test written on the PC side can
run unchanged in simulation. Each 12-bit line is one port cycle: bits 11..8
are 1 for an address byte write, 2 for a data byte write, 3 for a data byte
read, 4 for a status read and 0 for the end; bits 7..0 are the byte. The
bytes read are collected in order in `replies`, which is what the PC would
have received. `tb/opb_mem_model.sv` is an
OPB memory that can also ask for retries, answer with errors or stay silent.

## What is given by APSI and what was chosen here

Taken from the published description of APSI: the overall structure (PC
parallel port in EPP mode, bridge as bus master, OPB and Wishbone versions,
analysers as bus slaves, two independent analysers on one bus). Also the
three basic port operations (address byte write, data byte write, data byte
read), the analyser's split into a data-capture and a control interface, and
arming and triggering from the PC. Finally, CED as a pattern match that
enables sampling, and RLC with the top bit as value/count flag, including the
worked example and an adjustable maximum repeat.

Chosen here, where the description is silent:

* probe width 64 (enough for the OPB trace described above) and memory depth
  1024;
* how address bytes form the bus address (shifted in, four bytes), the
  auto-increment and the status byte on address reads;
* the OPB master sequence, the 16-cycle timeout in the bridge (normally the
  arbiter's job), a failed read returning 0xFF, and the Wishbone timeout;
* the register map, command encoding and memory window layout;
* the repeat limit drops samples beyond the limit, and counter overflow
  starts a new run;
* capture starts at the trigger sample, with no pre-trigger history, and runs
  until full or stop;
* one clock for bus and probes, synchronous active-high reset, and three-clock
  slave acknowledge.

Not in this RTL: the processor, memory controller and peripherals of an EDK
system, and the OPB arbiter (all vendor parts, connected through the ports).
Also left out are the PC software that runs the scripts and writes the
command streams, and the simulator-side viewer for captured data. The replay
format of `epp_model.play` is this design's own.
The testbench's decoding loop shows how to unpack a capture.
