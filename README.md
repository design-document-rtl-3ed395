# Hardware event logger for task-timing measurement on a soft-core CPU

Timing a task from software means reading a timer, and every read costs tens
to hundreds of CPU cycles and can be delayed by an interrupt. This design moves
the timestamp into hardware. Software marks an event with a single 32-bit store
to a memory-mapped register. In the clock cycle that store reaches the bus, the
logger reads a free-running 32-bit cycle counter. It stores the count together
with the event code in an on-chip buffer. At 100 MHz the resolution is 10 ns and
the counter wraps after about 42.9 s.

The intended use is a NIOS-V soft-core CPU on a Cyclone IV E (DE0-Nano board)
running FreeRTOS. Two periodic tasks log `TASK_START` and `TASK_END` events
around their work. After the measurement window, a low-priority task copies
the buffer out as CSV over the JTAG UART. A host script then computes execution
time, period, jitter and the gap between tasks. The system has no external
memory: program and data live in 64 KB of on-chip RAM, so memory timing does not
disturb the measurement.

This repository holds the FPGA fabric around the CPU as synthesizable
SystemVerilog: the logger, the on-chip RAM, the system-ID register, the reset
bridge, the Avalon-MM interconnect and the adapters that connect the CPU's
AXI4-Lite masters to it. It also holds a self-checking testbench
for each block and one for the whole system.

## System

```
       CPU instruction master (AXI4-Lite)   CPU data master (AXI4-Lite)   (outside: ports)
                    |                          |
               axil2avmm                  axil2avmm
                    \                         /
         +-----------------------------------------------+
         |  avmm_interconnect (32-bit Avalon-MM)          |
         |  decode - RAM arbitration - response steering  |
         +-----------------------------------------------+
            |            |              |             |
      onchip_ram      sysid       event_logger    JTAG UART        (UART: outside)
       64 KB         ID reg      counter+256x64
   reset_bridge: BTN_RESET_n -> sys_rst for all blocks; one 100 MHz clock
```

The top module is `event_logger_soc`. It does not contain the CPU, the JTAG
UART or the PLL, which are vendor parts:

* the CPU's two AXI4-Lite masters come in as ports, each through an
  `axil2avmm` adapter;
* the UART's slave port goes out as ports;
* `clk` is the PLL's 100 MHz output.

Byte-address map of the data master:

| Range                     | Slave                         | Reached by       |
|---------------------------|-------------------------------|------------------|
| 0x0000_0000 - 0x0000_FFFF | on-chip RAM, 64 KB            | instr and data   |
| 0x0002_0000 - 0x0002_0007 | SYSID                         | data             |
| 0x0002_0040 - 0x0002_005F | event logger, 5 registers     | data             |
| 0x0002_0060 - 0x0002_0067 | JTAG UART (external)          | data             |
| anything else             | default slave: reads 0, writes dropped | both    |

The logger's base address, 0x0002_0040, is part of the original design. The
other base addresses are this implementation's choice. They are parameters of
`avmm_interconnect`.

## The event logger

### Registers

Registers are 32-bit words. The offsets are word offsets from 0x0002_0040.

| Offset | Name          | Access | Contents                                             |
|--------|---------------|--------|------------------------------------------------------|
| 0      | EVENT_WRITE   | W      | `[15:8]` event type, `[7:0]` task id                 |
| 1      | EVENT_READ_LO | R      | timestamp of the entry at the read pointer           |
| 2      | EVENT_READ_HI | R      | `[15:8]` type, `[7:0]` task id; then advances the read pointer |
| 3      | STATUS        | R      | `[17]` full, `[16]` overflow, `[8:0]` entry count    |
| 4      | CONTROL       | W      | `[0]` = 1: empty the buffer and restart the counter  |

The event codes are `0x01` TASK_START, `0x02` TASK_END and `0x03` CONTEXT_SWITCH
(reserved for later use). The logger stores any 8-bit type and id without
checking them.

Each buffer entry is 64 bits wide: `{timestamp[63:32], 16'b0, event_type[15:8],
task_id[7:0]}`.

### Capture

A write to EVENT_WRITE does the following in one clock cycle. If fewer than 256
entries are held, the logger stores `{count, 0, type, id}` at the write pointer
and increments the entry count. The entry count also serves as the write
pointer. If the buffer is already full, the event is dropped and the sticky
overflow flag is set.

The buffer is linear, not a ring. Once it fills, the first 256 events stay
intact and later ones are lost. This is deliberate: a measurement never has
its oldest data overwritten without notice. The timestamp is the counter value
during the same cycle the write is on the bus. The logger never raises
waitrequest, so a logging store costs the CPU nothing beyond the store itself.

### Readout

Software reads the entries back in pairs: first EVENT_READ_LO (the timestamp),
then EVENT_READ_HI (type and id). Reading HI moves the read pointer on. Software
repeats this STATUS.count times. Three details matter:

* **The count is not lowered by reading.** STATUS counts the entries captured
  since the last clear, and the read pointer moves independently of it. Reads
  beyond the last captured entry return 0 and leave the pointer where it is.
* **Always-current read data.** The buffer is a block RAM with a registered read
  port (`event_buffer`). Its read address is the *next* value of the read
  pointer, so the word at the current pointer is already in the output register
  when a LO or HI read arrives. This holds even for a LO read in the cycle right
  after the HI read that moved the pointer.
* **Read right after capture.** When an entry is written and its address is
  read in the same cycle, a bypass register returns the new word. The entry can
  therefore be read back in the cycle after it was captured.

Bus timing: every access is accepted at once, and read data arrives with
`readdatavalid` exactly one cycle later.

### Clear

Writing 1 to CONTROL[0] resets both pointers, the entry count and the overflow
flag. It also reloads the counter with 0, so the counter reads 0 in the next
cycle. The stored words are not erased, but they can no longer be read.
Timestamps after a clear are therefore cycles since the clear. Writing 0 to
CONTROL[0] does nothing.

## Bus and interconnect

All slave ports use one Avalon-MM subset, declared as the structs `avmm_req_t`
and `avmm_rsp_t` in `avmm_pkg`:

* A request (`read` or `write`) is accepted in a cycle when `waitrequest` is
  low. The master holds the request until then.
* Read data returns later, with `readdatavalid` high for one cycle.
* Writes are posted and get no response.

Masters use byte addresses. Each slave sees a word address relative to its own
base.

`avmm_interconnect` works as follows:

* **Decoding.** The address selects the slave. The instruction master reaches
  only the RAM. An address outside every window goes to a built-in default
  slave.
* **Arbitration.** The RAM is the only slave that both masters share. When both
  request it in the same cycle, a round-robin arbiter grants one and holds
  waitrequest to the other. The loser wins the next contest.
* **Ordering.** Each master may have one read outstanding. A new request from
  that master waits until the data returns, but it may go in the cycle the data
  returns. This keeps responses in order even when a slow slave (the UART) and a
  fast one (the RAM) are read back to back. The RAM's read data is steered to
  its master by an owner register, which relies on the RAM's fixed one-cycle
  read latency.

### AXI4-Lite adapter

The NIOS-V's masters speak AXI4-Lite, so each one enters through `axil2avmm`.
The adapter handles one transaction at a time:

* It takes a read (AR), or a write once AW and W are both valid. When both are
  offered in the same cycle, it alternates between them.
* It presents the transaction on the Avalon side one cycle later, holding it
  through waitrequest.
* It returns R or B, and holds it until the CPU is ready.

Responses are always OKAY. With the bus free, a store takes 2 cycles from the
AW/W handshake to BVALID. A read whose slave answers in one cycle returns R 3
cycles after the AR handshake.

The event's timestamp is the cycle in which the store reaches the logger. That
is a fixed 1 cycle after the AXI handshake, plus any wait for the shared bus.
The data master reaches the logger through a path no other master uses, so in
practice the offset is constant.

## Other blocks

* `onchip_ram`: 16K x 32-bit single-port RAM with byte enables and a read
  latency of one cycle. Its contents are not reset. The program image is loaded
  by the FPGA tool flow, which this RTL does not model.
* `sysid`: a read-only word at offset 0 that returns `SYSTEM_ID` (parameter,
  default 0x0002_0040). Other offsets read 0. The original design names this
  block but gives neither its value nor its layout.
* `reset_bridge`: turns the asynchronous active-low button into an active-high
  reset. The reset asserts at once and is released in step with the clock two
  edges after the button is let go.
* `cycle_counter`: the 32-bit free-running counter, with a synchronous clear.

## Using it from software

```
log:    store32(0x00020040, (type << 8) | task_id)          // one store
clear:  store32(0x00020050, 1)
dump:   n = load32(0x0002004C) & 0x1FF; ovf = bit 16 of the same word
        repeat n: ts = load32(0x00020044); info = load32(0x00020048)
```

The host derives:

* execution time: END − START of the same task iteration;
* context-switch gap: next START − previous END, when the task changes;
* period: START[n+1] − START[n] of one task;
* jitter: max − min of the execution times.

To convert, 1 cycle = 10 ns.

## Sizes and capacity

| Parameter                        | Default | Where                          |
|----------------------------------|---------|--------------------------------|
| `LOG_DEPTH` / `DEPTH`            | 256     | `event_logger_soc`, `event_logger` |
| `TS_WIDTH`                       | 32      | `event_logger`                 |
| `RAM_SIZE_BYTES` / `SIZE_BYTES`  | 65536   | `event_logger_soc`, `onchip_ram` |

A 10 s run of the two tasks, one every 500 ms and one every 1000 ms, produces
20·2 + 10·2 = 60 events. That uses less than a quarter of the buffer, and 10 s
is 1.0·10⁹ cycles, well below the counter's wrap at 2³² ≈ 4.29·10⁹ cycles. The
buffer takes 2 KB: 256 × 64 bits. Bits [31:16] of every entry are always zero,
so synthesis keeps only 48 bits per entry.

## Where this departs from, or adds to, the original design

* The original text calls the buffer both a "ring buffer" and a "linear buffer
  ... (not ring-mode)". This RTL implements the linear buffer with overflow
  detection, which is the behaviour described in detail.
* These behaviours are not specified in the original and were chosen here:
  * bus timing (no wait states, read latency 1);
  * reads past the end return 0;
  * write-only registers read as 0;
  * byte enables are ignored by the logger;
  * the entry count is not lowered by reading.
* The following are this implementation's choices: all base addresses except
  the logger's, the SYSID value and layout, the arbitration policy, the default
  slave, the AXI4-Lite adapter's structure, and the reset synchronizer's depth.
* Not built, because they are vendor parts: the NIOS-V CPU, the JTAG UART
  (64-byte FIFO, IRQ to the CPU), and the PLL (50 → 100 MHz). The FreeRTOS
  tasks and the host script are software. The system testbench plays the roles
  of the CPU, the UART and the host.

## Verification

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| Testbench              | What it checks                                                       |
|------------------------|----------------------------------------------------------------------|
| `tb_cycle_counter`     | counting, clear, hold while cleared, 4-bit wrap                      |
| `tb_event_buffer`      | 3000 random write/read cycles against a reference, same-address bypass |
| `tb_event_logger`      | exact timestamps (testbench counts edges), back-to-back events, readout right after capture, STATUS, overflow at 256 with 300 writes, read past end, clear |
| `tb_onchip_ram`        | full-range random addresses, byte enables                            |
| `tb_sysid`             | ID value, other offsets, read latency                                |
| `tb_reset_bridge`      | asynchronous assert, release two edges later                         |
| `tb_axil2avmm`         | random AXI4-Lite traffic with late W, backpressure on B/R and Avalon wait states against a reference; simultaneous read and write (each wins); exact 2-cycle write and 3-cycle read latency |
| `tb_avmm_interconnect` | two random masters against slave models with random wait states: data, ordering, address translation; counts RAM contention, round-robin alternation, stalls, blocking by an outstanding read, default-slave reads |
| `tb_event_logger_soc`  | full system at default sizes (see below)                             |

`tb_event_logger_soc` runs the whole system at its default sizes:

1. The testbench drives both CPU masters as AXI4-Lite. It loads a program image
   into RAM, and the instruction master keeps fetching and checking it.
2. Two tasks run with periods of 500 and 1000 ms. Time is scaled to 20 cycles
   per ms, so the window is 200,000 cycles. Both tasks touch stack words in RAM
   while they work.
3. The dump task sends CSV through a JTAG UART model and polls its free space.
4. The host side parses the text and checks every line against the testbench's
   own record of when each store was accepted. It also checks that the
   execution times, periods and task switches are plausible.
5. A second phase writes 300 events to show overflow.

The test fails if any of these never happened: RAM contention, a UART stall, a
full UART FIFO, a late task start, or an overflow.

### Running with Verilator

From the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal \
    rtl/axil_pkg.sv rtl/avmm_pkg.sv rtl/evlog_pkg.sv -y rtl -y tb \
    tb/tb_event_logger_soc.sv --top-module tb_event_logger_soc -Mdir obj
./obj/Vtb_event_logger_soc
```

To run another testbench, replace the name. The packages must come first on the
command line. The system test takes well under a second.

## Files

* `rtl/avmm_pkg.sv`, `rtl/axil_pkg.sv`: Avalon-MM and AXI4-Lite request and
  response structs.
* `rtl/evlog_pkg.sv`: register offsets, event codes, entry struct.
* `rtl/cycle_counter.sv`, `rtl/event_buffer.sv`, `rtl/event_logger.sv`: the
  logger.
* `rtl/onchip_ram.sv`, `rtl/sysid.sv`, `rtl/reset_bridge.sv`,
  `rtl/axil2avmm.sv`, `rtl/avmm_interconnect.sv`: the system blocks.
* `rtl/event_logger_soc.sv`: the top.
* `tb/tb_*.sv`: the testbenches. `tb/tb_avmm_slave_model.sv` and
  `tb/tb_jtag_uart_model.sv` are testbench-only models.
