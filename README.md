# IP information registers for a CPU + 2D GPU test system

Debugging a system-on-chip on an FPGA usually means guessing from the outside what its blocks
are doing. The idea here is to give each IP block a small, uniform set of **IP information
registers (IIR)**: a window of 32-bit words that says what the block is, which version it is,
lets a controller reset it, and records what happened inside it: counters, and logs of events
stamped with a shared system clock. A second CPU, the *data-gathering master*, then finds
every such block by scanning its address space for a recognisable header. It checks that the
hardware matches the software it was built for, releases the system under test, and reads the
logs back for analysis.

This RTL implements that register hardware for one concrete test system: a CPU and a 2D
graphics processor (GPU) that share one 512 kB asynchronous SRAM, with a 640x480 VGA output.
It contains four IIR blocks:

| window (byte address) | block | type | what it adds |
|---|---|---|---|
| `0x0208_0000`..`0x0208_007F` | SRAM controller | 000 | 64-bit SRAM read and write counters |
| `0x0500_1800` (inside the GPU's `0x0500_0000`..`0x0500_3FFF` port) | GPU | 110 | frame counter; log of CPU/GPU SRAM use written to an external log memory |
| `0x0600_0000`..`0x0600_00FF` | CPU monitor | 101 | CPU reset control, wait statistics, three event logs of CPU bus traffic |
| `0x0600_0100`..`0x0600_017F` | system IIR | 000 | system identity, build string, 64-bit system counter (the timestamp) |

The top module `iir_test_setup` holds all four blocks, the shared SRAM controller, the GPU's
VGA timing generator and the logic that shares the GPU's register port. The CPUs, the GPU's
pixel engine, the SDRAM that receives the GPU log, and the memory chips are outside: they
connect through the top's ports.

## The general registers (every block)

Each window starts with the same registers (`rtl/iir_general_regs.sv`, offsets in 32-bit words):

| offset | access | content |
|---|---|---|
| 0x00 | R | header: reads alternate between `"IIR1"` and its byte-reversed form `"1RII"` |
| 0x01 | R | type: bit 0 external block (watches another IP from outside), bit 1 IP registers exist, bit 2 IP reset exists |
| 0x02 | R | offset from the IIR window to the IP's own registers (present when type bit 1 is set) |
| 0x03 | R/W | IP reset, active high (present when type bit 2 is set) |
| 0x04 | R | instance number |
| 0x05 | R/W | mutex for several masters (only where configured) |
| 0x06.. | R | VLNV: vendor, library, name, version, as NUL-terminated ASCII strings |

**The alternating header makes the scan work.** A scanner reads a candidate address twice. RAM,
unmapped space and ordinary registers return the same value both times. An IIR window returns
`IIR1` and then `1RII`. Only reads of offset 0 toggle the header, and the first read after
reset returns `IIR1`. Strings pack their first character into bits 7:0, so the header word
`0x3152_4949` shows as `IIR1` in a little-endian memory dump.

Registers marked R/C in a block's map are counters or statistics that any write clears, whatever
the data. Reads and writes to offsets a block does not implement return 0 and increment that
block's *faulty read* or *faulty write* counter, where it has one.

The mutex is one word. A non-zero write claims it only while it holds zero, and a zero write
releases it. A master writes its ID and reads the word back to see whether it won. This protocol
is this design's own; none of the four blocks in the test system enables the mutex.

## Event logs (`rtl/event_log.sv`)

The CPU monitor's three logs share one design. Each log is a 128-word memory holding events
as a timestamp word followed by data words (one data word here, so 64 events). The timestamp
is the low 32 bits of the system counter. A log register is driven by *command writes*: the
written value is a command code, not data.

| code | command |
|---|---|
| 0 / 1 | disable / enable logging |
| 2 | clear the log |
| 3 / 4 | disable / enable automatic clear after a full read |
| 5 / 6 | linear mode / FIFO mode |
| 7 | following reads return log memory words, oldest first |
| 8 | following reads return the status word |

Status word: bit 0 enabled, bit 1 auto clear, bit 2 overflow, bits 10:3 fill amount in words.

* **Linear mode** fills the memory once. When it is full, logging stops (the enable bit drops),
  and the next event sets overflow.
* **FIFO mode** overwrites the oldest event and sets overflow.
* **Auto clear** solves a race: clearing the log by a command after reading it would lose any
  event that arrived in between. With auto clear on, the read of the last filled word clears
  the log. An event that arrives in that same cycle is kept as the first entry of the new log.
* A log has one read pointer. The monitor's register 0x0E can load it, to re-read or skip
  entries.

After reset a log is disabled and in linear mode, with auto clear off, and reads return the status word.

**Periodic logs.** The same module becomes a periodic log when its `PERIOD` parameter is
non-zero. It then stores no timestamps. At the end of every interval of `PERIOD` enabled clocks
it writes one entry. The entry holds the number of cycles the input was active in that interval,
followed by the data input as it was in the interval's last cycle. The entry's position in the
log gives its time. This suits utilisation figures, such as how busy a port was per interval.
Commands, modes and status work as for event logs. The blocks of this test system use
event logs only (`PERIOD = 0`).

## CPU monitor (`rtl/nios2_monitor.sv`)

This is an *external* IIR block: it sits beside the CPU and watches the CPU's instruction and
data master ports, because the CPU core itself cannot be changed. Its IP reset register drives
the CPU's reset and is **set at system reset**. The CPU under test therefore stays halted until
the data-gathering master has found the blocks, checked the system and written 0 to offset 0x03.

| offset | access | content |
|---|---|---|
| 0x0E | R/W | log read pointer, loaded into all three logs |
| 0x0F / 0x10 | R/C | reads / writes to this window |
| 0x11 / 0x12 | R/C | faulty reads / writes |
| 0x13 | R/C | longest run of cycles the CPU waited for memory |
| 0x14 | log | stall log, data `{data stalled, instruction stalled}` |
| 0x15 | log | instruction log, data `{read, address[30:0]}` |
| 0x16 | log | data log, data `{read, write, address[29:0]}` |

An event is recorded whenever the logged bits differ from the previous cycle. So the instruction
log holds one entry for every new fetch address and for every start and end of a fetch. That is
enough to reconstruct the CPU's instruction stream around a crash.

## Shared SRAM controller (`rtl/sram_2x_access.sv`)

The GPU and the CPU share one 256K x 16 SRAM. **The GPU always wins**: a GPU read takes the SRAM
in the cycle it is asserted, and a CPU request is held with `cpu_waitrequest` until a cycle
without a GPU read. Every access takes one 10 ns cycle. The address, data, chip-enable and
output-enable pins are registered. Write-enable is held low for the whole cycle. Read data
is captured on the next edge, so read data returns two cycles after the request is accepted,
for both masters. `cpu_active` (CPU requesting, granted or waiting) goes to the GPU's logger.

The controller's IIR is on a separate slave port, so the memory port keeps a flat address space.
Offsets 0x10/0x11 hold the 64-bit write count (low/high) and 0x12/0x13 the read count. Reading a
low word latches its high word, so a low-then-high pair of reads is consistent. Writing either word clears the counter.

The original controller times writes with a 5 ns write pulse inside the 10 ns cycle. This
single-clock version keeps write-enable low for the full cycle instead. Check that against the
data sheet of the SRAM you use.

## GPU port sharing, VGA timing and the SRAM usage log

**Port sharing** (`rtl/iir_if_share.sv`). The GPU has one 4096-word slave port. Word addresses
0x600..0x61F (byte offset 0x1800) go to its IIR block and the rest to the GPU's own registers.
Because the window sits 0x1800 bytes above the start of the GPU's registers, the IIR's offset
register reads -0x1800. Read data is multiplexed by the registered target of the last read. The
GPU side may insert wait states, and the IIR side never does.

**VGA timing** (`rtl/vga_sync_gen.sv`). This is the standard 640x480 timing (800x525 including
blanking) with 4 system clocks per pixel at 100 MHz. Besides syncs and blanking it gives the beam
position `screen_x` and `screen_y`, the clock within the pixel `x_cycle`, and `fill_y`. `fill_y`
is the visible line the GPU is drawing into its spare line buffer: the line after the one on
screen, and 0 from the last visible line through vertical blanking.

**SRAM usage log** (`rtl/iir_xd_gpu.sv`). This is the block that shows how the CPU and GPU share
the SRAM. The logged signal is the pair `{cpu_active, gpu_active}`. Every change of that pair
becomes one 32-bit word, stamped with the beam position instead of the system counter:

```
frame start: [31]=1  [30:22]=0  [21:2]=frame number               [1]=cpu [0]=gpu
inside frame:[31]=0  [30:24]=0  [23:13]=screen x [12:11]=x cycle [10:2]=fill y [1]=cpu [0]=gpu
```

Words go into a 128-entry FIFO. A write master drains the FIFO into an external memory range at
one word per clock, unless that memory stalls. Control, in the GPU's IIR window:

| offset | access | content |
|---|---|---|
| 0x0D | R | frames since the GPU left reset |
| 0x0E / 0x0F | R/C | faulty writes / reads |
| 0x10 | R/W | frames to capture. Writing N > 0 arms the log, empties the FIFO and restarts at the begin address. The capture runs from the next frame start for N whole frames. Reads return the frames still to go. |
| 0x11 / 0x12 | R/W | log memory begin / end byte address (end exclusive) |
| 0x13 | R/W | bit 0 active (armed, capturing or still draining), bit 1 FIFO overrun. Writing bit 0 = 0 stops the capture. Writing bit 1 = 0 clears the overrun flag. |

The reader polls bit 0 until it drops and then reads the memory range. If the log memory range
fills, the capture ends early. If the FIFO fills, the event is dropped and the overrun bit is set.
One frame at 100 MHz is 1,680,000 clocks. In the worst case that is as many words (6.7 MB), so
the range should be sized for that, or the activity should be expected to change less often.
The end-to-end test produces about 83,000 words per frame.

The GPU's IP reset (offset 0x03) holds the external pixel engine in reset. It also restarts the
VGA timing and the frame counter.

## The data-gathering view (`rtl/iir_addr_decode.sv`)

A single master reaches the four windows through a plain decoder, with no address mirroring.
Other addresses read 0 without waiting, and `dg_unmapped` pulses for them so a testbench can
count them. Only accesses to the GPU's own registers can wait. In a real system this decoder is
replaced by the bus fabric. A fabric that mirrors addresses makes each block appear several
times, and the instance number lets software discard the copies.

## Files

| file | content |
|---|---|
| `rtl/iir_pkg.sv` | header words, offsets, log commands, status and log-word structs, VLNV strings |
| `rtl/iir_general_regs.sv` | general registers of every IIR block |
| `rtl/event_log.sv` | event or periodic log with commands, linear/FIFO modes, auto clear |
| `rtl/system_iir.sv` | system IIR and 64-bit system counter |
| `rtl/nios2_monitor.sv` | external IIR of the CPU under test |
| `rtl/sram_2x_access.sv` | shared SRAM controller with its IIR port |
| `rtl/vga_sync_gen.sv` | 640x480 timing with beam position |
| `rtl/sync_fifo.sv` | show-ahead FIFO used by the GPU logger |
| `rtl/iir_xd_gpu.sv` | GPU IIR block and SRAM usage logger |
| `rtl/iir_if_share.sv` | splits the GPU port between its registers and its IIR |
| `rtl/iir_addr_decode.sv` | data-gathering master's address decoder |
| `rtl/iir_test_setup.sv` | top |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/sram_async_model.sv` | behavioural asynchronous SRAM for the testbenches |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. A watchdog ends it with
a failure if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/iir_pkg.sv tb/tb_iir_test_setup.sv \
          --top-module tb_iir_test_setup -o sim && ./obj_dir/sim
```

Replace the testbench name to run the others. `tb_iir_test_setup` runs the whole top at its
default parameters (full 640x480 timing, 128-word logs, 128-entry FIFO) in a few seconds. It
surrounds the top with models of the CPU, the GPU pixel engine (bursts of SRAM reads on every
line, longer every 16 lines, and a short one in vertical blanking), the GPU's own registers and a
log memory with random wait states. It then does the following:

1. scans `0x0200_0000`..`0x0600_01FF`, expects exactly the four windows above, and checks their
   types, VLNV strings and the system's build string `iir_xd_test-11.02.2012`;
2. enables two monitor logs, releases the CPU, and compares both logs and the longest wait with
   references recorded from the CPU's ports (this overflows a linear log and uses auto clear);
3. captures one full frame of SRAM usage and compares every log word with a reference;
4. ends a capture early with a 16-word log range, overruns the logger's FIFO by stalling the
   log memory, then resets CPU and GPU through their IIR reset registers and checks the SRAM
   counters.

It counts header toggles, faulty and unmapped accesses, GPU register pass-through, CPU stalls,
log overflow, auto clear, frame capture, a full log range, FIFO overrun and IP resets, and fails
if any of them never happened.

## What follows the reference design and what is this design's own

These follow the reference system this RTL was written from: the register maps and their
offsets, the header and type codes, the log commands and status layout, the 128-word log size,
the GPU log word formats, the window addresses and sizes, the VLNV and build strings, the GPU's
priority on the SRAM, the CPU being held in reset until released, and a 64-bit system counter.

These are this design's own choices, where the reference leaves them open:

* the byte order of strings;
* the mutex protocol;
* what counts as a monitor event, and how its bits are packed;
* how many data words a log event has, and that the fill amount counts words;
* what a periodic log entry contains;
* the overflow rules;
* the GPU's capture start and stop rules;
* the end-exclusive log range;
* the FIFO depth;
* the VGA porch and sync widths;
* the definition of `fill_y`;
* the single-cycle SRAM timing and its full-cycle write pulse;
* the layout of the system IIR beyond its strings;
* the decoder without mirrors.

Not built:

* the GPU's pixel engine and its main state machine. The frame counter counts from the GPU's IP
  reset rather than from that state machine leaving reset.
* a proposed arbiter that hands the CPU the GPU's unused SRAM time per line.
* a crash watchdog counter that counts cycles without cache fills or flushes. It was suggested
  as another way to detect a crashed CPU, but it is not part of the monitor's register map.
* the CPUs, the bus fabric, the SDRAM, flash and JTAG parts.

Timing closure at 100 MHz has not been checked on an FPGA.
