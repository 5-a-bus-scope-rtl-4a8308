# Bus scope: an internal logic analyser read over the system bus

Hardware cannot be stopped at a breakpoint the way software can, so the practical way to
see a misbehaving circuit at speed is to record it. This bus scope records a probe word
(up to 32 bits) into on-chip memory on every clock where the probe is valid. It keeps the
most recent 2^LGMEM samples in a circular buffer. When a trigger fires, it records a
programmable number of further samples and then freezes. Everything about the scope is
done through two bus registers: resetting it, arming the trigger, setting the holdoff,
finding out whether it has stopped, and reading the trace back. It is controlled from
inside the design, not over JTAG. A CPU on the same bus can trigger it by software (for
example when a self-test fails), poll it, or take its interrupt, and then dump the trace.
A debug bridge can do the same from a host.

The RTL has one capture engine and two bus front ends (pipelined Wishbone and AXI4-Lite).
It also has an optional run-length compressor for slowly changing probes, and a top level
that puts three scopes side by side.

## Capturing a trace

The capture engine (`scope_capture`) keeps four flags instead of a state register:

| phase | flags (stopped, triggered, primed) | what happens |
|---|---|---|
| reset | 000 | write pointer cleared |
| filling | 000 | each valid sample (`i_ce`) is written, pointer advances |
| primed | 001 | the pointer has wrapped once: every word now holds a real sample. Only now is a trigger accepted |
| triggered | 011 | a countdown loaded with the holdoff counts valid samples |
| stopped | 111 | writing ends and the buffer is frozen |

Only these four flag patterns can occur, and a stopped, triggered engine has a countdown of
zero. Both rules are written as assertions.

**Why "primed" matters.** Block RAM cannot be reset. A trace read before the buffer has
been filled once would mix fresh samples with garbage. So the engine ignores triggers until
it has written all 2^LGMEM words since its last reset. A scope that is reset and then
triggered immediately therefore takes 2^LGMEM valid samples before it can stop.

**Trigger and holdoff.** The engine's trigger is the manual trigger (a bit written over the
bus) OR'd with the hardware trigger input `i_trigger`. The hardware input can be masked by
a disable bit. The trigger is heeded on any clock, whether or not that clock carries a
sample. It is latched: only a reset clears it. After the trigger, capture continues until
`holdoff` more samples have been written, then stops. In detail:

* If the trigger clock itself carries a sample, that sample is the trigger sample. Exactly
  `holdoff` samples follow it. In the frozen trace, the trigger sample is at position
  2^LGMEM − 1 − holdoff, counting from the oldest (position 0).
* If the trigger clock carries no sample, the `holdoff` samples are counted from the next
  valid clock on. With holdoff 0 the engine stops on that next sample.
* A holdoff of 0 shows only the history before the trigger. A holdoff of 2^LGMEM − 1 shows
  only what follows it. Anything in between gives both. A holdoff larger than the buffer
  delays the capture window past the trigger, for example to catch one video line many
  lines after start of frame. The holdoff register has 20 bits.

**Reading back.** While capture runs, the read pointer follows the write pointer, so it
always points at the oldest word. The pointer is the write address plus `i_ce`, so it is
already right on the clock where capture stops. After the stop, each data-register read
returns the word under the pointer and advances it. 2^LGMEM consecutive reads return the
trace oldest first, wherever the buffer happened to wrap. A data read before the stop
returns the live probe word instead, which is useful as a quick peek at a signal.

## Register map

Two 32-bit registers. The Wishbone port uses word addresses 0 and 1. The AXI-Lite port
uses byte addresses 0 and 4.

**Control (0)**, read:

| bits | field |
|---|---|
| 31 | internal reset in progress |
| 30 | stopped |
| 29 | triggered |
| 28 | primed |
| 27 | manual trigger set |
| 26 | hardware trigger disabled |
| 25 | 0 |
| 24:20 | LGMEM (log2 of the buffer depth) |
| 19:0 | holdoff |

**Control (0)**, write. Byte selects matter:

* Every control write restarts the capture, unless byte 3 is written with bit 31 set.
  Software therefore ORs `0x80000000` into any write that must leave a trace in place,
  such as a manual trigger or a change to the disable bit.
* With byte 3 selected, bit 27 = 1 sets the manual trigger and bit 26 sets or clears the
  hardware-trigger disable. The manual trigger stays set until the next reset.
* Byte lanes 0, 1 and 2 write holdoff bits 7:0, 15:8 and 19:16.

Typical sequences:

* Restart with holdoff H: write `H`.
* Restart with the hardware trigger masked: write `0x04000000 | H`.
* Trigger by software without losing the history: write `0x88000000 | H`.
* Keep a frozen trace and change nothing: write `0x80000000 | H`.

A bus reset also sets the holdoff to 2^LGMEM − 4. That leaves a few samples of history and
most of the buffer for what follows the trigger.

**Data (1)**: each read returns the next trace word once stopped, or the live probe word
before that. Writes are ignored.

`o_interrupt` is the stopped flag. It stays high until the next reset.

## Bus front ends

**Wishbone (`wbscope`).** This is a pipelined Wishbone slave that never stalls. A request
is accepted on the clock where `cyc & stb` are high. Its acknowledgement, with read data,
comes exactly two clocks later. Requests may be issued on every clock. Dropping `cyc`
cancels the acknowledgements still in flight. The two clocks are needed because a
block-RAM read costs a clock of its own: clock 1 registers the address and reads the
memory, clock 2 selects between the control word, the trace word and the live probe, and
the result is presented with `ack`. Every access takes the same two clocks, including
writes and control reads, which keeps the pipeline trivial.

**AXI4-Lite (`axilscope`).** AW, W and AR each enter through a skid buffer with a
registered ready. A write is taken once address and data are both present and the B
channel can accept a response. The scope never back-pressures writes internally. Reads use
the same two-stage pipeline as on Wishbone. That pipeline cannot stall, so a stalled R
channel must never meet a full pipeline. The parameter `OPT_DOUBLE_FIFO` selects one of
two ways to guarantee this:

* `0`: a read is admitted only when the pipeline is empty and the R channel is free. This
  is simple and costs half the read bandwidth: one word every two clocks.
* `1` (default): a control FIFO holds one entry for every read between AR acceptance and
  the R handshake. Only its fill level is used: while it is full, no further AR is
  accepted. The pipeline feeds a data FIFO of the same depth, which drives R. Every word in
  the pipeline or the data FIFO owns a control-FIFO entry, so the data FIFO cannot
  overflow. With four entries the port returns one word per clock, two clocks after
  ARVALID.

Both variants return OKAY on every response and ignore PROT.

## Compression (`scope_rle`)

A scope on a serial line or a slow control signal mostly records the same value over and
over. The optional compressor sits between the probe and a scope whose data width is 32.
It takes 31-bit samples and emits words of two kinds:

* bit 31 = 0: bits 30:0 are a new sample;
* bit 31 = 1: the previous sample repeated another 1 + bits 30:0 times.

Repeats produce no word until the run ends. The end of a run produces two words at once
(the repeat count, then the new sample). The second word waits one clock in a single-word
buffer. A repeated sample produces nothing, so that buffer is always empty again before it
is needed, even with a valid sample on every clock. Runs are capped at 2^31 − 1 repeats.

To decode a trace, skip any leading repeat words (the sample they repeat has already been
overwritten) and expand the rest. A run still open when the scope stops is not recorded.
The trigger position is in compressed words, not in samples.

## The top level (`busscope_top`)

A system usually carries several scopes, each with its own probe, trigger and bus address.
`busscope_top` instantiates three:

* `u_scope`: a plain Wishbone scope.
* `u_cscope`: a Wishbone scope behind the compressor.
* `u_axscope`: an AXI-Lite scope with the double-FIFO read path.

The interrupts go to bits 0, 1 and 2 of a 15-entry interrupt vector meant for an interrupt
controller. Each bus port is brought out separately. Address decoding belongs to the
system interconnect and is not part of this RTL. All three share one clock. `i_reset` is
active high.

## Files

| file | contents |
|---|---|
| `rtl/busscope_pkg.sv` | register addresses, control-word bit positions, `scope_ctrl_t` |
| `rtl/scope_mem.sv` | 2^LGMEM × W simple dual-port RAM with a registered read |
| `rtl/scope_capture.sv` | pointers, flags, holdoff countdown, flag assertions |
| `rtl/scope_core.sv` | registers: internal reset, triggers, holdoff, control word, read mux |
| `rtl/wbscope.sv` | Wishbone front end |
| `rtl/axilscope.sv`, `rtl/skidbuffer.sv`, `rtl/sfifo.sv` | AXI-Lite front end and its parts |
| `rtl/scope_rle.sv` | run-length compressor |
| `rtl/busscope_top.sv` | three scopes and the interrupt vector |
| `tb/tb_*.sv` | one self-checking testbench per module, plus the video-row use case |
| `tb/wb_bfm.sv`, `tb/axil_bfm.sv` | bus-master interfaces used by the testbenches |
| `tb/wb_slave_check.sv` | Wishbone protocol monitor |

Parameters and defaults: `W` = 32 (probe width, at most 32), `LGMEM` = 12 (4096-word
buffer), `HOLDOFFBITS` = 20. For AXI-Lite there are also `C_AXI_ADDR_WIDTH` = 3,
`OPT_DOUBLE_FIFO` = 1 and `LGFIFO` = 2. At the defaults each scope uses 128 Kbit of RAM.
LGMEM must stay below 32 so that it fits the five-bit field of the control word.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends. Run them from the project
root, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/busscope_pkg.sv tb/tb_busscope_top.sv --top-module tb_busscope_top -o sim
./obj_dir/sim
```

`tb_busscope_top` runs the whole design at its default sizes. Three 4096-word scopes are
each filled, triggered and read out completely. The test covers: hardware trigger with
holdoff, masked trigger, manual trigger with immediate stop, writes that keep the trace,
live reads, compressed traces checked run by run against the stimulus, AXI-Lite reads
under back-pressure and at full rate, and the interrupt vector. It takes a few seconds.

`tb_hdmi_row` is a worked use case at the default size. A video timing counter runs
the full 720p raster (1650 × 750 clocks) and then the 1080p raster (2200 × 1125). The
hardware trigger is start of frame, and the holdoff is 80·L + L − 1 for line length L.
The scope then stops on the last pixel of row 80, and row 80 must come back complete and
in order. In the 720p run the first start of frame arrives before the buffer is full, so
the capture must wait for the next frame. This takes about 1.6 million clocks and under a
second.

The block testbenches use smaller buffers (16 to 64 words) so that every corner is reached
quickly. In particular, `tb_scope_capture` checks the holdoff rule above for holdoffs 0, 1,
3, 5, 12 and 40, with triggers on clocks with and without a sample.

`tb/wb_slave_check.sv` watches a Wishbone port on every clock. It checks that the port
never stalls and never has more than two requests outstanding. It also checks that each
acknowledgement comes exactly two clocks after its request, and that dropping `cyc`
abandons whatever is outstanding. `tb_wbscope` and `tb_busscope_top` include it. The RTL
carries its own assertions as well: the legal flag patterns, the skid-buffer hold rule, R
held under back-pressure, and FIFO overflow and underflow. Build with `--assert` to
enable them.

The simulator used has two-state logic. Every register that is read is reset, except the
RAM. Nothing depends on the RAM's contents before the buffer has been filled once.

## Where this design departs from the original description, and why

* **Holdoff count.** The original counter logic stops one sample later than "holdoff
  samples after the trigger" for any non-zero holdoff, but stops on the trigger sample for
  holdoff 0. Here the stop test is "countdown ≤ 1", so the number of samples after the
  trigger equals the holdoff for every value. Software that computes the trigger position
  as 2^LGMEM − 1 − holdoff gets the right answer throughout.
* **Read pointer.** The read pointer is loaded with the write address plus `i_ce` while
  running. Without the `+ i_ce`, the first word read after a stop would be the newest
  sample rather than the oldest.
* **Holdoff byte lanes.** The holdoff is written through byte lanes 0, 1 and 2.
* **Disable bit.** The hardware-trigger disable is described as write-only. Here it can
  also be read back, at bit 26 of the control word.
* **Data register address.** The data register sits at word address 1 on Wishbone and
  at byte address 4 on AXI-Lite. Only address bit 0 (Wishbone) or bit 2 (AXI-Lite) is
  decoded, so the scope appears at every other word of any larger window.
* **Wishbone `cyc`.** Requests are qualified by `cyc`, and dropping `cyc` flushes
  outstanding acknowledgements.
* **Added parts.** The skid buffers, FIFOs, FIFO depth, compressor pipeline and the
  three-scope top are this design's own construction, built to the behaviour described
  for them.

Not included: the host software that turns a trace into a VCD file, and the generated
interconnect that maps the scope into a system address space.
