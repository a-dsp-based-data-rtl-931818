# DSP data acquisition board: glue logic in SystemVerilog

Beam instrumentation in a collider spreads thousands of digitizers along the
tunnel. Each of them produces far more data than a control system can take in.
This board puts a floating point DSP next to the digitizers. The DSP filters and
corrects the raw samples. It keeps the results in a shared static RAM, which
works as a "flight recorder" that the control system reads over VME.

The board is a 6U VME card that also fits as half of a VXI module. The DSP has
two independent 32-bit ports:

* **Port A** is the *local bus*. It holds the static RAM (up to 4 Mbytes in
  four plug-in modules) and a 128 Kbyte FLASH for the program. The VME bus
  shares this bus with the DSP.
* **Port B** goes to four *Industry Pack* (IP) mezzanine slots. These hold the
  digitizers and the timing-system interface.

This repository holds the logic around the DSP: the VME/VXI slave, the local
bus arbitration, the RAM and FLASH control, and the IP interface. The DSP
itself, the IP cards and the analog front ends are outside the design. The
DSP's two ports are ports of the top module, `dsp_board`.

```
  VME ─── vme_slave ──┐                     ┌── sram_ctrl ── sram_module ×4
            │         ├── lbus_arbiter ── lbus_decode
          vxi_regs    │                     └── flash_mem
  DSP port A ─────────┘
  DSP port B ─────────── ip_interface ─────── IP slots 0..3
```

## The local bus: one bus, two masters

Most of the design's difficulty is here. Both the DSP and the VME bus reach the
RAM and the FLASH over one local bus.

**Priority.** The DSP always has priority, because its throughput is what
matters. `lbus_arbiter` gives the bus to the DSP whenever both ask in the same
clock. A transfer that has started is never broken off. The other master waits
until the target has answered.

**VME waits.** The VME bus is asynchronous, so a VME master does not need to
know that arbitration happens. `vme_slave` holds its local bus request until
the transfer is done, and only then drives DTACK\*. A VME cycle that collides
with DSP traffic therefore just takes longer.

**Transfer protocol.** Each transfer is a request struct (`lb_req_t`: `req`,
`we`, a 24-bit *word* address, 32-bit data). The master holds it until the
target returns a one-clock `ack`, with `err` set if the target refuses. Both
structs are in `dspb_pkg`. The master may drop or replace its request in the
ack clock. An assertion in the arbiter checks that a request is held until
then.

**Grant timing.** The grant is combinational in the clock the bus is free, so
arbitration adds no clock.

**RAM speed.** A RAM transfer takes three clocks (one wait state). With the
32 MHz clock this design assumes, that is 42.7 Mbyte/s, the board's rated RAM
throughput.

### Memory map (32-bit word addresses)

| words             | contents    | from VME                            | from DSP      |
|-------------------|-------------|-------------------------------------|---------------|
| 000000h – 003FFFh | static RAM  | read only                           | read / write  |
| 004000h – 007FFFh | static RAM  | read / write (settings to the DSP)  | read / write  |
| 008000h – 0FFFFFh | static RAM  | read only                           | read / write  |
| 100000h – 100002h | board registers | undefined → BERR                | see below     |
| 100003h – F7FFFFh | undefined   | BERR                                | `err`         |
| F80000h – FFFFFFh | FLASH (32K words, repeated) | read; write = program, BERR if locked | same |

The board's own map lists these ranges and their VME rights. Two points here
are readings rather than statements:

* The map is read in 32-bit words. The RAM range 000000h–0FFFFFh is then
  exactly 4 Mbytes. Read as byte offsets, it would be only 1 Mbyte.
* The first three lines are taken to be the RAM.

The board registers are this design's own. The DSP needs some way to lock the
FLASH and to learn the installed RAM size:

* `100000h` – FLASH lock register: bit *n* locks section *n*.
* `100001h` – FLASH erase: a write of *n* erases section *n*.
* `100002h` – installed RAM size in words (read only).

From VME the memory appears in an A32 window of 64 Mbytes. The window base
(A31..A26) comes from the VXI offset register. The word address is A25..A2.
Memory accesses must be D32. A write to read-only RAM, any access to the
undefined range, a non-D32 memory access and a refused FLASH write all end
with BERR\*. The VXI configuration registers answer in A16 space at
C000h + 64 × logical address, with D16 transfers.

## Static RAM that configures itself

Each RAM socket takes a 64, 256, 512 or 1024 Kbyte module. Each module reports
its size on two pins. `sram_ctrl` adds up the fitted modules in socket order
and places them end to end from word 0. It then decodes every access to one
module and an offset within it. Anything beyond the installed total is
answered with `err`.

The pin code is an assumption: 00 = 64K, 01 = 256K, 10 = 512K, 11 = 1 Mbyte,
plus a presence bit per socket. The total is readable at `100002h`.
`sram_module` is the memory array of one module. It is sized for the largest
module and has a registered read.

## FLASH with lockable sections

The 128 Kbyte FLASH is split into eight sections of 4K words. A locked section
refuses programming and erasing, so a core program stored in it cannot be
overwritten by mistake.

The programming model below follows ordinary FLASH devices and is an
assumption:

* Programming can only clear bits: new = old AND data.
* An erase sets a whole section to ones, one word per clock. The transfer is
  acknowledged when the erase is done, so the local bus is busy for about 4096
  clocks.
* Reads take 3 wait states.

## Industry Pack interface and its rates

`ip_interface` turns a port B word transfer into an IP bus cycle on one slot.

**Port B address layout.** The port B address selects:

* the slot, in addr[9:8]
* the space, in addr[7:6]: I/O, ID or interrupt-vector (INTSel), with the
  fourth code refused
* IP A6..A1, in addr[5:0]

**Cycle steps.** An IP cycle is counted in IP clocks:

1. Select, address and data are driven.
2. ACK\* is sampled on each following clock.
3. When ACK\* is seen, port B is acknowledged.
4. A few recovery clocks follow.

**Rates.** The recovery counts were chosen so that a card that acknowledges at
once gives the board's rated throughput:

| slot speed | cycle | 16-bit rate | double wide (32-bit) |
|-----------|-------|-------------|----------------------|
| 8 MHz (every 4th clock of 32 MHz) | 3 IP clocks = 12 clocks | 5.3 Mbyte/s | 10.6 Mbyte/s |
| 32 MHz (slots 0 and 1 only, when `fast_sel`) | 5 clocks | 12.8 Mbyte/s | 25.6 Mbyte/s |

**Double wide cards.** A double wide card spans slots 0/1 or 2/3, selected by
the `dw` straps. It gets both selects at once and moves D15..0 on the even slot
and D31..16 on the odd one. ID and interrupt cycles stay 16 bit.

**Interrupts.** Each slot's two interrupt request lines are synchronized and
brought out as `ip_irq` for the DSP's interrupt inputs.

**Which slots are fast.** The board has the 32 MHz interface on two slots but
does not say which two. The `FAST_SLOTS` parameter sets them; the default is
slots 0 and 1.

## VXI registers

`vxi_regs` holds the four registers a VXI resource manager expects of a
register-based A16/A32 device:

* **ID** – class and address space, plus a manufacturer code (placeholder
  `FFFh`).
* **Device type** – memory code 5, which requests 64 Mbytes of A32 space.
* **Status / control** – A32 enable, sysfail inhibit, reset, passed, ready.
* **Offset** – the A32 base.

The bit layout follows VXI practice, not a board-specific specification. The
control register's reset bit is the `dsp_reset` output.

## What is assumed

The board description gives the structure, the priorities, the sizes and the
rates. It gives no signal-level detail. The main choices made here are:

* **Clock.** A single 32 MHz board clock. This comes from the RAM and IP rates.
  The DSP's 16.5 MIPS would suggest 33 MHz.
* **Reset.** An asynchronous, low-active reset clears all control state.
  Memory contents and FLASH contents are not reset. FLASH lock bits reset to
  `LOCK_INIT`; in a real device they are nonvolatile.
* **DSP ports.** The DSP96002 bus protocol (TS\*, TA\*, bus request/grant) is
  not modelled. Ports A and B use the simple request/acknowledge bus described
  above. An adapter to the real pins would go between the DSP and `dsp_board`.
* **IP spaces.** IP memory space (MemSel\*) and byte strobes are not
  implemented.
* **Standard conventions.** VME address modifiers (A16 29h/2Dh, A32 09h, 0Ah,
  0Dh, 0Eh) and the VXI register layout come from the bus standards.

## Files

* `rtl/dspb_pkg.sv` – local bus structs, word map, size codes.
* `rtl/dsp_board.sv` – top level.
* `rtl/vme_slave.sv`, `rtl/vxi_regs.sv`, `rtl/lbus_arbiter.sv`,
  `rtl/lbus_decode.sv`, `rtl/sram_ctrl.sv`, `rtl/sram_module.sv`,
  `rtl/flash_mem.sv`, `rtl/ip_interface.sv` – the blocks.
* `tb/tb_<block>.sv` – a self-checking testbench per block. Each ends by
  printing `TB_RESULT checks=N failures=M`.
* `tb/tb_dsp_board.sv` – the end-to-end test at full size (4 × 1 Mbyte RAM).
  It runs the ring position monitor case:
  * A 4-channel digitizer card on the 32 MHz slot interrupts at 78 kHz.
  * A DSP model reads the samples over port B. It writes samples, sums and
    differences into a record buffer in the VME-read-only RAM.
  * A VME master configures the VXI registers, writes a setting into the
    read/write window and reads every record back. It checks the records
    against values computed independently.
  * Along the way the test makes each mechanism happen at least once: VME
    waiting for the DSP, BERR on a read-only write, on the undefined range and
    on a locked FLASH section, a refused DSP write to a locked section, 8 MHz,
    32 MHz and double wide IP cycles, and interrupts.
* `tb/tb_workloads.sv` – the three channel/rate cases of the board's typical
  applications, run through the whole board.

## What the tests show

* RAM: 16 back-to-back DSP writes complete one word every three clocks. That
  is 42.7 Mbyte/s at 32 MHz.
* IP: the cycle period is 12 clocks on an 8 MHz slot and 5 clocks on a 32 MHz
  slot. A double wide card moves 32 bits in the same period.
* VME: every range of the map gives its rights, and DTACK\* follows the local
  bus answer.
* Typical applications (`tb_workloads`), at full size. Each conversion is
  served well inside its sample period:

  | application            | channels | rate     | period       | DSP model busy |
  |------------------------|----------|----------|--------------|----------------|
  | ring position monitor  | 4        | 78 kSa/s | 410 clocks   | about 25 clocks  |
  | ring loss monitor      | 8        | 20 kSa/s | 1600 clocks  | about 105 clocks |
  | injection line         | 24       | 30 Sa/s  | 1.07 M clocks | about 300 clocks |

  The DSP model does no arithmetic; it only moves the samples. So these
  figures measure the bus load, not the DSP's processing time.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/dspb_pkg.sv tb/tb_dsp_board.sv \
          --top-module tb_dsp_board -o sim && ./obj_dir/sim
```

Replace `tb_dsp_board` with any other testbench name. The package file must
come first. Everything in `rtl/` is synthesizable. The RAM and FLASH are
written as arrays and are meant to become memories.
