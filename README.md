# ISUAL Mass Memory (MM) — SystemVerilog RTL

The Mass Memory is the one-gigabit science-data store of the ISUAL instrument's
Auxiliary Electronics Package. Six very different clients share it:

| client | link into the MM | traffic | priority |
|---|---|---|---|
| CCD imager (through the camera controller) | 12-bit parallel pixels, valid/ready | write-only, sequential, one pixel per 125 ns (96 Mb/s) | high |
| DSP on the camera controller | 16-bit data, 26-bit word address, wait | random read/write, ~100 ns cycles | high |
| Telemetry (to the DPU) | serial: data, clock, CTS | read-only, sequential, 2 Mb/s, 1106-byte packets | high |
| Array Photometer (AP) | serial: data, clock, strobe | write-only into a circular buffer, 320 k samples/s of 12 bits | medium |
| Spectrophotometer (SP) | serial: data, clock, strobe | write-only into a circular buffer, 60 k samples/s of 12 bits | medium |
| DPU | 8-bit data, 14-bit address, bank register | random byte read/write, a few hundred bytes/s | low |

The central idea is simple: **one memory port, one access per clock, and a
priority arbiter in front of it**. Every client is turned into the same kind
of requester by a small front end — a DMA engine for the streams, a bus
state machine with a wait line for the two processors — and the arbiter hands
out memory cycles by priority class. Any mix of clients may run at once; the
only limit is the total number of memory cycles per second.

## Block diagram

```
 CCD pixels ──► mm_ccd_if ──(FIFO, linear DMA)───────────┐
 DSP bus   ◄──► mm_dsp_if ──(wait until served)──────────┤
 TLM serial ◄── mm_tlm_if ◄─(read DMA, FIFO, shifter)────┤   mm_arbiter     mm_memory
 AP serial ──► mm_serial_rx ─► mm_circ_dma (circular) ───┼──► priority + ──► 2^27 x 8 bit
 SP serial ──► mm_serial_rx ─► mm_circ_dma (circular) ───┤    round robin   (32-bit rows,
 DPU bus   ◄──► mm_dpu_if ──(bank window)────────────────┘                   byte lanes)
                   │
                   └──► mm_regs (setup and status registers, DPU register space)
```

All of it is in `mm_top`. Shared types (request record, access sizes, port
numbers, priorities, register map) are in `mm_pkg`.

## The memory port and its arbitration

This is the part that decides whether the design works, so it is described
in detail.

**Request record.** Each client presents `req` and an `mm_req_t`:
`we`, `size` (`SZ_BYTE`, `SZ_WORD` = 16 bits, `SZ_DWORD` = 32 bits), a 27-bit
*byte* address and right-justified write data. The memory ignores address
bits below the access size (accesses are aligned) and is little-endian: the
16-bit word at byte address 2n holds byte 2n in bits [7:0].

**One cycle per access.** In a clock where the arbiter grants client *i*
(`gnt[i]`, combinational from the requests), that client's record goes to the
memory and is executed at the rising edge. A write is then complete. A read
returns its data in the next clock, on the shared `rdata` bus, flagged by
`rvalid[i]`. The client may raise its next request in the clock after the
grant, so a single client can use every cycle.

**Priority.** The clients are in three classes: CCD, DSP and telemetry high;
AP and SP medium; DPU low. In each clock the highest class with a pending
request wins. Inside a class the arbiter goes round-robin, starting after the
last client granted. So two saturating high-priority clients (say the CCD and a
busy DSP) get half the cycles each, and neither can lock the other out. The
medium and low classes get only the cycles the high class leaves free. The
round-robin tie-break is a choice made in this design; the specification only
gives the classes.

**Bandwidth budget.** The clock frequency is not specified. This design assumes
20 MHz, which gives 20 M accesses/s:

| client | accesses/s at full rate |
|---|---|
| CCD, one 16-bit word per pixel | 8 M |
| DSP, one access per 100 ns | up to 10 M |
| AP, one word per sample | 0.32 M |
| SP | 0.06 M |
| telemetry, one byte read per byte | 0.25 M |
| DPU | < 0.001 M |
| total | 18.6 M |

The end-to-end testbench runs all of these at once and checks that the CCD
source is never held off.

**Holding clients off.** Each kind of client reacts differently when it
loses arbitration:

* the processors (DSP, DPU) see their `wait` line stay high;
* the CCD front end buffers 8 pixels, then drops `ccd_ready`;
* the photometer channels cannot stop their serial source. They buffer
  4 samples, then drop samples and set an `overrun` flag;
* telemetry prefetches 4 bytes. If it cannot refill in time the serial link
  simply pauses between bytes.

## DMA channels

**CCD (`mm_ccd_if`).** Arming the channel latches a base byte address and a
size in pixels. Each pixel moves on a clock edge where `ccd_valid` and
`ccd_ready` are both high. It is stored zero-extended in one 16-bit word at
`base + 2n`. After `size` pixels the channel stops: `ready` stays low, `busy`
falls and `done` rises.

**Photometers (`mm_serial_rx` + `mm_circ_dma`).** One instance of each pair
serves the AP and one the SP.

The serial frame works like this. While `strobe` is high, each rising edge of
the serial clock shifts in one data bit, MSB first. When `strobe` falls, a
frame of exactly 12 bits becomes a sample. Any other length raises
`frame_err`. The three lines go through two-flop synchronisers, so the serial
clock must stay below a quarter of the system clock. Each level must last at
least about two system clocks.

The DMA writes sample *n* to `base + 2*(n mod size)`. `wptr` is the next slot,
and `wrapped` is set once the buffer has gone round. Base and size are taken
when the enable rises. Dropping the enable clears the FIFO and the flags.

**Telemetry (`mm_tlm_if`).** A start pulse latches the block address and
length in bytes. The block is read a byte at a time at incrementing addresses
into a 4-byte FIFO. The serial side sends MSB first. One bit lasts `CLK_DIV`
clocks (10 → 2 Mb/s at 20 MHz). `tlm_data` changes while `tlm_clk` is low, and
the receiver samples it on the rising edge in the middle of the bit. `tlm_cts`
is checked before every byte: a low CTS stops the link after the current byte.
`done` rises after the last bit. The DPU adds its own packet header and
trailer around this data.

## Processor buses

**DSP (`mm_dsp_if`).** The DSP drives `dsp_cs`, `dsp_we`, a 26-bit word
address (2^26 × 16 bits is the whole memory) and data. `dsp_wait` is high,
combinationally, until the access is done. On an idle memory a write is done
in the clock `cs` rises, and a read one clock later. A DSP cycle therefore
takes two clocks (100 ns) for a write and three for a read. One access is
made per `cs` pulse: the DSP drops `cs` to end the cycle. The DSP and DPU pass
commands to each other through ordinary memory blocks.

**DPU (`mm_dpu_if`).** The DPU's 14 address lines cover 16 KB. The 13-bit BANK
register supplies the rest: byte address = `{bank, dpu_addr}`. When
`dpu_reg` is high the cycle goes to the register file instead and ends in the
same clock. The handshake is the same as the DSP's (`dpu_cs`, `dpu_wait`). Its
1524 ns bus cycle is about 30 clocks, far more than a DPU access needs unless
the high and medium classes saturate the memory.

## Register map (DPU register space, `dpu_reg = 1`)

32-bit registers, accessed a byte at a time, little-endian; unused bits read 0.

| addr | name | contents |
|---|---|---|
| 0x00 | CTRL | bit0 CCD arm (pulse), bit1 AP enable, bit2 SP enable, bit3 telemetry start (pulse). Pulse bits read as 0. Writing CTRL also clears the frame-error bits. |
| 0x04 | BANK | DPU bank, 13 bits |
| 0x08 / 0x0C | CCD_BASE / CCD_SIZE | byte address / pixels |
| 0x10 / 0x14 | AP_BASE / AP_SIZE | byte address / samples |
| 0x18 / 0x1C | SP_BASE / SP_SIZE | byte address / samples |
| 0x20 / 0x24 | TLM_BASE / TLM_LEN | byte address / bytes |
| 0x28 | STATUS (ro) | 0 CCD busy, 1 CCD done, 2 AP overrun, 3 AP wrapped, 4 AP frame error, 5 SP overrun, 6 SP wrapped, 7 SP frame error, 8 TLM busy, 9 TLM done |
| 0x2C | CCD_COUNT (ro) | pixels written |
| 0x30 / 0x34 | AP_WPTR / SP_WPTR (ro) | next slot of each circular buffer |

Program a base or size before you arm, enable or start its channel. The
channel copies the value at that moment, so a partly written register does no
harm while the channel is running.

## What follows the specification and what is this design's own

These follow the specification:

* the client set and the direction of each link;
* the widths: 12-bit pixels and samples, 16-bit DSP data with 26 address
  lines, 8-bit DPU data with 14 address lines, 16 KB banks;
* the three-wire serial links;
* the priority classes;
* linear DMA for the CCD and for telemetry, circular buffers for AP and SP;
* the one-gigabit capacity with byte, word and double-word access.

These are choices made here because the specification leaves them open:

* the 20 MHz clock, with one access per clock;
* the memory as one synchronous array;
* round-robin inside a priority class;
* the handshakes and control lines, including a DPU wait line and a
  register-select line;
* one pixel or sample per 16-bit word;
* the bit order and edges of the serial links;
* FIFO depths;
* the register map, and programming the CCD buffer from the DPU (the
  specification allows the DSP or the DPU);
* synchronous active-low reset.

Not included:

* **error detection and correction**, which the specification leaves to be
  decided;
* the **power switching and the thermistor**, which have no logic in this
  module;
* the **24-bit CCD option**, mentioned only as an alternative to the 12-bit
  interface.

## Limits to know about

* Start, arm or enable a channel only while it is idle. Restarting the
  telemetry channel while a read is in flight can leave a stale byte in its
  FIFO.
* A size or length of 0 ends the CCD and telemetry channels at once. For a
  circular buffer it behaves as size 1.
* The DSP and DPU buses are taken to be synchronous to the MM clock. Only the
  serial inputs are synchronised.
* The whole memory is one behavioural-style array of 2^25 × 32 bits.
  Synthesis keeps it as a memory cell that must map onto real memory devices;
  their timing is not modelled.

## Simulation

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Any of them runs with plain Verilator, for
example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl \
  rtl/mm_pkg.sv tb/tb_mm_top.sv -y rtl --top-module tb_mm_top
./obj_dir/Vtb_mm_top
```

What each testbench checks:

* `tb_mm_memory`: all three access sizes against a byte model.
* `tb_mm_arbiter`: random request patterns against a reference model, the
  one-cycle read return, even sharing between two saturating high-priority
  clients, and the DPU being held off.
* `tb_mm_fifo`, `tb_mm_ccd_if`, `tb_mm_circ_dma`, `tb_mm_tlm_if`: data,
  addresses, wrap, overrun, the 2 Mb/s bit period and CTS. The CCD test also
  checks one pixel per clock on a free memory.
* `tb_mm_serial_rx`: samples and malformed frames.
* `tb_mm_dsp_if`, `tb_mm_dpu_if`: the bus handshakes, the bank window,
  register cycles and the latencies above.
* `tb_mm_regs`: the register map.

`tb_mm_top` runs the whole module at its full default size (1 Gbit) in a few
seconds. It has two phases:

* **Phase 1** runs every interface at its full rate at the same time:
  * 2000 CCD pixels at 125 ns;
  * back-to-back DSP cycles;
  * AP at 325 k and SP at 61.6 k samples/s;
  * a 1106-byte telemetry block with a CTS pause;
  * DPU writes through a bank.

  It checks that the CCD is never held off, and checks every stream's data in
  memory or on the telemetry link.
* **Phase 2** overloads the memory: a pixel every clock while the DSP hammers
  it. The CCD must then be held off without losing a pixel, the photometer
  channels must overrun, and the DPU must wait.

The testbench counts each mechanism (DSP wait, DPU wait, CCD hold-off, CTS
pause, bank switch, AP and SP wrap, overrun, frame error) and fails if any of
them never happened.

## Parameters

* `mm_pkg::MEM_ADDR_W` = 27: bytes of memory, as a power of two.
* `mm_top.TLM_CLK_DIV` = 10: clocks per telemetry bit.
* `mm_memory.ADDR_W`: memory size for a stand-alone memory.
* `WIDTH` / `FIFO_DEPTH` in the front ends.
* `mm_arbiter.N` and `PRIO`: number of clients and their priority classes.

A different clock frequency needs only a new `TLM_CLK_DIV`, together with a
fresh look at the bandwidth table above.
