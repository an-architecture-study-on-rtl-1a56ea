# Zynq cluster static image for software-defined radio

This is the programmable-logic side of one board in a four-board cluster of
Zynq-7020 chips that runs software-defined radios. Each board's FPGA fabric is
split into two parts:

* A fixed **static** part. It provides a standard set of interfaces.
* A reconfigurable **blacktop** region. Hardware blocks of a radio flowgraph
  (FFT, FIR filters, pass-throughs) are placed there at run time.

The blacktop sees eight stream ports in and eight out:

* four DMA channels to the ARM processor's DDR memory;
* four serial links over the FMC connector to the other boards. Three give a
  fully connected four-board cluster, and the fourth receives an external
  data source.

Every port has the same format: a 32-bit word plus a valid bit, with no
back-pressure. A word is one single-precision float or one complex sample
with 16-bit I and Q. A serial "parameter chain" lets software set registers
inside blacktop modules, such as filter taps, without an address bus.

The RTL here holds the static part (DMA, FMC links, parameter controller)
and one example blacktop configuration (two floating-point FIR filters, a
pass-through, an FFT hookup and cross-links). All of it is wired together in
`zynq_static`.

## Streams and clocks

`zc_pkg::stream_t` is `{valid, data[31:0]}`. A sender drives one word per
clock with `valid` high, and a receiver must take it. A word that cannot be
stored is dropped where the stream enters a FIFO, and that FIFO's `overflows`
counter records it. Software can read all drop counters.

There are two clock domains:

* `clk` runs the blacktop, the DMA channels and the parameter chain. Its
  frequency is not fixed by the design.
* `link_clk` is the 10 MHz word clock of the FMC links.

Each domain has its own synchronous, active-high reset. Words cross between
the domains through gray-pointer dual-clock FIFOs (`async_fifo`). Single-bit
commands cross through toggle synchronisers.

## DMA channel (`dma_channel` = `dma_regs` + `dma_ctrl` + two `sync_fifo`)

Each channel connects one blacktop output and one blacktop input to two
circular buffers ("rings") in DDR. Software allocates the rings.

* **Write ring** (PL → ARM). Blacktop words go into a 512-word write FIFO.
  The control logic copies them into the ring with burst writes.
* **Read ring** (ARM → PL). Software puts data into the ring. The control
  logic fetches it into a 512-word read FIFO, and the FIFO drains onto the
  blacktop one word per clock.

Software tells the PL each ring's base and size. After every copy it writes
how many bytes it took from or put into a ring (registers `WBUF_DONE` and
`RBUF_DONE`). From these the PL keeps, in 32-bit words:

* how much valid data the write ring holds;
* how much unread data the read ring holds;
* its own offset in each ring.

The full register map is in the header of `rtl/dma_regs.sv`. All counts are
in bytes and must be multiples of four.

**Burst sizing** is the core of the channel.

* A write burst is the smallest of:
  * the empty space in the write ring;
  * the space left before the ring wraps;
  * the words waiting in the write FIFO.
* A read burst is the smallest of:
  * the unread data in the read ring;
  * the space left before the ring wraps;
  * the free room in the read FIFO.
* Both are also capped at `MAX_BURST` (256). The master port's burst length
  is finite, so the cap is this design's addition.

Because of the ring-end term, a burst never crosses the end of a ring. A
transfer that wraps becomes two bursts. One burst per direction is in flight
at a time. The fill and offset counters move when the master reports the
burst done.

**Interrupts.** Software arms an interrupt by writing a byte count N to
`WBUF_IRQ` or `RBUF_IRQ`.

* The write-ring interrupt rises when the valid data reaches min(N, size/16).
* The read-ring interrupt rises when the free space reaches min(N, size/16).

The size/16 term stops a large request from waiting for a nearly full ring.
The interrupt then stays high until software writes the count register again.
Writing 0 disarms it.

**Master interface.** The high-performance AXI port is reached through a
vendor bridge. This design exposes a simplified command/data interface for
that bridge instead of AXI itself:

* A command is held on `*_req/_addr/_len` until `*_ack`.
* Write data is a valid/ready stream taken straight from the FIFO head.
* Read data arrives on `rd_data_valid` with no back-pressure. Room for the
  whole burst was reserved before the command was issued, and an assertion
  checks this.
* `*_done` ends the burst.

## FMC links (`fmc_link` = `fmc_tx` + `fmc_rx` + two `async_fifo`)

A one-way link uses four differential pairs, one per lane, each serialised
10:1. Each 10 MHz word clock therefore carries 40 bits:

* bits 31..0 are the data word;
* bit 32 is the valid bit;
* bits 39..33 are zero.

That gives 320 Mb/s of payload per direction at 100 Mb/s per pair. The
serialiser and deserialiser cores are vendor primitives and sit outside this
RTL. The design hands them a 40-bit word each link clock and drives the
deserialisers' shared `bitslip` strobe.

**Alignment is the hard part.** Two things corrupt the received word:

* The deserialisers start at an arbitrary bit offset.
* The breakout board swaps the polarity of some pairs.

The link solves both with training:

1. For `TRAIN_CYCLES` link clocks after reset, and again after each software
   command, `fmc_tx` sends a training word. The default is 50,000,000 clocks,
   which is five seconds. The training word repeats the 10-bit pattern
   `0000010011` on every lane. This pattern has three ones, so no rotation of
   it or of its complement equals it. Only the correct bit offset together
   with the correct inversion mask decodes to the training word.
2. `fmc_rx` tries the combinations in a fixed order. For each one it XORs
   every lane with that lane's inversion bit. It waits `SETTLE` (4) clocks,
   then needs `MATCH_N` (8) training words in a row.
3. On any mismatch it moves on. The 4-bit inversion mask counts up. When the
   mask wraps, one `bitslip` pulse shifts all four deserialisers by one bit.
4. There are 10 × 16 = 160 combinations. The worst case is
   160 × (SETTLE+1) + MATCH_N = 808 link clocks (81 µs), far inside the
   training window.

Once locked, the receiver decodes every word. Training and idle words have
valid = 0 and are discarded. Only valid words enter the receive FIFO. The
receiver stays locked until reset or a realign command, so software can
restart the search after retraining a link.

## Parameter chain (`param_ctrl`, `param_reg`)

The parameter bus is a single wire, daisy-chained through every parameter
register in the blacktop. It is low when idle, and one bit moves per clock.
A frame aimed at the register at chain position `a` is:

```
1 (start) | a zeros | 1 (data start) | d[31] ... d[0]
```

Each register acts on the second bit of a frame:

* If the second bit is low, the register is not addressed. It removes that
  one low bit and forwards the rest, so the next register sees an address one
  smaller.
* If the second bit is high, the register is addressed. It shifts in the 32
  data bits, loads `value`, pulses `updated`, and forwards nothing.

No register needs an adder or a position number.

Each register delays a passing frame by two clocks. The addressed register's
`updated` pulse therefore comes 2a + 34 clocks after the start bit leaves the
controller.

`param_ctrl` has three registers:

* register 0 is the data word;
* register 1 is `{start, addr[30:0]}`;
* register 2 is `busy`.

A rising edge of `start` sends one frame of 34 + a clocks. Setting a
parameter takes three writes: clear start, write data, write address with
start set.

## Floating-point FIR (`fir_float`, `fp32_mul`, `fp32_add`)

`fir_float` is a real single-precision FIR in transposed form, with 16 taps
by default. Each valid input updates all partial sums at once. One output
leaves per input, one clock later. Its taps are `param_reg` instances chained
inside the module, tap 0 nearest the chain input. A complex stream is
filtered by two instances, one for I and one for Q.

The arithmetic units are combinational and simplified:

* results are truncated (round toward zero);
* denormals are treated as zero;
* overflow gives infinity;
* NaN is not propagated.

The 16 taps form one long combinational multiply-add path per tap. A fast
`clk` would need pipelining, which this design does not do.

## Example blacktop (`blacktop_example`)

One configuration of the region, with every path registered once:

| from        | through               | to          |
|-------------|-----------------------|-------------|
| `fmc_in[3]` (external source) | register (pass-through) | `dma_out[0]` |
| `fmc_in[3]` | vendor FFT (outside, via `fft_in`/`fft_out`) | `dma_out[1]` |
| `dma_in[0]` | FIR 0 (chain addresses 0–15)  | `fmc_out[0]` |
| `fmc_in[0]` | FIR 1 (chain addresses 16–31) | `dma_out[2]` |
| `dma_in[1]`, `dma_in[2]`, `dma_in[3]` | register | `fmc_out[1]`, `fmc_out[2]`, `fmc_out[3]` |
| `fmc_in[1]` | register | `dma_out[3]` |

`fmc_in[2]` is unused.

In the FM-receiver flow this design was built for, the first board holds the
FFT and pass-through, and each other board holds two FIR filters. This
example puts both kinds in one image so that a single top level exercises
every module.

## Top level (`zynq_static`) and register map

Word addresses on the 8-bit register port. It is a single-cycle write and
combinational read bus, standing in for the vendor's AXI register bridge.

| address     | unit |
|-------------|------|
| 0x00–0x0F, 0x10–0x1F, 0x20–0x2F, 0x30–0x3F | DMA channel 0–3 (map in `dma_regs`) |
| 0x40–0x42   | parameter controller |
| 0x50        | write: bits 3..0 start training on link k, bits 7..4 restart alignment on link k; read: bits 3..0 link k locked |
| 0x51–0x54   | transmit drops of link 0–3 |
| 0x55–0x58   | receive drops of link 0–3 |

`irq[2k]` and `irq[2k+1]` are the write-ring and read-ring interrupts of
channel k.

Top parameters and their defaults:

| parameter | default |
|-----------|---------|
| `DMA_FIFO_DEPTH` | 512 |
| `MAX_BURST` | 256 |
| `LINK_FIFO_DEPTH` | 16 |
| `TRAIN_CYCLES` | 50,000,000 |
| `FIR_TAPS` | 16 |

## What follows the original design and what does not

These parts follow the original design:

* the blacktop port format and the port count;
* the two-ring DMA with software copy notifications;
* the three-way burst minimum and the one-sixteenth interrupt rule;
* the FMC link's 32-bit word at 10 MHz over four pairs;
* five-second training and the exhaustive search over about 160
  shift/inversion combinations;
* the strip-one-bit parameter protocol and its three-write controller;
* real floating-point FIRs with taps on the chain.

These are this design's own choices:

* the FIFO depths, the burst cap and the register layouts;
* one shared register port with an address decode, where the original
  design gives each DMA channel and the parameter controller a
  general-purpose AXI port of its own;
* the master-port handshake;
* the training pattern and the lane bit mapping;
* the `SETTLE`/`MATCH_N` search timing;
* the FIR tap count and structure;
* the simplified floating-point rounding;
* the routing of the example blacktop.

These are not included:

* the AXI bridges, the serialiser and deserialiser cores, and the 1024-point
  FFT core, which are vendor IP;
* the ARM processing system and its driver;
* the boards and cables;
* partial reconfiguration of the blacktop.

## Testbenches

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. Each has a watchdog.

| testbench | covers |
|-----------|--------|
| `tb_param_reg`    | chains of registers, every address, forwarding, timing of `updated` |
| `tb_param_ctrl`   | frame bits and length, busy, the three-write sequence |
| `tb_dma_channel`  | both rings against a DDR model and a driver model: data order, bursts limited by each factor and by the cap, ring wrap, both interrupt thresholds, FIFO overflow, soft reset |
| `tb_fmc_link`     | two links back to back through cable models with bit shifts and inversions, lock time, data, retrain, overflow |
| `tb_fp32`         | multiplier and adder against a real-arithmetic reference |
| `tb_fir_float`    | random taps loaded over the chain, random samples with gaps against a reference convolution, latency, chain pass-on |
| `tb_blacktop_example` | every route and both filters |
| `tb_zynq_static`  | whole image, short training. It counts bitslips, parameter writes, bursts at the cap, ring wraps, interrupts, drops and a retrain, and fails if any never happened |
| `tb_cluster_fir`  | two boards joined by a link-0 cable; a filter chain split across them (board A FIR 0, cable, board B FIR 1) against the exact two-stage convolution |
| `tb_zynq_static_full` | whole image at default parameters, including the full 50-million-clock training (about 80 s in Verilator) |

`tb/hp_mem_model.sv` models DDR behind the master port.
`tb/fmc_channel_model.sv` models a cable that shifts the bit alignment and
inverts chosen pairs, and responds to `bitslip`.

To run one with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_zynq_static rtl/zc_pkg.sv tb/tb_zynq_static.sv
./obj_dir/Vtb_zynq_static
```
