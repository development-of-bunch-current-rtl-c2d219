# Bunch current and oscillation recorder — SystemVerilog RTL

A storage ring such as SuperKEKB holds up to 5120 RF buckets, and operators need
to know how much charge sits in every one of them. The injector then tops up the
emptiest bucket and keeps the fill pattern flat. When the beam is lost, they also
want a long record of every bunch over many turns. This RTL is the digital core of a
VME board that does both. An 8-bit ADC samples every bucket at 508.886 MHz. The
logic aligns those samples to the revolution marker and keeps them in one of two
ways:

* **Bunch current mode.** A one-turn ring memory in block RAM is rewritten every
  turn. When a stop arrives, the board finishes the current turn and raises a VME
  interrupt. The crate CPU then reads one clean snapshot of all bunch currents.
* **Large scale memory mode.** Every sample goes to DDR2 memory, which is used as a
  circular buffer of 4k, 8k or 16k turns. For SuperKEKB that is 20, 40 or 80 MB,
  or 40 ms to 160 ms of beam. A trigger-position setting picks how much of the
  buffer holds data from before the stop and how much from after it.

The design follows the published description of the KEK "18K10" recorder board.
That description covers the modes, ring sizes, stop rules, memory sizes,
trigger positions, VME functions, address windows and the overall data path. It
does not cover register maps, bus handshakes, widths, depths or the DDR2
controller. Those are this design's own choices. Each is listed under "What is
this design's own" below.

## Rings and clocks

The ADC has a built-in 1:2 demultiplexer. The logic therefore runs on the RF/2
clock (254.4 MHz) and receives one **ADC word** per clock: 16 bits holding the
sample of an even bunch in `[7:0]` and of the next, odd bunch in `[15:8]`. A turn
has h/2 ADC words. The ring is selected on a DIP switch (`sw_ring`):

| `ring_e`     | ring                | harmonic h | ADC words per turn |
|--------------|---------------------|-----------:|-------------------:|
| `RING_SKEKB` | SuperKEKB LER / HER | 5120       | 2560               |
| `RING_PFAR`  | PF-AR               | 640        | 320                |
| `RING_PF`    | PF                  | 312        | 156                |
| `RING_DR`    | SuperKEKB damping ring | 230     | 115                |

All logic here, including the VME CPLD part, runs on this one clock. The VME
strobes AS\*, DS0\*, DS1\* and IACKIN\* pass two-flop synchronisers. Address, AM
code, WRITE\* and data are sampled only once a synchronised strobe has been seen.

## How one recording runs

1. **Start.** A VME write to the control register freezes the DIP mode and ring
   and the configured trigger position and memory size. It also arms
   `rev_sync`.
2. **Synchronisation.** At the next rising edge of the revolution marker the
   word counter restarts. The ADC word that arrived in the same clock as the edge
   becomes address 0 (bunches 0 and 1). From then on the counter runs free modulo
   h/2. Later markers are ignored, so a glitch on the marker cannot move the
   bunch numbering during a recording.
3. **Recording.** Every word is written. In bunch current mode it goes to the
   ring memory at its position in the turn. In memory mode it goes to the DDR2
   write path, and `acq_ctrl` advances a write pointer modulo the capacity
   C = N·h/2 ADC words, where N is the number of turns.
4. **Stop.** The stop is a rising edge on the trigger input or a stop command.
   Recording always ends on the **last word of a turn**, so the memory holds whole
   turns only. The turn in which the stop arrived counts as the first turn after
   the trigger.

   | mode / trigger position | recording ends at the end of            |
   |-------------------------|-----------------------------------------|
   | bunch current mode      | the turn holding the stop               |
   | memory, −100 %          | the turn holding the stop               |
   | memory, 0 %             | turn N/2 after the stop (half the buffer is post-trigger) |
   | memory, 100 %           | turn N after the stop (whole buffer is post-trigger) |

5. **Flush** (memory mode only). The write buffer is drained into DDR2, including
   a partial last word (see below).
6. **Done.** The status flag is set, and the interrupt is raised if it is enabled.
   The read-out engine starts filling the read FIFO at once. Nothing records again
   until the next start command.

## Data layout in memory — the part that needs care

Memory words are 64 bits wide: four ADC-word lanes, with lane 0 in the low bits.
Both memories use this layout, so one read path serves both modes.

**Ring memory.** It has 640 words of 64 bits (2560 ADC words, enough for
h = 5120). ADC word *a* of a turn goes to lane `a[1:0]` of word `a >> 2`, and each
lane has its own write enable. For h = 230 the last word is only partly used.

**DDR2 circular buffer.** Words are written continuously from address 0 after
synchronisation. The region is `cap_words` = C/4 memory words long. For every
ring and every memory size this is a multiple of the 32-word burst: for example,
4096·230/8 = 117760 = 3680·32. So a write burst never crosses the wrap point.

A turn is not a whole number of memory words for every ring (115 ADC words at
h = 230). The stop point can therefore fall in the middle of a 64-bit word. That
word then holds the newest data in its lower lanes and, once the buffer has
wrapped, the oldest data in its upper lanes. For this reason:

* `sample_packer` sends the partial word with only its written lanes enabled;
* `ddr_burst_writer` pads the last burst with beats whose lanes are all disabled;
* the memory port therefore needs per-lane write enables (`mem_wr_en`).

**Order of read-out.** Data are always returned oldest first, as a stream of ADC
words:

* bunch current mode: h/2 words from bunch 0;
* memory mode, buffer not wrapped: words 0 … wptr−1;
* memory mode, buffer wrapped: C words starting at `wptr`, running to the end
  of the region and on from address 0. With the 0 % and 100 % trigger positions
  this is the normal case.

DDR2 reads begin at the burst-aligned address below `wptr/4`. The unpacker drops
the unwanted leading words (`skip` ≤ 127). Because the start and end of the
range fall in the same memory word, a wrapped read fetches that word twice,
once at the start and once at the end.

The **word count** register gives the number of D32 reads needed,
⌈words/2⌉. The **stop pointer** register gives `wptr` in ADC words. Reads past
the end return 0 at once, so a reader that reads too far does not hang the bus.

## Read path

```
ring memory ─┐
             ├─> long read FIFO ─> unpacker ─> fpga_vme_port ═16 bit+strobe═> pack16to32 ─> vme_slave ─> D32
DDR2 bursts ─┘   (1024 x 64 bit)   (skip,count)
```

* `readout_engine` issues a DDR2 read burst only when the FIFO has room for all
  of it on top of the beats still in flight. The memory side therefore never
  needs back-pressure. The FIFO also hides DDR2 refresh pauses from the VME
  reader.
* For each data-window access the VME CPLD sends `dat_req`. The FPGA port then
  takes two ADC words (four bunches) and sends them as two 16-bit pieces, lowest
  first, each with a strobe. The board converter rebuilds the D32 word. DTACK\*
  is driven once the word is complete, so an empty FIFO just stretches the cycle.
* Set `BUS_W = 8` to send four 8-bit pieces instead (see the departures below).

## VME interface

The board answers in a 512-byte window whose base A31…A9 comes from the
switches (`sw_base`):

* **A32 D32 supervisory data access, AM 0x0D:** all registers.
* **A32 supervisory block transfer (BLT), AM 0x0F:** accepted only in the 256-byte
  ADC data area (offset 0x100–0x1FF). The address is ignored, and every beat reads
  the next word of the ADC data FIFO for as long as AS\* stays low. The master
  limits a block to 64 beats because the area is 256 bytes.
* **Interrupter, release on acknowledge (ROAK):** level and vector come from the
  switches, and level 0 turns the interrupter off. IRQ\* is released in the IACK
  cycle that takes the vector. An IACK for another level is passed on through
  IACKOUT\*. Reading the status register also clears the interrupt status.

| offset | name     | access | contents |
|--------|----------|--------|----------|
| 0x000  | STATUS   | R      | [0] done flag (cleared by this read, also drops IRQ), [1] recording, [2] waiting for revolution, [3] stopping, [4] buffer wrapped, [5] finished, [6] IRQ enabled, [8] mode, [10:9] ring |
| 0x004  | CONTROL  | W / R  | [0] start, [1] stop, [2] ADC demultiplexer reset (4-clock pulse), [3] interrupt enable (read back) |
| 0x008  | CONFIG   | R/W    | [1:0] trigger position (0: −100 %, 1: 0 %, 2: 100 %), [3:2] memory size (0: 4k, 1: 8k, 2: 16k turns) |
| 0x00C  | DELAY    | R/W    | [9:0] RF clock delay code, 10 ps steps, on `rf_delay_code` |
| 0x010  | STOPPTR  | R      | write pointer in ADC words |
| 0x014  | COUNT    | R      | D32 words in this read-out |
| 0x100  | ADCDATA  | R      | ADC data window (FIFO); BLT anywhere in 0x100–0x1FF |

A typical service routine works like this. Take the interrupt (the vector
arrives and IRQ\* is released). Read STATUS. Read COUNT. BLT-read COUNT words in
blocks of 64. Write CONTROL with start = 1 and interrupt enable = 1.

## Modules

| file | role |
|------|------|
| `rtl/bcr_pkg.sv` | widths, ring/mode/trigger/memory-size enums, harmonic and turn tables, register map |
| `rtl/bcr_top.sv` | top: wires everything, freezes settings at start, computes C and `cap_words`, shares the DDR2 port |
| `rtl/rev_sync.sv` | revolution synchroniser and bunch-position counter |
| `rtl/acq_ctrl.sv` | start/stop state machine, trigger positions, write pointer, wrap flag |
| `rtl/ring_buffer.sv` | one-turn ring memory, 64-bit words with lane enables |
| `rtl/sample_packer.sv` | 4 ADC words → 64-bit memory word, partial word at the stop |
| `rtl/sync_fifo.sv` | show-ahead block-RAM FIFO (write buffer and long read FIFO) |
| `rtl/ddr_burst_writer.sv` | buffer → DDR2 bursts in the circular region |
| `rtl/readout_engine.sv` | ring/DDR2 → read FIFO → ADC word stream, oldest first |
| `rtl/fpga_vme_port.sv` | FPGA end of the strobed narrow bus |
| `rtl/pack16to32.sv` | board converter to D32 |
| `rtl/vme_slave.sv` | VME CPLD: decoding, registers, BLT, ROAK interrupter |

**DDR2 user port** (`mem_*` on the top):

* a command (`mem_cmd_valid`/`mem_cmd_ready`, `mem_cmd_we`, `mem_cmd_addr` in
  64-bit words) covers `BURST` = 32 words;
* a write command is followed by 32 beats on `mem_wr_valid`/`mem_wr_ready`
  with `mem_wr_en` lane enables;
* a read command returns 32 beats on `mem_rd_valid` in order, with no
  back-pressure.

Wrapping a real DDR2 controller to this port is left to the integrator.

Top parameters, with their defaults: `AW = 24` (128 MB of 8-byte words),
`BURST = 32`, `WDEPTH = 512`, `RDEPTH = 1024`, `BUS_W = 16`.

## Simulation

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. To build and run one with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/bcr_pkg.sv tb/tb_bcr_top.sv --top-module tb_bcr_top --Mdir obj_top
obj_top/Vtb_bcr_top
```

| testbench | what it covers | run time |
|-----------|----------------|----------|
| `tb_bcr_top` | whole design at default parameters. Register access and demultiplexer reset. Bunch mode at h = 5120 (trigger stop, ROAK, status clear, D32 single cycles). Bunch mode at h = 230 (command stop, BLT, daisy-chain pass-through, reads past the end). Memory mode at −100 % wrapped, 0 % not wrapped, 100 % wrapped (h = 312) and 8k turns at h = 640. Every word is compared. Each mechanism (synchronisation, partial words, refresh stalls, FIFO-empty waits, …) is counted, and one that never happens is a failure. | ~6 s |
| `tb_bcr_full` | main configuration at defaults: bunch mode, then h = 5120 memory mode with 4k turns (20 MB) and trigger 0 %. The wrapped buffer is read back in full, 2,621,440 D32 words. | ~50 s, 210 MB |
| `tb_bcr_16k` | largest size: h = 5120, 16k turns (80 MB), trigger 100 %; all 10,485,760 D32 words read back and compared | ~3 min, 0.8 GB |
| `tb_rev_sync`, `tb_acq_ctrl`, `tb_ring_buffer`, `tb_sample_packer`, `tb_sync_fifo`, `tb_ddr_burst_writer`, `tb_readout_engine`, `tb_fpga_vme_port`, `tb_pack16to32`, `tb_vme_slave` | one block each | < 1 s |

Helpers in `tb/`:

* `vme_master.sv`: VME master with single-cycle, BLT and IACK tasks.
* `ddr2_model.sv`: behavioural controller-plus-memory with read latency,
  periodic refresh pauses, lane enables and sparse storage.

`tb_bcr_top` also measures the board's side of a BLT beat: about 14 clocks
(55 ns) including the master model. A crate CPU that needs about 550 ns per beat
therefore sets the transfer rate, not the board.

## What is this design's own

These points are not given by the original description and were chosen here:

* The single-clock structure, the synchronisers, and all handshakes (the
  FPGA–CPLD request/strobe bus, the DDR2 user port).
* The register map and bit layout, the command bits, and freezing the settings
  at start.
* The 64-bit memory word with lane enables, the burst length of 32, and the FIFO
  depths (512 × 68 bits for the write buffer, 1024 × 64 bits for the read FIFO).
* The rule that recording always ends at a turn boundary, also for the −100 %
  trigger position, and that the stop turn counts as the first post-trigger turn.
* Oldest-first read-out of a wrapped buffer, and zeros after the end.
* The 10-bit delay code, derived from 10 ps steps over about 10 ns. The delay
  chip's real control interface is not modelled.

## Departures and limits

* **Narrow bus width.** The board's block diagram labels the converter "16 bit to
  32 bit", but the prose speaks of an 8-bit strobed bus. The default follows the
  diagram (`BUS_W = 16`). `BUS_W = 8` works too and is covered by the unit tests.
* **Not included:**
  * the ADC, the RF delay chip, the amplifiers and attenuators, and the NIM/LVDS
    converters;
  * the DDR2 chip and its controller, and the boot flash;
  * the second CPLD, which supervises the FPGA and reads the ADC temperature
    diode. Its function is not specified beyond that.
* **Clock domains.** The real board has the CPLD on its own clock and the DDR2
  controller in its own clock domain. Here everything shares the RF/2 clock, so
  fitting this RTL to that board needs clock-domain crossings at the CPLD bus and
  at the memory port.
* **Known problem on the original board.** Its memory mode showed occasional
  wrong samples. Those were put down to board timing, and nothing in this RTL
  models them.
