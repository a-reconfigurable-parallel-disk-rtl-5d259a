# Disk-side genome filter: SoC for one reconfigurable disk board

Searching a genomic bank for sequences similar to a query is usually done in two
steps: find *anchors* (short words of W nucleotides that occur exactly in both
the query and a bank sequence), then try to extend each anchor into a real
alignment. The first step reads the whole bank and is bounded by disk
bandwidth. This design moves it next to the disk. Each disk sits on a board
with a small FPGA, which filters the data as it comes off the drive. Only the
anchor positions (a small fraction of the bank) go over Ethernet to a
front-end computer, which does the alignment work. Many such boards work in
parallel, one disk each, behind an Ethernet switch.

This RTL is the system-on-chip inside one board's FPGA, less its CPU core:

```
             SDRAM (32 MB, 16M x 16)
                    |
   CPU fetch --> icache --> ram_ctrl <---------+
   CPU fetch --> boot_rom                      |
   CPU data  --> sys_bus ----------------------+---- eth_isa_if --> ISA --> Ethernet chip
                    |        |          |          sys_ctrl --> micro-controller hand-off
                    |     ide_ctrl    anchor_filter (ctrl, out)
                    |        |  stream     ^ in
   ATA cable <------+--------+-------------+
```

The FPGA is split into a common part, the same for every application (memory
controller, instruction cache, boot ROM, IDE and Ethernet interfaces, bus), and
an application part, the filter, which is replaced by reconfiguring the FPGA
when the kind of query changes. The filter has three ports: `in`, fed straight
by the IDE controller so disk data never crosses the CPU bus; `ctrl`, a
register port on the system bus; and `out`, also on the system bus, because its
traffic is small.

## The anchor filter (`anchor_filter`)

This is the part that does the real work, and the part to read first.

**Data.** Nucleotides are coded on 2 bits (A=0, C=1, G=2, T=3), four per byte.
The first nucleotide of a byte is in bits [1:0]. The bank arrives as bytes from
the disk. The query (up to `QLEN` = 300 nt) is written through the control port,
8 nucleotides per 16-bit word.

**Detector.** Consider the dot plot of query against bank. An exact match is a
run along a diagonal. The filter keeps one small counter per query position i:
`run[i]` is the length of the match that ends at query position i and at the
latest bank nucleotide. For each new bank nucleotide c, in parallel for every i:

    run[i] <- (q[i] == c) ? min(run[i-1] + 1, W) : 0

An anchor ends at (bank position p, query position i) when `run[i]` steps from
W-1 to W. The counter then saturates, so a long match is reported once, not once
per base. Four such steps are chained inside one clock, so the filter takes one
byte (4 nt) per clock. At 50 MHz that is 200 M nt/s, well above what a disk
delivers in PIO mode (15 MB/s, which is 60 M nt/s).

**Hit records.** All anchors ending in the same byte are folded into one
record:

- the bank nucleotide index of the earliest anchor end in the byte;
- the lowest query index among those anchors;
- a `multi` flag, set when more than one anchor ends in the byte.

Records go into a 16-entry FIFO that the CPU drains through the `out` port. The
FIFO never overflows. When it is full, the filter drops `in_ready`, the IDE
controller holds its read strobe, and the disk stream simply waits. No hit is
lost.

**Control port** (word offsets): 0 CTRL (write bit0 = soft reset, bit1 = run;
read bit1 = run, bit3 = FIFO full, bit4 = FIFO not empty), 1 active query
length, 2/3 bank position, 4/5 record count, 6 W (read only), 7 QLEN (read
only), 0x80+k query word k.
**Output port**: 0/1 position of the oldest record; 2 `{multi, qpos[14:0]}`,
and reading it pops the record (0xFFFF when empty); 3 FIFO occupancy.
`hit_irq` is high while records wait.

Clearing the run bit is the "interrupt the data flow" command. Soft reset clears
the counters, the position and the FIFO, but keeps the query.

Limits you should know:

- Sequence boundaries inside the stream are not marked. An anchor that spans two
  bank sequences is reported, and post-processing has to reject it.
- The anchor size W is fixed when the design is built. A filter for a more
  sensitive search (say W=7) is the same RTL with another parameter, loaded by
  reconfiguration.
- The bank position counter is 32 bits wide and restarts at each soft reset. A
  single stream must stay below 4.29e9 nt (about 1 GB).

## Disk path (`ide_ctrl`)

This block is an ATA host in PIO mode. The CPU reaches the drive's task-file
registers through the bus: offsets 0x00-0x07 are the command block (CS0-),
0x08-0x0F the control block (CS1-). Each access runs one PIO cycle.

To scan, the CPU issues READ SECTORS to the drive, then writes the number of
sectors to STREAM (0x10). The stream engine then works alone, sector by sector:

1. It polls the status register until BSY=0 and DRQ=1. ERR stops the stream and
   sets STATUS bit3.
2. It reads 256 data words and hands each word to the filter as two bytes, low
   byte first.

The address setup time is only spent when the register address changes. So back-to-back data reads take
T_ACT + T_REC = 6 clocks per word (120 ns at 50 MHz, 16.7 MB/s). The next read
strobe is already running while the previous word drains into the filter. If
the filter stalls, the strobe is held (IORDY-style) until the byte buffer is
empty.

Other registers: STATUS (0x11) gives streaming, INTRQ, released and error.
CTRL (0x12) bit0 drives the drive's RESET- line. `release_i` hands the cable to
the board micro-controller: `ata_drive` drops and no new cycle starts.

## Memory side (`ram_ctrl`, `icache`, `boot_rom`)

**`ram_ctrl`** drives a 16M x 16 SDRAM. The part is assumed to be a
256 Mbit x16 device with 4 banks, 8192 rows and 512 columns. The word address
splits as `{row, bank, column}`.

- **Power-up:** 200 us wait, PRECHARGE ALL, two AUTO REFRESH, then LOAD MODE
  (burst 1, CAS latency 2).
- **Refresh:** one refresh every 390 clocks (7.8 us).
- **Access:** each access is ACTIVE, then READ or WRITE with auto-precharge
  (closed page).
- **Ports:** two clients share the controller, the instruction port (from the
  cache) and the system bus. When both wait, they take turns.
- **Latency:** the bus sees a read answered 8 clocks after presenting it, and a
  write after 3.

**`icache`** is direct-mapped and read-only: 128 lines of 4 words (1 KB). A
hit answers in the same clock. A miss refills the whole line with four reads.
The system-control register can flush it after new code has been loaded.

**`boot_rom`** is a 256-word ROM on the instruction path (fetch address bit
24 = 1). It answers one clock after the request. Its contents come from a
`$readmemh` file named by `INIT_FILE`. With no file it reads as zero. The boot
program itself is software and is not included.

## Bus, network and reconfiguration

**`sys_bus`.** The system bus has one master, the CPU's data side, and 16-bit
words. A request (`bus_req_t`: valid, we, 25-bit word address, wdata) is held
until the slave returns `ready` for one clock, with `rdata` on a read. Types and
the map are in `rdisk_pkg`. The map:

| word address | slave |
|---|---|
| `0x000_0000`-`0x0FF_FFFF` | SDRAM |
| `0x100_1000` | IDE |
| `0x100_2000` | Ethernet |
| `0x100_3000` | filter control |
| `0x100_4000` | filter output |
| `0x100_5000` | system control |

An unmapped access completes at once, reads as zero, and sets the sticky
`bus_error` flag.

**`eth_isa_if`.** The Ethernet controller is an NE2000-compatible chip on an
ISA bus. The bridge turns each access to the Ethernet window into one 16-bit
ISA I/O cycle:

- 2 clocks of setup;
- an 8-clock IOR-/IOW- strobe, stretched while the chip holds IOCHRDY low;
- 2 clocks of hold.

Offsets 0x00-0x1F map to the chip's 32 registers (the data port is 0x10). 0x20
reads the chip interrupt, 0x21 drives its reset. The network protocol is
software.

**`sys_ctrl`.** When a query needs a different filter, software writes the disk
address (LBA) of the next bitstream and sets the wake bit. `uc_wake` rises,
`cfg_lba` holds the location, and the IDE cable is released so that the
micro-controller can read the bitstream from the disk and reconfigure the FPGA.
Once wake is set, the registers are frozen until reset. The same register has
the cache-flush bit and a plain IDE-release bit.

## How far to trust it

- Every block has a self-checking testbench. The ATA disk, SDRAM and Ethernet
  chip are behavioural models. They were written from the same reading of the
  ATA, SDRAM and ISA conventions as the controllers, so a shared misreading
  would not show. Check the PIO, ISA and SDRAM timing parameters against the
  data sheets of the parts you use.
- The filter results are checked against an independent brute-force search,
  with W = 11 and W = 7, at the full 300-nt query size.
- Nothing has been placed and routed. The filter at its defaults holds about
  1.9k flip-flops: 300 run counters of 4 bits, plus the 600-bit query and the
  FIFO. That is a large share of a 200k-gate Spartan-II class device, and the
  4-step chain per clock is the likely critical path at 50 MHz. If it does not
  close timing, lower the unrolling or the clock. Either way the disk rate still
  needs more than 1.2 nt per clock at 50 MHz.

## What is not here

- **The CPU core.** The SoC uses an existing 16-bit, 3-stage RISC core with 16
  registers, clocked at 50 MHz. It is not part of this RTL, and its instruction
  and data ports are ports of `rsoc_top`.
- **The software.** The real-time kernel, drivers and application program are
  not included.
- **Off-chip parts.** The board's micro-controller, Ethernet chip, SDRAM, disk,
  clock generator and debug connectors are not RTL. Neither are the switch and
  the front-end computer.
- **Interfaces that are this design's own.** These are the register maps, bus
  protocol, PIO/ISA/SDRAM timing, cache organisation, hit-record format and
  micro-controller hand-off signals. The system this RTL follows specifies only
  the structure, the 300-nt/11-nt filter sizes, the 2-bit packing, the 32 MB
  16-bit SDRAM, PIO disk access and an ISA-attached NE2000 Ethernet chip.

## Files and simulation

`rtl/` holds one module or package per file:

- `rdisk_pkg.sv`: package with the bus types and the address map;
- `anchor_filter.sv`, `ide_ctrl.sv`, `ram_ctrl.sv`, `icache.sv`, `boot_rom.sv`,
  `eth_isa_if.sv`, `sys_bus.sv`, `sys_ctrl.sv`: the blocks;
- `rsoc_top.sv`: the top.

`tb/` has one self-checking testbench per block, `tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M`. The directory also holds behavioural models of
an ATA disk (`ata_disk_model.sv`, with generated sector data), an SDRAM
(`sdram_model.sv`, which checks the command protocol) and the Ethernet chip's
ISA registers (`isa_eth_model.sv`).

`tb_rsoc_top` runs the whole SoC at its default parameters:

- it fetches from the boot ROM, then runs code from SDRAM through the cache;
- it loads a 300-nt query assembled from pieces of the disk data;
- it streams 4 sectors from the disk model through the filter, with a FIFO-full
  stall and a pause on the way;
- it checks every hit record against a brute-force search and forwards the
  records to the Ethernet model;
- it ends with the reconfiguration hand-off.

It counts every mechanism and fails if any one never happened. It also checks
that the last sector streams at 6 clocks per word (16.7 MB/s at 50 MHz), above the
15 MB/s disk rate. It runs in a few seconds.

`tb_filter_w7` runs the same filter test as `tb_anchor_filter` on a filter built
with `W = 7`, the configuration for a more sensitive search.

To run a testbench, for example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    --top-module tb_rsoc_top rtl/rdisk_pkg.sv tb/tb_rsoc_top.sv
./obj_dir/Vtb_rsoc_top
```

Testbenches read files by paths relative to the repository root (the boot ROM
test reads `tb/boot_rom_test.hex`), so run them from there.
