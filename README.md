# ATA hard-disk memory card for video data

This design is the logic of a memory card that records a camera's image stream onto an ordinary
ATA (IDE) hard disk. Hard disks are the cheapest bulk storage there is. A channel of surveillance
video needs several gigabytes per hour, or about 2 TB per month, so a plain disk behind a little
programmable logic is the cheapest way to build such a recorder.

The card has two programmable devices on either side of an external dual-clock FIFO chip:

```
 camera --4 bit--> [ CPLD: pixel_combiner ] --16 bit--> FIFO chip --16 bit--> [ FPGA ] --ATA 40-pin--> disk
   pixel clock                                 WCLK            RCLK   FPGA clock   ^
                                                                                   | register port
                                                                                  AVR micro-controller
```

* The **CPLD** runs on the camera's pixel clock. It latches each 4-bit sample, shifts four samples
  into a 16-bit word, loads that word into a data register and writes it into the FIFO. The CPLD
  is the only part that depends on the camera, so a different camera means new CPLD logic only.
* The **FIFO chip** absorbs the difference in clocks and the disk's latency. It is the only
  crossing between the two clock domains.
* The **FPGA** reads the FIFO, collects whole 512-byte sectors in two alternating buffers, and sends
  them to the disk, either by PIO register cycles or by Ultra DMA bursts with their CRC.
* The **AVR** micro-controller is outside this RTL. It tells the FPGA which ATA command to run,
  switches FIFO reading on and off, and reads back the status. A USB-to-ATA bridge, also outside
  this RTL, shares the disk and reads the recordings back to a PC. The AVR hands the disk bus to
  the bridge through a control bit, and the FPGA then lets its ATA pads float.

## Files

| file | block |
|---|---|
| `rtl/memcard_top.sv` | the whole card: CPLD and FPGA logic, with the FIFO chip, AVR and disk as ports |
| `rtl/pixel_combiner.sv` | CPLD: latch, 4-bit shift register, 16-bit data register, FIFO write |
| `rtl/fifo_read_if.sv` | FPGA: FIFO read control and the data latch |
| `rtl/pingpong_buffer.sv` | FPGA: the two sector buffers |
| `rtl/ata_crc16.sv` | FPGA: Ultra DMA CRC |
| `rtl/ata_bus_if.sv` | FPGA: ATA pin timing, covering PIO cycles and Ultra DMA data-out bursts |
| `rtl/ata_ctrl.sv` | FPGA: the command sequencer, the AVR register port and the status word |
| `rtl/ata_pkg.sv` | register addresses, command codes, status bits, AVR register map |
| `tb/tb_*.sv` | one self-checking testbench per block, plus `tb_memcard_top` for the whole card and `tb_video_stream` for a continuous VGA recording |
| `tb/ata_disk_model.sv`, `tb/ext_fifo_model.sv` | behavioural disk and FIFO chip, for testbenches only |

## Data path and flow control

The camera writes words at its own pace. The disk takes them in bursts and sometimes not at all,
for example while it seeks or while a PIO command runs. Three stages absorb the difference.

**CPLD (`pixel_combiner`).** Samples are taken while `cam_gate` is high. The first sample of a word
lands in bits 3:0 and the fourth in bits 15:12. A word reaches the FIFO pins two clocks after its
last sample: one clock for the input latch, one for the data register. If the gate falls in the
middle of a word, the partial word is dropped. If the FIFO shows full (`FF-` low) when a word is
ready, the word is dropped and the sticky `overflow` flag is set. The card does not stall the
camera, so the recording has a hole rather than a lost time base.

**FIFO read (`fifo_read_if`).** The FIFO chip is used in its standard mode: after a clock edge with
`REN-` low, the next word appears on `Q`. The data latch captures it one clock later. `REN-` is
asserted only if all three of these hold:

* the AVR has enabled reading;
* the FIFO is not empty (`EF-` high);
* the buffer has room for this word **and the two words already in flight**.

The two words in flight are the word requested on the previous clock and the word sitting in the
latch. Without them in the room count, the buffer would overrun at the moment a sector completes.

**Sector buffers (`pingpong_buffer`).** There are two banks of one sector (256 words) each. The
write side fills one bank. When the bank is full, it passes to the read side and writing moves to
the other bank, provided that bank has been drained. The read side sees a bank only when it is
full, so the ATA side always sends whole sectors. `wr_free` counts the words that can still be
written: the rest of the current bank plus the other bank if it is empty.

## The ATA bus side (`ata_bus_if`)

The ATA data bus DD is bidirectional. Here it is split into `dd_o`, `dd_oe` and `dd_i`, and the
FPGA pad joins them. `ata_bus_if` runs one of four operations at a time for the controller. Times
below are in clocks of the FPGA clock, assumed to be 50 MHz.

**PIO register write / read, PIO data write.** The address (`CS0-`/`CS1-`, `DA`) is set up for
`PIO_T1`=4 clocks. `DIOW-` or `DIOR-` is then low for `PIO_T2`=9 clocks, longer while the disk holds
`IORDY` low. Then come `PIO_T2I`=17 recovery clocks. That is 30 clocks = 600 ns, which is ATA PIO
mode 0. From request to `done` an operation takes `T1+T2+T2I+2` clocks. A read samples DD at the
end of the `DIOR-` pulse. A PIO data write carries the next word of the sector buffer.

**Ultra DMA data-out burst.** The host, which is this design, does the following:

1. Waits for `DMARQ`, then asserts `DMACK-`. It holds STOP (`DIOW-`) low and HSTROBE (`DIOR-`)
   high.
2. Waits for the disk to assert DDMARDY-, which is carried on `IORDY` and is active low.
3. Puts one word on DD every `UDMA_HALF`=2 clocks and toggles HSTROBE in the middle of it. Each
   HSTROBE edge, rising or falling, transfers one word. At 50 MHz that is 40 ns per word, or
   50 MB/s.
4. Pauses, with no edge, while DDMARDY- is high or the sector buffer is empty.
5. After the last word, raises STOP. When the disk drops `DMARQ`, HSTROBE returns high, the burst
   CRC goes onto DD, and `DMACK-` is released. The disk takes the CRC on that edge.

One command is sent as one burst of all its sectors. A disk that ends a burst on its own in the
middle (device-initiated termination) is not handled.

**CRC (`ata_crc16`).** The CRC polynomial is x^16 + x^12 + x^5 + 1, seeded with 4ABAh at the start
of each burst. A whole word is folded in per clock, DD0 first. The CRC is folded as the words leave
on DD, not when they enter the FPGA, because it must cover exactly the words of one burst.

## The controller (`ata_ctrl`) and the AVR register port

After reset the register group is cleared. `RESET-` is driven low for `RESET_CLKS` = 1250 clocks
(25 us), and the disk Status register is polled until BSY clears. The controller is then idle and
reports not-busy.

A command runs like this:

1. The AVR fills in the task file, then writes the Command register.
2. BUSY goes up in the status word on the next clock. While BUSY is up, writes to the task file are
   ignored.
3. The task file is forwarded to the disk in the 48-bit form of ATA-6. Features, Sector Count and
   LBA low/mid/high are each written twice, high-order byte first, then Device, then Command. A
   28-bit command uses only the second write of each pair.
4. The command is classed and run:

| command | class | what happens |
|---|---|---|
| CAh WRITE DMA, 35h WRITE DMA EXT | Ultra DMA data-out | one burst of all sectors from the sector buffers |
| 30h WRITE SECTORS, 34h WRITE SECTORS EXT | PIO data-out | per sector: poll for DRQ, then 256 Data-register writes |
| 20h READ SECTORS, 24h READ SECTORS EXT, ECh IDENTIFY DEVICE | PIO data-in | per sector: poll for DRQ, 256 Data-register reads into a one-sector buffer, then wait for the AVR to empty it |
| anything else | non-data | nothing more to do |

5. Status is polled until BSY clears. If ERR or DF is set, the Error register is read as well.
6. BUSY clears and DONE sets.

A sector count of 0 means 256 sectors for a 28-bit command and 65536 for an EXT command. The 48-bit
LBA allows disks larger than 128 GiB, and a month of one video channel (about 2 TB) needs that.

AVR register map. The port is synchronous to the FPGA clock. `avr_we` writes a register. `avr_rdata`
shows the addressed register in the same clock. `avr_re` marks the clock in which the AVR takes a
byte; only `RDATA` cares about it.

| addr | register | notes |
|---|---|---|
| 0 | Features | |
| 1 | Sector Count 7:0 | |
| 2, 3, 4 | LBA 7:0, 15:8, 23:16 | |
| 5 | Device | bit 6 = LBA mode |
| 6 | Command | a write starts the command |
| 7 | status word (read) | 7 BUSY, 6 DONE, 5 ERR (disk ERR or DF), 4 RDRDY (data-in sector waiting), 3 INTRQ, 2 FIFO half full, 1 FIFO almost empty, 0 FIFO almost full |
| 8 | last disk Status (read) | |
| 9 | last disk Error (read) | |
| 10 | control | bit 0 = FIFO read enable; bit 1 = hand the disk bus to the USB bridge; bit 2 (read only) = bus handed over |
| 11 | Sector Count 15:8 | EXT commands |
| 12, 13, 14 | LBA 31:24, 39:32, 47:40 | EXT commands |
| 15 | RDATA (read) | data-in sector, low byte then high byte of each word; each `avr_re` advances one byte |

To record video:

1. Set bit 0 of `control` to enable FIFO reading.
2. Write Sector Count, LBA and Device (40h).
3. Write 35h (WRITE DMA EXT) to Command.
4. Wait for BUSY to drop, check ERR, and go on with the next LBA.

The FPGA keeps filling its buffers between commands. No word is lost between two commands as long
as the FIFO chip does not fill up.

Sharing the disk with the USB bridge. Setting bit 1 of `control` asks for the bus. The request is
granted once the controller is idle, or as soon as the running command finishes. Then:

* `control` bit 2 reads 1 and BUSY stays up;
* the top's `ata_ctl_oe` goes low, so the pads of DA, CS0-, CS1-, DIOR-, DIOW- and DMACK- float
  (DD is not driven either);
* task-file and Command writes are ignored.

Clearing bit 1 takes the bus back, and the controller is idle again. `RESET-` stays driven by the
FPGA throughout.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `PIX_W` | 4 | camera sample width; four samples per 16-bit word |
| `SECTOR_WORDS` | 256 | 16-bit words per sector, and the size of each buffer |
| `RESET_CLKS` | 1250 | `RESET-` low time in clocks |
| `PIO_T1`, `PIO_T2`, `PIO_T2I` | 4, 9, 17 | PIO address setup, strobe and recovery, in clocks |
| `UDMA_HALF` | 2 | clocks per Ultra DMA word (at least 2) |

At another FPGA clock, scale the PIO counts so that they meet the PIO mode in use, and set
`UDMA_HALF` so that one word takes at least the mode's half cycle (30 ns for mode 4). With
`UDMA_HALF`=2, a clock of 66.7 MHz or more gives the full 66 MB/s of UDMA mode 4.

## Where this follows its source and where it departs

The design follows a published description of such a card. These parts come from that
description:

* the partition into CPLD, FIFO chip, FPGA, AVR and USB bridge;
* the CPLD's latch, 4-bit shift register and 16-bit data register;
* the 16-bit FIFO path;
* the two buffers in the FPGA;
* the CRC check;
* synchronising the ATA signals sampled from the bus before the controller uses them;
* PIO and Ultra DMA operation of the disk;
* the ATA-6 register set;
* the controller's order: initialise registers, reset the disk, idle, take a command with BSY, then
  split into data and non-data processing.

The description gives function more than mechanism, so much is this design's own. These details
come from the ATA standard:

* command codes and status bits;
* PIO mode-0 timing;
* the Ultra DMA handshake;
* the CRC polynomial and seed.

These are this design's own choices:

* the 50 MHz FPGA clock;
* the sample order in a word;
* the FIFO-full policy of dropping words;
* the standard (not first-word-fall-through) FIFO mode;
* sector-sized buffers;
* polling Status instead of waiting for INTRQ;
* one burst per command;
* the AVR register map and status word;
* the byte-wide data-in reader;
* the bus hand-over to the USB bridge. The source only says that the bridge and the FPGA share the
  disk.

Points to check before trusting this on hardware:

* **CRC bit order.** The CRC takes DD0 first. A disk that rejects every burst's CRC (ICRC in the
  Error register) would point here.
* **Synchronised inputs.** DMARQ, IORDY and INTRQ each pass two flip-flops, so the FSM sees them
  two clocks late. After the disk negates DDMARDY-, the host sends at most two more words in
  simulation. The ATA standard lets the recipient expect up to three. Whether the final strobe
  also meets the standard's ready-to-final-strobe time (tRFS) at the chosen clock has not been
  checked.
* **Termination and timing.** Device-initiated Ultra DMA termination is not supported. The disk
  must let the host end the burst. Ultra DMA timing is met with whole clock periods only; tighter
  parameters such as tACK and tSS are assumed to be covered by the clock-period margins and have
  not been checked against a standard.
* **Camera pins.** The CPLD in the reference board has six camera data pins. Only the four that the
  4-bit shift register uses are modelled.
* **FIFO depth.** The FIFO chip's depth sets how long the disk may stall before video is lost. The
  testbench uses 4096 words.
* **Outside this RTL.** The AVR firmware, the I2C link between cards (run by the AVR, 400 kbit/s),
  the USB bridge and the FPGA configuration PROM are not part of this RTL.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    --top-module tb_memcard_top -y rtl -y tb +libext+.sv -Irtl rtl/ata_pkg.sv tb/tb_memcard_top.sv
./obj_dir/Vtb_memcard_top
```

Replace `tb_memcard_top` with any other `tb_*` to run that block's testbench. The two-state
simulator starts undriven state at random values, so every testbench resets what it reads.

* `tb_memcard_top` runs the whole card at its default parameters. A camera on a 37 MHz pixel clock
  streams lines of 64 words. The FIFO model and the disk model sit on either side. The testbench
  runs, in order:
  * WRITE DMA (4 sectors), WRITE SECTORS by PIO (2), WRITE DMA (2);
  * IDENTIFY DEVICE read by the AVR;
  * a non-data command and an aborted command;
  * finally, with reading switched off until the FIFO overflows.

  It checks that the 2048 words on the disk are the camera's, in order, and that every CRC was
  accepted. It also counts each mechanism and fails if one never happened: disk reset, PIO data-out
  and data-in, Ultra DMA, pause by DDMARDY-, pause on an empty buffer, IORDY stretching, both
  buffers full, FIFO empty, camera gaps, FIFO overflow and error reporting. It also hands the bus to
  the USB bridge (played by the testbench), which reads the disk Status register while the card's
  pads float.
* `tb_video_stream` records the VGA case of the source, 640 x 480 pixels at 30 frames/s
  (9,216,000 B/s). The camera sends without a gap, on an 18.432 MHz clock with two samples per
  pixel. Four back-to-back WRITE DMA EXT commands of 64 sectors each write the last 256 sectors of a
  2160 GB disk, which is one channel for 30 days at 3 GB per hour. That puts the LBA above 2^32. The
  testbench checks that:
  * no word is dropped;
  * every word lands in order at the right LBA;
  * every CRC is accepted;
  * the card's average write rate keeps up with the camera.

  At 50 MHz, Ultra DMA moves 50 MB/s, and the sector buffers absorb the time between commands. The
  FIFO chip never holds more than one word.
* `tb_ata_ctrl` covers:
  * the reset pulse length;
  * task-file forwarding, including the 48-bit LBA and count;
  * non-data and aborted commands;
  * WRITE SECTORS, WRITE DMA and WRITE DMA EXT over 257 sectors;
  * IDENTIFY and READ SECTORS through the byte reader;
  * BUSY behaviour;
  * handing the bus to the USB bridge and taking it back.
* `tb_ata_bus_if` covers:
  * PIO cycle length and pulse width;
  * IORDY stretching;
  * two Ultra DMA bursts with the word rate, both kinds of pause and the CRC;
  * a PIO data sector.
* The other testbenches check their blocks against reference models, including the CPLD's
  two-clock latency and the FIFO reader's two-clock latency.
