# SC_PROC — spacecraft interface and processor board of the EIS ICU

SC_PROC is the processor card of the instrument control unit (ICU) of the
EIS spectrometer on Solar-B. A 20 MHz TSC21020F DSP (an ADSP-21020 part)
runs the instrument software. Around it, two FPGAs and a set of memories
and FIFOs provide everything the software needs to talk to the spacecraft:

- a serial **command link** in from the mission data processor (MDP),
- a serial **status link** and a **mission data link** back to it,
- a **spacecraft time** counter,
- a **watchdog** that can reboot the board,
- a **discrete reset** that the ground can trigger with two special commands,
- a **boot controller** that copies the boot loader from PROM into program
  RAM before the DSP is let out of reset,
- a **bus controller** that retimes the DSP buses so slow PROMs and the cards
  on the backplane can be reached.

This repository is synthesizable SystemVerilog for the logic of that board:
both FPGAs, the memories and FIFOs as arrays, and a board-level top that
wires them to the DSP's buses. The DSP, the boot PROM contents, the line
drivers and the other backplane cards are outside the RTL; their signals are
ports of the top.

## Block map

```
                          sc_proc (board)
   DSP PM bus ──┬─ boot_ctl (PM master while the DSP is in reset)
                ├─ prog_ram      128k x 48  = 6 x sram_128kx8   0x00 0000
                ├─ twib_ctl      I/O ports at 0xC0 000x, 3 wait states
                │    ├─ sc_time    32-bit time, 512 Hz
                │    ├─ watchdog   7.78 s / 15.56 s, warm reboot
                │    ├─ dc_rst     two 0xF5 commands within 16 s
                │    ├─ cmd_if     serial in  → 3 x fifo_4kx9 (27 bits)
                │    ├─ st_if      1 x fifo_4kx9 → serial out (ser_tx)
                │    └─ md_if      2 x fifo_4kx9 (16 bits) → serial out
                └─ tbus_ctl      buffered PM: CM_Ctl 0x80, MON 0xA0, PROM 0xE0
   DSP DM bus ──┬─ data_ram      128k x 32  = 4 x sram_128kx8   0x0000 0000
                └─ tbus_ctl      buffered DM: banks 1-3 (CCD buffer, -, EEPROM)
```

`sc_proc_pkg` holds the shared constants: port numbers, flag bit positions,
address windows and the 0xF5 discrete-reset byte.

## Bus convention

Inside the RTL every bus access uses one rule. The master holds the address,
an active-high `rd` or `wr` and the write data until `ack` is high at a
rising clock edge. That edge ends the access: a write happens on it, read data
is valid in that clock, and a FIFO pop happens on it. At the top the DSP
strobes are active low (`pmrd_n`, `pmwr_n`, `dmrd_n`, `dmwr_n`) and the
acknowledges are `pmack` / `dmack`. Read and write data are separate ports
(`pmd_o` is written by the DSP, `pmd_i` is read by it), since a two-state
model has no tri-state bus.

| Space | Address (PMA[23:21] / DMA) | Data lanes | Access time |
|---|---|---|---|
| Program RAM | 000, 0x00 0000–0x01 FFFF | PMD[47:0] | 1 clock |
| CM_Ctl card | 100 | PMD[31:16] | ≥ 4 clocks, card may stretch |
| MON card | 101 | PMD[31:16] | ≥ 4 clocks, card may stretch |
| SC_PROC ports | 110, PMA[3:0] = port | see port map | 4 clocks |
| Boot PROM | 111 | PMD[23:16] | ≥ 4 clocks |
| Data RAM | 0x0000 0000–0x0001 FFFF | DMD[39:8] | 1 clock |
| DM banks 1–3 | DMA[31:24] = 01, 02, 03 | DMD[23:8] | ≥ 4 clocks, card may stretch |

Accesses to unused space end at once and read zero.

## TWIB_CTL: the I/O ports

The port number is PMA[3:0]. PMA[20:4] are ignored. Every access takes three
wait states, so `ack` comes in the fourth clock.

| Port | Read | Write | Lanes |
|---|---|---|---|
| 0 | spacecraft time | load time | PMD[47:16] |
| 1 | watchdog status | watchdog control | PMD[47:40] |
| 2 | command status | command control | PMD[47:40] |
| 3 | command FIFO word (pop) | – | PMD[47:21] |
| 4 | status-link status | status-link control | PMD[47:40] |
| 5 | – | status byte into FIFO | PMD[23:16] |
| 6 | mission-data status | mission-data control | PMD[47:40] |
| 7 | – | mission-data word into FIFO | PMD[31:16] |
| 8, 9 | – | OD0 / OD1 strobe | PMD[47:16] on `od_pmd` |
| A–F | 0 | ignored | |

Flag registers are active low, bit 47 first:

| Port | D47 | D46 | D45 | D44 | D43 | D42 | D41 | D40 |
|---|---|---|---|---|---|---|---|---|
| 1 rd | ~WDTrip | ~WD_EN | ~WDTToSel | ~V_Fail | ~DC_Rst | 0 | 0 | 0 |
| 1 wr | ~WDTripRst | ~WD_EN | ~WDTToSel | ~WD_RST | | | | |
| 2 rd | 0 | ~BitErr | ~HF | ~Irq | ~OvrFlw | ~EF | ~FF | CMD_ENA |
| 2 wr | | ~ClrBitErr | | ~ClrIrq | ~ClrOvrFlw | ~RST | | |
| 4 rd | ~ST_GO | 0 | 0 | 0 | 0 | ~EF | ~FF | ST_ENA |
| 4 wr | ~ST_GO | | | | | ~RST | | |
| 6 rd | 0 | ~FF | ~EF | BSY | ~Irq | ~EOP | ~GO | 0 |
| 6 wr | ~RST | | | | ~ClrIrq | ~EOP | ~GO | |

When a register is built from several FIFOs, its FIFO flags are the OR of
their active-low flags. So "~EF = 0" means at least one FIFO is empty.

### Command link (`cmd_if`)

The MDP frames a command packet with CMD_ENA and clocks bits in with CMD_CLK.
The three link lines pass through two-stage synchronisers into the 20 MHz
domain. Bits are taken on each rising CMD_CLK, most significant bit first.

Each byte is stored with a ninth bit, the End-of-Command flag. This bit lets
software find the packet length without counting. The last byte of a packet
is only known when CMD_ENA falls, so the receiver holds every finished byte
back by one byte. When the next byte arrives, the held byte goes into the
packer with the flag clear. When CMD_ENA falls, it goes in with the flag set.

The packer puts three 9-bit segments into one 27-bit word, first byte in
PMD[47:39], and writes the word into three 4k x 9 FIFOs side by side. If a
packet's length is not a multiple of three, its last word is padded with zero
segments after the flagged byte.

The falling edge of CMD_ENA also does two things:
- It sets ~Irq, which drives ~IRQ3.
- If a partial byte was left over, it sets ~BitErr.

A word that arrives while the FIFO is full is dropped and sets ~OvrFlw.

### Status link (`st_if`)

Software writes a status packet byte by byte into the ST FIFO, then writes
~ST_GO = 0. The link then raises ST_ENA and sends the bytes back to back,
most significant bit first, through `ser_tx`. When the last bit is out,
ST_ENA falls and ~ST_GO returns to 1. The status link raises no interrupt,
because a status packet is only ever sent in answer to a command.

### Mission data link (`md_if`)

A mission data packet can be longer than the 4k x 16 FIFO, so software sends
it in sub-packets:

1. Fill the FIFO.
2. Write ~GO = 0. For every sub-packet except the last, write ~EOP = 1 at the
   same time. For the last one, write ~EOP = 0.

Before each sub-packet the link waits until the MDP's BUSY line is low. It
then sends the FIFO out in 16-bit words. When the FIFO runs empty, ~GO
returns to 1, and what happens next depends on ~EOP:
- **~EOP = 1:** MD_ENA stays high and the link holds, waiting for the next
  sub-packet. The receiver sees one unbroken packet.
- **~EOP = 0:** MD_ENA falls, and that falling edge sets ~Irq (~IRQ0).

Every control write also writes ~EOP. Software must therefore carry the
~EOP value along when it only means to clear the interrupt.

### Serial format (`ser_tx`)

Both transmit links use the same word shifter. Each bit lasts `BIT_DIV`
clocks (20, i.e. 1 Mbit/s). Data changes at the start of a bit, and the clock
is high for the second half of the bit, so the receiver samples on the rising
edge. The next word may start in the last clock of the current one, so words
follow each other without gaps.

### Watchdog and warm reboot (`watchdog`)

A cycle counter runs while ~WD_EN = 0 and is held at zero otherwise. Software
restarts it by writing ~WD_RST = 0. If it is not restarted in time, it trips:
- after 155,600,000 clocks (7.78 s) by default,
- after 311,200,000 clocks (15.56 s) with ~WDTToSel = 0.

The trip sets ~WDTrip and starts a warm reboot: the board reset is driven low
for 16 clocks. The same warm reboot is caused by:
- a discrete-reset request, which sets ~DC_Rst;
- the MON card's ~V_FAIL line, for as long as it is low.

The board reset clears everything except:
- the watchdog register (flags, enable, time-out select),
- the spacecraft-time prescaler.

Those are cleared only at power-on. After a reboot, software can therefore
read why it happened. Note that the watchdog also stays enabled across a
reboot. Writing ~WDTripRst = 0 clears ~WDTrip and ~DC_Rst.

### Spacecraft time (`sc_time`) and discrete reset (`dc_rst`)

The spacecraft time is a 32-bit counter advanced by a 512.0066 Hz tick
(20 MHz / 39062, period 1.9531 ms). Software loads it from the time the MDP
sends. A load restarts the prescaler, so the first tick comes one full period
after the load.

The discrete reset detector watches for command packets that are exactly one
byte long. The first packet holding 0xF5 opens a window of 8192 ticks
(16.0 s). A second such packet while the window is open requests a warm
reboot. Other commands in between do not close the window.

## TBUS_CTL: slow and off-board accesses (`tbus_ctl`, `tbus_cycle`)

The PROM and the backplane cards cannot follow the DSP's zero-wait-state
timing. The bus controller has one channel for the PM bus and one for the DM
bus. A channel works as follows:

1. It registers the address, the write data and the device select.
2. One clock after the access starts, it drives the buffered strobe.
3. It holds the DSP for at least four clocks (200 ns).

A device that needs longer pulls its ~ACK_B line low within the first two
clocks of the strobe. The DSP is then held until the device lets ~ACK_B go
high. Each card thus sets its own access time. A device that answers within
four clocks does not touch ~ACK_B.

Buffered devices are 16 bits wide. The boot PROM sits on the low byte of the
PM lane, and the board merges `prom_d` into that lane when `prom_ce_n` is low.

## Boot (`boot_ctl`)

At power-on and after every warm reboot, the boot controller does the
following:

1. It holds the DSP in reset (`dsp_reset_n` low) and takes the PM bus.
2. For each instruction i, it reads six PROM bytes at 0xE0 0000 + 6i …
   6i + 5, most significant first.
3. It writes the 48-bit word to program RAM address i.

After `BOOT_WORDS` instructions (256), it releases the bus and the DSP reset,
and the DSP starts at address 0.

Each byte is a buffered access of four clocks, and each RAM write takes one
more clock. A boot therefore takes 256 × 25 = 6400 clocks (320 µs). While
booting, `pmack` is low towards the DSP.

## Interrupts and test port

| Line | Source |
|---|---|
| `irq_n[3]` (~IRQ3, highest) | command packet received |
| `irq_n[2]` (~IRQ2) | MHC UART byte, from the camera card, passed through |
| `irq_n[1]` (~IRQ1) | ROE UART byte, passed through |
| `irq_n[0]` (~IRQ0) | mission data packet sent |

The OD test port carries the following signals to an external test board:
- PMD[47:16] as `od_pmd`,
- a one-clock low strobe on `od0_n` / `od1_n` for writes to port 8 / 9,
- the board reset as `wrm_rst_n`, low at power-on and during every warm
  reboot.

`wd_trip`, `dc_req`, `pm_held` and `dm_held` are monitor strobes for
test. They are not board signals.

## Where the RTL goes beyond or departs from the source description

The board description gives the register map, memory map, FIFO organisation,
time-outs, boot scheme and bus timing rules. Everything else is this design's
choice, listed in each file's header. The points a user is most likely to
trip over:

- **Serial link timing** (bit rate, clock edge, bit order, BUSY handshake
  detail) belongs to the spacecraft interface control document, which is not
  reproduced here. `BIT_DIV = 20` and MSB-first are placeholders to check
  against it.
- **Mission data interrupt.** The interrupt table says the interrupt comes
  at the end of each sub-packet. The register description says it comes at
  the falling edge of MD_ENA, after the final word of the packet. This design
  raises it once per packet, at the falling edge of MD_ENA.
- **I/O decode.** The port map decodes PMA[23:21] = 11x, but the memory map
  gives 110 to the ports and 111 to the PROM. This design decodes 110 only.
- **Boot addresses.** Instruction i comes from PROM bytes 6i…6i+5, so the
  second instruction starts at PROM address 6. The loader length (256
  instructions) and the byte order (most significant first) are assumptions.
- **PROM size.** The board fits two 8k × 8 PROMs (16 KB). The memory map
  lists a 32 KB window. Only `bpm_addr` is brought out; the PROM parts
  decode what they need.
- **~V_FAIL** reboots the board but does not set ~WDTrip. It has its own
  status bit.
- **Address windows.** Each buffered card is selected by the whole
  PMA[23:21] window. The smaller ranges in the memory map, such as MON at
  0xA0 000x, are left to the card's own decode.
- **Boot source.** The board has a jumper that selects PROM boot.
  The RTL always boots from PROM.
- **Asynchronous parts** (SRAMs, FIFOs) are modelled with synchronous writes
  in the 20 MHz domain. SRAM reads and FIFO output data are combinational,
  so the zero-wait-state RAM timing holds.

## Parameters

All defaults are the board's sizes.

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| sc_proc | RAM_WORDS | 131072 | words in each RAM |
| | FIFO_DEPTH | 4096 | words per FIFO |
| | BIT_DIV | 20 | clocks per serial bit |
| | TICK_DIV | 39062 | clocks per 512 Hz tick |
| | WD_SHORT / WD_LONG | 155600000 / 311200000 | watchdog time-outs in clocks |
| | DC_WINDOW | 8192 | discrete-reset window in ticks |
| | BOOT_WORDS | 256 | instructions copied at boot |
| watchdog | WRM_LEN | 16 | warm-reboot pulse length |
| tbus_cycle | MIN_CYC | 4 | minimum buffered cycle |

## Simulation

Every testbench in `tb/` checks itself. Each ends with a line of this form:

```
TB_RESULT checks=<n> failures=<n>
```

Each testbench also has a watchdog that ends a hung run. Run a testbench from
the repository root with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/sc_proc_pkg.sv tb/tb_sc_proc.sv --top-module tb_sc_proc -Mdir obj -o sim
./obj/sim
```

`--assert` turns on the concurrent assertions in the RTL. They check three
things:
- the DSP holds an access steady until it is acknowledged (`sc_proc`),
- a buffered cycle is never shorter than four clocks and its strobes stay
  steady (`tbus_cycle`),
- a FIFO never holds more than its depth and is never flagged empty and full
  at once (`fifo_4kx9`).

The testbenches reset every register they read. They pass with Verilator's
random initial values (`+verilator+rand+reset+2`).

| Testbench | What it covers |
|---|---|
| `tb_fifo_4kx9`, `tb_sram_128kx8`, `tb_prog_ram`, `tb_data_ram` | storage parts at full size |
| `tb_cmd_if`, `tb_st_if`, `tb_md_if` | the three links, with small FIFOs and fast bits |
| `tb_watchdog`, `tb_sc_time`, `tb_dc_rst` | watchdog, time counter, discrete reset |
| `tb_tbus_ctl`, `tb_boot_ctl`, `tb_twib_ctl` | bus controller, boot, port decode |
| `tb_sc_proc` | end to end, reduced sizes (see below) |
| `tb_sc_proc_full` | one complete operation at default sizes |
| `tb_sc_proc_workloads` | full 4k FIFOs and a real 7.78 s watchdog trip, default sizes |

`tb_sc_proc` reboots the board four times: at power-on, and by watchdog,
~V_FAIL and discrete reset. Along the way it receives commands (one with a bit
error, one that overflows the FIFO), sends status and a three-part mission
data packet, stretches buffered accesses on both buses, reads the PROM and
strobes the OD port. It counts each of these events and fails if any never
happened.

`tb_sc_proc_full` uses the defaults. It:
- boots 256 instructions and checks the boot time and every word,
- exercises the tops of both RAMs,
- runs one pass of each link,
- waits one time tick.

`tb_sc_proc_workloads` does the following, also at the defaults:
- fills the command FIFO with a 12288-byte packet,
- overflows it with one more packet,
- sends a mission data packet of two full 4096-word sub-packets,
- lets the watchdog trip after exactly 155.6 million clocks.

It takes about two minutes of simulation.

`tb/boot_prom_model.sv` is a behavioural PROM used by the board tests. Byte
n holds (37·n + 11) mod 256.
