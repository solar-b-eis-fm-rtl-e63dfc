# EIS instrument control unit: digital logic

The instrument control unit (ICU) of the EIS spectrometer on Solar-B is a 21020 DSP
surrounded by memories and a few FPGAs. This RTL covers the FPGAs and the memories. The
FPGAs do four jobs:

- they boot the processor from a byte-wide PROM;
- they exchange command, status and mission-data packets with the spacecraft's mission
  data processor (MDP) over three serial links;
- they catch the CCD camera's two high-speed data streams into a double-buffered image
  memory, sorting every word by the CCD read-out port it came from;
- they keep a watchdog, a spacecraft time counter, the power-switch latch and the
  health-monitor multiplexer select.

The processor, its address decoders, the PROM, EEPROM, UARTs, ADC and analogue parts are
not part of the RTL. Their signals are ports of the top module `icu_top`, so a testbench
or a processor model takes the DSP's place on the buses.

Everything runs on one 20 MHz system clock, except the front end of each camera link
receiver, which is clocked by that link's own clock.

```
            PROM ──► boot_loader ──► program RAM 128k x 48 ◄──┐
                         │ dsp_rst                            │
  DSP PM bus (48/24) ────┼────────────────────────────────────┤
                         ├─► sc_if ─┬─ cmd_if ◄── CMD link ◄── MDP
                         │          ├─ st_if  ──► ST link  ──► MDP
                         │          └─ md_if  ──► MD link  ──► MDP (MD_BSY back)
                         │     3 x cmd FIFO, 1 x st FIFO, 2 x md FIFO (4k x 9 each)
                         ├─► watchdog (16 s) ──► warm reboot
                         ├─► sc_time (32 bit)
                         ├─► power_latch ──► power switches
                         └─► mon_sel ──► analogue multiplexer select
  DSP DM bus (32/32) ────┬─► data RAM 128k x 32, working RAM 512k x 16
                         └─► ccd_buf_ctl ◄── two hsl_rx ◄── camera links
                                  │  page A / page B, 2M x 16 each
```

## Processor buses

`icu_top` takes the DSP's side of the two buses as ports, together with one select line
per device (the output of the address decoder, which is not built here).

- **PM bus:** 48-bit data, 24-bit address.
- **DM bus:** 32-bit data, 32-bit address.

The bus cycle is simplified to one access per clock:

- **Write:** the select, `pm_wr`/`dm_wr`, the address and the data are all valid in the
  same clock.
- **Read:** `pm_rd`/`dm_rd` and the select are given in one clock. The data appear on
  `pm_rdata`/`dm_rdata` in the next clock.

Register devices sit on the top byte of the PM data bus, PM[47:40], which is the byte the
interface FPGA is wired to. The wider data sit as follows:

| Device | Bus | Bits |
|---|---|---|
| program RAM | PM | 47:0 |
| command FIFOs (read) | PM | copy 2 in 47:40, copy 1 in 39:32, copy 0 in 31:24; first-byte flags of copies 2, 1, 0 in 23:21 |
| status FIFO (write) | PM | 47:40 |
| mission-data FIFO (write) | PM | 47:32, high byte in 47:40 |
| S/C interface, watchdog, power, monitor registers | PM | 47:40 (power: top `N_PWR` bits) |
| spacecraft time | PM | 47:16 |
| data RAM | DM | 31:0 |
| working RAM, CCD buffer | DM | 15:0 |
| CCD controller registers | DM | 31:0 read, 15:0 write |

## Boot and reset

`sys_rst` is `por | ext_rst | watchdog reboot`. It resets every block except the
watchdog's own register, which only power-on reset clears. This lets software see after a
restart that the watchdog caused it.

When `sys_rst` falls, `boot_loader` does the following:

1. It reads the PROM byte by byte.
2. It packs each six bytes into one 48-bit word, with the first byte in bits 47:40.
3. It writes the words to program RAM from address 0.

While it works, it owns the program RAM port and holds `dsp_rst` high. It also holds the
rest of the ICU (interface FPGA, FIFOs, time counter, CCD controller, power latch, monitor
select) in reset. Only the watchdog keeps counting. A PROM access is
given `PROM_WAIT+1` clocks, so each word takes 19 clocks. The whole 16 kbyte PROM
(2730 words) is copied in about 2.6 ms. `dsp_rst` falls when the last word has been
written.

## Spacecraft interface (`sc_if`)

The three MDP links use the same three-wire form:

- an enable that is high for the whole packet;
- a clock that runs only while the enable is high;
- data sent msb first, changing on the falling clock edge.

`ser_tx` is the shared transmitter. Each link bit takes `2*LINK_HALF` system clocks
(5 Mbit/s at the default).

The processor reaches `sc_if` through PMD[47:40], PMRD and PMWR, one select per interface
(CMD_CTL, ST_CTL, MD_CTL), and `scif_reg`. `scif_reg` chooses between a register access
(1) and a FIFO data-port access (0).

Register write bits:

| Bit | Function |
|---|---|
| 0 | GO (status and mission-data interfaces) |
| 1 | reset the interface and its FIFO(s) |
| 2 | clear the sticky status flags |

Status read bits:

| Bit | CMD | ST | MD |
|---|---|---|---|
| 0 | all FIFOs empty | FIFO empty | a FIFO empty |
| 1 | any FIFO full | FIFO full | a FIFO full |
| 2 | receiving | sending | sending |
| 3 | packet received | packet sent | sub-packet sent |
| 4 | byte lost (FIFO full) | – | MDP busy (MD_BSY) |
| 5 | enable fell mid-byte | – | – |

**Commands (`cmd_if`).** The receiver samples the link's three lines with the system clock
through two-flop synchronisers, so the command clock must stay below 5 MHz. Every complete
byte is written in the same clock into all three command FIFOs. Software reads one word
holding the three copies and takes a bit-wise majority vote, so an upset in one FIFO does
no harm. The ninth FIFO bit marks the first byte of each packet. The sticky flags report:

- a packet end (the enable falls);
- a byte lost to a full FIFO;
- a byte cut short by the enable.

**Status (`st_if`).** Software fills the status FIFO with a whole packet and writes GO.
The interface then sends bytes until the FIFO is empty. It raises no interrupt, because a
status packet only ever answers a command. The "packet sent" bit can be read if wanted.

**Mission data (`md_if`).** Two 9-bit FIFOs side by side form one 16-bit FIFO. Software
fills it with a sub-packet and writes GO. The interface then sends 16-bit words until the
FIFO is empty. It does not start a word while the MDP holds MD_BSY high. At the end it
pulses `md_irq`, if PULSE_EN is high.

## CCD buffer and camera links (`ccd_buf_ctl`, `hsl_rx`)

This is the part with the most going on.

**Receiving.** Each camera link runs at 16 MHz and has the same three-wire form, with
16-bit words. `hsl_rx` shifts the data in on the link's own clock. Its bit counter is
cleared asynchronously while the link enable is low, because the link clock stops between
packets. The lint warning about `hsl_ena` being used both as data and as an async clear
comes from this and is intended.

Each complete word is held, and a toggle flag is flipped. The toggle crosses into the
system clock through two flip-flops. The word has been stable for many clocks when the
system side reads it. This needs the system clock to be about four times the word rate:
20 MHz against 1 M words/s.

**End of exposure.** An enable that stays low for `EOE_CLKS` system clocks (10 µs) after
data marks the end of an exposure. It raises `ccd_irq`.

**Auto-sort.** Bits 15:14 of every word are the ID of the CCD read-out port it came from.
A page is split into four equal ranges of 512k words, and each range has its own write
pointer. So each port's data end up contiguous in their own range, whichever link carried
them. The stored word keeps its ID bits.

**Arbitration.** Both links share a page's single write port. Each link has a one-word
holding register, and link 0 is served first. At most 2 M words/s arrive against
20 M write slots, so neither link waits long. A word whose range is full is dropped and
sets the overflow flag.

**Double buffering.** There are two pages of 2M x 16. One belongs to the links and the
other to the DSP, which reaches it as plain memory on DM[15:0]. When software writes the
swap bit, the two pages trade places. The four pointers are copied into four word-count
registers, which tell the DSP how much of each range its new page holds, and the pointers
restart at 0.

Register port:

| Access | Address | Bits |
|---|---|---|
| write | 0 | bit 0 swap, bit 1 clear flags |
| read | 0 | bit 0 link page, bits 1/2 end of exposure seen on link 0/1, bit 3 overflow, bits 4/5 link 0/1 active |
| read | 4–7 | word count of range 0–3 |

## Watchdog and spacecraft time

**Watchdog.** The watchdog counts 16 s (320 M clocks). It is enabled at power-on. Software
restarts it by writing bit 0. If it expires:

- it drives the reset for 16 clocks (a warm reboot);
- it sets the WARM-REBOOT flag.

Other write bits:

| Bit | Function |
|---|---|
| 1 | clear the flag |
| 2 | write enable for bit 3 |
| 3 | enable (1) or disable (0) the watchdog |

A read returns {enabled, flag} in bits 1:0.

The simulations run the watchdog with short periods (1000 clocks in its own test, 60000
in the reduced top test). The full 320M-clock period is a parameter value and has not
been simulated. At about 2 M clocks/s in Verilator it would take several minutes.

**Spacecraft time.** `sc_time` is a 32-bit counter that advances every `TICK_DIV` clocks
(1 µs by default). Software can load it. A read captures all 32 bits at once.

## Power switches and monitor select

`power_latch` holds `N_PWR` (8) on/off outputs for the heater and power-line switches.
They are all off after reset and can be read back.

`mon_sel` holds the health-monitor multiplexer channel. There are `N_MON` (16) channels.
A channel out of range is folded into range and flagged. `mon_settle` pulses 20 clocks
after each change, which is when the analogue line may be converted.

## Sizes and parameters

Every default is the flight size:

| Parameter | Default |
|---|---|
| program RAM | 128k x 48 |
| data RAM | 128k x 32 |
| working RAM | 512k x 16 |
| CCD page | 2 x 2M x 16 |
| each FIFO | 4k x 9 |
| PROM | 16 kbyte |
| watchdog | 16 s |

The following are this design's own choices:

| Parameter | Default |
|---|---|
| `LINK_HALF` | 2 |
| `TICK_DIV` | 20 |
| `EOE_CLKS` | 200 |
| `N_PWR` | 8 |
| `N_MON` | 16 |
| PROM wait states | 2 |

The memories are written as arrays (`sram`) with one clock of read latency, standing in for
the asynchronous SRAM chips. The FIFOs are written the same way (`sc_fifo`), standing in for
the bought-in FIFO parts.

## Where the RTL fills in gaps

The block set, the memory sizes, the triple command FIFOs, the GO-driven status and
mission-data transmitters, the mission-data interrupt, the 16 s watchdog with its
reboot-surviving flag, the 32-bit time counter and the CCD auto-sort with two swapped pages
follow the ICU's definition. That definition leaves these points open, and they are filled
in here:

- the link bit rates and the framing of the MDP links;
- all register layouts and bit positions;
- the placement of devices on the PM bus;
- the first-byte flag in the command FIFOs;
- the CCD write arbitration, pointers and word-count registers;
- the end-of-exposure timeout;
- the time counter's rate, load and read;
- how many power switches and monitor channels there are;
- the simplified bus cycle.

The bus cycle has no wait states. The real working RAM needs three, which the processor
would insert for that address range.

Two readings are worth knowing:

- The MD_BSY line is taken to mean "MDP not ready".
- PULSE_EN is taken as the enable of the mission-data interrupt.

Software functions, such as the triple vote on commands and page management, are left to
the processor.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops on a cycle watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl rtl/icu_pkg.sv \
    $(ls rtl/*.sv | grep -v icu_pkg) tb/tb_icu_top.sv --top-module tb_icu_top -o sim
./obj_dir/sim
```

Testbenches:

| Testbench | What it runs |
|---|---|
| `tb_<block>` | one block, often at reduced sizes (e.g. a 1k-word CCD page, a 1000-clock watchdog) |
| `tb_icu_top` | the whole ICU at reduced memory sizes and a short watchdog period |
| `tb_icu_full` | the whole ICU at every default size: full 16 kbyte boot, command, status and 2048-word mission-data packets, camera data into both pages |
| `tb_ccd_exposure` | a full exposure pair (2 x 2048 x 512 words) over both 16 MHz links into a full-size page, every word read back (about 20 s) |

`tb_icu_top` does the following:

- boots;
- receives and votes commands, and overflows a command FIFO;
- sends status and mission-data packets, including an MD_BSY hold and the interrupt;
- streams both camera links with all four IDs;
- swaps pages and checks the sorted data and the end of exposure;
- switches power and the monitor channel;
- reads time;
- lets the watchdog trip and checks the warm reboot and its flag.

It counts each of these and fails if one never happened.

`tb_icu_full` takes about 10 s in Verilator and needs a few GB of memory for the 86 Mbit of
arrays. Starting the simulation with `+verilator+rand+reset+2` randomises the initial state.
The RTL resets everything that is read.
