# Flasher-board interface CPLD

An LED flasher board carries six LED modules, a few 1-Wire memory chips
(calibration data, board serial number), some SPI devices and six adjustable
trigger-delay chips. None of these has a path of its own to the host processor
board ("DOMMB"). This CPLD gives the host one small parallel register bus
(8-bit address, 8-bit data, active-low `nWR`/`nRD`) and turns it into:

* a **1-Wire master** that the host drives byte by byte, switched onto one of
  eight 1-Wire lines `DQ0..DQ7` (DQ0–DQ5: the LED modules' calibration PROMs,
  DQ6: the board-ID chip, DQ7: spare);
* an **SPI pass-through mode** in which four bus pins stop being bus pins and
  become SCLK, MOSI, MISO and nCS for a chosen set of SPI channels;
* **trigger-delay control**: a 3-bit code and an enable line for each of the six
  LED modules.

The RTL follows an interface description written as host-side pseudo-code
(which register to write, with what value, in what order). That description
fixes the register functions, the 1-Wire register offsets and command values,
the SPI pin mapping and the bit packing of the delay codes. Everything it leaves
open — absolute addresses, bus timing, the 1-Wire divider coding and slot
timing, several flag positions — is chosen here and listed under
[Departures and choices](#departures-and-choices).

## Block structure

```
 host bus ──► host_bus_if ──reg_bus_t──┬──► owm_master ──dq_low/dq_in──► owm_channel_sel ──► DQ0..DQ7
 (nWR,nRD,                             │        ▲ soft_clr (new channel) ────┘
  addr,data)                           ├──► spi_bridge ◄── raw nWR, data(0), data(2); ──► data(1)
                                       │         └──► SCLK, MOSI, nCS[7:0] ◄── MISO[7:0]
                                       └──► trig_delay_regs ──► del_ena[5:0], del_code[6][2:0]
 read data: each block returns rdata/rd_hit for host_addr; flasher_cpld muxes them
```

| file | role |
|---|---|
| `rtl/flasher_pkg.sv` | register map, `reg_bus_t`, 1-Wire flag/enable structs |
| `rtl/host_bus_if.sv` | strobe synchroniser, write/read strobes on the internal bus |
| `rtl/owm_master.sv` | 1-Wire master: registers, divider, reset/presence and slot engine |
| `rtl/owm_channel_sel.sv` | one-hot channel register, DQ mux |
| `rtl/spi_bridge.sv` | SPI active list, SPI_mode, pin mapping |
| `rtl/trig_delay_regs.sv` | delay enables and codes |
| `rtl/flasher_cpld.sv` | top: wiring, SPI_mode write blocking, read mux |

## Register map

Addresses are this design's choice (`flasher_pkg`); change them there.

| address | name | access | meaning |
|---|---|---|---|
| 0x00 | OWM command | W/R | write 0x01: reset + presence detect; any other value: transmit it. Read bit 0: reset in progress |
| 0x01 | OWM data | W/R | write: transmit byte (0xFF = eight read slots); read: receive buffer, clears RBF |
| 0x02 | OWM flags | R | `{0,0,RSRF=0,RBF,TEMT,TBE,PDR,PD}`; reading clears PD |
| 0x03 | OWM interrupt enable | W/R | `{DQOE,ENBSY,ESINT,ERBF,ETMT,ETBE,IAS,EPD}` |
| 0x04 | OWM clock divider | W/R | 0 stops the master; see below |
| 0x08 | slave select | W/R | one-hot channel (bit n = DQn), 0 = none |
| 0x10 | SPI active list | W/R | bit n = 1: SPI channel n takes part |
| 0x11 | SPI operate | W/R | 0xFF enters SPI_mode, 0x00 leaves it; reads 0xFF/0x00 |
| 0x18 | delay enable | W/R | bit n enables LED module n |
| 0x19/0x1A/0x1B | delay codes | W/R | bits 2:0 module 2k, bits 5:3 module 2k+1 (k = 0,1,2) |

Unmapped addresses read 0. While `nRD` is low the CPLD drives all eight data
lines (`host_data_oe = 0xFF`) with the addressed register, combinationally.

## The host bus

`host_bus_if` samples address and data on every clock while the raw strobe is
low, passes `nWR`/`nRD` through two-flop synchronisers and, once the
synchronised strobe has risen, issues a one-cycle `wr` or `rd` on the internal
`reg_bus_t`. So a write takes effect on the rising edge of `nWR`, 3–4 clocks
later. The host must hold address/data for at least one clock before the
rising edge, keep each strobe low at least 2 clocks, and leave 3 clocks before
the next access. `rd` exists only for clear-on-read flags; read data is not
registered. An assertion checks that `nWR` and `nRD` are never low together.

## The 1-Wire master

This is the part with the most behaviour in it.

**Time base.** The divider register turns the CPLD clock into a 1 µs tick:
ratio = {1,3,5,7}[bits 1:0] × 2^bits 4:2. The set-up value the host uses,
0x0D, gives 3 × 8 = 24, i.e. 1 µs from a 24 MHz clock. With another clock,
pick the value whose ratio equals the clock in MHz. While the divider is 0,
nothing starts.

**Reset / presence.** Writing 0x01 to offset 0 pulls the line low for
`T_RSTL` = 480 µs, releases it for `T_RSTH` = 480 µs, and samples it
`T_MSP` = 70 µs after release. A low level there is a slave's presence pulse:
PDR = 1. At the end PD is set.

**Bytes.** A byte written to offset 1 (or any byte other than 0x01 written to
offset 0 — the host sends ROM/function commands there) goes LSB first in eight
70 µs slots. A 1 bit is 6 µs low, a 0 bit 60 µs low, and every slot samples the
line at 15 µs. The eight samples form the received byte (RBF = 1). Writing 0xFF
therefore reads a byte: the slave holds the line low through the sample point
for each 0 it sends. A full byte takes 560 µs (13 440 clocks at 24 MHz).

**Flags and INTR.** TBE = 1 means the transmitter is entirely free. It drops
on a write to the transmit buffer or on a reset command, and returns only when
that byte or reset has finished. TEMT is 0 only while bits are shifting. INTR is
the OR of the enabled conditions (EPD·PD, ETBE·TBE, ETMT·TEMT, ERBF·RBF,
ENBSY·TBE), active high if IAS = 1, else active low. With the usual enable value
0x17, INTR goes low as soon as the host starts a reset or a byte and high when it
ends (if RBF and PD have been read away). ESINT and DQOE are stored and read
back but do nothing.

**Channel change.** Writing a different word to the slave-select register
clears the master completely: divider, enables and buffers. The host therefore
has to set up the divider and enables again after every switch. A select word
with more than one bit set is ignored.

### Host procedures

The interface is meant to be used with these sequences (offsets from 0x00):

1. *Select channel*: write the one-hot word to 0x08.
2. *Set up master*: 0x04 ← 0x0D, 0x03 ← 0x17.
3. *Reset*: 0x00 ← 0x01; wait for INTR; read 0x02: PD must be 1, PDR tells
   whether a slave answered.
4. *Send byte*: write it (commands to 0x00, address/data bytes to 0x01); wait
   for INTR, then poll 0x02 until TBE = 1. Read 0x01 to clear RBF.
5. *Read byte*: 0x01 ← 0xFF; wait for INTR and TBE = 1; read 0x01.

With these: board ID = reset, 0x33, 8 reads (family, 6 serial bytes, CRC).
PROM read = reset, 0xCC, 0xF0 (0xAA for the status memory), two address bytes,
then one read for the CRC-8 and as many reads as wanted.
PROM write = reset, 0xCC, 0x0F (0x55 for status), two address bytes, the data
byte, then one read for the CRC and one read for the programmed byte. The CRC is
checked by the host, not in the CPLD. The 12 V programming pulse that a PROM
write needs between those two reads is **not** produced by this RTL; see below.

## SPI pass-through

The host bit-bangs SPI on its own bus pins; the CPLD only routes them.
After 0x10 ← active list and 0x11 ← 0xFF:

| host pin | becomes |
|---|---|
| `nWR` | SCLK (shared by all channels) |
| `data(0)` | MOSI (shared) |
| `data(2)` | nCS: while low, the nCS of every active channel is low |
| `data(1)` | driven by the CPLD with MISO (OR of the active channels) |

In SPI_mode only `data(1)` is driven. Every register write is ignored except a
write to 0x11, because `nWR` is now the SPI clock. The host must therefore keep
the address away from 0x11 while it clocks. It leaves the mode with 0x11 ← 0x00.
Outside SPI_mode SCLK and MOSI are 0 and all nCS are high. The pin mapping is
combinational, so the SPI rate is whatever the host produces.

## Trigger-delay control

Four plain registers drive the `del_ena[5:0]` and `del_code[5:0][2:0]` pins of
the external delay chips directly; they change one clock after the write strobe.

## Departures and choices

* Absolute addresses, bus width (8/8) and bus timing are chosen here.
* Transmit address: the original sequences send command bytes to offset 0
  (where 0x01 means reset) and address/data bytes to offset 1. Both are
  supported, which is why 0x01 cannot be sent as a byte through offset 0.
* Divider coding, slot and reset times (standard-speed 1-Wire values), and the
  flag bits other than PD (bit 0) and TBE (bit 2) are chosen here.
* TBE stays 0 until a byte or reset has *completed*. The original read-byte
  sequence ("wait for INTR, check TBE, read the byte") relies on this; a master
  with a separate buffer-empty flag would return stale data there.
* The master is cleared on a channel change. The original only says it must be
  set up again after a change.
* The enable register of the delay chips is a bit mask (several modules at once).
  The original wording can also be read as selecting a single module.
* Number of SPI channels (8), MISO as an OR, SCLK/MOSI shared: chosen here.
* **Not built:** the 12 V PROM programming pulse (no register, pin or timing is
  defined for it), the PROMs, the ID chip, the delay chips and the host.
  The testbenches use behavioural models of the 1-Wire chips instead.
  Their PROM model programs a byte without any pulse.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/flasher_pkg.sv rtl/*.sv tb/ow_slave_model.sv tb/flasher_cpld_tb.sv \
  --top-module flasher_cpld_tb -Mdir obj && obj/Vflasher_cpld_tb
```

| testbench | what it covers |
|---|---|
| `tb/flasher_cpld_tb.sv` | whole design at default size: delay codes; board-ID read; PROM read/status read on two channels; PROM write (two bytes) and status write; reset on an empty channel; three SPI transfers with random active lists, blocked writes in SPI_mode. Counts every mechanism and fails if one never happens. About 1.1 M clocks; about a second of simulation. |
| `tb/owm_master_tb.sv` | master alone: reset and byte timing to within a few µs, 0/1 slot low times, presence/no presence, flags, INTR polarity, clear on channel change, stopped divider |
| `tb/owm_channel_sel_tb.sv` | one-hot rule, change pulse, DQ mux |
| `tb/spi_bridge_tb.sv` | mode entry/exit, pin mapping, chip selects, MISO, frozen active list |
| `tb/trig_delay_regs_tb.sv` | random writes against a model of the packing |
| `tb/host_bus_if_tb.sv` | random strobes of 2–8 clocks: latency, captured address/data, one strobe per access |
| `tb/ow_slave_model.sv` | behavioural 1-Wire PROM (`KIND=0`) or ID chip (`KIND=1`), not synthesizable |

The PROM model's memory holds `mem[i] = (i·37 + 5 + SEED) mod 256`; its status
bytes start at 0xFF. The CRC is the 1-Wire CRC-8 (x⁸+x⁵+x⁴+1, LSB first),
computed in the testbenches.

The 1-Wire timing parameters of `owm_master` (`T_RSTL`, `T_SLOT`, … in µs) can
be overridden. The top's `N_OW`, `N_SPI` and `N_LED` size the channel counts,
but the register layout assumes at most 8 of each.
