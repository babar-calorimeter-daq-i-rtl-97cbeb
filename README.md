# Calorimeter front-end I/O board controller

This is the digital logic of an I/O board (IOB) for a crystal calorimeter
readout. The board sits between the off-detector electronics and a set of
ADC boards (ADBs). Each ADB carries twelve crystal channels, read by CARE
range-selecting amplifiers and 10-bit ADCs. The off-detector side talks to
the board over three links:

* **C-LINK** (in) and **D-LINK** (out). These are serial bit streams at the
  59.5 MHz system clock. They carry fast strobes (sync, trigger,
  calibration) and register reads and writes. The board sends the clock back
  unchanged with the D-LINK.
* **FLINK**. This is one G-LINK serialiser plus an optical transmitter for
  every two ADBs. It carries the sampled data of 24 crystals in every
  3.7 MHz sample period.
* **ELINK**. This is a slow, opto-isolated serial port on its own clock. A
  monitoring microcontroller uses it to read a voltage ADC, the optical
  transmitters' diagnostic ports, the G-LINK lock status and the board's
  serial number.

A barrel board serves six ADBs and has three fibres. An end-cap board serves
four ADBs and has two fibres. Both come from the parameter `N_ADB`, which
defaults to 6.

## Block structure

```
iob_top
 ├─ protocol_receiver          controller, 59.5 MHz
 │   ├─ clink_rx               C-LINK deserialiser and decoder
 │   ├─ fc_reg_engine          register access engine and D-LINK responses
 │   ├─ control_reg            serial + parallel control register
 │   ├─ cal_ctrl_reg           calibration enables and capacitor selects
 │   ├─ cal_strobe_gen         500 us calibration strobe
 │   ├─ clk_divider            SAMPLE / DIGITISE generation, SYNC
 │   ├─ timing_capture         T/C divider snapshots, Tr/Cs flags
 │   └─ flink_ctrl  x3         bits 19 and 18 of each fibre's words
 ├─ data_formatter x18         per-CARE 48-bit to 3-bit/clock shifter
 ├─ glink_lock_monitor         LOCKED synchronisers and sticky edge flags
 └─ elink_if                   ELINK command interpreter, ECLK domain
```

`iob_pkg` holds the shared opcode enum, register lengths, control-register
bit positions and the `sample_t` struct (`range[1:0]`, `adc[9:0]`).

The formatters physically live on the ADBs. They are included here because
the G-LINK word format cannot be checked without them.

## Clock divider and synchronisation

A four-bit counter runs on the system clock.

* SAMPLE is counter bit 3, a 3.7 MHz square wave.
* DIGITISE is bit 1 (14.9 MHz), or bit 3 when the control register's
  DCLKSEL bit is set.
* A SYNC strobe zeroes the counter. All boards receive SYNC at the same
  time, so their dividers stay in step.

Synchronisation is checked as follows:

* Every L1 trigger strobe copies the counter into T[3:0].
* Every calibration strobe copies it into C[3:0].
* Both values, plus "a strobe arrived in the last period" flags (Tr, Cs),
  travel with the data. The DAQ can then compare them across boards.

The copy sent in a packet is taken at the last clock of the sample period.
It stays constant for the whole packet.

## C-LINK packets and register access

The link idles low. A packet is:

* a start bit `1`;
* five opcode bits C0..C4;
* five data or address bits.

Packets may come back to back with a single `0` between them. C0 and A0 are
treated as the most significant bits.

| Opcode | Action |
|-------:|--------|
| 0x02 | SYNC: zero the divider |
| 0x03 | L1 accept: snapshot T |
| 0x05 | calibration: snapshot C, start the 500 us strobe |
| 0x1A / 0x16 | write / read control register (8 bits) |
| 0x1B | write calibration DAC (16 bits, cannot be read) |
| 0x1C / 0x18 | write / read calibration control register (6 bits) |
| 0x1D / 0x19 | write / read CARE register, address 0..6 |

All other codes do nothing, and so do CARE addresses above 6.

**Write data rate.** Write data follows the header at one significant bit per
16 clocks. Bit D_k is the first bit of the (k+1)-th 16-bit row after the
header, i.e. 15 + 16k clocks after the start bit. The other 15 bits of each
row are ignored. The write packet must leave the line low after its last
data bit, until that 16-bit row is complete.

**Bit slots.** `fc_reg_engine` runs one 16-clock slot per register bit:

* the shared serial data line `reg_sdo_o` changes after slot clock 3;
* the clock of the selected register is high for slot clocks 8..15;
* registers inside the controller shift at slot clock 8.

This gives every external register half a slot of setup and hold.

**Read-back.** A read loops each bit leaving the register back into its
input, so after the read the register holds what it held before. The D-LINK
response is a 16-bit header `1 0 1 C0..C4 A0..A4 0 0 0`. It is followed by
one row of 16 bits per register bit, with the data in the last position of
the row and zeros elsewhere.

**Busy.** While an access runs, any other register request is ignored.
Strobes are still decoded.

**Register lengths.** The control, calibration control and DAC registers have
the lengths in the table. CARE register 6, a test register, is 8 bits. The
length of CARE registers 0-5 is not known: it is `CARE_BITS`, default 16.

**Control register.** The write goes into a serial stage and is copied to a
parallel stage only at the end of the write, so the outputs never see shifting
data. The bits are:

| Bit | Name |
|----:|------|
| 0 | LINK_ENABLE |
| 1 | LINKTEST |
| 2 | DCLKSEL |
| 3 | FIN_RESET* |
| 4 | FIN_OFF |
| 5 | GLINK_RESET* |
| 6 | SERNOSEL |
| 7 | unused |

**Calibration control register.** This is a plain shift register:
CALEN0..3 in bits 0..3 and CALSEL0..1 in bits 4..5.

**Bit order.** The first bit sent ends up in bit 0. For the DAC this means the
most significant bit is sent first.

## The calibration strobe

A calibration command raises an internal strobe for `STROBE_CYCLES` = 29750
clocks (500 us). It is ANDed with CALEN0..3 to give four strobe outputs. A
second command while the strobe is high is ignored. The analogue side is not
part of this logic: the DAC voltage, and the AC coupling of the strobe onto
the voltage pair.

## The G-LINK packet (FLINK)

Each sample period sends 16 words of 20 bits per fibre, word 0 first.

**Bits 17..0 (crystal data).** These come from the six formatters of the
fibre's two ADBs. Formatter k (k = 0..5) drives bits 3k+2..3k and carries
crystals X(4k)..X(4k+3). The three bits of a crystal's 12-bit sample appear in
this order:

| Word (mod 4) | Bits |
|-------------:|------|
| 0 | A2 A1 A0 |
| 1 | A5 A4 A3 |
| 2 | A8 A7 A6 |
| 3 | R1 R0 A9 |

Here A is the ADC value and R the range. Crystal X(4k) fills words 0-3,
X(4k+1) words 4-7, and so on.

**Bits 19 and 18 (control bits).** These come from `flink_ctrl`:

| Word | Bit 19 | Bit 18 |
|-----:|--------|--------|
| 0 | – | – |
| 1-10 | W0..W9 | F0 F1 S0..S7 (SERNOSEL=1) or H0..H9 (SERNOSEL=0) |
| 11-14 | T0..T3 | C0..C3 |
| 15 | Tr | Cs |

* W is a 10-bit wall clock. It counts sample periods and is zeroed by SYNC.
* F is the fibre number, 1..3.
* S is the board serial number.
* H is the last C-LINK header: H0..H4 = C0..C4 and H5..H9 = D0..D4. This
  lets the DAQ pair an L1 accept's trigger tag with the data.

**Word flags.** Word 0 is flagged to the G-LINK as a control word (`cav`) and
words 1-15 as data words (`dav`). With LINK_ENABLE = 0 both flags stay low,
so the G-LINK sends fill frames. With LINKTEST = 1 every formatter sends
the value `r mod 8` in word r instead of data.

## ELINK

The ELINK runs on ECLK from the monitoring board. It has its own asynchronous
reset. Each transaction has this form:

* a start bit;
* six command bits c0..c5, least significant first;
* a body that depends on the command.

| c0..c5 | Transaction |
|--------|-------------|
| `1 0 0 a0 a1 a2` | ADC access with ADB MUX address a2a1a0 |
| `1 0 1 a0 a1 x` | optical transmitter a1a0 (1..3; 0 returns to idle) diagnostic access |
| `1 1 0 0 x x` | EOUT toggles on each rising edge while EIN is high |
| `1 1 0 1 x x` | 8-bit serial number, LSB first, then zeros while EIN is high |
| `1 1 1 x x x` | lock a, edge a, lock b, edge b, lock c, edge c, then zeros; the read clears the edge flags |
| `0 x x x x x` | invalid, back to idle |

**ADC and Finisar access.** In both, EIN is wired through as the device's
serial input. ECLK is passed to the device clock through an enable that only
changes while ECLK is low, so the device never sees a runt pulse. The
monitoring board holds ECLK high while waiting:

* for the ADC, until SSTRB pulses low;
* for the Finisar, until READY goes low.

During the wait, EOUT shows SSTRB or READY. A flag set on the first falling
ECLK edge afterwards switches EOUT to the device's serial output. The device
drives its first data bit on that falling edge, and the monitoring board
samples it at the next rising edge.

* **ADC:** a rising edge with EIN high ends the access.
* **Finisar:** the access ends in either of two ways. A rising edge while
  READY is still high aborts it. After eight data bits EOUT shows READY
  again, and the next rising edge returns to idle.

**G-LINK lock monitor.** `glink_lock_monitor` samples the three LOCKED lines
on the system clock, because ECLK may be stopped for long periods. It keeps a
sticky flag per link for any 0→1 transition. An ELINK status read clears the
flags through a toggle that crosses into the system clock domain.

## Where this design departs from, or adds to, the description it is built from

* **Wall clock width.** The wall clock is 10 bits, matching the ten W
  positions of the packet. The prose calls it a nine-bit counter.
* **Header field.** The C-LINK header goes in bit 18 only, as the packet
  layout shows. The control register description says bits 18 and 19.
* **MUX address.** The ADB analogue MUX address comes from the ELINK ADC
  command. One sentence says it comes from the control register, but that
  register has no field for it. The ELINK command carries the address, and the
  block diagram connects the address lines to the monitoring interface.
* **Register timing details.** The bit order of opcode and address, the
  position of the data bit inside its 16-clock slot, and the zero fill of
  undefined response bits are choices made here. So are the CARE register
  length (16), the handling of requests while busy, and reset values of zero.
* **Formatter details.** The fibre number mapping (fibre f carries ADBs 2f-2
  and 2f-1) and the link-test pattern (`r mod 8`) are choices made here.
* **Not included.** Power regulation, the opto-isolated current loop, the
  JTAG programming port, the temperature interlock and all analogue
  calibration circuitry have no logic and are not modelled. Neither are the
  G-LINK, Finisar, MAX192 ADC, CARE chips or DAC. The testbenches model the
  CARE shift registers and the DAC's serial port behaviourally
  (`tb/care_reg_model.sv`, `tb/cal_dac_model.sv`). The ADC and optical
  transmitters are driven by simple stimulus inside `tb_elink_if` and
  `tb_iob_top`.

## Simulation

Every block has a self-checking testbench `tb/tb_<block>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

`tb_iob_top` runs the whole barrel board at its default sizes. It includes a
full 29750-clock strobe and exercises every register, strobe, link mode, all
72 crystal positions and every ELINK transaction. It counts each mechanism
and fails any that never happened.

`tb_protocol_receiver` also builds an end-cap (`N_ADB=4`) instance.

With Verilator 5:

```
verilator --binary --timing --assert --top-module tb_iob_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/iob_pkg.sv tb/tb_iob_top.sv
./obj_dir/Vtb_iob_top
```

Replace `tb_iob_top` with any other testbench name to run that block alone.
Concurrent assertions in `protocol_receiver`, `fc_reg_engine` and
`elink_if` check the rules between parts (one register clock or chip select at
a time, write data taken only during an access, strobe gating); keep
`--assert` so that they are evaluated. Simulation is two-state, and random values come from `$urandom`. All RTL is
synthesizable.
