# DSS: a data source and sink module for testing trigger hardware

Testing a trigger prototype needs two things: something that drives its
inputs with known data at the full 40 MHz bunch-crossing rate, and something
that captures its outputs and says whether they are right. The DSS (data
source and sink) is a single 6U VME board that does both. Its motherboard
carries memories, pattern generators and checkers. Two plug-in mezzanine
cards provide the physical layer, so one motherboard can serve many tests:
LVDS or G-link serial links, parallel LVDS, S-link, or an ADC card.

This repository holds SystemVerilog for the motherboard logic. The core is
eight identical *data FPGAs*. Each one owns 20 bits of a mezzanine connector
and a 32K x 32 dual-port RAM. Each can:

- **play** RAM contents, a pseudo-random bit pattern (PRBP) or a ramp onto
  its pins, one word per clock (source); or
- **record** what arrives into its RAM and **check** it against its own
  pattern generator or against data pre-loaded in the RAM (sink). The first
  erroneous word and its address are latched for VME readout.

Around the data FPGAs sit:

- a VME slave (A32/A24, D32) with control, status and per-FPGA registers;
- start/stop control from VME, from a timing card or from TTC broadcasts;
- two S-link FPGAs, each with its own RAM;
- a trigger (CTP) emulator;
- a port for loading FPGA configurations over VME;
- a behavioural model of the 40 MHz timing card.

## Board organisation

```
                     VME A32/A24 D32
                           |
                 vme_slave -> control_logic ----- port A of all 10 RAMs
                                 |  registers
          +----------------------+-----------------------+
   data FPGAs 1-4 (site 1)   data FPGAs 5-8 (site 2)   S-link dest (RAM 9)
   4 x 20 = 80 connector     4 x 20 = 80 connector     S-link source (RAM 10)
   bits, RAMs 1-4            bits, RAMs 5-8            CTP emulator, config port
          \______________________|______________________/
             run_control: start/stop pulses to all FPGAs
             timing_card: 40 MHz clock, two de-skew clocks, start/stop
```

The data FPGAs work in two blocks of four, one block per mezzanine site.
Control register bits 0 and 1 make each block a source or a sink. Both blocks
may be sources, or both sinks, or one of each. One of each lets a board test
a link by looping site 1 to site 2.

The connector pins are bidirectional on the board. Here they appear as
separate `cmc_in`, `cmc_out` and `cmc_oe` arrays indexed `[site][fpga]`.
Every signal that leads to a part that is not designed here is brought out
as a top-level port of `dss_top`. These parts are the TTCrx, the S-link
cards, the link mezzanines and the CPM read-out logic.

## Inside a data FPGA

`data_fpga` holds both a `source_fpga` and a `sink_fpga`, and the block mode
chooses between them. On the real board the choice is made by loading a
different FPGA configuration. Keeping both makes the mode a register bit, and
it is the main structural liberty taken here.

### Source

On a start pulse, an address counter runs from 0 to `last_addr`. It then
stops, or wraps to 0 if `loop` is set. The word on the pins is the OR of
three inputs, each gated by its own enable bit:

| enable   | input                                                  |
|----------|--------------------------------------------------------|
| `en_ram` | the RAM word at the current address (bits 19:0)        |
| `en_gen` | the next PRBP word or ramp value (`pattern` bit)       |
| `en_ro`  | the `ro_data` input, for emulated serialiser read-out  |

With one enable set, the OR selects that input. With several set, it merges
them; for example, a sparse RAM pattern can be ORed onto a pattern.

Timing: address n is issued one cycle after the start edge plus n. Word n
appears on the pins two clocks later, from the RAM read and an output
register. `conn_tx_valid` marks the words of a run, and the pins are 0
between runs. A stop pulse ends a run at once, and the pattern generator is
reseeded at every start. A looping source therefore produces one endless
PRBS: the pattern continues across the RAM address wrap.

### Sink

A received word is accepted when the sink is running and the mezzanine's
valid line (`conn_valid`) is high. It is registered, and this register is
comparator input A. The word gets the current address counter value. The
reference, comparator input B, is the OR of the internal pattern generator
and the RAM word at that address. `sink_mode` enables one of them or
neither:

| mode          | RAM port                                | compared with                |
|---------------|-----------------------------------------|------------------------------|
| `SINK_RECORD` | writes `{11'b0, 1'b0, word}`            | nothing                      |
| `SINK_PRBP`   | writes `{11'b0, error, word}`           | internal PRBP generator      |
| `SINK_RAM`    | reads only, so the reference survives   | pre-loaded RAM word          |

A mismatch has four effects:

- it pulses `bit_error`;
- it increments a 16-bit saturating word-error count;
- it adds the number of wrong bits to a 32-bit saturating bit-error count;
- if it is the first mismatch since the last clear, it latches the word and
  its address.

All of these take effect one clock after the word was accepted.

### The pseudo-random pattern and how a checker locks onto it

This is the part most worth understanding before changing anything.

`prbp_gen` is a 15-bit Fibonacci LFSR for x^15 + x^14 + 1 (PRBS-15, period
32767). It is unrolled to produce 20 serial bits per clock, with the first
bit in D19. Because 20 >= 15, the 15 low bits of any word *are* the register
state after that word. The checker needs no training sequence and no
knowledge of where the source started: it loads the low 15 bits of one
received word as its seed, and from then on predicts every following word.

Two details follow from this:

- **Locking skips all-zero words.** An all-zero seed would lock the LFSR
  into its stuck state, and a source's pins are 0 between runs. The checker
  therefore locks on the first accepted word whose low 15 bits are not zero,
  then sets `synced` and checks every word after it.
- **An error in the locking word is not seen as one.** The checker would
  then predict a wrong stream and count errors on every word. If the
  counters explode right after a start, clear and restart. A real link test
  first waits for the link to lock; `lvds_link_test_tb` does the same.

Because the checker follows the received stream, a missing or repeated word
shows up as a burst of errors, not as a single one. That is the intended
behaviour for a link test.

## Register and address map

The board answers A32 cycles (AM 0x09/0x0D) when A31..A22 equal the 10 base
switches. It answers A24 cycles (AM 0x39/0x3D) when A23..A22 equal the two
low switches. Only D32 transfers are acknowledged. The word address A21..A2
forms a 20-bit local bus address:

| word address      | contents                                                          |
|-------------------|-------------------------------------------------------------------|
| `0x00` CTRL       | [0] block 1 sink, [1] block 2 sink, [2] run, [3] TTC start/stop enable, [4] timing-card start/stop enable, [5] S-link dest enable, [6] force XOFF, [7] CTP emulator enable |
| `0x01` STATUS     | [7:0] running, [15:8] error latched, [23:16] PRBP synced (bit i = FPGA i+1), [24] S-link source busy, [25] XOFF, [26] S-link dest overflow, [27] config busy, [28] INIT*, [29] DONE, [30] ROD busy, [31] S-link dest full |
| `0x02` CMD        | write 1: [0] clear error registers, [1] send S-link block, [2] clear S-link dest |
| `0x03` TTC        | [5:0] broadcast code for start, [13:8] for stop                    |
| `0x04`-`0x06`     | CTP trigger period, triggers sent, triggers vetoed                 |
| `0x07`, `0x08`    | S-link source and destination last address                         |
| `0x09`            | S-link dest: [15:0] words received, [31:16] control words          |
| `0x0A` CFGPORT    | write: [7:0] byte, [8] shift it out, [9] pulse PROG*; read: busy/INIT/DONE |
| `0x0B` ID         | `0xD5500001`                                                      |
| `0x40 + 8i + k`   | data FPGA i (0-7): k=0 configuration (`dfpga_cfg_t`), 1 error words, 2 first-error address, 3 first-error data, 4 bit errors, 5 address counter |
| `0x80000` + `r<<15` + `w` | RAM r (0-7 data FPGAs, 8 S-link dest, 9 S-link source), word w |

The per-FPGA configuration word packs these fields:

- `last_addr` [22:8]
- `loop` [7]
- `sink_mode` [6:5]
- `pattern` [4]
- `en_ro` [3], `en_ram` [2], `en_gen` [1]
- `sink` [0], which is overridden by the block bits in CTRL

The RAMs are true dual-port, so VME can read a sink's RAM while the sink
writes it.

### VME cycle timing

`vme_slave` brings AS* and DS* through two-flop synchronisers. It issues one
local-bus request per cycle and drives DTACK* one clock after the local bus
acknowledges. It holds DTACK* until the data strobes rise. `control_logic`
always acknowledges one clock after a request, so a cycle takes about
5 clocks (125 ns) from DS* low to DTACK* low. Assertions check the
local-bus rules: a request is a one-clock pulse, and it is never
acknowledged in the same clock.

## Starting and stopping runs

`run_control` merges three sources into one start pulse and one stop pulse
for all data FPGAs:

- the CTRL run bit (rising edge starts, falling edge stops);
- the timing card's start/stop level, synchronised and gated by CTRL[4];
- TTCrx broadcast commands matching the codes in the TTC register, gated by
  CTRL[3].

A TTC broadcast reaches every board in the same crossing, so several DSS
modules can start their patterns in step. The latency is one clock from a
VME write or broadcast strobe, and three clocks from a timing card edge.

## S-link FPGAs and flow control

The **destination** FPGA (RAM 9) emulates a read-out buffer. Every word the
S-link card delivers is written to the next RAM address, and data and
control words are counted separately. UXOFF* is asserted when fewer than
`XOFF_MARGIN` (4) words remain free. This margin lets words already in
flight land. It can also be forced from VME to exercise the sender's flow
control. A word arriving with no room is dropped and sets a sticky overflow
flag.

The **source** FPGA (RAM 10) sends RAM words 0..`last_addr` as one block
when commanded. The first and last words are marked as control words. It
stops while LFF* or LDOWN* is low. A two-word read-ahead buffer lets it
resume without a gap.

## CTP emulator, configuration port, timing card

- **`ctp_emulator`** issues an L1A every `period` clocks while enabled.
  While the synchronised ROD busy is high, a due trigger is withheld and
  counted as vetoed.
- **`fpga_config_port`** shifts a VME-written byte out MSB first in Xilinx
  slave-serial style: DIN is set while CCLK is low and taken on the rising
  edge, at two clocks per bit. It can pulse PROG* for 16 clocks. A
  mezzanine that carries its own configuration PROM (`dc_prom_present_n`
  low) disables the motherboard PROM of that site.
- **`timing_card`** is a behavioural model with delays, not logic. It gives
  a 40 MHz clock from an on-card oscillator or the front panel, two
  de-skewed copies (5 ns and 10 ns, chosen here), and a start/stop level.
  Its clock is the system clock of `dss_top`.

## Simulating

Everything runs with plain Verilator 5 (two-state, with timing):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/dss_pkg.sv tb/dss_top_tb.sv --top-module dss_top_tb -o sim
./obj_dir/sim
```

Use another `tb/*_tb.sv` and `--top-module` for the other tests. Each test
prints `TB_RESULT checks=N failures=M` and stops itself. Each has a
watchdog.

| testbench                | what it shows                                                    |
|--------------------------|------------------------------------------------------------------|
| `prbp_gen_tb`            | 400 words against a bit-serial reference LFSR; locking from one word |
| `dpram_tb`               | both ports, read latency, simultaneous access                    |
| `source_fpga_tb`         | every source, the OR, ramp, loop/stop, exact word latency        |
| `sink_fpga_tb`           | three modes, error latching, counters, idle words before lock    |
| `data_fpga_tb`           | mode switching, pin direction, RAM port ownership                |
| `vme_slave_tb`           | A32/A24 decoding, wrong AM/base/width ignored, DTACK* timing     |
| `control_logic_tb`       | every register and RAM window, block-mode override, command pulses          |
| `run_control_tb`, `ctp_emulator_tb`, `slink_*_tb`, `fpga_config_port_tb`, `timing_card_tb` | each block's rules and cycle counts |
| `dss_top_tb`             | the whole board at its real sizes, driven only over VME and the pins; it ends with a full 32768-word run between the sites and counts 17 mechanisms (modes, errors, S-link XOFF stall, CTP veto and others) |
| `lvds_link_test_tb`      | the LVDS link test: eight 480 Mbaud serial links (`lvds_link_model`, 12-bit frames), 20000 words each, random serial bit errors injected and all found in the VME error counters |
| `rod_test_tb`            | the ROD prototype test set-up: site 1 plays a read-out pattern onto four links, the CTP emulator triggers a behavioural ROD in the test, the ROD's events return over S-link into RAM 9; a forced XOFF fills the ROD, whose busy makes the CTP emulator withhold triggers; every stored word is checked |
| `ccd_readout_tb`         | the board as a CCD readout: site 2 plays a looping clock sequence, a behavioural 8-channel 10-bit ADC card answers each conversion strobe on site 1, whose sinks record 256 pixels and stop; every sample is read back |
| `cp_system_test_tb`      | five boards on one VME bus and one TTC channel: four play patterns as pre-processor stand-ins, a behavioural hit counter turns them into sixteen 3-bit multiplicities, and the fifth board checks them against its RAMs; one broadcast starts all boards in the same clock, another stops them, and one injected error is found at its word address |

`dss_top_tb` runs in about 6 s, `lvds_link_test_tb` in about 10 s and
`rod_test_tb` in about 15 s, `ccd_readout_tb` in about 10 s and `cp_system_test_tb` in about 20 s.

## How far it can be trusted

- Every module compiles without errors in Verilator and in a second
  SystemVerilog front end. Each testbench passes, and each has been shown
  to fail against a deliberately broken copy of its module.
- Expected values in the tests come from independent reference code, not
  from the RTL. For example, the PRBP reference is a bit-serial LFSR,
  and the board test predicts every RAM word and error count itself.
- Not verified:
  - real timing closure in an XC4028XLA-class device;
  - behaviour with a real VME master's skews;
  - interoperation with real S-link, TTCrx or mezzanine hardware.

  The S-link, TTC and link interfaces follow signal names and usual
  conventions, not a checked specification.
- The tests are two-state and start from random values. A reset
  dependency hidden by X-propagation in a four-state simulator would not be
  seen here.

## Where this design goes beyond or departs from the original board

What comes from the original board:

- the two sites of 80 bits and the eight data FPGAs in two blocks of four;
- the 32K x 32 RAMs and the two S-link FPGAs with their own RAMs;
- the OR of RAM, pattern generator and read-out data in the source;
- the comparator, the "data in error" register and the address counter in
  the sink;
- A32/A24 D32 VME;
- start/stop from the timing card and TTC;
- a 40 MHz timing card with two de-skew clocks;
- FPGA loading through a VME register, and a mezzanine PROM that overrides
  the motherboard one.

Choices made here, because the original gives no detail:

- the register map and VME decoding;
- the PRBS-15 polynomial and bit order, and the locking rule;
- the ramp;
- the counters and their widths;
- the run length and loop registers;
- the S-link block format, the XOFF margin and the overflow rule;
- the CTP emulator's periodic trigger;
- the TTC command codes;
- the slave-serial loading protocol.

Departures:

- Source and sink live in one `data_fpga` and are chosen by a register, not
  by reloading the FPGA.
- On the original board the VME logic sits in two CPLDs. Here it is two
  modules (`vme_slave`, `control_logic`) with no claim about how they would
  split across chips.
- The original mentions a PRBP checker among the source functions. Here the
  checker is in the sink only, where the received data is.
- Loading the configuration EEPROMs through VME is not built. Only FPGA
  loading is. JTAG in-system programming is board wiring, not logic, and is
  not modelled.
- The TTCrx, the mezzanine cards (G-link, LVDS, parallel LVDS, ADC), the
  S-link cards and the CPM serialiser read-out logic are external parts.
  Their signals are top-level ports. The only models of such parts are the
  behavioural LVDS link used by `lvds_link_test_tb`, the small ROD
  model inside `rod_test_tb`, the ADC card model inside
  `ccd_readout_tb` and the hit-counter stand-in inside
  `cp_system_test_tb`.
