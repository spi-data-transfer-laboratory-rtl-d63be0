# SPI switch-to-LED transfer lab

This design puts an SPI master and an SPI slave on one FPGA board and wires
them together. Each side has four slide switches and four LEDs. Buttons
tell the master to send its switch word to the slave, or tell the slave to
offer its word and the master to read it. The LEDs show each side's
register, so you can watch a 4-bit word cross the SPI link in either
direction.

The SPI link is slow on purpose. The state machines run on a divided clock
(10 Hz with a 50 MHz board clock), and every SCLK level lasts at least one
state-clock cycle. This is a teaching design, not a general SPI core. It
follows the structure, signal names and cycle-by-cycle behaviour of a 2008
embedded-systems lab solution. The parts that solution only names are
filled in here. That covers the clock divider and the button debouncer.

## Board controls

| Control | Effect |
|---|---|
| BTN0 | master loads SW7..SW4 and sends them to the slave |
| BTN1 | slave loads SW3..SW0 and offers them on MISO |
| BTN3 | master reads the slave's word |
| BTN2 | clears both registers and all requests |
| LD7..LD4 | master register (LD7 = MSB) |
| LD3..LD0 | slave register (LD3 = MSB) |

**A request stays set until BTN2.** A button does not start a single
transfer. Its controller sets a flag on the next state-clock edge, and that
flag holds until the clear button. While it is set, the datapath repeats
the transfer back to back. So after BTN0 the slave LEDs follow the master
switches live, and after BTN1 + BTN3 the master LEDs follow the slave
switches.

To read the slave, press BTN1 first and then BTN3. Once BTN1 is latched,
the slave no longer watches SS for incoming data. To send from master to
slave after that, clear with BTN2 first. If both master requests are set,
reading the slave wins.

## Clocks

`clock` toggles its output every `HALF_PERIOD` input cycles, so
f_out = f_CCLK / (2 · HALF_PERIOD). The top uses two of them:

| Instance | Parameter of `spilab08` | Default | At 50 MHz |
|---|---|---|---|
| SPI state clock `clk1` | `CLK1_HALF` | 2,500,000 | 10 Hz (5 Hz SCLK) |
| button clock `clk100` | `CLK100_HALF` | 250,000 | 100 Hz |

The original labels `clk1` as 1 Hz. That needs `CLK1_HALF = 25_000_000` at
50 MHz. The default keeps the original's divisor of 2,500,000 instead.

Both divided clocks are ordinary flip-flop outputs used as clocks, as on
the original board. All four SPI blocks share `clk1`, so master and slave
are synchronous to each other. The debounced buttons cross from `clk100`
to `clk1` without a synchronizer. A press lasts many `clk1` cycles, so a
late sample only delays the request by one cycle. In an ASIC, or at higher
clock rates, you would add synchronizers and a proper clock-enable scheme.

## The two SPI transfers

SPI words are 4 bits, sent MSB first. All SPI outputs are registers.
"Cycle k" below means the k-th `clk1` cycle after the IDLE cycle that saw
the request.

### Master to slave (BTN0)

The master drives SS low and clocks out four bits:

| k | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 |
|---|---|---|---|---|---|---|---|---|---|
| SCLK | 0 | 1 | 0 | 1 | 0 | 1 | 0 | 1 | 0 |
| SS | 0 | 0 | 0 | 0 | 0 | 0 | 0 | 1 | 1 |
| MOSI | b3 | b3 | b2 | b2 | b1 | b1 | b0 | b0 | b0 |

- MOSI changes only when SCLK goes low. An assertion in `spimdtpth` checks this.
- SS rises together with the last SCLK high.
- A held request repeats every 10 cycles: 9 transfer cycles plus IDLE.
- The master register takes the switches at k = 1. Bits b2..b0 are read
  from the switches at the cycle they are driven.

The slave leaves IDLE when it sees SS low. It then takes MOSI into register
bit 3, 2, 1, 0 on each SCLK high it sees, and waits for SCLK low between
bits. Each received bit replaces only its own register bit.

### Slave to master (BTN1, then BTN3)

This handshake is unusual: **SS stays high** the whole time. The slave
treats SS high as its go-ahead:

1. BTN1 puts the slave in its load state. It copies its switches into its
   register and puts bit 3 on MISO.
2. As soon as SS is high, it waits for SCLK high, then SCLK low.
3. On each SCLK low it moves MISO to the next bit.

The master makes four SCLK pulses. It samples MISO one cycle after each
rise, while SCLK is still high:

| k | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 | 13 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| SCLK | 0 | 1 | 1 | 0 | 1 | 1 | 0 | 1 | 1 | 0 | 1 | 1 | 0 |
| master samples | | | b3 | | | b2 | | | b1 | | | b0 | |

A held read repeats every 14 cycles. With BTN1 still latched, the slave
goes back to its load state after each word. So the next read returns the
switches as they were when the previous read ended.

### How the slave keeps pace

The slave has no SCLK clock domain of its own. It samples SCLK on `clk1`
and moves one state per SCLK level it sees, so it lags the master by one
cycle. This works because the master holds every SCLK level for at least
one `clk1` cycle. For the same reason, the slave also works with a master
that holds levels longer, and its testbench checks this. A master that
changed SCLK on every edge of the same clock would break it.

## Modules

| File | Role |
|---|---|
| `rtl/spilab_pkg.sv` | `DATA_W = 4`, the SPI word and LED width |
| `rtl/clock.sv` | clock divider |
| `rtl/pbdebounce.sv` | button debouncer: 4 samples at 100 Hz, output = AND of the samples (registered) |
| `rtl/spimcntrl.sv` | master request flags `rdmdat`, `rdslave` (set by button, held until clear) |
| `rtl/spimdtpth.sv` | master state machine: IDLE, send states, read states |
| `rtl/spiscntrl.sv` | slave request flag `rdsdat` |
| `rtl/spisdtpth.sv` | slave state machine: IDLE, load/send states, receive states |
| `rtl/spilab08.sv` | board top: switch and LED mapping, all instances |

The original code uses one state per bit: 23 master states and 18 slave
states. Here the two datapaths use a 3-bit state plus a bit index instead.
The outputs are the same cycle for cycle. The width parameter `W` follows
from this, but the board and the testbenches use only W = 4.

## Differences from the original lab code

- **Clear.** Clear (BTN2) is synchronous and takes priority. In the
  original, the state case statement also ran on a clear edge.
- **Reset values.** Clear sets SCLK low, SS high and MISO low directly.
  The original set SCLK and SS only through the IDLE state that ran on the
  same edge, and left MISO untouched.
- **Power-up.** No register has a power-up value. Press BTN2 once after
  configuration. The original relied on an FPGA initial value for the state
  registers only.
- **Divider and debouncer insides.** The original names these blocks but
  does not show their insides. Both are this design's own choices.
- **Divisors.** They are parameters here. In the original they were passed
  as port values.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

- `tb_clock`: edge spacing for half periods 3 and 1.
- `tb_pbdebounce`: output against a sample-history reference. Bounce bursts
  must never get through, and steady presses must.
- `tb_spimcntrl`, `tb_spiscntrl`: flags against a reference under random
  buttons.
- `tb_spimdtpth`: SCLK/SS/MOSI against the send table for all 16 words.
  Read sampling is checked against random MISO, at exactly the cycles in
  the table. Also covers: a held request repeating every 10 cycles, read
  priority, and clear during a send.
- `tb_spisdtpth`: a master model drives the original waveforms, at the
  original timing and with levels stretched to 1–3 cycles. Covers receive,
  transmit, reload with a held request, and clear.
- `tb_spilab08`: the whole board, driven only through buttons and
  switches, with the dividers shortened to 8 and 2. Covers clear, a
  rejected bouncy tap, sends, switch changes following a held send, the
  10-cycle send period (measured on SS), reads, and changes following a
  held read. It counts each of these and fails if any never happened.
- `tb_spilab08_full`: the top at its default dividers with a 50 MHz clock.
  It measures the 10 ms and 100 ms clock periods, clears the board, presses
  BTN0, and checks both LED groups. This is about 1.2·10^8 board cycles,
  roughly 35 s of simulation.

Run a testbench with verilator, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
  --top-module tb_spilab08 rtl/spilab_pkg.sv tb/tb_spilab08.sv
./obj_dir/Vtb_spilab08
```

Replace `tb_spilab08` with any other testbench name. Verilator is a
two-state simulator. The testbenches press clear first, so they do not
depend on power-up values.

## Changing it

- Slower or faster LEDs: set `CLK1_HALF`. Debounce timing: set
  `CLK100_HALF` and `pbdebounce`'s `SAMPLES` (at least 2).
- The SPI word width is `spilab_pkg::DATA_W`. The board top maps exactly
  four switches and four LEDs per side. A different width also needs new
  switch and LED wiring in `spilab08`.
