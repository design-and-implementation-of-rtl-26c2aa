# TRRT FPGA: tracking receiver remote terminal for a 1553-controlled antenna tracking system

A communication satellite with several spot-beam reflectors keeps them pointed
at the ground with an on-board RF tracking receiver. The receiver turns uplink
beacon signals into DC error voltages (azimuth and elevation) and a lock
status. The attitude and orbit control system (AOCS) reads these over a
MIL-STD-1553 bus, moves the selected antenna towards null, and sends back
commands: which of the four antennas the RF switch matrices select, and a
phase control word.

The tracking receiver remote terminal (TRRT) card sits between the two. Its
FPGA, described here, does everything the 1553 remote-terminal chip cannot do
by itself:

* it configures the remote-terminal chip (registers and RAM descriptor table)
  from a PROM after power-on, after a reset telecommand and after a watchdog
  event, and, when enabled, keeps rewriting that RAM from PROM to repair
  upsets;
* it digitises eight analog channels (four in use, four spare) every 4.8 ms
  and latches the digital status inputs;
* every millisecond it checks whether the bus controller has asked for data,
  and if so writes the latest samples and status into the chip's transmit
  buffer, then keeps off the shared RAM while the controller reads it;
* it reads telecommands from the chip's receive area and drives the phase
  control word and the antenna selects;
* it resets the whole 1553 side if the bus controller has not asked for data
  for three minutes.

All of it is synchronous logic on one 24 MHz clock, in SystemVerilog.

## Blocks

```
                 +-------------------- trrt_fpga_top ---------------------+
   24 MHz ------>| clkgen --- 1us, 26us, 500us, 1ms, 8ms strobes, 12 MHz  |
   por, cmd_rst->|                                                        |
                 |  master_rt_sched --drdy_start--> drdy_sched ----+      |
                 |    (500 us)      --tc_start----> tc_update -----+      |
                 |                  --refresh-----> init_refresh_seq+--> if1553 <--> 1553 chip
   PROM <------->|  init_refresh_seq (init walk on por/cmd_rst/wdt)|      |   registers + RAM
                 |                                                 |      |
   mux/ADC <---->|  an_dig_acq_seq --latches--> drdy_sched          |      |
   digital in -->|                                                        |
                 |  wdt <--drdy_pulse-- drdy_sched; wdt_pulse --> re-init |
                 |  tc_update --> pcw[11:0], ant_sel_m, ant_sel_r         |
                 +--------------------------------------------------------+
```

| Module | Role |
|---|---|
| `trrt_pkg` | shared widths, memory map, bit positions, access codes, request/response structs |
| `clkgen` | all rates from the 24 MHz clock, as one-cycle enables and square waves |
| `master_rt_sched` | the main loop: data-ready poll, telecommand update, refresh |
| `drdy_sched` | data-ready poll and Tx buffer update, 8 ms hold |
| `tc_update` | telecommand and phase control word read |
| `init_refresh_seq` | PROM-driven init of the 1553 chip and periodic refresh |
| `an_dig_acq_seq` | analog mux/ADC sequencer and digital input latch |
| `if1553` | arbitration of the shared 1553 bus, bus cycle generation |
| `wdt` | 3-minute data-ready watchdog |
| `trrt_fpga_top` | wiring, resets, ports |

## The schedule

Nearly all the behaviour follows from one loop in `master_rt_sched`, which
steps on a 500 us strobe:

```
MASIDLE --eof_prominit--> RDDRDY --dr_eof--> TC_UPDT --next tick--> RDDRDY ...
                             \--dr_eof, every 40th round--> REFRESH --next tick--> RDDRDY
```

* **MASIDLE.** Nothing runs until the PROM init reports its end. If an init
  restarts later (reset telecommand, watchdog), `eof_prominit` falls and the
  scheduler drops back to MASIDLE at once.
* **RDDRDY.** `drdy_sched` reads the data-ready word. If its LSB is 0 it
  finishes within microseconds and the scheduler moves on at the next tick.
  So in the normal case RDDRDY and TC_UPDT alternate and **the data-ready
  word is polled every 1 ms**.
* **TC_UPDT.** `tc_update` reads the telecommand word and the phase control
  word (about 2 us). The scheduler does not wait for it.
* **REFRESH.** Every 40th round (`RF_EN`), REFRESH replaces TC_UPDT, and
  `init_refresh_seq` rewrites the next two RAM locations from PROM. Since a
  round is 1 ms, **two locations are refreshed every 40 ms**. Nothing happens
  if refresh is disabled by telecommand.

When the data-ready LSB is 1, `drdy_sched`:

1. takes a snapshot of the acquisition latches and the watchdog status;
2. writes nine words to transmit subaddress 1, starting at 0x0400;
3. writes 0 to the data-ready word;
4. pulses `drdy_pulse` to the watchdog;
5. waits 8 ms (`HOLD_MS`) before reporting `dr_eof`.

During those 8 ms the scheduler stays in RDDRDY and the FPGA does not touch
the shared RAM, so the bus controller's read of the transmit buffer cannot
collide with it. The update is paced at one access per microsecond and takes
about 12 us. The bus controller can therefore read fresh data at most about
1.02 ms after setting data ready, inside the 1.1 ms it allows for.

A round with a Tx update lasts about 9 ms instead of 1 ms. The refresh
counter counts rounds, not milliseconds, so refreshes are spaced further
apart while data ready keeps arriving.

## 1553 memory map and word layouts

Addresses are 1553 RAM word addresses. The transmit-buffer address and the
W0 status bits come from the original design. The other addresses and the
telecommand bit layout are this implementation's choices, all in
`trrt_pkg`.

| Address | Direction | Content |
|---|---|---|
| 0x0200 `DRDY_ADDR` | BC → FPGA | data ready: LSB = 1 asks for a Tx update; the FPGA clears it |
| 0x0220 `TC_ADDR` | BC → FPGA | telecommand word |
| 0x0221 `PCW_ADDR` | BC → FPGA | phase control word, bits 11..0 |
| 0x0400 `TX_SA1_W0_ADDR` | FPGA → BC | W0: bits 3..0 digital inputs, bit 4 watchdog occurred, bit 5 watchdog enabled |
| 0x0401..0x0408 | FPGA → BC | W1..W8: analog channels 0..7, 12-bit sample right-aligned |

Telecommand word: bit 0 refresh enable, bit 1 watchdog enable, bit 2 clear
the watchdog-occurred status, bits 5..4 antenna select for switch matrix M,
bits 7..6 antenna select for switch matrix R. All of these reset to 0.

## PROM init table

`init_refresh_seq` walks a table of two-word entries from PROM address 0:

| Word | Bits | Meaning |
|---|---|---|
| first | 15 | NOP: skip the entry |
| first | 14 | 1 read, 0 write |
| first | 13 | 1 1553 RAM, 0 chip register |
| first | 12 | end of initialization (marker, no access) |
| first | 11..0 | target address |
| second | 15..0 | data to write |

Bits 15..12 are the control bits of the original design. The address/data
split is this implementation's. One PROM word is read per microsecond. An
entry takes about 4 us, so a table of 250 entries loads in about
a millisecond. Read entries are carried out and the data is dropped (reading
some chip registers clears their status).

A refresh walks the same table from where the previous refresh stopped. It
carries out only RAM-write entries, stops after two of them, and wraps to
entry 0 at most once at the end marker. A table with no RAM writes therefore
cannot make it loop. A new init request (rising `init_start`) aborts any walk
at the next entry and starts over from entry 0. It is edge-triggered, so the
50 ms watchdog pulse causes one init, not many.

## The shared 1553 bus (`if1553`)

The remote-terminal chip and the FPGA share the address/data bus to the chip's
registers and its RAM. Between FPGA accesses, a chip request (`dev_req`) wins.
It is held (`dev_gnt`) for as long as the request stays high, and the FPGA's
drivers (`bus_oe`) are off meanwhile. An FPGA access is never cut short.
Inside the FPGA the three clients are served in fixed priority: init/refresh,
data ready, telecommand. In practice the scheduler never runs two at once.

An FPGA access is 1 setup cycle, 2 strobe cycles (`STROBE_CYC`) and 1 hold
cycle, followed by 1 cycle of `ack` to the client. Read data is sampled on
the last strobe cycle. The strobes use the 2-bit codes of the original
design: `reg_access` for chip registers and `ram_access` for RAM, with 01 for
idle (the default, read state), 11 for read and 10 for write.

Clients use a request/response pair of packed structs (`ram_req_t`,
`ram_rsp_t`): hold `req` and the fields until `ack`, and drop or change them
on the cycle after. `if1553` asserts this rule, and asserts that the FPGA
never drives the bus during a chip grant.

The bus cycle timing is a placeholder. Match it to the real chip's
datasheet, along with any chip-side arbitration handshake, before using it in
hardware.

## Analog and digital acquisition (`an_dig_acq_seq`)

One counter, `ancnt`, runs through each channel slot. The FSM is that of the
original design: IDLE, SOCGEN, SOCPW, LATCHGEN, NXTCHNL.

| State | Length (26 us ticks) | Action |
|---|---|---|
| SOCGEN | 16 (ancnt 0..15 = `SOCGEN_CNT`) | mux set to the channel, input settles |
| SOCPW | 1 | `soc` high: start of conversion |
| LATCHGEN | 5 (until ancnt = 21 = `LATGEN_CNT`) | wait for the ADC, then latch `adc_data` |
| NXTCHNL (or IDLE after channel 7) | 1 | next channel |

A slot is 23 × 26 us = 598 us and a full sequence 184 ticks = 4.784 ms,
matching the 600 us per channel and 4.8 ms per sequence of the original
design. The two counts are this implementation's reading of those times.
Change them if the ADC needs a different settling or conversion time. The
digital inputs are latched when a sequence starts. Each channel keeps its
own latch until its next conversion, so `drdy_sched` always finds a
complete set.

## Watchdog (`wdt`)

States WDTIDLE, WDTINC and WDTDET. With the watchdog enabled by telecommand,
the count advances on the 8 ms strobe and is cleared by each `drdy_pulse`. At
`WDT_LIMIT` = 22500 (3 minutes) it goes to WDTDET and raises `wdt_pulse` for
50 ms. The pulse sets the sticky `wdt_occ_sts` flag and restarts the PROM
init. After the pulse the FSM returns to WDTIDLE and counts again from 0.
Disabling the watchdog stops the count. The occurred flag is reported in Tx
W0 bit 4 and cleared by telecommand bit 2, by power-on or by the reset
telecommand.

## Clocks and resets

`clkgen` derives every rate from the 24 MHz clock: 1 us, 26 us, 500 us, 1 ms
and 8 ms. The other blocks use these as one-cycle clock enables, so the
design has a single clock domain. The original design ran each block on its
own divided clock. The same rates also come out as square waves (`clk1m`,
`clk26us`, `clk2k`, `clk1ms`, `clk8ms`). `clk12m` (24 MHz / 2) is meant for the
1553 chip.

All resets are synchronous and active high:

* `por` resets everything and starts an init.
* `cmd_rst` (reset telecommand) resets `clkgen` and the watchdog, which share
  the reset `por | cmd_rst`, and restarts the init.
* The watchdog pulse also restarts the init.
* Telecommand outputs (phase control word, antenna selects, enables) keep
  their values through `cmd_rst` and watchdog re-inits.

## Departures and open points

Taken from the original design: the block list, the three FSMs (acquisition,
master scheduler, watchdog) and their named exit conditions, the rates of
every block, the PROM control bits, the access codes, the Tx W0 address and
its status bits, the 1 ms poll, the 8 ms hold, two locations per 40 ms of
refresh, the 3-minute/50 ms watchdog, the 12-bit phase control word and the
two 2-bit antenna selects.

Chosen here, where the original is silent:

* the single clock domain with enables;
* the data-ready, telecommand and phase-word addresses, and the
  telecommand bit layout;
* the analog word layout, 12-bit ADC, 4 digital inputs;
* the two-word PROM entry format below the control bits;
* the shared-bus arbitration policy and cycle timing;
* the acquisition counts;
* which table entries refresh touches;
* the watchdog's exit from WDTDET;
* the reset values of the telecommand outputs (everything off).

Not in this RTL: the 1553 remote-terminal chip itself, its isolation
transformers and transceivers, the PROM, the analog multiplexer and ADC, and
the RF tracking receiver. The testbenches use simple behavioural models of
the chip, its RAM and the PROM (`tb/dev1553_model.sv`, `tb/prom_model.sv`).

## Parameters

| Parameter (top) | Default | Meaning |
|---|---|---|
| `DIV_1US` | 24 | 24 MHz clocks per microsecond |
| `DIV_26US` | 624 | 24 MHz clocks per acquisition tick |
| `WDT_LIMIT` | 22500 | 8 ms ticks before the watchdog fires (3 min) |
| `WDT_PULSE_MS` | 50 | watchdog pulse width |
| `RF_EN` | 40 | scheduler rounds per refresh |
| `HOLD_MS` | 8 | RAM hold after a Tx update |
| `SOCGEN_CNT`, `LATGEN_CNT` | 15, 21 | acquisition slot counts |

`if1553.STROBE_CYC` (2) and `init_refresh_seq.REFRESH_LOCS` (2) are set in
their modules.

## Simulation

Every block has a self-checking testbench in `tb/` that ends by printing
`TB_RESULT checks=N failures=M`. For example, with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_trrt_fpga_top rtl/trrt_pkg.sv tb/tb_trrt_fpga_top.sv
./obj_dir/Vtb_trrt_fpga_top
```

* `tb_trrt_fpga_full` runs the top with every parameter at its default,
  24 MHz real timing, for about 90 ms of simulated time. It covers power-on
  init, a telecommand update, acquisition, a data-ready update and the
  refreshes that follow. It checks:
  * the 1 ms polling;
  * the 4.784 ms acquisition period;
  * Tx data within 1.1 ms of data ready;
  * no FPGA bus traffic during the 8 ms hold;
  * the 40 ms refresh period;
  * repair of an upset RAM word.

  It takes a few seconds.
* `tb_trrt_fpga_top` is the end-to-end test: about 320 ms of simulated time
  with the watchdog shortened to 96 ms. Beyond the above it covers:
  * random chip bus grabs;
  * refresh repairing corrupted RAM;
  * a watchdog event, its re-init and its status bit, and the status-clear
    telecommand;
  * a reset telecommand.

  It counts each of these mechanisms and fails if one never happened.
* Each block has its own testbench:
  * `tb_clkgen`: strobe periods and widths;
  * `tb_wdt`: limit, pulse width, clear, disable;
  * `tb_an_dig_acq_seq`: per-channel samples, 23-tick spacing, 184-tick
    sequence, digital latch timing;
  * `tb_if1553`: random traffic against a reference copy, priority, latency,
    exclusivity;
  * `tb_init_refresh_seq`: table execution, NOP skipping, two-per-refresh
    order and wrap, re-init;
  * `tb_master_rt_sched`: flag order and 40-round refresh;
  * `tb_drdy_sched`: Tx contents, snapshot, clear, hold length;
  * `tb_tc_update`: decoding and hold.

The RTL files carry no `timescale`; the testbenches set 1 ns/1 ps, hence the
`--timescale` option (`-Wno-fatal` keeps testbench width warnings from stopping
the build). Verilator has no X state, so every register that is read is reset, and
the testbenches clear their models' counters after reset.
