# Phase-deterministic TCS clock distribution for NA64 front-end digitizers

In the NA64 data acquisition every front-end digitizer has to sample with a
clock whose phase is fixed with respect to the experiment's central Trigger
and Control System (TCS). The phase must survive resets of either end and a
fiber being unplugged and plugged back in. Here the front-end is the
Waveboard, a 12-channel FADC board. The TCS clock and commands reach it
through a DHMux concentrator, over a 3.1104 Gb/s 8b/10b optical link that uses
the UCF (Unified Communication Framework) protocol. On the Waveboard, an
external jitter-cleaning PLL (SI5345) turns that clock into the FADC clock.

The usual transceiver setup recovers only the *frequency* of such a link. Its
phase after a relock is arbitrary. This design gets a deterministic phase in
two steps:

1. **Word alignment by clock slipping.** The receiver never shifts data in
   logic. It pulses the transceiver's RXSLIDE input until the comma
   character lands at bit 0 of the received word. Each pulse moves the
   recovered parallel clock by one bit period (321.5 ps). Only one of the 20
   positions is accepted, so after every relock the recovered 155.52 MHz
   clock has the same phase relative to the transmitter, to within one bit.
2. **TCS clock phase by SYNC.** The recovered clock is divided by 4 to make
   the 38.88 MHz TCS clock. Divide-by-4 has four possible phases. The DHMux
   sends the TCS SYNC command in a packet at a fixed place in the TCS period,
   and the Waveboard uses the received SYNC to clear the divider. The TCS
   clock, and with it the PLL reference and the FADC clock, ends up with one
   fixed phase.

The TCS RESET command, carried the same way, clears every front-end's
trigger counter and timer at the same moment. After it, all boards number
triggers and time alike.

## Clocks

| clock | frequency | where it comes from |
|---|---|---|
| line bit rate | 3.1104 Gb/s | 155.52 MHz × 20 bits (two 8b/10b symbols per word) |
| link word clock `tx_clk` / `rx_clk` | 155.52 MHz | DHMux: recovered from the TCS; Waveboard: recovered by the transceiver's CDR |
| TCS clock `tx_tcs_clk` / `tcs_clk` | 38.88 MHz | word clock / 4 |
| FADC clock | 233.28 MHz | external PLL, 38.88 MHz × 6, reference = `tcs_clk` |

## Structure

```
na64_sync_top                       N_SLAVES = 15 Waveboards on one DHMux
├── dhmux_ucf_tx                    DHMux, tx_clk domain, broadcast to all ports
│   ├── ucf_tcs_tx                  TCS commands -> UCF words, fixed schedule
│   └── enc8b10b                    2 bytes -> 20-bit line word
└── wb_ucf_rx  (one per Waveboard)  rx_clk[i] domain
    ├── rxslide_aligner             RXSLIDE control, comma at bit 0
    ├── dec8b10b                    20-bit line word -> 2 bytes + flags
    ├── ucf_tcs_rx                  UCF words -> SYNC / RESET / trigger pulses
    ├── tcs_clk_div                 /4 with SYNC phase clear -> tcs_clk
    └── tcs_timer                   trigger counter and timer, cleared by RESET
ucf_pkg                             constants, tcs_cmd_t, 8b/10b code tables
```

The transceivers (serializer, CDR, RXSLIDE logic) and the PLL are not in the
RTL. Their signals are top-level ports: `tx_sym` goes to the DHMux
serializers; `rx_clk[i]`, `rx_sym[i]` and `rxslide[i]` connect to board i's
receiver; `tcs_clk[i]` goes to board i's PLL reference input. The DHMux sends
the same command word to every port, so one framer and one encoder feed all
slave serializers.

## The link as built here

UCF carries up to 64 streams per link, one of them reserved for the TCS. Its
packet format is not reproduced here. This design uses a minimal framing of
its own that keeps the TCS stream at fixed latency. A word is 16 bits: byte 0
is sent first, and bit 0 of each 10-bit symbol (code bit *a*) goes first on
the line.

| TCS period word | content | purpose |
|---|---|---|
| phase 0 | `{D21.5, K28.5}` | comma in every TCS period, for alignment |
| phase 1 | `{stream, K28.2}` if a command is pending, else idle | packet start, TCS stream = 0 |
| phase 2 | `{~flags, flags}` if a packet started, else idle | flags = `{trigger, reset, sync}` |
| phase 3 | `{D21.5, K28.5}` | idle |

Commands that arrive during one TCS period are merged into one packet. A
command reaches the output between 2 and 5 clocks after `cmd_valid`.
`tx_tcs_clk` rises with the phase-0 word on `tx_sym`. The DHMux's TCS clock
is therefore defined by this word counter: a DHMux reset changes its phase,
and every Waveboard follows at the next SYNC.

Only K28.y control characters are generated or recognised. The 8b/10b code is
the standard one. The encoder and decoder share the 5b/6b and 3b/4b tables in
`ucf_pkg`. The decoder finds each sub-block by searching those tables at both
running disparities. It flags `code_err` for a sub-block found in no table,
and `disp_err` for one that is valid only at the other disparity. For K28.y,
the 6-bit part settles the disparity; without that, K28.1/K28.6 and
K28.2/K28.5 would be confused.

## Word alignment (`rxslide_aligner`)

The aligner looks at bits [9:0] of the raw 20-bit word only, and compares
them with the two forms of K28.5 (0x17C, 0x283 in line order). It works in
windows of `WINDOW` = 8 words. Commas come every 4 words, so a window always
holds one when the link is aligned.

* **SEARCH:** if a window has no comma at bit 0, give one `rxslide` pulse.
  Then wait `SLIDE_WAIT` = 32 clocks for the transceiver to settle, and look
  again. After `LOCK_WINDOWS` = 4 windows in a row with a comma, raise
  `aligned`.
* **LOCKED:** after `LOSS_WINDOWS` = 3 windows in a row without a comma, drop
  `aligned`, pulse `relock` and search again.

In valid 8b/10b data a comma can only appear at a symbol boundary. Of the 20
slip positions, only the one with the comma in byte 0 is accepted. From any
start, alignment therefore takes exactly `(20 − offset) mod 20` slides,
at most 19 × (8 + 1 + 32) clocks. It always ends with the same edge of the
recovered clock against the line. Pulse spacing, window and lock counts are
this design's own choices. The 32-clock spacing follows the usual rule for
Xilinx GTX RXSLIDE.

## TCS clock phase recovery (`tcs_clk_div`)

This block is a 2-bit counter on the recovered clock, with `tcs_clk = cnt[1]`.
In the FPGA this is the BUFR divide-by-4, whose asynchronous CLR is driven by
the recreated SYNC. `clr` is a register, so the asynchronous clear is glitch
free. The timing, counted in recovered-clock edges:

```
edge              a        a+1      a+2      a+3      a+4
sync              1 (set at a)
clr (out of phase)         1        0
cnt (out of phase)  x      0        0        1        2   -> tcs_clk rises at a+4
cnt (in phase)    2        3        0        1        2   -> same edge, no clear
```

An asynchronous clear that spans a clock edge stalls the counter for one
cycle. Clearing on every periodic SYNC would therefore stretch one TCS period
each time, even when the phase is already right. To avoid that, this design
clears the divider only when SYNC finds it out of phase (`cnt != 2` at the
edge that registers SYNC). It reports each correction on `readjust`. A
divider already in phase runs on untouched, so the PLL reference has no
periodic glitch. `tcs_ce`, high in the cycle before each `tcs_clk` rise, lets
logic in the recovered-clock domain count TCS periods without using
`tcs_clk` as a clock.

Latency from the payload word to the SYNC pulse is fixed (`ucf_tcs_rx`
registers it once). The alignment is fixed too. The edge of `tcs_clk`
therefore sits at a fixed delay from the DHMux TCS clock, set only by the
fiber length and constant pipelines.

## Commands, trigger counter and timer

`ucf_tcs_rx` accepts a TCS packet only while `aligned`. It also requires no
decode error in either word, a data (not control) payload word, and the
payload to be the complement pair. Anything else is dropped and raises
`pkt_err`. Packets of other stream numbers are ignored.

`tcs_timer` counts TCS periods (`timer`, 32 bits) and triggers (`trig_cnt`,
24 bits). For each trigger, `trig_valid` presents the trigger's number and
time stamp. RESET clears both counters. A trigger that arrives in the same
clock as RESET becomes number 0 at time 0. The widths are this design's own
choice.

## What is not here

* Transceivers, the PLL and the ADCs are vendor parts. The testbenches model
  the transceivers and the PLL (`tb/gtx_link_model.sv`, `tb/si5345_model.sv`).
* The DHMux TCS receiver (COMPASS TCS decoding) is not here; commands enter at
  `cmd_valid`/`cmd`.
* The DHMux event building from up to 15 slaves, the S-Link and IPBus/Ethernet
  interfaces, the UCF data and slow-control streams and the FADC data interface
  are not built: no formats are available for them.
* The Waveboard analog front-end (programmable-gain amplifier, differential
  driver, filter) and its SiPM bias supplies (25–75 V per channel) are analog.
* The real UCF packet layout is not reproduced (see the framing above). A
  Waveboard built from this RTL talks to a DHMux built from this RTL, not to
  existing UCF equipment.

## Synthesis notes

* `tcs_clk_div` makes a clock from a register and uses a register as an
  asynchronous clear. That is intended: on a Xilinx FPGA, map it to a BUFR in
  divide-by-4 mode with CLR, as the scheme requires, and constrain `tcs_clk`
  as a generated clock.
* In `ucf_tcs_tx`, bit 1 of `tx_charisk` is always 0, because byte 1 never
  carries a control character.
* The decoder's table search unrolls into about 1500 word-level cells per
  20-bit word. It fits easily at 155.52 MHz in a Kintex-7, but it is the
  largest block.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_enc8b10b` | known code groups from the 8b/10b standard; on 8000 random symbols: disparity 0/±2, running sum bounded, runs ≤ 5 bits, codes unique per disparity |
| `tb_dec8b10b` | known codes; 3000 random words round-trip through the encoder; 150 injected single-bit errors all flagged |
| `tb_ucf_tcs_tx` | every output word against a reference model of the schedule; merging; latency ≤ 5 clocks |
| `tb_ucf_tcs_rx` | valid, foreign-stream, corrupted and erroneous packets; pulse timing |
| `tb_tcs_clk_div` | period, duty cycle, `tcs_ce`, rise 4 edges after SYNC, no readjust for an in-phase SYNC |
| `tb_tcs_timer` | every output against a reference counter, with RESETs and triggers |
| `tb_rxslide_aligner` | 40 random start offsets: exact slide count, pulse spacing ≥ 32, loss and relock |
| `tb_dhmux_ucf_tx` | line decoded: no errors, comma at each `tx_tcs_clk` rise, every command delivered |
| `tb_wb_ucf_rx` | word-level link with random bit offsets and resets: all commands received, trigger counter and timer cleared by RESET, same TCS clock phase after every realignment |
| `tb_na64_sync_top` | full top at default parameters, 15 Waveboards on bit-level links of different fiber lengths, 8 trials of Waveboard resets, DHMux reset and CDR relocks: each board's TCS and FADC clock edge lands at the same picosecond delay from the DHMux TCS clock in every trial; periods, trigger counts and all mechanisms (slides, relocks, readjusts, SYNC, RESET, triggers, PLL lock) exercised |

The end-to-end result reproduces the behaviour the scheme is meant to give.
Two boards whose fibers differ by 15 bits show the same FADC clock phase
difference (535 ps) in all trials.

To run a testbench with Verilator 5 (timescale 1 ns / 1 ps, as the
testbenches assume):

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb \
  --top-module tb_na64_sync_top rtl/ucf_pkg.sv rtl/*.sv \
  tb/gtx_link_model.sv tb/si5345_model.sv tb/tb_na64_sync_top.sv
./obj_dir/Vtb_na64_sync_top
```

For a block testbench, list `rtl/ucf_pkg.sv`, the block's files and its
testbench. `tb_dhmux_ucf_tx` also needs `dec8b10b.sv`, and `tb_dec8b10b`
needs `enc8b10b.sv`. The full top testbench runs in about 10 seconds.

## Trust and departures

* The source of this scheme does not give the RTL. The clocking scheme
  follows it: 20-bit words at 3.1104 Gb/s, slip-based alignment with one-bit
  resolution, divide-by-4 with SYNC clear, RESET of counters and timers, a
  ×6 FADC PLL, and 15 slaves per DHMux. The framing, the aligner's
  windowing, the readjust gating of the divider and all counter widths are
  this design's own.
* The readjust gating departs from a plain "clear on every SYNC". With a
  plain clear, the TCS clock would stretch by one 155.52 MHz cycle at each
  SYNC. The phase after SYNC is the same in both cases.
* The transceiver model shifts its recovered clock by exactly one bit per
  RXSLIDE pulse, as the scheme relies on. A real GTX in PMA slip mode must be
  configured so that it behaves like this.
